// zasua_ram_tb -- self-checking test of the 256 x 8 data RAM: random writes
// and reads against an array model, with the one-clock read latency and
// read-before-write on the same address.
module zasua_ram_tb;
  logic clk = 0, we;
  logic [7:0] addr, wdata, rdata;
  logic [7:0] model [256];
  logic [7:0] expect_q;
  int checks = 0, failures = 0;

  zasua_ram dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // fill every word first
    for (int i = 0; i < 256; i++) begin
      we = 1; addr = 8'(i); wdata = 8'($urandom); model[i] = wdata;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 2000; i++) begin
      we = 1'($urandom); addr = 8'($urandom); wdata = 8'($urandom);
      expect_q = model[addr];
      @(posedge clk); #1;
      if (we) model[addr] = wdata;
      checks++;
      if (rdata !== expect_q) begin
        failures++; $display("FAIL addr=%h got %h want %h", addr, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
