// zasua_rom_tb -- self-checking test of the 17-bit program memory at its
// full 8K-word size: loads words through the load port and reads them back
// one clock after the address is presented.
module zasua_rom_tb;
  logic clk = 0, load_we;
  logic [12:0] raddr, load_addr;
  logic [16:0] rdata, load_data;
  logic [16:0] model [8192];
  int checks = 0, failures = 0;

  zasua_rom dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    raddr = 0;
    for (int i = 0; i < 8192; i++) begin
      load_we = 1; load_addr = 13'(i); load_data = 17'($urandom); model[i] = load_data;
      @(posedge clk); #1;
    end
    load_we = 0;
    for (int i = 0; i < 3000; i++) begin
      raddr = (i < 2) ? 13'(8191 * i) : 13'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++; $display("FAIL addr=%h got %h want %h", raddr, rdata, model[raddr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
