// zasua_ir_tb -- self-checking test of the instruction register: loads only
// when load=1, holds otherwise, and splits the word into opcode [16:12],
// general [11:4], addressing [3:2], source [1] and destination [0].
module zasua_ir_tb;
  import zasua_pkg::*;
  logic clk = 0, rst, load;
  logic [16:0] din, q, m;
  instr_t fields;
  int checks = 0, failures = 0;

  zasua_ir dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; load = 0; din = 0;
    @(posedge clk); #1; rst = 0; m = 0;
    checks++; if (q !== 0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 500; i++) begin
      load = 1'($urandom); din = 17'($urandom);
      @(posedge clk); #1;
      if (load) m = din;
      checks++;
      if (q !== m || fields.opcode !== m[16:12] || fields.general !== m[11:4] ||
          fields.mode !== m[3:2] || fields.src !== m[1] || fields.dst !== m[0]) begin
        failures++; $display("FAIL q=%h want %h", q, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
