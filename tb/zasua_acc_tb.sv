// zasua_acc_tb -- self-checking test of the A/B accumulator pair: reset
// clears both, a write changes only the register named by dst, we=0 holds.
module zasua_acc_tb;
  logic clk = 0, rst, we, dst;
  logic [7:0] din, a, b, ma, mb;
  int checks = 0, failures = 0;

  zasua_acc dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; we = 0; dst = 0; din = 0;
    @(posedge clk); #1;
    checks++; if (a !== 0 || b !== 0) begin failures++; $display("FAIL reset"); end
    rst = 0; ma = 0; mb = 0;
    for (int i = 0; i < 300; i++) begin
      we = 1'($urandom); dst = 1'($urandom); din = 8'($urandom);
      @(posedge clk); #1;
      if (we) begin if (dst) mb = din; else ma = din; end
      checks++;
      if (a !== ma || b !== mb) begin
        failures++; $display("FAIL a=%h b=%h want %h %h", a, b, ma, mb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
