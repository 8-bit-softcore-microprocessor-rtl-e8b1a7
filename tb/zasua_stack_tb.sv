// zasua_stack_tb -- self-checking test of the 8 x 13 return stack: random
// pushes and pops against a model; filling all eight entries, unwinding
// them in LIFO order, and the wrap of the stack address counter.
module zasua_stack_tb;
  logic clk = 0, rst, push, pop;
  logic [12:0] din, top;
  logic [2:0] sp;
  logic [12:0] model [8];
  int msp = 0;
  int checks = 0, failures = 0;

  zasua_stack dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic step(input logic pu, input logic po, input logic [12:0] d);
    push = pu; pop = po; din = d;
    @(posedge clk); #1;
    if (pu) begin model[msp] = d; msp = (msp + 1) % 8; end
    else if (po) msp = (msp + 7) % 8;
    push = 0; pop = 0;
    checks++;
    if (sp !== 3'(msp) || top !== model[(msp + 7) % 8]) begin
      failures++; $display("FAIL sp=%0d top=%h want sp=%0d top=%h", sp, top, msp, model[(msp+7)%8]);
    end
  endtask

  initial begin
    rst = 1; push = 0; pop = 0; din = 0;
    @(posedge clk); #1; rst = 0;
    checks++; if (sp !== 0) begin failures++; $display("FAIL reset sp"); end
    for (int i = 0; i < 8; i++) step(1, 0, 13'(100 + i));
    for (int i = 7; i >= 0; i--) begin
      checks++;
      if (top !== 13'(100 + i)) begin failures++; $display("FAIL lifo %0d got %h", i, top); end
      step(0, 1, 0);
    end
    for (int i = 0; i < 500; i++) begin
      logic pu;
      pu = 1'($urandom);
      step(pu, ~pu & 1'($urandom), 13'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
