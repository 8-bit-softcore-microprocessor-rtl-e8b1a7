// zasua_pc_tb -- self-checking test of the 13-bit program counter: reset to
// 0, hold, increment with wrap, absolute load, relative add, stack load and
// interrupt vector, each against a model.
module zasua_pc_tb;
  import zasua_pkg::*;
  logic clk = 0, rst;
  pc_sel_e sel;
  logic [12:0] abs_addr, stack_top, pc, m;
  logic [7:0] rel_off;
  int checks = 0, failures = 0;

  zasua_pc #(.INT_VECTOR(13'h0abc)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; sel = PC_HOLD; abs_addr = 0; rel_off = 0; stack_top = 0;
    @(posedge clk); #1; rst = 0; m = 0;
    checks++; if (pc !== 0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 1000; i++) begin
      sel = pc_sel_e'($urandom_range(0, 5));
      abs_addr = 13'($urandom); rel_off = 8'($urandom); stack_top = 13'($urandom);
      if (i == 10) begin sel = PC_ABS; abs_addr = 13'h1fff; end
      if (i == 11) sel = PC_INC;      // wraps to 0
      case (sel)
        PC_INC:  m = 13'((int'(m) + 1) % 8192);
        PC_ABS:  m = abs_addr;
        PC_REL:  m = 13'((int'(m) + int'(rel_off)) % 8192);
        PC_POP:  m = stack_top;
        PC_VEC:  m = 13'h0abc;
        default: ;
      endcase
      @(posedge clk); #1;
      checks++;
      if (pc !== m) begin failures++; $display("FAIL sel=%s got %h want %h", sel.name(), pc, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
