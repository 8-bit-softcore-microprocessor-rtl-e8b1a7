// zasua_control_tb -- self-checking test of the ZA-SUA control unit.
// Drives the instruction register input directly and checks: the state
// sequence and its lengths (reset 2 clocks, instruction 4, interrupt entry
// 3); the controls issued in INSTRUCTIONS for every instruction class; flag
// updates; conditional jumps taken and not taken; EINT/DINT; and interrupt
// entry with the CARRY saved and restored by RETI.
module zasua_control_tb;
  import zasua_pkg::*;

  logic clk = 0, rst;
  logic [16:0] ir;
  logic int_req, alu_z, alu_c, alu_c_we;
  state_e state;
  logic ir_load, stack_push, stack_pop, acc_we, mux2_in, ram_we, port_rd, port_wr, int_ack;
  pc_sel_e pc_sel;
  alu_op_e alu_op;
  logic flag_z, flag_c, ie;
  int checks = 0, failures = 0;

  zasua_control dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (state=%s)", what, state.name()); end
  endtask

  function automatic logic [16:0] gen(input logic [4:0] op, input logic [7:0] g,
                                      input logic [1:0] m, input logic s, input logic d);
    return {op, g, m, s, d};
  endfunction

  // Runs one instruction from WAIT; checks the 4-state sequence and the
  // INSTRUCTIONS-state controls {pc_sel, push, pop, acc_we, mux2_in, ram_we, rd, wr}.
  task automatic exec(input logic [16:0] instr, input pc_sel_e e_pc,
                      input logic [6:0] e_ctl, input alu_op_e e_op, input string nm);
    chk(state == ST_WAIT, {nm, ": starts in WAIT"});
    @(posedge clk); #1;
    chk(state == ST_SEARCH && ir_load && pc_sel == PC_INC, {nm, ": SEARCH loads IR, PC+1"});
    ir = instr;
    @(posedge clk); #1;
    chk(state == ST_DECODE && !acc_we && !ram_we && !port_wr, {nm, ": DECODE idle"});
    @(posedge clk); #1;
    chk(state == ST_INSTR, {nm, ": INSTRUCTIONS"});
    chk(pc_sel == e_pc, {nm, ": pc_sel"});
    chk({stack_push, stack_pop, acc_we, mux2_in, ram_we, port_rd, port_wr} == e_ctl, {nm, ": controls"});
    if (acc_we) chk(alu_op == e_op, {nm, ": alu op"});
    @(posedge clk); #1;
  endtask

  initial begin
    rst = 1; ir = 0; int_req = 0; alu_z = 0; alu_c = 0; alu_c_we = 1;
    @(posedge clk); #1;
    chk(state == ST_RESET && !flag_z && !flag_c && !ie, "reset state and flags");
    rst = 0;
    @(posedge clk); #1;
    chk(state == ST_WAIT, "RESET -> WAIT (reset is 2 clocks)");

    // ALU: ADD, result flags Z=1 C=1
    alu_z = 1; alu_c = 1;
    exec(gen(5'b00000, 8'h12, 2'b01, 0, 1), PC_HOLD, 7'b0010000, ALU_ADD, "ADD");
    chk(flag_z && flag_c, "ADD sets Z and C");
    // SHL: C not written (c_we=0)
    alu_z = 0; alu_c = 0; alu_c_we = 0;
    exec(gen(5'b00110, 8'h00, 2'b00, 1, 0), PC_HOLD, 7'b0010000, ALU_SHL, "SHL");
    chk(!flag_z && flag_c, "SHL updates Z only");
    alu_c_we = 1;
    // jumps
    exec({4'b1000, 13'h0123}, PC_HOLD, 7'b0, ALU_LOAD, "JIFZ not taken");
    exec({4'b1001, 13'h0123}, PC_ABS,  7'b0, ALU_LOAD, "JIFC taken");
    exec({4'b1010, 13'h1fff}, PC_ABS,  7'b0, ALU_LOAD, "JUMP");
    exec({4'b1011, 13'h0042}, PC_ABS,  7'b1000000, ALU_LOAD, "CALL");
    alu_z = 1; alu_c = 0;
    exec(gen(5'b01010, 8'h00, 2'b01, 0, 0), PC_HOLD, 7'b0010000, ALU_AND, "AND");
    exec({4'b1000, 13'h0123}, PC_ABS,  7'b0, ALU_LOAD, "JIFZ taken");
    exec({4'b1001, 13'h0123}, PC_HOLD, 7'b0, ALU_LOAD, "JIFC not taken");
    // non-ALU
    exec(gen(5'b11000, 8'h10, 2'b10, 1, 0), PC_HOLD, 7'b0000100, ALU_LOAD, "STORE");
    exec(gen(5'b11001, 8'h00, 2'b00, 0, 0), PC_POP,  7'b0100000, ALU_LOAD, "RETURN");
    exec(gen(5'b11001, 8'h77, 2'b01, 0, 1), PC_POP,  7'b0110000, ALU_LOAD, "RETURN imm");
    exec(gen(5'b11010, 8'h05, 2'b00, 0, 1), PC_HOLD, 7'b0011010, ALU_LOAD, "INPUT");
    exec(gen(5'b11011, 8'h05, 2'b00, 1, 0), PC_HOLD, 7'b0000001, ALU_LOAD, "OUTPUT");
    exec(gen(5'b11111, 8'h00, 2'b00, 0, 0), PC_REL,  7'b0, ALU_LOAD, "JUMPR");

    // interrupts are ignored while disabled
    int_req = 1;
    exec(gen(5'b11101, 8'h00, 2'b00, 0, 0), PC_HOLD, 7'b0, ALU_LOAD, "DINT");
    chk(!ie, "DINT clears enable");
    @(posedge clk); #1;  // WAIT -> SEARCH, no interrupt
    chk(state == ST_SEARCH, "disabled interrupt not taken");
    int_req = 0;
    @(posedge clk); #1; @(posedge clk); #1; @(posedge clk); #1;
    // set C=1, then EINT
    alu_c = 1; alu_z = 0;
    exec(gen(5'b00000, 8'h00, 2'b01, 0, 0), PC_HOLD, 7'b0010000, ALU_ADD, "ADD C=1");
    exec(gen(5'b11100, 8'h00, 2'b00, 0, 0), PC_HOLD, 7'b0, ALU_LOAD, "EINT");
    chk(ie, "EINT sets enable");
    int_req = 1;
    chk(state == ST_WAIT, "WAIT before INT");
    @(posedge clk); #1;
    chk(state == ST_INT && stack_push && int_ack, "INT pushes PC, acks");
    int_req = 0;
    @(posedge clk); #1;
    chk(state == ST_JUMP_INT && pc_sel == PC_VEC && !ie, "JUMP INT loads vector, disables");
    @(posedge clk); #1;
    chk(state == ST_WAIT, "interrupt entry is 3 clocks");
    // ISR clears C, then RETI restores it
    alu_c = 0;
    exec(gen(5'b00000, 8'h00, 2'b01, 0, 0), PC_HOLD, 7'b0010000, ALU_ADD, "ISR ADD C=0");
    chk(!flag_c, "ISR cleared C");
    exec(gen(5'b11110, 8'h00, 2'b00, 0, 0), PC_POP, 7'b0100000, ALU_LOAD, "RETI");
    chk(flag_c && ie, "RETI restores C and re-enables");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
