// zasua_tb -- end-to-end test of the ZA-SUA processor at its default size
// (8K-word program memory, 256-byte RAM).
//
// A program is assembled here and written through the load port while reset
// is held. It walks through all 28 instructions, the four addressing modes,
// taken and untaken conditional jumps, nested CALLs, a JUMPR table lookup
// that returns a constant with RETURN #k, port input and output (direct and
// indirect), an interrupt that arrives while interrupts are disabled, is
// taken after EINT and returns with RETI restoring the CARRY, and a block of
// random ALU and STORE instructions.
//
// An instruction-set model in this testbench executes the same program. Each
// time the processor finishes an instruction (INSTRUCTIONS -> WAIT) or an
// interrupt entry (JUMP INT -> WAIT), the model takes the same step and A, B,
// ZERO, CARRY, the interrupt enable, PC and the stack pointer are compared;
// each port write is compared with the model's. Cycle counts are checked:
// 2 clocks from reset to the first fetch, 4 per instruction, 3 per interrupt
// entry. Every mechanism must be seen at least once.
module zasua_tb;
  import zasua_pkg::*;
  import zasua_iss_pkg::*;

  localparam logic [12:0] VEC = 13'h0001;

  logic        clk = 0, rst;
  logic [7:0]  port_in, port_out, port_addr;
  logic        port_rd, port_wr, int_req, int_ack;
  logic        load_we;
  logic [12:0] load_addr;
  logic [16:0] load_data;

  zasua dut (.*);
  always #5 clk = ~clk;

  // input-port device: a fixed function of the port address
  assign port_in = port_device(port_addr);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- assembler
  logic [16:0] prog [8192];
  int          pa;  // assembly address

  function automatic logic [16:0] I(input logic [4:0] op, input logic [7:0] g,
                                    input logic [1:0] m, input logic s, input logic d);
    return {op, g, m, s, d};
  endfunction
  task automatic emit(input logic [16:0] w); prog[pa] = w; pa++; endtask
  task automatic emit_j(input logic [3:0] op4, input int target);
    prog[pa] = {op4, 13'(target)}; pa++;
  endtask

  localparam logic [1:0] DIR = 2'b00, IMM = 2'b01, INDA = 2'b10, INDB = 2'b11;
  localparam logic A = 1'b0, B = 1'b1;

  // ------------------------------------------------------ instruction-set model
  zasua_iss iss = new(8192, VEC);
  int       n_int_blocked;

  task automatic compare(input string when);
    chk(dut.u_acc.a == iss.a && dut.u_acc.b == iss.b && dut.u_ctrl.flag_z == iss.z &&
        dut.u_ctrl.flag_c == iss.c && dut.u_ctrl.ie == iss.ie && dut.u_pc.pc == iss.pc &&
        dut.u_stack.sp == iss.sp, when);
    if (failures > 0 && failures < 5)
      $display("  dut: A=%h B=%h Z=%b C=%b IE=%b PC=%h SP=%0d | model: A=%h B=%h Z=%b C=%b IE=%b PC=%h SP=%0d",
               dut.u_acc.a, dut.u_acc.b, dut.u_ctrl.flag_z, dut.u_ctrl.flag_c, dut.u_ctrl.ie,
               dut.u_pc.pc, dut.u_stack.sp, iss.a, iss.b, iss.z, iss.c, iss.ie, iss.pc, iss.sp);
  endtask

  // ------------------------------------------------------------------ program
  localparam int MAIN = 16, SUB1 = 200, SUB2 = 210, HALT = 300;

  task automatic assemble();
    for (int i = 0; i < 8192; i++) prog[i] = {4'b1010, 13'(HALT)};  // JUMP HALT
    pa = 0;
    emit_j(OP4_JUMP, MAIN);
    // interrupt service routine at the vector
    pa = int'(VEC);
    emit(I(OP_STORE, 8'hF0, DIR, A, 0));       // save A
    emit(I(5'b00000, 8'h00, IMM, A, A));       // ADD A,#0 -> CARRY = 0
    emit(I(OP_OUTPUT, 8'h80, DIR, B, 0));      // port 0x80 <- B
    emit(I(5'b01110, 8'hF0, DIR, A, A));       // LOAD A,[F0]
    emit(I(OP_RETI, 8'h00, DIR, 0, 0));
    // main
    pa = MAIN;
    emit(I(OP_DINT, 0, DIR, 0, 0));
    emit(I(5'b01110, 8'h10, IMM, 0, A));       // LOAD A,#10
    emit(I(5'b01110, 8'h20, IMM, 0, B));       // LOAD B,#20
    emit(I(OP_STORE, 8'h30, DIR, A, 0));       // [30] <- A
    emit(I(OP_STORE, 8'h00, INDA, B, 0));      // [A] <- B
    emit(I(OP_STORE, 8'h00, INDB, A, 0));      // [B] <- A
    emit(I(5'b00000, 8'h30, DIR, A, A));       // ADD A,[30]
    emit(I(5'b00000, 8'h00, INDA, B, B));      // ADD B,[A]
    emit(I(5'b01111, 8'h00, DIR, B, A));       // MOVE A <- B
    emit(I(5'b00001, 8'h00, INDB, A, A));      // ADDC A,[B]
    // every ALU operation once, each with a different addressing mode
    for (int o = 0; o < 16; o++)
      emit(I(5'(o), 8'(o * 16 + 3), 2'(o), 1'(o >> 1), 1'(o >> 2)));
    // random block
    for (int i = 0; i < 120; i++) begin
      if ($urandom_range(0, 4) == 0)
        emit(I(OP_STORE, 8'($urandom), 2'($urandom), 1'($urandom), 0));
      else
        emit(I(5'($urandom_range(0, 15)), 8'($urandom), 2'($urandom), 1'($urandom), 1'($urandom)));
    end
    // conditional jumps: Z=1, C=0
    emit(I(5'b01110, 8'h05, IMM, 0, A));       // LOAD A,#5
    emit(I(5'b00010, 8'h05, IMM, A, A));       // SUB A,#5 -> Z=1 C=0
    emit_j(OP4_JIFC, 0);                       // not taken
    emit_j(OP4_JIFZ, pa + 2);                  // taken, skips next
    emit(I(5'b01110, 8'hEE, IMM, 0, A));       // skipped
    emit(I(5'b00010, 8'h06, IMM, A, A));       // SUB A,#6 -> A=FF, Z=0 C=1
    emit_j(OP4_JIFZ, 0);                       // not taken
    emit_j(OP4_JIFC, pa + 2);                  // taken
    emit(I(5'b01110, 8'hEE, IMM, 0, B));       // skipped
    // nested call with a table lookup
    emit(I(5'b01110, 8'h02, IMM, 0, B));       // LOAD B,#2 (table index)
    emit_j(OP4_CALL, SUB1);
    emit(I(OP_OUTPUT, 8'h41, DIR, A, 0));      // port 41 <- A (looked-up value)
    // ports
    emit(I(OP_INPUT, 8'h33, DIR, 0, A));       // A <- port 33
    emit(I(OP_OUTPUT, 8'h44, DIR, A, 0));      // port 44 <- A
    emit(I(5'b01110, 8'h55, IMM, 0, A));       // LOAD A,#55
    emit(I(OP_INPUT, 8'h00, INDA, 0, B));      // B <- port [A]
    emit(I(OP_OUTPUT, 8'h00, INDA, B, 0));     // port [A] <- B
    emit(I(OP_OUTPUT, 8'h00, INDB, A, 0));     // port [B] <- A
    // interrupt: requested while disabled, then enabled
    emit(I(5'b01110, 8'hFF, IMM, 0, A));       // LOAD A,#FF
    emit(I(5'b00100, 8'h00, DIR, A, A));       // INC A -> 0, C=1, Z=1
    emit(I(5'b01011, 8'h00, IMM, A, B));       // OR B <- A | 0 (int_req raised here)
    emit(I(5'b01110, 8'h07, IMM, 0, B));       // LOAD B,#7
    emit(I(OP_EINT, 0, DIR, 0, 0));            // interrupt taken after this
    emit(I(5'b00100, 8'h00, DIR, B, B));       // INC B
    emit(I(OP_OUTPUT, 8'h90, DIR, B, 0));
    emit_j(OP4_JUMP, HALT);
    // SUB1: calls SUB2, returns
    pa = SUB1;
    emit(I(5'b00100, 8'h00, DIR, B, B));       // INC B -> index 3
    emit_j(OP4_CALL, SUB2);
    emit(I(OP_RETURN, 8'h00, DIR, 0, 0));
    // SUB2: table lookup, A <- table[B]
    pa = SUB2;
    emit(I(OP_JUMPR, 8'h00, DIR, B, 0));       // PC <- PC + B
    for (int k = 0; k < 6; k++)
      emit(I(OP_RETURN, 8'(8'hA0 + k), IMM, 0, A));
    pa = HALT;
    emit_j(OP4_JUMP, HALT);
  endtask

  // ------------------------------------------------------------------ checking
  state_e prev;
  int     cyc, last_retire, retired, n_wait_first;
  logic   cap_wr;
  logic [7:0] cap_addr, cap_data;
  bit     done;

  initial begin
    #5_000_000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // interrupt request: raised by the third-to-last block of main, dropped
  // on acknowledge
  always @(posedge clk) begin
    if (rst) int_req <= 1'b0;
    else if (int_ack) int_req <= 1'b0;
    else if (dut.u_ctrl.state == ST_INSTR && dut.u_ir.q == I(5'b01011, 8'h00, IMM, A, B))
      int_req <= 1'b1;
  end

  always @(posedge clk) begin
    #1;
    cyc++;
    if (!rst && !done) begin
      if (prev == ST_INSTR) begin
        // one instruction retired
        if (retired > 0) chk(cyc - last_retire == 4, "instruction takes 4 clocks");
        iss.step();
        compare($sformatf("state after instruction %0d at %h", retired, dut.u_ir.q));
        chk(cap_wr == iss.exp_wr, "port write strobe");
        if (iss.exp_wr)
          chk(cap_addr == iss.exp_paddr && cap_data == iss.exp_pdata, "port write address/data");
        retired++;
        last_retire = cyc;
        cap_wr = 1'b0;
      end
      if (prev == ST_JUMP_INT) begin
        chk(cyc - last_retire == 3, "interrupt entry takes 3 clocks");
        iss.interrupt();
        compare("state after interrupt entry");
        last_retire = cyc;
      end
      if (prev == ST_WAIT && dut.u_ctrl.state == ST_SEARCH && int_req) begin
        chk(!iss.ie, "pending interrupt not taken only when disabled");
        n_int_blocked++;
      end
      if (dut.u_ctrl.state == ST_INSTR && port_wr) begin
        cap_wr = 1'b1; cap_addr = port_addr; cap_data = port_out;
      end
      if (dut.u_ctrl.state == ST_INSTR && port_rd)
        chk(port_in == port_device(port_addr), "port read");
    end
    prev = dut.u_ctrl.state;
  end

  initial begin
    assemble();
    rst = 1; load_we = 0; load_addr = 0; load_data = 0; done = 0; cap_wr = 0;
    for (int i = 0; i < 8192; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 13'(i); load_data = prog[i];
    end
    @(negedge clk); load_we = 0;
    // model reset state
    iss.reset();
    for (int i = 0; i < 8192; i++) iss.rom[i] = prog[i];
    for (int i = 0; i < 256; i++) iss.ram[i] = dut.u_ram.mem[i];  // RAM is not reset
    @(negedge clk); rst = 0;
    // reset: RESET, WAIT, then the first SEARCH
    n_wait_first = 0;
    while (dut.u_ctrl.state != ST_SEARCH) begin
      @(negedge clk); n_wait_first++;
    end
    chk(n_wait_first == 2, "reset takes 2 clocks");
    last_retire = cyc;
    retired = 0;
    // run until the halt loop
    while (!(dut.u_pc.pc == 13'(HALT) && dut.u_ctrl.state == ST_WAIT && retired > 10))
      @(negedge clk);
    repeat (8) @(negedge clk);
    done = 1;
    // RAM contents against the model
    for (int i = 0; i < 256; i++)
      chk(dut.u_ram.mem[i] == iss.ram[i], $sformatf("RAM[%0d]", i));
    // every mechanism seen
    for (int o = 0; o < 32; o++) begin
      if (o >= 16 && o < 24) begin
        if (o % 2 == 0) chk(iss.n_op[o] + iss.n_op[o + 1] > 0, $sformatf("jump opcode %b used", 5'(o)));
      end else chk(iss.n_op[o] > 0, $sformatf("opcode %b used", 5'(o)));
    end
    for (int m = 0; m < 4; m++) chk(iss.n_mode[m] > 0, $sformatf("addressing mode %0d used", m));
    chk(iss.n_jifz_t > 0 && iss.n_jifz_n > 0, "JIFZ taken and not taken");
    chk(iss.n_jifc_t > 0 && iss.n_jifc_n > 0, "JIFC taken and not taken");
    chk(iss.n_int > 0, "interrupt taken");
    chk(n_int_blocked > 0, "interrupt held off while disabled");
    chk(iss.n_c_restored > 0, "RETI restored a changed CARRY");
    chk(iss.n_ret_imm > 0, "RETURN with immediate (table lookup)");
    chk(iss.n_nest2 > 0, "nested CALL");
    chk(iss.n_port_wr > 0 && iss.n_port_rd > 0, "port read and write");
    $display("mechanisms: int=%0d blocked=%0d c_restored=%0d ret_imm=%0d nest=%0d port_wr=%0d port_rd=%0d jifz=%0d/%0d jifc=%0d/%0d",
             iss.n_int, n_int_blocked, iss.n_c_restored, iss.n_ret_imm, iss.n_nest2, iss.n_port_wr, iss.n_port_rd,
             iss.n_jifz_t, iss.n_jifz_n, iss.n_jifc_t, iss.n_jifc_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
