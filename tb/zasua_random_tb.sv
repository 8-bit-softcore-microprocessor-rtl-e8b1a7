// zasua_random_tb -- random-program test of the ZA-SUA processor in its
// smallest configuration (256-word program memory).
//
// Forty times over, the program memory is filled with random instructions
// of every kind and 500 of them are run,
// including jumps to random 13-bit addresses (which wrap in the 256-word
// memory), unmatched RETURN/RETI (the stack pointer wraps), EINT/DINT and
// JUMPR, and the interrupt request toggles at random. After every completed
// instruction and interrupt entry the processor's architectural state is
// compared with the instruction-set model, as are all port writes and
// reads. The testbench also checks that an interrupt is taken exactly when
// one is pending and enabled in WAIT, and the 4-clock instruction and
// 3-clock interrupt timing.
module zasua_random_tb;
  import zasua_pkg::*;
  import zasua_iss_pkg::*;

  localparam int          DEPTH = 256;
  localparam int          N_PROG  = 40;
  localparam int          N_INSTR = 500;
  localparam logic [12:0] VEC = 13'h0001;

  logic        clk = 0, rst;
  logic [7:0]  port_in, port_out, port_addr;
  logic        port_rd, port_wr, int_req, int_ack;
  logic        load_we;
  logic [12:0] load_addr;
  logic [16:0] load_data;

  zasua #(.ROM_DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  assign port_in = port_device(port_addr);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  zasua_iss iss = new(DEPTH, VEC);

  function automatic logic [16:0] rand_instr();
    int k;
    k = $urandom_range(0, 99);
    if (k < 50) return {1'b0, 4'($urandom), 8'($urandom), 2'($urandom), 2'($urandom)};
    if (k < 58) return {OP_STORE, 8'($urandom), 2'($urandom), 2'($urandom)};
    if (k < 70) return {2'b10, 2'($urandom), 13'($urandom)};         // JIFZ/JIFC/JUMP/CALL
    if (k < 75) return {OP_RETURN, 8'($urandom), 2'($urandom), 2'($urandom)};
    if (k < 77) return {OP_RETI, 8'($urandom), 2'($urandom), 2'($urandom)};
    if (k < 81) return {OP_INPUT, 8'($urandom), 2'($urandom), 2'($urandom)};
    if (k < 87) return {OP_OUTPUT, 8'($urandom), 2'($urandom), 2'($urandom)};
    if (k < 92) return {OP_EINT, 12'($urandom)};
    if (k < 96) return {OP_DINT, 12'($urandom)};
    return {OP_JUMPR, 8'($urandom), 2'($urandom), 2'($urandom)};
  endfunction

  task automatic compare(input string when);
    chk(dut.u_acc.a == iss.a && dut.u_acc.b == iss.b && dut.u_ctrl.flag_z == iss.z &&
        dut.u_ctrl.flag_c == iss.c && dut.u_ctrl.ie == iss.ie && dut.u_pc.pc == iss.pc &&
        dut.u_stack.sp == iss.sp, when);
  endtask

  state_e prev;
  int     cyc, last_event, retired;
  int     n_taken, n_held, total;
  logic   cap_wr;
  logic [7:0] cap_addr, cap_data;
  bit     running;

  initial begin
    #10_000_000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random interrupt request
  always @(posedge clk) begin
    if (rst) int_req <= 1'b0;
    else if ($urandom_range(0, 99) == 0) int_req <= ~int_req;
  end

  always @(posedge clk) begin
    #1;
    cyc++;
    if (running) begin
      if (prev == ST_WAIT) begin
        // the interrupt decision made in the WAIT clock that just ended
        if (dut.u_ctrl.state == ST_INT) begin
          chk(iss.ie, "interrupt taken only when enabled");
          n_taken++;
        end
      end
      if (prev == ST_INSTR) begin
        chk(cyc - last_event == 4, "instruction takes 4 clocks");
        iss.step();
        compare($sformatf("after instruction %0d (%h)", retired, dut.u_ir.q));
        chk(cap_wr == iss.exp_wr, "port write strobe");
        if (iss.exp_wr)
          chk(cap_addr == iss.exp_paddr && cap_data == iss.exp_pdata, "port write address/data");
        cap_wr = 1'b0;
        retired++;
        last_event = cyc;
      end
      if (prev == ST_JUMP_INT) begin
        chk(cyc - last_event == 3, "interrupt entry takes 3 clocks");
        iss.interrupt();
        compare("after interrupt entry");
        last_event = cyc;
      end
      if (dut.u_ctrl.state == ST_INSTR && port_wr) begin
        cap_wr = 1'b1; cap_addr = port_addr; cap_data = port_out;
      end
    end
    prev = dut.u_ctrl.state;
  end

  // the WAIT decision itself: with the request and the enable both high the
  // processor must go to INT, otherwise to SEARCH
  always @(negedge clk) begin
    if (running && dut.u_ctrl.state == ST_WAIT) begin
      checks++;
      if ((dut.u_ctrl.state_n == ST_INT) != (int_req && iss.ie)) begin
        failures++;
        if (failures < 10) $display("FAIL interrupt decision req=%b ie=%b", int_req, iss.ie);
      end
      if (int_req && !iss.ie) n_held++;
    end
  end

  initial begin
    rst = 1; load_we = 0; load_addr = 0; load_data = 0; running = 0; cap_wr = 0;
    for (int p = 0; p < N_PROG; p++) begin
      // a fresh random program, loaded while reset is held
      rst = 1;
      for (int i = 0; i < DEPTH; i++) iss.rom[i] = rand_instr();
      for (int i = 0; i < DEPTH; i++) begin
        @(negedge clk);
        load_we = 1; load_addr = 13'(i); load_data = iss.rom[i];
      end
      @(negedge clk); load_we = 0;
      @(negedge clk);
      iss.reset();
      for (int i = 0; i < 256; i++) iss.ram[i] = dut.u_ram.mem[i];     // not reset
      for (int i = 0; i < 8; i++)   iss.stk[i] = dut.u_stack.mem[i];   // not reset
      rst = 0;
      @(posedge clk);
      #2;
      last_event = cyc;  // WAIT now; SEARCH, DECODE, INSTRUCTIONS follow
      retired = 0;
      running = 1;
      while (retired < N_INSTR) @(negedge clk);
      running = 0;
      total += retired;
    end
    for (int i = 0; i < 256; i++)
      chk(dut.u_ram.mem[i] == iss.ram[i], $sformatf("RAM[%0d]", i));
    // mechanisms that a random program must have hit
    chk(iss.n_int > 0 && n_taken == iss.n_int, "interrupts taken");
    chk(n_held > 0, "requests held off while disabled");
    chk(iss.n_c_restored > 0, "RETI restored CARRY");
    chk(iss.n_stack_wrap > 0, "stack pointer wrapped");
    chk(iss.n_jumpr > 0 && iss.n_ret_imm > 0, "JUMPR and RETURN #k");
    chk(iss.n_jifz_t > 0 && iss.n_jifz_n > 0 && iss.n_jifc_t > 0 && iss.n_jifc_n > 0,
        "conditional jumps both ways");
    chk(iss.n_port_wr > 0 && iss.n_port_rd > 0, "port writes and reads");
    for (int m = 0; m < 4; m++) chk(iss.n_mode[m] > 0, $sformatf("ALU addressing mode %0d", m));
    $display("programs=%0d instructions=%0d interrupts=%0d held=%0d c_restored=%0d stack_wraps=%0d jumpr=%0d",
             N_PROG, total, iss.n_int, n_held, iss.n_c_restored, iss.n_stack_wrap, iss.n_jumpr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
