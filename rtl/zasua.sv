// zasua -- ZA-SUA, an 8-bit Harvard accumulator processor with two
// accumulators (A and B) that serve both as ALU source/destination and as
// index registers for indirect addressing.
//
// Datapath (as in the processor's block diagram): the program memory (17-bit
// words, ROM_DEPTH of them) feeds the instruction register; the PC (13 bits)
// addresses it and is loaded from the instruction (absolute jumps), from the
// 8 x 13 stack (returns), from PC + accumulator (JUMPR) or with the interrupt
// vector. MUX1 gives the ALU either the instruction's 8-bit general field
// (immediate) or the RAM word; MUX3 gives it A or B (Source bit); MUX2 writes
// the ALU result or the input port into A or B (Destination bit); MUX4/MUX5
// form the RAM and port address from the general field (direct) or from A or
// B (indirect). The RAM (256 x 8) is written from MUX3 by STORE; the output
// port carries MUX3 and the port address MUX5. DEC turns the addressing
// bits into the MUX1/4/5 selects, CONTROL sequences everything.
//
// Timing: every instruction takes 4 clocks (SEARCH, DECODE, INSTRUCTIONS,
// WAIT); reset takes 2 clocks after rst falls; interrupt entry takes 3.
// port_wr is high for one clock while port_out/port_addr are valid (OUTPUT);
// port_rd is high for the clock in which port_in is sampled (INPUT).
// int_req is a level, taken in WAIT when interrupts are enabled; int_ack
// pulses for one clock when it is taken.
//
// The load port (load_we/load_addr/load_data) writes the program memory; it
// and the interrupt vector address (INT_VECTOR, default 1) are this design's
// choices, as the document does not give them. Reset is synchronous and
// active high.
module zasua
  import zasua_pkg::*;
#(
  parameter int unsigned ROM_DEPTH  = 8192,
  parameter int unsigned RAM_DEPTH  = 256,
  parameter logic [12:0] INT_VECTOR = 13'h0001,
  parameter string       ROM_INIT   = ""
) (
  input  logic        clk,
  input  logic        rst,
  // I/O port
  input  logic [7:0]  port_in,
  output logic [7:0]  port_out,
  output logic [7:0]  port_addr,
  output logic        port_rd,
  output logic        port_wr,
  // interrupt
  input  logic        int_req,
  output logic        int_ack,
  // program-memory load port
  input  logic        load_we,
  input  logic [12:0] load_addr,
  input  logic [16:0] load_data
);

  localparam int unsigned RAM_AW = $clog2(RAM_DEPTH);

  logic [16:0] rom_q, ir_q;
  instr_t      f;
  logic [12:0] pc, stack_top;
  logic [7:0]  a, b, ram_q;
  logic [7:0]  alu_y, acc_din, src_data, addr, alu_res;
  logic        mux1_imm, mux4_b, mux5_ind;
  logic        alu_z, alu_c, alu_c_we;
  logic        ir_load, stack_push, stack_pop, acc_we, mux2_in, ram_we;
  pc_sel_e     pc_sel;
  alu_op_e     alu_op;
  logic        flag_c;

  zasua_rom #(.DEPTH(ROM_DEPTH), .INIT_FILE(ROM_INIT)) u_rom (
    .clk, .raddr(pc), .rdata(rom_q),
    .load_we, .load_addr, .load_data
  );

  zasua_ir u_ir (
    .clk, .rst, .load(ir_load), .din(rom_q), .q(ir_q), .fields(f)
  );

  zasua_pc #(.INT_VECTOR(INT_VECTOR)) u_pc (
    .clk, .rst, .sel(pc_sel), .abs_addr(ir_q[12:0]), .rel_off(src_data),
    .stack_top, .pc
  );

  zasua_stack #(.DEPTH(STACK_N), .W(PCW)) u_stack (
    .clk, .rst, .push(stack_push), .pop(stack_pop), .din(pc),
    .top(stack_top), .sp()
  );

  zasua_dec u_dec (
    .mode(f.mode), .mux1_imm, .mux4_b, .mux5_ind
  );

  zasua_muxes u_mux (
    .general(f.general), .ram_rdata(ram_q), .alu_result(alu_res), .port_in,
    .a, .b, .mux1_imm, .mux2_in, .mux3_b(f.src), .mux4_b, .mux5_ind,
    .alu_y, .acc_din, .src_data, .index(), .addr
  );

  zasua_alu u_alu (
    .op(alu_op), .x(src_data), .y(alu_y), .c_in(flag_c),
    .result(alu_res), .z_out(alu_z), .c_out(alu_c),
    .c_we(alu_c_we)
  );

  zasua_acc u_acc (
    .clk, .rst, .we(acc_we), .dst(f.dst), .din(acc_din), .a, .b
  );

  zasua_ram #(.DEPTH(RAM_DEPTH)) u_ram (
    .clk, .we(ram_we), .addr(addr[RAM_AW-1:0]), .wdata(src_data), .rdata(ram_q)
  );

  zasua_control u_ctrl (
    .clk, .rst, .ir(ir_q), .int_req,
    .alu_z, .alu_c, .alu_c_we,
    .state(), .ir_load, .pc_sel, .stack_push, .stack_pop, .acc_we, .mux2_in,
    .alu_op, .ram_we, .port_rd, .port_wr, .int_ack,
    .flag_z(), .flag_c, .ie()
  );

  assign port_out  = src_data;
  assign port_addr = addr;

endmodule
