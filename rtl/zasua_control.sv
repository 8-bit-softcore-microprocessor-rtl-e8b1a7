// zasua_control -- CONTROL, the control unit of the ZA-SUA processor.
//
// A seven-state machine, the one of the processor's state diagram:
//
//   RESET -> WAIT -> SEARCH -> DECODE -> INSTRUCTIONS -> WAIT -> ...
//                 \-> INT -> JUMP INT -> WAIT   (when an interrupt is taken)
//
// One state per clock, so an instruction takes 4 cycles (SEARCH, DECODE,
// INSTRUCTIONS, WAIT), reset takes 2 (RESET, WAIT) and interrupt entry 3
// (INT, JUMP INT, WAIT), the counts the document gives.
//   WAIT        the program memory reads the word at the program counter;
//               an enabled, pending interrupt sends the machine to INT.
//   SEARCH      the instruction register loads the word; PC <= PC + 1.
//   DECODE      the instruction's fields settle the multiplexers, so the RAM
//               reads the operand at the address MUX5 presents.
//   INSTRUCTIONS the instruction executes: accumulator/flag write, RAM or
//               port write, PC change, stack push or pop.
//   INT         pushes the PC, saves CARRY, disables interrupts, int_ack=1.
//   JUMP INT    loads the interrupt vector into the PC.
// Because every select is a function of the state and the instruction
// register, what an operation needs is set up in the states before the one
// that uses it, as the document requires.
//
// The unit holds the ZERO and CARRY flags, the interrupt enable (set by
// EINT, cleared by DINT) and the CARRY saved at interrupt entry, which RETI
// restores. This design's own choices: the request int_req is a level,
// sampled in WAIT; taking it clears the enable and RETI sets it again; ZERO
// is not saved; RETURN and RETI with immediate addressing also load the
// general field into the Destination accumulator (a table-lookup return)
// without touching the flags; INPUT and OUTPUT pulse port_rd / port_wr for
// the one INSTRUCTIONS cycle.
module zasua_control
  import zasua_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [16:0] ir,
  input  logic        int_req,
  // ALU flag results
  input  logic        alu_z,
  input  logic        alu_c,
  input  logic        alu_c_we,
  // controls
  output state_e      state,
  output logic        ir_load,
  output pc_sel_e     pc_sel,
  output logic        stack_push,
  output logic        stack_pop,
  output logic        acc_we,
  output logic        mux2_in,
  output alu_op_e     alu_op,
  output logic        ram_we,
  output logic        port_rd,
  output logic        port_wr,
  output logic        int_ack,
  // architectural flags
  output logic        flag_z,
  output logic        flag_c,
  output logic        ie
);

  instr_t     f;
  logic [3:0] op4;
  logic       is_alu;
  logic       c_saved;
  logic       take_int;
  state_e     state_n;

  assign f        = instr_t'(ir);
  assign op4      = ir[16:13];
  assign is_alu   = ~ir[16];
  assign take_int = int_req && ie;

  // next state
  always_comb begin
    unique case (state)
      ST_RESET:    state_n = ST_WAIT;
      ST_WAIT:     state_n = take_int ? ST_INT : ST_SEARCH;
      ST_SEARCH:   state_n = ST_DECODE;
      ST_DECODE:   state_n = ST_INSTR;
      ST_INSTR:    state_n = ST_WAIT;
      ST_INT:      state_n = ST_JUMP_INT;
      ST_JUMP_INT: state_n = ST_WAIT;
      default:     state_n = ST_RESET;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= ST_RESET;
    else     state <= state_n;
  end

  // per-state controls
  always_comb begin
    ir_load    = 1'b0;
    pc_sel     = PC_HOLD;
    stack_push = 1'b0;
    stack_pop  = 1'b0;
    acc_we     = 1'b0;
    mux2_in    = 1'b0;
    ram_we     = 1'b0;
    port_rd    = 1'b0;
    port_wr    = 1'b0;
    int_ack    = 1'b0;
    alu_op     = is_alu ? alu_op_e'(ir[15:12]) : ALU_LOAD;

    unique case (state)
      ST_SEARCH: begin
        ir_load = 1'b1;
        pc_sel  = PC_INC;
      end
      ST_INSTR: begin
        if (is_alu) begin
          acc_we = 1'b1;
        end else if (ir[15] == 1'b0) begin
          // absolute jumps
          unique case (op4)
            OP4_JIFZ: if (flag_z) pc_sel = PC_ABS;
            OP4_JIFC: if (flag_c) pc_sel = PC_ABS;
            OP4_JUMP: pc_sel = PC_ABS;
            OP4_CALL: begin pc_sel = PC_ABS; stack_push = 1'b1; end
            default: ;
          endcase
        end else begin
          unique case (f.opcode)
            OP_STORE:  ram_we = 1'b1;
            OP_RETURN, OP_RETI: begin
              pc_sel    = PC_POP;
              stack_pop = 1'b1;
              acc_we    = (f.mode == AM_IMM);
            end
            OP_INPUT:  begin acc_we = 1'b1; mux2_in = 1'b1; port_rd = 1'b1; end
            OP_OUTPUT: port_wr = 1'b1;
            OP_JUMPR:  pc_sel = PC_REL;
            default: ;  // EINT, DINT: flags only
          endcase
        end
      end
      ST_INT: begin
        stack_push = 1'b1;
        int_ack    = 1'b1;
      end
      ST_JUMP_INT: pc_sel = PC_VEC;
      default: ;
    endcase
  end

  // flags, interrupt enable, saved carry
  always_ff @(posedge clk) begin
    if (rst) begin
      flag_z  <= 1'b0;
      flag_c  <= 1'b0;
      ie      <= 1'b0;
      c_saved <= 1'b0;
    end else begin
      if (state == ST_INSTR) begin
        if (is_alu) begin
          flag_z <= alu_z;
          if (alu_c_we) flag_c <= alu_c;
        end else if (f.opcode == OP_EINT) begin
          ie <= 1'b1;
        end else if (f.opcode == OP_DINT) begin
          ie <= 1'b0;
        end else if (f.opcode == OP_RETI) begin
          flag_c <= c_saved;
          ie     <= 1'b1;
        end
      end
      if (state == ST_INT) begin
        c_saved <= flag_c;
        ie      <= 1'b0;
      end
    end
  end

  a_int_only_when_enabled: assert property (@(posedge clk) disable iff (rst)
    (state == ST_WAIT && state_n == ST_INT) |-> ie)
    else $error("control: interrupt taken while disabled");

endmodule
