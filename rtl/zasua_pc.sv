// zasua_pc -- the 13-bit program counter of the ZA-SUA processor.
//
// On each rising edge the counter takes the value chosen by sel:
//   PC_HOLD keep, PC_INC  +1 (after the instruction fetch),
//   PC_ABS  the 13-bit absolute address of JIFZ/JIFC/JUMP/CALL,
//   PC_REL  pc + the zero-extended 8-bit offset (JUMPR),
//   PC_POP  the top of the stack (RETURN, RETI),
//   PC_VEC  the interrupt vector (the JUMP INT state).
// Since the counter is incremented when the instruction is fetched, a
// relative jump counts from the instruction after the JUMPR. Synchronous
// active-high reset clears it; the program starts at address 0.
module zasua_pc
  import zasua_pkg::*;
#(
  parameter logic [12:0] INT_VECTOR = 13'h0001
) (
  input  logic        clk,
  input  logic        rst,
  input  pc_sel_e     sel,
  input  logic [12:0] abs_addr,
  input  logic [7:0]  rel_off,
  input  logic [12:0] stack_top,
  output logic [12:0] pc
);

  always_ff @(posedge clk) begin
    if (rst) begin
      pc <= '0;
    end else begin
      unique case (sel)
        PC_HOLD: pc <= pc;
        PC_INC:  pc <= pc + 13'd1;
        PC_ABS:  pc <= abs_addr;
        PC_REL:  pc <= pc + {5'd0, rel_off};
        PC_POP:  pc <= stack_top;
        PC_VEC:  pc <= INT_VECTOR;
        default: pc <= pc;
      endcase
    end
  end

endmodule
