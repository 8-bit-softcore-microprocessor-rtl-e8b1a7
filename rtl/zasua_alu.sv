// zasua_alu -- the 16-operation ALU of the ZA-SUA processor.
//
// Purely combinational. Operand x is the accumulator picked by the
// instruction's Source bit (MUX3); operand y is the memory or immediate
// operand (MUX1). The 4-bit operation code is the low four opcode bits of an
// ALU instruction. The result goes, through MUX2, to the accumulator named by
// the Destination bit.
//
// Which operations update ZERO and CARRY follows the processor's instruction
// table: every operation updates ZERO; c_we is 1 for ADD..DEC, ROL and ROR
// only.
// This design's own choices, where the document gives only the operation's
// name: unary operations (INC, DEC, shifts, rotates, NOT, MOVE) work on x;
// LOAD passes y; after SUB/SUBC/DEC the carry is the borrow (1 when the
// result went below zero); after INC it is the carry out of bit 7; ROL/ROR
// rotate through the carry, SHL/SHR shift in a 0.
module zasua_alu
  import zasua_pkg::*;
(
  input  alu_op_e      op,
  input  logic [7:0]   x,       // source accumulator
  input  logic [7:0]   y,       // RAM / immediate operand
  input  logic         c_in,    // current CARRY flag
  output logic [7:0]   result,
  output logic         z_out,
  output logic         c_out,
  output logic         c_we     // this operation updates CARRY
);

  logic [8:0] wide;

  always_comb begin
    wide = '0;
    c_we = 1'b0;
    unique case (op)
      ALU_ADD:  begin wide = {1'b0, x} + {1'b0, y};                 c_we = 1'b1; end
      ALU_ADDC: begin wide = {1'b0, x} + {1'b0, y} + {8'd0, c_in};  c_we = 1'b1; end
      ALU_SUB:  begin wide = {1'b0, x} - {1'b0, y};                 c_we = 1'b1; end
      ALU_SUBC: begin wide = {1'b0, x} - {1'b0, y} - {8'd0, c_in};  c_we = 1'b1; end
      ALU_INC:  begin wide = {1'b0, x} + 9'd1;                      c_we = 1'b1; end
      ALU_DEC:  begin wide = {1'b0, x} - 9'd1;                      c_we = 1'b1; end
      ALU_SHL:  wide = {1'b0, x[6:0], 1'b0};
      ALU_SHR:  wide = {1'b0, 1'b0, x[7:1]};
      ALU_ROL:  begin wide = {x[7], x[6:0], c_in};                  c_we = 1'b1; end
      ALU_ROR:  begin wide = {x[0], c_in, x[7:1]};                  c_we = 1'b1; end
      ALU_AND:  wide = {1'b0, x & y};
      ALU_OR:   wide = {1'b0, x | y};
      ALU_XOR:  wide = {1'b0, x ^ y};
      ALU_NOT:  wide = {1'b0, ~x};
      ALU_LOAD: wide = {1'b0, y};
      ALU_MOVE: wide = {1'b0, x};
      default:  wide = '0;
    endcase
    result = wide[7:0];
    c_out  = wide[8];
    z_out  = (wide[7:0] == 8'd0);
  end

endmodule
