// zasua_acc -- the two accumulators A and B of the ZA-SUA processor.
//
// Two 8-bit registers written from MUX2 (ALU result or input port). On a
// rising clock edge with we=1 the register named by dst (0 = A, 1 = B, as the
// Destination bit encodes it) takes din; the other keeps its value. Both are
// always readable: they feed MUX3 (ALU/RAM/port operand) and MUX4 (index for
// indirect addressing). Synchronous active-high reset clears both, as the
// processor's RESET state does.
module zasua_acc (
  input  logic       clk,
  input  logic       rst,
  input  logic       we,
  input  logic       dst,
  input  logic [7:0] din,
  output logic [7:0] a,
  output logic [7:0] b
);

  always_ff @(posedge clk) begin
    if (rst) begin
      a <= '0;
      b <= '0;
    end else if (we) begin
      if (dst) b <= din;
      else     a <= din;
    end
  end

endmodule
