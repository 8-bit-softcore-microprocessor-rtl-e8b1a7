// zasua_stack -- the return-address stack (PILA) of the ZA-SUA processor:
// DEPTH entries of 13 bits (8 x 13 by default, as the block diagram gives).
//
// A small register array with a 3-bit stack address counter sp that points
// at the next free entry. push writes din at sp and increments sp; pop
// decrements sp. top always shows the last pushed entry, mem[sp-1], so the
// program counter can load it in the same cycle as the pop. CALL and the
// interrupt entry push the program counter; RETURN and RETI pop it.
// The counter is cleared by the synchronous reset, as the processor's RESET
// state clears its "stack address counter". Nothing is said about
// overflow: the counter wraps, so a ninth push overwrites the oldest entry
// (this design's choice). push and pop never come together; an assertion
// checks it.
module zasua_stack #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned W     = 13
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         push,
  input  logic         pop,
  input  logic [W-1:0] din,
  output logic [W-1:0] top,
  output logic [$clog2(DEPTH)-1:0] sp
);

  localparam int unsigned SW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [SW-1:0] sp_m1;

  assign sp_m1 = sp - SW'(1);
  assign top   = mem[sp_m1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sp <= '0;
    end else if (push) begin
      mem[sp] <= din;
      sp      <= sp + SW'(1);
    end else if (pop) begin
      sp <= sp_m1;
    end
  end

  a_no_push_pop: assert property (@(posedge clk) disable iff (rst) !(push && pop))
    else $error("stack: push and pop in the same cycle");

endmodule
