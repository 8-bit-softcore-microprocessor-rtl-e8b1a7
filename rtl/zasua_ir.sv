// zasua_ir -- the 17-bit instruction register of the ZA-SUA processor.
//
// Latches the program-memory word when load is high (the SEARCH state) and
// holds it through DECODE and INSTRUCTIONS, so that the whole datapath can
// read the instruction fields from it. It is exposed both as the raw word
// and as the general-format struct (opcode, general, addressing, source,
// destination). Synchronous reset clears it.
module zasua_ir
  import zasua_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        load,
  input  logic [16:0] din,
  output logic [16:0] q,
  output instr_t      fields
);

  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= din;
  end

  assign fields = instr_t'(q);

endmodule
