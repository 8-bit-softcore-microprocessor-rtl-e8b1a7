// zasua_dec -- DEC, the addressing-mode decoder of the ZA-SUA processor.
//
// Combinational. Turns the 2-bit addressing field of the instruction
// (00 direct, 01 immediate, 10 indirect through A, 11 indirect through B)
// into the selects of the three multiplexers it drives:
//   mux1_imm  MUX1 passes the instruction's general field (immediate)
//             instead of the RAM read data;
//   mux4_b    MUX4 passes accumulator B instead of A as the index;
//   mux5_ind  MUX5 passes the MUX4 index instead of the general field as
//             the RAM / port address.
module zasua_dec
  import zasua_pkg::*;
(
  input  addr_mode_e mode,
  output logic       mux1_imm,
  output logic       mux4_b,
  output logic       mux5_ind
);

  always_comb begin
    mux1_imm = (mode == AM_IMM);
    mux4_b   = (mode == AM_IND_B);
    mux5_ind = (mode == AM_IND_A) || (mode == AM_IND_B);
  end

endmodule
