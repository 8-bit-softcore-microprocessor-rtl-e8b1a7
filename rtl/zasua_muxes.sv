// zasua_muxes -- the five datapath multiplexers of the ZA-SUA processor.
//
// Combinational, wired as in the processor's block diagram:
//   MUX1 alu_y    = mux1_imm ? general : ram_rdata   (ALU memory/immediate operand)
//   MUX2 acc_din  = mux2_in  ? port_in : alu_result  (what the accumulators store)
//   MUX3 src_data = mux3_b   ? b : a                 (ALU operand, RAM write data,
//                                                     output-port data)
//   MUX4 index    = mux4_b   ? b : a                 (index for indirect addressing)
//   MUX5 addr     = mux5_ind ? index : general       (RAM address and port address)
// MUX1, MUX4 and MUX5 are driven by DEC; MUX2 by the instruction (INPUT) and
// MUX3 by its Source bit.
module zasua_muxes (
  input  logic [7:0] general,
  input  logic [7:0] ram_rdata,
  input  logic [7:0] alu_result,
  input  logic [7:0] port_in,
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       mux1_imm,
  input  logic       mux2_in,
  input  logic       mux3_b,
  input  logic       mux4_b,
  input  logic       mux5_ind,
  output logic [7:0] alu_y,
  output logic [7:0] acc_din,
  output logic [7:0] src_data,
  output logic [7:0] index,
  output logic [7:0] addr
);

  always_comb begin
    alu_y    = mux1_imm ? general : ram_rdata;
    acc_din  = mux2_in  ? port_in : alu_result;
    src_data = mux3_b   ? b : a;
    index    = mux4_b   ? b : a;
    addr     = mux5_ind ? index : general;
  end

endmodule
