// zasua_ram -- data memory of the ZA-SUA processor, DEPTH x 8 bits
// (256 bytes by default, as the processor's block diagram gives it).
//
// One port, synchronous: on a rising edge with we=1 mem[addr] <= wdata; every
// edge registers mem[addr] into rdata (read-before-write on the same
// address), which maps to an FPGA block or distributed RAM. The processor
// presents the address in its DECODE state and uses rdata in INSTRUCTIONS.
// The content is not reset. The registered read is this design's choice.
module zasua_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
