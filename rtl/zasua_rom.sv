// zasua_rom -- program memory of the ZA-SUA processor, DEPTH x 17 bits.
//
// The processor lets the program memory be sized at 256, 512, 1024, 2048,
// 4096 or 8192 words; DEPTH picks one (default 8192, the full reach of the
// 13-bit program counter). Reads are synchronous: rdata <= mem[raddr] on
// every rising edge. The processor presents the program counter in its WAIT
// state and latches rdata into the instruction register in SEARCH. Addresses
// at or above DEPTH wrap (the upper address bits are ignored).
//
// Loading the program is this design's choice, since the document does not
// say how the ROM is filled: INIT_FILE, if not empty, is read with
// $readmemh at start-up (the usual FPGA way of initialising a ROM), and the
// load port (load_we/load_addr/load_data) writes a word, as a boot loader
// or a bitstream update would. The processor core itself never writes it.
module zasua_rom #(
  parameter int unsigned DEPTH     = 8192,
  parameter int unsigned AW        = $clog2(DEPTH),
  parameter string       INIT_FILE = ""
) (
  input  logic          clk,
  input  logic [12:0]   raddr,
  output logic [16:0]   rdata,
  input  logic          load_we,
  input  logic [12:0]   load_addr,
  input  logic [16:0]   load_data
);

  logic [16:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr[AW-1:0]] <= load_data;
    rdata <= mem[raddr[AW-1:0]];
  end

endmodule
