// sram_256kx32: one of the two board SRAMs (256k words of 32 bits) used as a
// ping-pong frame store: while the filters read one, they write the other.
//
// Modelled as a synchronous single-port memory: the address is sampled on the
// clock edge and the word read appears on rdata one clock later (old data on
// a simultaneous write).  we[0] writes the low 16-bit half, we[1] the high
// half, so a single filtered sample can be stored.  Size follows the board;
// the port timing and half-word enables are this design's choice.
module sram_256kx32 #(
  parameter int AW = 18,
  parameter int DW = 32
) (
  input  logic          clk,
  input  logic [1:0]    we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we[0]) mem[addr][DW/2-1:0]  <= wdata[DW/2-1:0];
    if (we[1]) mem[addr][DW-1:DW/2] <= wdata[DW-1:DW/2];
    rdata <= mem[addr];
  end

endmodule
