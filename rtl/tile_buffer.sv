// tile_buffer: on-chip input tile memory of the layer engine.
//
// Holds one input tile: DEPTH pixel positions, each a word of LANES feature
// values (one input channel group). It is written by the tile loader one word
// per cycle and read by the MAC array one word per cycle. The read is
// asynchronous (distributed RAM style), so the word for a given address is
// available in the same cycle. Tiling the feature maps into on-chip buffers
// follows the design description; the sizes are this design's choice.
module tile_buffer import fsr_pkg::*; #(
  parameter int unsigned LANES = 5,
  parameter int unsigned DEPTH = 144
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  feat_t                    wdata [LANES],
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output feat_t                    rdata [LANES]
);
  feat_t mem [DEPTH][LANES];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
