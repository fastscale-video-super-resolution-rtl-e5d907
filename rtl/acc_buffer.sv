// acc_buffer: output tile accumulators of the layer engine.
//
// Holds LANES partial sums (one output channel group) for each of the
// DEPTH = TR*TC output pixels of a tile. Each cycle the MAC array's LANES
// partial sums are added to the entry at `addr`; with `first` set they
// replace it instead, which starts a new tile without a separate clearing
// pass. The read port (for the tile storer) is asynchronous. Accumulators are
// 40 bits wide, enough to hold every sum of the network exactly, so the
// order of accumulation does not change the result.
module acc_buffer import fsr_pkg::*; #(
  parameter int unsigned LANES = 5,
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     acc_en,
  input  logic                     first,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  acc_t                     psum [LANES],
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output acc_t                     racc [LANES]
);
  acc_t mem [DEPTH][LANES];

  always_ff @(posedge clk)
    if (acc_en)
      for (int unsigned i = 0; i < LANES; i++)
        mem[addr][i] <= first ? psum[i] : mem[addr][i] + psum[i];

  assign racc = mem[raddr];
endmodule
