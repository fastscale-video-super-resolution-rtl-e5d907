// weight_rom: the fixed-weight store of the accelerator.
//
// The accelerator does not load weights over the memory bus: every weight is a
// constant of the circuit ("fixed weights"), which the design description
// names as the optimisation that made FSRCNN-s fit and run at speed. This
// block returns, combinationally, the LANES x LANES weight block that the MAC
// array needs in one cycle: output channels og*LANES.., input channels
// ig*LANES.., tap (ky,kx) of layer `layer`. Weights of channels beyond the
// layer's channel counts read as zero, so partly filled channel groups add
// nothing. The weight values are this design's own (a hash of the indices,
// see fsr_pkg::weight_of) because trained values are not available; replacing
// weight_of with a table of trained weights changes nothing else.
module weight_rom import fsr_pkg::*; #(
  parameter int unsigned LANES = 5
) (
  input  logic [2:0] layer,
  input  logic [3:0] og,           // output channel group
  input  logic [3:0] ig,           // input channel group
  input  logic [3:0] ky,
  input  logic [3:0] kx,
  input  logic [6:0] cin,
  input  logic [6:0] cout,
  output wgt_t       w [LANES][LANES]  // [output lane][input lane]
);
  always_comb begin
    for (int unsigned mo = 0; mo < LANES; mo++) begin
      for (int unsigned ni = 0; ni < LANES; ni++) begin
        logic [6:0] m, n;
        m = 7'(og * LANES + mo);
        n = 7'(ig * LANES + ni);
        if (m < cout && n < cin) w[mo][ni] = weight_of(layer, m, n, ky, kx);
        else                     w[mo][ni] = '0;
      end
    end
  end
endmodule
