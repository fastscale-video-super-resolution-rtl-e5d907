// pe_array: the TM x TN multiply-accumulate array of the layer engine
// (TM = TN = LANES).
//
// In one cycle it multiplies the LANES input-channel values of one input pixel
// with a LANES x LANES weight block and sums, for each output lane, the
// LANES products with an adder tree. This is the unrolled inner pair of loops
// (output channel, input channel) of the tiled convolution loop nest. The
// array is purely combinational; the accumulator buffer registers its
// result. `en_in` zeroes the products (used for taps that fall outside the
// kernel of the fractionally strided layer). Products are Q8.8 x Q1.7 =
// Q.15 and are kept exact.
module pe_array import fsr_pkg::*; #(
  parameter int unsigned LANES = 5
) (
  input  feat_t act  [LANES],
  input  wgt_t  w    [LANES][LANES],
  input  logic  en_in,
  output acc_t  psum [LANES]
);
  always_comb begin
    for (int unsigned mo = 0; mo < LANES; mo++) begin
      acc_t s;
      s = '0;
      for (int unsigned ni = 0; ni < LANES; ni++)
        s += acc_t'(act[ni]) * acc_t'(w[mo][ni]);
      psum[mo] = en_in ? s : '0;
    end
  end
endmodule
