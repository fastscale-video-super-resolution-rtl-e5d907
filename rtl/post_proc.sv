// post_proc: output stage of a layer: bias, PReLU and saturation.
//
// For each of the LANES output channels of a group it adds the channel's fixed
// bias to the accumulated sum (both brought to Q.15), drops the seven weight
// fraction bits (arithmetic shift, rounding towards minus infinity), applies
// PReLU with a negative slope of 1/4 when `act` is set, and saturates to a
// 16-bit Q8.8 feature value. Lanes at or beyond `cout` output zero. Purely
// combinational. The PReLU activation follows the FSRCNN family; its fixed
// slope, the rounding and the saturation are this design's choices.
module post_proc import fsr_pkg::*; #(
  parameter int unsigned LANES = 5
) (
  input  acc_t       acc  [LANES],
  input  logic [2:0] layer,
  input  logic [3:0] og,
  input  logic [6:0] cout,
  input  logic       act,
  output feat_t      y    [LANES]
);
  localparam acc_t FMAX = acc_t'(32767);
  localparam acc_t FMIN = -acc_t'(32768);

  always_comb begin
    for (int unsigned i = 0; i < LANES; i++) begin
      logic [6:0] m;
      acc_t v;
      m = 7'(og * LANES + i);
      v = (acc[i] + (acc_t'(bias_of(layer, m)) <<< WFRAC)) >>> WFRAC;
      if (act && v < 0) v = v >>> PRELU_SHIFT;
      if (v > FMAX)      v = FMAX;
      else if (v < FMIN) v = FMIN;
      y[i] = (m < cout) ? feat_t'(v) : '0;
    end
  end
endmodule
