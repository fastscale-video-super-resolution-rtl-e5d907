// fsr_pkg: types, constants and fixed-weight functions shared by the FSRCNN-s
// super-resolution accelerator.
//
// The network is FSRCNN-s with d=35 feature maps, s=5 shrunk maps and m=1
// mapping layer: conv 5x5 (1->35), conv 1x1 (35->5), conv 3x3 (5->5),
// conv 1x1 (5->35) and a 9x9 transposed ("deconvolution") layer (35->1) whose
// stride is the scaling factor 4.5 = 9/2. The layer shapes and the 4.5 scale
// follow the design description; the number formats, the PReLU slope, the
// placement rule of the fractional stride and the weight values are this
// design's own choices (trained weights are not available, so the fixed
// weights are generated by a hash of their indices).
//
// Number formats: feature values are signed Q8.8 (16 bit), weights signed
// Q1.7 (8 bit), biases signed Q8.8. Input pixels are 8-bit luma placed in the
// fractional byte, i.e. value = pixel/256.
package fsr_pkg;

  localparam int unsigned FEAT_W  = 16;   // feature value width
  localparam int unsigned FRAC    = 8;    // fractional bits of a feature value
  localparam int unsigned WGT_W   = 8;    // weight width
  localparam int unsigned WFRAC   = 7;    // fractional bits of a weight
  localparam int unsigned ACC_W   = 40;   // accumulator width
  localparam int unsigned NLAYERS = 5;
  localparam int unsigned PRELU_SHIFT = 2; // negative slope 1/4

  typedef logic signed [FEAT_W-1:0] feat_t;
  typedef logic signed [WGT_W-1:0]  wgt_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  typedef enum logic [1:0] {LT_CONV = 2'd0, LT_DECONV = 2'd1} layer_kind_e;

  // Per-layer description handed from the sequencer to the layer engine.
  typedef struct packed {
    logic [2:0]  idx;        // layer number 0..4 (selects the fixed weights)
    layer_kind_e kind;
    logic [3:0]  k;          // kernel size
    logic [6:0]  cin;        // input channels
    logic [6:0]  cout;       // output channels
    logic        act;        // apply PReLU
    logic [15:0] in_h;
    logic [15:0] in_w;
    logic [15:0] out_h;
    logic [15:0] out_w;
    logic [31:0] in_base;    // word address of the input feature map
    logic [31:0] out_base;   // word address of the output feature map
  } layer_cfg_t;

  // FSRCNN-s (35,5,1) layer shapes.
  localparam int unsigned D_FEAT = 35;
  localparam int unsigned S_SHR  = 5;
  function automatic int unsigned layer_k(input int unsigned l);
    case (l)
      0: return 5; 1: return 1; 2: return 3; 3: return 1; default: return 9;
    endcase
  endfunction
  function automatic int unsigned layer_cin(input int unsigned l);
    case (l)
      0: return 1; 1: return D_FEAT; 2: return S_SHR; 3: return S_SHR; default: return D_FEAT;
    endcase
  endfunction
  function automatic int unsigned layer_cout(input int unsigned l);
    case (l)
      0: return D_FEAT; 1: return S_SHR; 2: return S_SHR; 3: return D_FEAT; default: return 1;
    endcase
  endfunction

  // 32-bit integer hash used to generate the fixed parameters.
  function automatic logic [31:0] mix32(input logic [31:0] x);
    logic [31:0] h;
    h = x * 32'h9E37_79B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EB_CA6B;
    h = h ^ (h >> 13);
    return h;
  endfunction

  // Fixed weight of layer l, output channel m, input channel n, tap (ky,kx).
  // Range -32..31, i.e. -0.25..0.242 in Q1.7.
  function automatic wgt_t weight_of(input logic [2:0] l, input logic [6:0] m,
                                     input logic [6:0] n, input logic [3:0] ky,
                                     input logic [3:0] kx);
    logic [31:0] h;
    h = mix32({7'd0, l, m, n, ky, kx} + 32'h1234_5678);
    return wgt_t'($signed(h[7:0]) >>> 2);
  endfunction

  // Fixed bias of layer l, output channel m: -16..15 in Q8.8.
  function automatic feat_t bias_of(input logic [2:0] l, input logic [6:0] m);
    logic [31:0] h;
    h = mix32({22'd0, l, m} + 32'h0BAD_F00D);
    return feat_t'($signed(h[7:0])) >>> 3;
  endfunction

endpackage
