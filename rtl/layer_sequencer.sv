// layer_sequencer: runs the five FSRCNN-s layers of one frame in order.
//
// On `start` it hands the layer engine the configuration of layer 0, waits for
// the engine's `done`, then configures the next layer, and so on through layer
// 4, then pulses `done`. Feature maps between layers live in external memory
// and ping-pong between two scratch regions: frame -> A -> B -> A -> B ->
// output. A feature map of C channels is stored as ceil(C/LANES) planes, one
// per channel group, each H*W words of LANES 16-bit values, row-major. The
// layer shapes (FSRCNN-s with d=35, s=5, m=1; 5x5, 1x1, 3x3, 1x1 and a 9x9
// transposed layer with stride 4.5) follow the design description; the memory
// layout is this design's own. Frame-at-a-time, layer-after-layer operation
// matches the description's sequential per-frame processing.
module layer_sequencer import fsr_pkg::*; #(
  parameter int unsigned H_IN      = 240,
  parameter int unsigned W_IN      = 426,
  parameter int unsigned SCALE_NUM = 9,
  parameter int unsigned SCALE_DEN = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] in_base,
  input  logic [31:0] out_base,
  input  logic [31:0] scr_a_base,
  input  logic [31:0] scr_b_base,
  output logic        busy,
  output logic        done,
  output logic [2:0]  cur_layer,
  // to the layer engine
  output logic        eng_start,
  output layer_cfg_t  eng_cfg,
  input  logic        eng_done
);
  localparam int unsigned H_OUT = (H_IN * SCALE_NUM + SCALE_DEN - 1) / SCALE_DEN;
  localparam int unsigned W_OUT = (W_IN * SCALE_NUM + SCALE_DEN - 1) / SCALE_DEN;

  logic running;

  always_comb begin
    eng_cfg       = '0;
    eng_cfg.idx   = cur_layer;
    eng_cfg.kind  = (cur_layer == 3'd4) ? LT_DECONV : LT_CONV;
    eng_cfg.k     = 4'(layer_k(32'(cur_layer)));
    eng_cfg.cin   = 7'(layer_cin(32'(cur_layer)));
    eng_cfg.cout  = 7'(layer_cout(32'(cur_layer)));
    eng_cfg.act   = (cur_layer != 3'd4);
    eng_cfg.in_h  = 16'(H_IN);
    eng_cfg.in_w  = 16'(W_IN);
    eng_cfg.out_h = (cur_layer == 3'd4) ? 16'(H_OUT) : 16'(H_IN);
    eng_cfg.out_w = (cur_layer == 3'd4) ? 16'(W_OUT) : 16'(W_IN);
    case (cur_layer)
      3'd0:    begin eng_cfg.in_base = in_base;    eng_cfg.out_base = scr_a_base; end
      3'd1:    begin eng_cfg.in_base = scr_a_base; eng_cfg.out_base = scr_b_base; end
      3'd2:    begin eng_cfg.in_base = scr_b_base; eng_cfg.out_base = scr_a_base; end
      3'd3:    begin eng_cfg.in_base = scr_a_base; eng_cfg.out_base = scr_b_base; end
      default: begin eng_cfg.in_base = scr_b_base; eng_cfg.out_base = out_base;   end
    endcase
  end

  assign busy = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; done <= 1'b0; cur_layer <= '0; eng_start <= 1'b0;
    end else begin
      done <= 1'b0;
      eng_start <= 1'b0;
      if (!running) begin
        if (start) begin
          running <= 1'b1; cur_layer <= '0; eng_start <= 1'b1;
        end
      end else if (eng_done) begin
        if (cur_layer == 3'(NLAYERS - 1)) begin
          running <= 1'b0; done <= 1'b1; cur_layer <= '0;
        end else begin
          cur_layer <= cur_layer + 3'd1; eng_start <= 1'b1;
        end
      end
    end
  end
endmodule
