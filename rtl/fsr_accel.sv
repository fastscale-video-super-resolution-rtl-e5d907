// fsr_accel: FSRCNN-s video super-resolution accelerator, top level.
//
// Upscales one 8-bit luma frame of H_IN x W_IN pixels (default 240 x 426,
// widescreen 240p) by 4.5 to H_OUT x W_OUT (1080 x 1917) with the FSRCNN-s
// network (feature extraction 5x5 -> 35 maps, shrinking 1x1 -> 5, one 3x3
// mapping layer, expanding 1x1 -> 35, 9x9 transposed convolution with stride
// 4.5). A host writes the frame into external memory, pulses `start` and waits
// for the one-cycle `done` pulse. The layer sequencer steps through the five
// layers; one layer engine (tiled loop nest, LANES x LANES MAC array, fixed
// weights) computes each; the engine's word-wide memory channels reach memory
// through an AXI4 master port (single-beat bursts, see axi_master_bridge). A
// layer counts as complete once the engine is done and every write has been
// acknowledged on the B channel; only then does the next layer start. One
// frame is processed at a time, so throughput is the inverse of the
// per-frame latency, as in the described system.
//
// Memory layout (word addresses; word w is at byte address w*AXI_DATA_W/8;
// one word = LANES x 16-bit Q8.8 values in the low bits): the input frame at
// in_base (H_IN*W_IN words, pixel/256 in lane 0, other lanes zero), the output
// at out_base (H_OUT*W_OUT words, Q8.8 value in lane 0), two scratch regions
// of ceil(35/LANES)*H_IN*W_IN words each. `mac_cycles` counts the cycles in
// which the MAC array worked during the last frame and `frame_cycles` the
// cycles from start to done; `bus_error` is sticky on a non-OKAY response.
module fsr_accel import fsr_pkg::*; #(
  parameter int unsigned H_IN      = 240,
  parameter int unsigned W_IN      = 426,
  parameter int unsigned LANES     = 5,
  parameter int unsigned TR        = 8,
  parameter int unsigned TC        = 8,
  parameter int unsigned SCALE_NUM = 9,
  parameter int unsigned SCALE_DEN = 2,
  parameter int unsigned AXI_DATA_W = 128
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [31:0]             in_base,
  input  logic [31:0]             out_base,
  input  logic [31:0]             scr_a_base,
  input  logic [31:0]             scr_b_base,
  output logic                    busy,
  output logic                    done,
  output logic [2:0]              cur_layer,
  output logic [31:0]             mac_cycles,
  output logic [31:0]             frame_cycles,
  output logic                    bus_error,
  // AXI4 master to external memory
  output logic                    m_axi_arvalid,
  input  logic                    m_axi_arready,
  output logic [31:0]             m_axi_araddr,
  output logic [7:0]              m_axi_arlen,
  output logic [2:0]              m_axi_arsize,
  output logic [1:0]              m_axi_arburst,
  input  logic                    m_axi_rvalid,
  output logic                    m_axi_rready,
  input  logic [AXI_DATA_W-1:0]   m_axi_rdata,
  input  logic [1:0]              m_axi_rresp,
  input  logic                    m_axi_rlast,
  output logic                    m_axi_awvalid,
  input  logic                    m_axi_awready,
  output logic [31:0]             m_axi_awaddr,
  output logic [7:0]              m_axi_awlen,
  output logic [2:0]              m_axi_awsize,
  output logic [1:0]              m_axi_awburst,
  output logic                    m_axi_wvalid,
  input  logic                    m_axi_wready,
  output logic [AXI_DATA_W-1:0]   m_axi_wdata,
  output logic [AXI_DATA_W/8-1:0] m_axi_wstrb,
  output logic                    m_axi_wlast,
  input  logic                    m_axi_bvalid,
  output logic                    m_axi_bready,
  input  logic [1:0]              m_axi_bresp
);
  logic eng_start, eng_done, mac_busy, seq_done, seq_busy;
  logic layer_done, drain;
  layer_cfg_t eng_cfg;
  logic [15:0] wr_pending;

  // engine-side memory channels
  logic                    rd_req_valid, rd_req_ready, rd_resp_valid, rd_resp_ready;
  logic [31:0]             rd_req_addr, wr_addr;
  logic [LANES*FEAT_W-1:0] rd_resp_data, wr_data;
  logic                    wr_valid, wr_ready;

  layer_sequencer #(.H_IN(H_IN), .W_IN(W_IN), .SCALE_NUM(SCALE_NUM),
                    .SCALE_DEN(SCALE_DEN)) u_seq (
    .clk, .rst_n, .start, .in_base, .out_base, .scr_a_base, .scr_b_base,
    .busy(seq_busy), .done(seq_done), .cur_layer, .eng_start, .eng_cfg, .eng_done(layer_done));

  layer_engine #(.LANES(LANES), .TR(TR), .TC(TC), .SCALE_NUM(SCALE_NUM),
                 .SCALE_DEN(SCALE_DEN)) u_eng (
    .clk, .rst_n, .start(eng_start), .cfg(eng_cfg), .done(eng_done),
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_ready, .rd_resp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data, .mac_busy);

  axi_master_bridge #(.LANES(LANES), .DATA_W(AXI_DATA_W), .ADDR_W(32)) u_axi (
    .clk, .rst_n,
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_ready, .rd_resp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data, .wr_pending, .bus_error,
    .m_axi_arvalid, .m_axi_arready, .m_axi_araddr, .m_axi_arlen, .m_axi_arsize, .m_axi_arburst,
    .m_axi_rvalid, .m_axi_rready, .m_axi_rdata, .m_axi_rresp, .m_axi_rlast,
    .m_axi_awvalid, .m_axi_awready, .m_axi_awaddr, .m_axi_awlen, .m_axi_awsize, .m_axi_awburst,
    .m_axi_wvalid, .m_axi_wready, .m_axi_wdata, .m_axi_wstrb, .m_axi_wlast,
    .m_axi_bvalid, .m_axi_bready, .m_axi_bresp);

  // A layer counts as finished only when all its writes have been
  // acknowledged, so the next layer never reads stale data.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) drain <= 1'b0;
    else if (eng_done) drain <= 1'b1;
    else if (drain && wr_pending == 16'd0) drain <= 1'b0;
  end
  assign layer_done = drain && wr_pending == 16'd0;
  assign busy = seq_busy;
  assign done = seq_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mac_cycles <= '0; frame_cycles <= '0;
    end else if (start && !busy) begin
      mac_cycles <= '0; frame_cycles <= '0;
    end else if (busy) begin
      frame_cycles <= frame_cycles + 32'd1;
      if (mac_busy) mac_cycles <= mac_cycles + 32'd1;
    end
  end
endmodule
