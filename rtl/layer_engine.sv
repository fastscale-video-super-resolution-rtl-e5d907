// layer_engine: tiled convolution engine that computes one network layer.
//
// It runs the tiled loop nest of the layer (outermost first): output row
// tile, output column tile, output channel group (og), input channel group
// (ig), kernel tap, output pixel of the tile. For every (og, ig) pair the
// tile loader first brings the input window of channel group ig into the tile
// buffer; then, one cycle per (tap, pixel), the LANES x LANES MAC array adds
// one input word times one weight block into the tile's accumulators. After
// the last input group the tile storer writes the finished output group
// (bias, PReLU, saturation). Loads, computation and stores do not overlap.
//
// Ordinary layers are stride-1 "same" convolutions of size K (K in 1,3,5).
// The last layer (kind LT_DECONV) is the 9x9 transposed convolution with the
// fractional stride S = SCALE_NUM/SCALE_DEN = 4.5. Low-resolution pixel i is
// placed at high-resolution coordinate p(i) = floor(i*S) and its 9x9 kernel is
// centred there, so output pixel Y receives from input i the tap
// Y - p(i) + 4 when that lies in 0..8. The engine computes it in gather form:
// per output pixel it visits NCAND candidate inputs per axis, starting at
// i0(Y), the first i with p(i) >= Y-4, and masks candidates whose tap falls
// outside the kernel. With S = 4.5 there are at most two per axis.
//
// The tiled loop nest, the uniform tile sizes, the fixed weights and the
// network follow the design description; the tile sizes (TR x TC outputs,
// LANES-wide channel groups), the placement rule p(i) and the handshakes are
// this design's own. Interface: pulse `start` with `cfg` valid (held until
// `done`); `done` pulses when the last tile has been written.
module layer_engine import fsr_pkg::*; #(
  parameter int unsigned LANES     = 5,
  parameter int unsigned TR        = 8,
  parameter int unsigned TC        = 8,
  parameter int unsigned SCALE_NUM = 9,
  parameter int unsigned SCALE_DEN = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  layer_cfg_t              cfg,
  output logic                    done,
  // memory read channel
  output logic                    rd_req_valid,
  input  logic                    rd_req_ready,
  output logic [31:0]             rd_req_addr,
  input  logic                    rd_resp_valid,
  output logic                    rd_resp_ready,
  input  logic [LANES*FEAT_W-1:0] rd_resp_data,
  // memory write channel
  output logic                    wr_valid,
  input  logic                    wr_ready,
  output logic [31:0]             wr_addr,
  output logic [LANES*FEAT_W-1:0] wr_data,
  // activity, for performance counting
  output logic                    mac_busy
);
  localparam int unsigned IN_R   = TR + 4;   // largest ordinary kernel is 5x5
  localparam int unsigned IN_C   = TC + 4;
  localparam int unsigned DK     = 9;        // transposed-convolution kernel
  localparam int unsigned DPAD   = (DK - 1) / 2;
  localparam int unsigned NCAND  = (DK * SCALE_DEN + SCALE_NUM - 1) / SCALE_NUM;
  localparam int unsigned BDEPTH = IN_R * IN_C;
  localparam int unsigned ADEPTH = TR * TC;

  // first low-resolution index whose placed position is >= Y - DPAD
  function automatic logic [15:0] first_src(input logic [15:0] y);
    int t;
    t = int'(y) - int'(DPAD);
    if (t <= 0) return '0;
    return 16'((t * SCALE_DEN + SCALE_NUM - 1) / SCALE_NUM);
  endfunction
  function automatic logic [15:0] place(input logic [15:0] i);
    return 16'((int'(i) * SCALE_NUM) / SCALE_DEN);
  endfunction

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_WAIT_LOAD, S_COMP, S_STORE, S_WAIT_STORE}
    state_e;
  state_e state;

  layer_cfg_t c;
  logic [15:0] tr0, tc0;
  logic [3:0]  og, ig, ngo, ngi;
  logic [3:0]  ty, tx, ntap;
  logic [$clog2(TR)-1:0] pr;
  logic [$clog2(TC)-1:0] pc;
  logic deconv;
  assign deconv = (c.kind == LT_DECONV);

  // ---------------- input window of the current tile ----------------
  logic signed [17:0] win_r0, win_c0;
  logic [4:0] win_nr, win_nc;
  always_comb begin
    if (deconv) begin
      win_r0 = 18'(first_src(tr0));
      win_c0 = 18'(first_src(tc0));
      win_nr = 5'(first_src(tr0 + 16'(TR - 1)) + 16'(NCAND) - first_src(tr0));
      win_nc = 5'(first_src(tc0 + 16'(TC - 1)) + 16'(NCAND) - first_src(tc0));
    end else begin
      win_r0 = $signed({2'b0, tr0}) - 18'(c.k >> 1);
      win_c0 = $signed({2'b0, tc0}) - 18'(c.k >> 1);
      win_nr = 5'(TR) + 5'(c.k) - 5'd1;
      win_nc = 5'(TC) + 5'(c.k) - 5'd1;
    end
  end

  // ---------------- sub-blocks ----------------
  logic ld_start, ld_done, st_start, st_done;
  logic buf_we;
  logic [$clog2(BDEPTH)-1:0] buf_waddr, buf_raddr;
  feat_t buf_wdata [LANES];
  feat_t buf_rdata [LANES];
  logic [31:0] in_plane, out_plane;
  assign in_plane  = c.in_base  + 32'(ig) * 32'(c.in_h)  * 32'(c.in_w);
  assign out_plane = c.out_base + 32'(og) * 32'(c.out_h) * 32'(c.out_w);

  tile_loader #(.LANES(LANES), .IN_R(IN_R), .IN_C(IN_C)) u_load (
    .clk, .rst_n, .start(ld_start), .base(in_plane), .in_h(c.in_h), .in_w(c.in_w),
    .r0(win_r0), .c0(win_c0), .nr(win_nr), .nc(win_nc), .done(ld_done),
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_ready, .rd_resp_data,
    .buf_we, .buf_waddr, .buf_wdata);

  tile_buffer #(.LANES(LANES), .DEPTH(BDEPTH)) u_buf (
    .clk, .we(buf_we), .waddr(buf_waddr), .wdata(buf_wdata),
    .raddr(buf_raddr), .rdata(buf_rdata));

  // ---------------- tap / address generation ----------------
  logic [15:0] oy, ox, sy, sx;
  logic signed [16:0] dky, dkx;
  logic [3:0] ky, kx;
  logic tap_ok;
  logic [4:0] brow, bcol;
  always_comb begin
    oy = tr0 + 16'(pr);
    ox = tc0 + 16'(pc);
    sy = first_src(oy) + 16'(ty);
    sx = first_src(ox) + 16'(tx);
    dky = $signed({1'b0, oy}) + 17'(DPAD) - $signed({1'b0, place(sy)});
    dkx = $signed({1'b0, ox}) + 17'(DPAD) - $signed({1'b0, place(sx)});
    if (deconv) begin
      tap_ok = dky >= 0 && dky < 17'(DK) && dkx >= 0 && dkx < 17'(DK)
               && sy < c.in_h && sx < c.in_w;
      ky   = 4'(dky);
      kx   = 4'(dkx);
      brow = 5'(sy - 16'(win_r0));
      bcol = 5'(sx - 16'(win_c0));
    end else begin
      tap_ok = 1'b1;
      ky   = ty;
      kx   = tx;
      brow = 5'(pr) + 5'(ty);
      bcol = 5'(pc) + 5'(tx);
    end
    if (!tap_ok) begin brow = '0; bcol = '0; end
  end
  assign buf_raddr = ($clog2(BDEPTH))'(brow * IN_C + bcol);

  wgt_t w [LANES][LANES];
  weight_rom #(.LANES(LANES)) u_wrom (
    .layer(c.idx), .og(og), .ig(ig), .ky(ky), .kx(kx), .cin(c.cin), .cout(c.cout), .w(w));

  acc_t psum [LANES];
  pe_array #(.LANES(LANES)) u_pe (.act(buf_rdata), .w(w), .en_in(tap_ok), .psum(psum));

  logic acc_en, acc_first;
  logic [$clog2(ADEPTH)-1:0] acc_raddr;
  acc_t acc_rdata [LANES];
  assign acc_en    = (state == S_COMP);
  assign acc_first = (ig == 0) && (ty == 0) && (tx == 0);
  assign mac_busy  = acc_en;

  acc_buffer #(.LANES(LANES), .DEPTH(ADEPTH)) u_acc (
    .clk, .acc_en, .first(acc_first), .addr(($clog2(ADEPTH))'(pr * TC + pc)),
    .psum(psum), .raddr(acc_raddr), .racc(acc_rdata));

  tile_storer #(.LANES(LANES), .TR(TR), .TC(TC)) u_store (
    .clk, .rst_n, .start(st_start), .base(out_plane), .out_h(c.out_h), .out_w(c.out_w),
    .r0(tr0), .c0(tc0), .layer(c.idx), .og(og), .cout(c.cout), .act(c.act), .done(st_done),
    .acc_raddr, .acc_rdata, .wr_valid, .wr_ready, .wr_addr, .wr_data);

  assign ld_start = (state == S_LOAD);
  assign st_start = (state == S_STORE);

  // ---------------- loop-nest controller ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; c <= '0;
      tr0 <= '0; tc0 <= '0; og <= '0; ig <= '0; ngo <= '0; ngi <= '0;
      ty <= '0; tx <= '0; ntap <= '0; pr <= '0; pc <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          c    <= cfg;
          ngi  <= 4'((cfg.cin  + 7'(LANES) - 7'd1) / 7'(LANES));
          ngo  <= 4'((cfg.cout + 7'(LANES) - 7'd1) / 7'(LANES));
          ntap <= (cfg.kind == LT_DECONV) ? 4'(NCAND) : cfg.k;
          tr0 <= '0; tc0 <= '0; og <= '0; ig <= '0;
          state <= S_LOAD;
        end
        S_LOAD: state <= S_WAIT_LOAD;
        S_WAIT_LOAD: if (ld_done) begin
          ty <= '0; tx <= '0; pr <= '0; pc <= '0;
          state <= S_COMP;
        end
        S_COMP: begin
          if (pc == ($clog2(TC))'(TC - 1)) begin
            pc <= '0;
            if (pr == ($clog2(TR))'(TR - 1)) begin
              pr <= '0;
              if (tx == ntap - 4'd1) begin
                tx <= '0;
                if (ty == ntap - 4'd1) begin
                  ty <= '0;
                  if (ig == ngi - 4'd1) state <= S_STORE;
                  else begin ig <= ig + 4'd1; state <= S_LOAD; end
                end else ty <= ty + 4'd1;
              end else tx <= tx + 4'd1;
            end else pr <= pr + 1'b1;
          end else pc <= pc + 1'b1;
        end
        S_STORE: state <= S_WAIT_STORE;
        S_WAIT_STORE: if (st_done) begin
          ig <= '0;
          state <= S_LOAD;
          if (og == ngo - 4'd1) begin
            og <= '0;
            if (tc0 + 16'(TC) >= c.out_w) begin
              tc0 <= '0;
              if (tr0 + 16'(TR) >= c.out_h) begin
                tr0 <= '0; state <= S_IDLE; done <= 1'b1;
              end else tr0 <= tr0 + 16'(TR);
            end else tc0 <= tc0 + 16'(TC);
          end else og <= og + 4'd1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_window_fits: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_LOAD |-> win_nr <= 5'(IN_R) && win_nc <= 5'(IN_C));
endmodule
