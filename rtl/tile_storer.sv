// tile_storer: writes one finished output tile back to external memory.
//
// It walks the TR x TC output positions of the tile whose top-left pixel is
// (r0, c0) in row-major order. For each position inside the out_h x out_w
// frame it reads the LANES accumulators from the accumulator buffer, passes
// them through post_proc (bias, PReLU, saturation) and issues one word write
// to base + row*out_w + col with a valid/ready handshake; positions past the
// frame edge are skipped. `done` pulses for one cycle after the last write is
// accepted. One write per cycle while `wr_ready` is high.
module tile_storer import fsr_pkg::*; #(
  parameter int unsigned LANES = 5,
  parameter int unsigned TR    = 8,
  parameter int unsigned TC    = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [31:0]                 base,
  input  logic [15:0]                 out_h,
  input  logic [15:0]                 out_w,
  input  logic [15:0]                 r0,
  input  logic [15:0]                 c0,
  input  logic [2:0]                  layer,
  input  logic [3:0]                  og,
  input  logic [6:0]                  cout,
  input  logic                        act,
  output logic                        done,
  // accumulator buffer read port
  output logic [$clog2(TR*TC)-1:0]    acc_raddr,
  input  acc_t                        acc_rdata [LANES],
  // memory write channel
  output logic                        wr_valid,
  input  logic                        wr_ready,
  output logic [31:0]                 wr_addr,
  output logic [LANES*FEAT_W-1:0]     wr_data
);
  logic busy;
  logic [$clog2(TR)-1:0] r;
  logic [$clog2(TC)-1:0] c;
  logic [15:0] y, x;
  logic in_frame, adv;
  feat_t v [LANES];

  assign y = r0 + 16'(r);
  assign x = c0 + 16'(c);
  assign in_frame = y < out_h && x < out_w;
  assign acc_raddr = ($clog2(TR*TC))'(r * TC + c);

  post_proc #(.LANES(LANES)) u_post (
    .acc(acc_rdata), .layer(layer), .og(og), .cout(cout), .act(act), .y(v));

  assign wr_valid = busy && in_frame;
  assign wr_addr  = base + 32'(y) * 32'(out_w) + 32'(x);
  always_comb
    for (int unsigned i = 0; i < LANES; i++) wr_data[i*FEAT_W +: FEAT_W] = v[i];

  assign adv = busy && (!in_frame || wr_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; r <= '0; c <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; r <= '0; c <= '0;
      end else if (adv) begin
        if (c == ($clog2(TC))'(TC - 1)) begin
          c <= '0;
          if (r == ($clog2(TR))'(TR - 1)) begin
            busy <= 1'b0; done <= 1'b1;
          end else r <= r + 1'b1;
        end else c <= c + 1'b1;
      end
    end
  end

  a_wr_stable: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid && !wr_ready |=> wr_valid && $stable(wr_addr) && $stable(wr_data));
endmodule
