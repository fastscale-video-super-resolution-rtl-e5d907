// tile_loader: copies one input tile from external memory into the tile buffer.
//
// The tile is a window of nr x nc pixel positions whose top-left corner is at
// (r0, c0) of an in_h x in_w feature-map plane starting at word address
// `base`; each memory word holds one channel group (LANES feature values) of
// one pixel. Two pointers walk the window in the same row-major order: the
// issue pointer sends one read request per in-frame position (valid/ready
// handshake, any number outstanding), the response pointer writes each
// returning word, in order, to the buffer at row*IN_C+col. Positions outside
// the frame are the convolution's zero padding: they are written as zero and
// never read from memory. `done` pulses for one cycle when the last position
// is written. Read responses arrive in request order with a valid/ready
// handshake; the loader holds `rd_resp_ready` low while it writes padding.
// Loading tiles into on-chip buffers follows the design description; the
// word-wide read channel is this design's own, and axi_master_bridge maps it
// onto AXI4.
module tile_loader import fsr_pkg::*; #(
  parameter int unsigned LANES = 5,
  parameter int unsigned IN_R  = 12,
  parameter int unsigned IN_C  = 12
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  logic [31:0]                       base,
  input  logic [15:0]                       in_h,
  input  logic [15:0]                       in_w,
  input  logic signed [17:0]                r0,
  input  logic signed [17:0]                c0,
  input  logic [4:0]                        nr,
  input  logic [4:0]                        nc,
  output logic                              done,
  // memory read channel
  output logic                              rd_req_valid,
  input  logic                              rd_req_ready,
  output logic [31:0]                       rd_req_addr,
  input  logic                              rd_resp_valid,
  output logic                              rd_resp_ready,
  input  logic [LANES*FEAT_W-1:0]           rd_resp_data,
  // tile buffer write port
  output logic                              buf_we,
  output logic [$clog2(IN_R*IN_C)-1:0]      buf_waddr,
  output feat_t                             buf_wdata [LANES]
);
  logic        busy, iss_end, rsp_end;
  logic [4:0]  qr, qc, pr, pc;
  logic        q_in, p_in;
  logic signed [17:0] qy, qx, py, px;

  assign qy = r0 + 18'(qr);
  assign qx = c0 + 18'(qc);
  assign py = r0 + 18'(pr);
  assign px = c0 + 18'(pc);
  assign q_in = qy >= 0 && qy < $signed({2'b0, in_h}) && qx >= 0 && qx < $signed({2'b0, in_w});
  assign p_in = py >= 0 && py < $signed({2'b0, in_h}) && px >= 0 && px < $signed({2'b0, in_w});

  assign rd_req_valid = busy && !iss_end && q_in;
  assign rd_req_addr  = base + 32'(qy) * 32'(in_w) + 32'(qx);

  logic iss_adv, rsp_adv;
  assign iss_adv = busy && !iss_end && (!q_in || rd_req_ready);
  assign rsp_adv = busy && !rsp_end && (!p_in || rd_resp_valid);

  assign rd_resp_ready = busy && !rsp_end && p_in;
  assign buf_we    = rsp_adv;
  assign buf_waddr = ($clog2(IN_R*IN_C))'(pr * IN_C + pc);
  always_comb
    for (int unsigned i = 0; i < LANES; i++)
      buf_wdata[i] = p_in ? feat_t'(rd_resp_data[i*FEAT_W +: FEAT_W]) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; iss_end <= 1'b0; rsp_end <= 1'b0; done <= 1'b0;
      qr <= '0; qc <= '0; pr <= '0; pc <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; iss_end <= 1'b0; rsp_end <= 1'b0;
        qr <= '0; qc <= '0; pr <= '0; pc <= '0;
      end else if (busy) begin
        if (iss_adv) begin
          if (qc == nc - 5'd1) begin
            qc <= '0; qr <= qr + 5'd1;
            if (qr == nr - 5'd1) iss_end <= 1'b1;
          end else qc <= qc + 5'd1;
        end
        if (rsp_adv) begin
          if (pc == nc - 5'd1) begin
            pc <= '0; pr <= pr + 5'd1;
            if (pr == nr - 5'd1) begin
              rsp_end <= 1'b1; busy <= 1'b0; done <= 1'b1;
            end
          end else pc <= pc + 5'd1;
        end
      end
    end
  end

  // A request, once offered, stays offered with the same address until taken.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    rd_req_valid && !rd_req_ready |=> rd_req_valid && $stable(rd_req_addr));
  // The window must fit the buffer.
  a_fits: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> nr <= 5'(IN_R) && nc <= 5'(IN_C) && nr != 0 && nc != 0);
endmodule
