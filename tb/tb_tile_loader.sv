// tb_tile_loader: loads random windows (in_f the frame, across every edge
// and corner, and wholly outside) from a stalling memory model and checks
// every word written to the tile buffer: in-frame positions must carry the
// memory word of that pixel, padding positions zero, each position written
// exactly once. Also checks that no read is issued for a padding position and
// counts read back-pressure and padding.
module tb_tile_loader;
  import fsr_pkg::*;
  localparam int unsigned LANES = 5, IN_R = 12, IN_C = 12;
  localparam int unsigned H = 9, W = 11, BASE = 7;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done;
  logic [31:0] base;
  logic [15:0] in_h, in_w;
  logic signed [17:0] r0, c0;
  logic [4:0] nr, nc;
  logic rd_req_valid, rd_req_ready, rd_resp_valid, rd_resp_ready;
  logic [31:0] rd_req_addr;
  logic [LANES*FEAT_W-1:0] rd_resp_data;
  logic buf_we;
  logic [$clog2(IN_R*IN_C)-1:0] buf_waddr;
  feat_t buf_wdata [LANES];
  int checks = 0, failures = 0, n_pad = 0, n_stall = 0, n_bad_req = 0;
  feat_t got [IN_R*IN_C][LANES];
  int wcount [IN_R*IN_C];

  tile_loader #(.LANES(LANES), .IN_R(IN_R), .IN_C(IN_C)) dut (.*);
  mem_model #(.WORD_W(LANES*FEAT_W), .DEPTH(BASE + H*W), .STALL(1'b1)) u_mem (
    .clk, .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_ready,
    .rd_resp_data, .wr_valid(1'b0), .wr_ready(), .wr_addr(32'd0), .wr_data('0));
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && buf_we) begin
      got[buf_waddr] <= buf_wdata;
      wcount[buf_waddr] <= wcount[buf_waddr] + 1;
    end
    if (rst_n && rd_req_valid && !rd_req_ready) n_stall++;
    if (rst_n && rd_req_valid && (rd_req_addr < BASE || rd_req_addr >= BASE + H*W)) n_bad_req++;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    base = BASE; in_h = H; in_w = W;
    r0 = '0; c0 = '0; nr = 5'd1; nc = 5'd1;
    for (int a = 0; a < BASE + H*W; a++)
      for (int i = 0; i < LANES; i++) u_mem.mem[a][i*FEAT_W +: FEAT_W] = 16'($urandom);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      r0 = 18'(int'($urandom % 16) - 6);
      c0 = 18'(int'($urandom % 18) - 6);
      nr = 5'(1 + $urandom % IN_R);
      nc = 5'(1 + $urandom % IN_C);
      if (t == 0) begin r0 = -18'sd20; c0 = 18'sd0; end   // wholly outside
      if (t == 1) begin r0 = -18'sd2; c0 = -18'sd2; nr = 5'(IN_R); nc = 5'(IN_C); end
      foreach (wcount[i]) wcount[i] = 0;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      @(negedge clk);
      for (int r = 0; r < nr; r++)
        for (int c = 0; c < nc; c++) begin
          int y, x, a;
          bit in_f;
          y = int'(r0) + r; x = int'(c0) + c; a = r * IN_C + c;
          in_f = y >= 0 && y < H && x >= 0 && x < W;
          if (!in_f) n_pad++;
          for (int i = 0; i < LANES; i++) begin
            feat_t e;
            e = in_f ? feat_t'(u_mem.mem[BASE + y*W + x][i*FEAT_W +: FEAT_W]) : '0;
            checks++;
            if (got[a][i] !== e || wcount[a] != 1) begin
              failures++;
              if (failures < 10) $display("FAIL win(%0d,%0d) pos(%0d,%0d) lane %0d: %0d vs %0d (writes %0d)",
                                          r0, c0, r, c, i, got[a][i], e, wcount[a]);
            end
          end
        end
    end
    checks++;
    if (n_bad_req != 0 || u_mem.out_of_range != 0) failures++;
    checks++;
    if (n_pad == 0 || n_stall == 0) failures++;
    $display("padding positions %0d, read stalls %0d", n_pad, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
