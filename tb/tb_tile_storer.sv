// tb_tile_storer: fills a model of the accumulator buffer with random sums,
// stores tiles at the frame interior and at the right/bottom edges with
// random write back-pressure, and checks that exactly the in-frame pixels
// are written, each once, at base + y*out_w + x, with the post-processed
// values of fsr_ref_pkg::ref_post. Also checks the cycle count of an
// unstalled interior tile: TR*TC cycles of writes, then the done pulse.
module tb_tile_storer;
  import fsr_pkg::*;
  import fsr_ref_pkg::*;
  localparam int unsigned LANES = 5, TR = 8, TC = 8;
  localparam int unsigned OH = 13, OW = 19, BASE = 100;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done;
  logic [31:0] base;
  logic [15:0] out_h, out_w, r0, c0;
  logic [2:0] layer;
  logic [3:0] og;
  logic [6:0] cout;
  logic act;
  logic [$clog2(TR*TC)-1:0] acc_raddr;
  acc_t acc_rdata [LANES];
  logic wr_valid, wr_ready;
  logic [31:0] wr_addr;
  logic [LANES*FEAT_W-1:0] wr_data;
  acc_t accm [TR*TC][LANES];
  int checks = 0, failures = 0, n_stall = 0;
  logic stall_en = 1'b1;
  int wcount [OH*OW];
  logic [LANES*FEAT_W-1:0] wval [OH*OW];

  tile_storer #(.LANES(LANES), .TR(TR), .TC(TC)) dut (.*);
  always #5 clk = ~clk;
  assign acc_rdata = accm[acc_raddr];

  always @(posedge clk) begin
    if (rst_n && wr_valid && wr_ready) begin
      if (wr_addr >= BASE && wr_addr < BASE + OH*OW) begin
        wcount[wr_addr - BASE] <= wcount[wr_addr - BASE] + 1;
        wval[wr_addr - BASE] <= wr_data;
      end else failures++;
    end
    if (rst_n && wr_valid && !wr_ready) n_stall++;
    wr_ready <= stall_en ? ($urandom % 3 != 0) : 1'b1;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_tile(input int ty, input int tx, output longint cycles);
    longint n;
    foreach (wcount[i]) wcount[i] = 0;
    foreach (accm[i, j]) accm[i][j] = acc_t'(int'($urandom % 4000000) - 2000000);
    r0 = 16'(ty); c0 = 16'(tx);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    cycles = n;
    @(negedge clk);
    for (int y = 0; y < OH; y++)
      for (int x = 0; x < OW; x++) begin
        bit in_tile;
        in_tile = y >= ty && y < ty + TR && x >= tx && x < tx + TC;
        checks++;
        if (wcount[y*OW + x] != (in_tile ? 1 : 0)) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d) written %0d times", y, x, wcount[y*OW + x]);
        end else if (in_tile) begin
          for (int i = 0; i < LANES; i++) begin
            longint e;
            int m;
            m = og * LANES + i;
            e = (m < cout) ? ref_post(longint'(accm[(y-ty)*TC + (x-tx)][i]), layer, m, act) : 0;
            checks++;
            if (longint'($signed(wval[y*OW + x][i*FEAT_W +: FEAT_W])) != e) begin
              failures++;
              if (failures < 10) $display("FAIL (%0d,%0d) lane %0d", y, x, i);
            end
          end
        end
      end
  endtask

  longint cyc;
  initial begin
    base = BASE; out_h = OH; out_w = OW; layer = 3'd1; og = 4'd0; cout = 7'd5; act = 1'b1;
    r0 = '0; c0 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    run_tile(0, 0, cyc);
    run_tile(8, 16, cyc);  // bottom-right corner: 5 x 3 pixels in frame
    layer = 3'd0; og = 4'd6; cout = 7'd35;
    run_tile(0, 8, cyc);
    layer = 3'd4; og = 4'd0; cout = 7'd1; act = 1'b0;
    run_tile(8, 0, cyc);
    stall_en = 1'b0;
    @(negedge clk); @(negedge clk);
    layer = 3'd2; cout = 7'd5; act = 1'b1;
    run_tile(0, 8, cyc);
    checks++;
    if (cyc != TR*TC + 1) begin
      failures++;
      $display("FAIL unstalled tile took %0d cycles, want %0d", cyc, TR*TC + 1);
    end
    checks++;
    if (n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
