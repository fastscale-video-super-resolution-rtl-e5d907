// tb_layer_engine: runs single layers on random feature maps through the
// layer engine with a stalling memory model and compares every output
// channel value with fsr_ref_pkg (ref_conv for the 5x5, 1x1 and 3x3
// convolutions, ref_deconv for the 4.5-stride transposed layer). Also checks
// the number of MAC-array cycles against the tiled schedule and counts the
// masked taps of the transposed layer and the partial edge tiles.
module tb_layer_engine;
  import fsr_pkg::*;
  import fsr_ref_pkg::*;
  localparam int unsigned LANES = 5, TR = 8, TC = 8, NUM = 9, DEN = 2;
  localparam int unsigned H = 9, W = 12;
  localparam int unsigned HO = (H * NUM + DEN - 1) / DEN, WO = (W * NUM + DEN - 1) / DEN;
  localparam int unsigned OUT_BASE = 7 * H * W;
  localparam int unsigned DEPTH = OUT_BASE + 7 * HO * WO;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done, mac_busy;
  layer_cfg_t cfg;
  logic rd_req_valid, rd_req_ready, rd_resp_valid, rd_resp_ready, wr_valid, wr_ready;
  logic [31:0] rd_req_addr, wr_addr;
  logic [LANES*FEAT_W-1:0] rd_resp_data, wr_data;
  int checks = 0, failures = 0;
  longint n_mac = 0, n_mask = 0;

  layer_engine #(.LANES(LANES), .TR(TR), .TC(TC), .SCALE_NUM(NUM), .SCALE_DEN(DEN)) dut (.*);
  mem_model #(.WORD_W(LANES*FEAT_W), .DEPTH(DEPTH), .STALL(1'b1)) u_mem (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && mac_busy) n_mac++;
    if (rst_n && mac_busy && !dut.tap_ok) n_mask++;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_layer(input int l);
    int cin, cout, k, oh, ow, gi, go, taps;
    int inp[], ref_o[];
    int rho, rwo;
    longint m0, exp_mac;
    bit dcv;
    dcv = (l == 4);
    cin = layer_cin(l); cout = layer_cout(l); k = layer_k(l);
    oh = dcv ? HO : H; ow = dcv ? WO : W;
    inp = new[cin * H * W];
    foreach (inp[i]) inp[i] = int'($urandom % 1024) - 512;
    for (int a = 0; a < DEPTH; a++) u_mem.mem[a] = '0;
    for (int n = 0; n < cin; n++)
      for (int p = 0; p < H * W; p++)
        u_mem.mem[(n / LANES) * H * W + p][(n % LANES)*FEAT_W +: FEAT_W] = 16'(inp[n*H*W + p]);
    if (dcv) ref_deconv(inp, cin, H, W, NUM, DEN, ref_o, rho, rwo);
    else     ref_conv(l, inp, cin, cout, k, H, W, 1'b1, ref_o);
    cfg = '0;
    cfg.idx = 3'(l); cfg.kind = dcv ? LT_DECONV : LT_CONV; cfg.k = 4'(k);
    cfg.cin = 7'(cin); cfg.cout = 7'(cout); cfg.act = !dcv;
    cfg.in_h = 16'(H); cfg.in_w = 16'(W); cfg.out_h = 16'(oh); cfg.out_w = 16'(ow);
    cfg.in_base = 32'd0; cfg.out_base = 32'(OUT_BASE);
    m0 = n_mac;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    @(negedge clk);
    for (int m = 0; m < cout; m++)
      for (int p = 0; p < oh * ow; p++) begin
        int got;
        got = int'($signed(u_mem.mem[OUT_BASE + (m / LANES) * oh * ow + p][(m % LANES)*FEAT_W +: FEAT_W]));
        checks++;
        if (got != ref_o[m*oh*ow + p]) begin
          failures++;
          if (failures < 10) $display("FAIL layer %0d ch %0d pix %0d: %0d vs %0d", l, m, p, got, ref_o[m*oh*ow + p]);
        end
      end
    gi = (cin + LANES - 1) / LANES; go = (cout + LANES - 1) / LANES;
    taps = dcv ? 4 : k * k;
    exp_mac = longint'((oh + TR - 1) / TR) * ((ow + TC - 1) / TC) * go * gi * taps * TR * TC;
    checks++;
    if (n_mac - m0 != exp_mac) begin
      failures++;
      $display("FAIL layer %0d MAC cycles %0d want %0d", l, n_mac - m0, exp_mac);
    end
  endtask

  initial begin
    cfg = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run_layer(2);
    run_layer(0);
    run_layer(1);
    run_layer(4);
    checks++;
    if (n_mask == 0 || u_mem.out_of_range != 0) failures++;
    $display("masked taps %0d", n_mask);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
