// tb_fsr_accel_full: end-to-end test of the accelerator at its default size:
// one full 240 x 426 frame upscaled to 1080 x 1917.
//
// Fills the external memory model with a random 8-bit luma frame, pulses
// start, waits for done and compares every output pixel (lane 0) and the
// unused lanes (zero) with the reference network of fsr_ref_pkg. It also
// checks the cycle counters against the tiled schedule (MAC cycles = sum over
// layers of tiles x output groups x input groups x taps x TR*TC) and counts
// how often each mechanism occurred: read and write back-pressure, the wait
// for outstanding AXI write responses at the end of a layer, zero
// padding at frame borders, masked taps of the fractionally strided layer,
// skipped stores of partial edge tiles, accumulation over several input
// channel groups, partly used channel groups and all five layers.
// The accelerator keeps all its default parameters; the constants below only
// mirror them for the testbench.
module tb_fsr_accel_full;
  import fsr_pkg::*;
  import fsr_ref_pkg::*;

  localparam int unsigned H_IN = 240;
  localparam int unsigned W_IN = 426;
  localparam int unsigned LANES = 5, TR = 8, TC = 8, NUM = 9, DEN = 2;
  localparam int unsigned H_OUT = (H_IN * NUM + DEN - 1) / DEN;
  localparam int unsigned W_OUT = (W_IN * NUM + DEN - 1) / DEN;
  localparam int unsigned PLANE = H_IN * W_IN;
  localparam int unsigned A_BASE = PLANE;
  localparam int unsigned B_BASE = A_BASE + 7 * PLANE;
  localparam int unsigned O_BASE = B_BASE + 7 * PLANE;
  localparam int unsigned DEPTH  = O_BASE + H_OUT * W_OUT;
  localparam longint WATCHDOG = 64'd400_000_000;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic [2:0] cur_layer;
  logic [31:0] mac_cycles, frame_cycles;
  logic bus_error;
  localparam int unsigned DW = 128;
  logic m_axi_arvalid, m_axi_arready, m_axi_rvalid, m_axi_rready, m_axi_rlast;
  logic m_axi_awvalid, m_axi_awready, m_axi_wvalid, m_axi_wready, m_axi_wlast;
  logic m_axi_bvalid, m_axi_bready;
  logic [31:0] m_axi_araddr, m_axi_awaddr;
  logic [7:0] m_axi_arlen, m_axi_awlen;
  logic [2:0] m_axi_arsize, m_axi_awsize;
  logic [1:0] m_axi_arburst, m_axi_awburst, m_axi_rresp, m_axi_bresp;
  logic [DW-1:0] m_axi_rdata, m_axi_wdata;
  logic [DW/8-1:0] m_axi_wstrb;

  always #5 clk = ~clk;

  fsr_accel u_dut (
    .clk, .rst_n, .start, .in_base(32'd0), .out_base(32'(O_BASE)),
    .scr_a_base(32'(A_BASE)), .scr_b_base(32'(B_BASE)),
    .busy, .done, .cur_layer, .mac_cycles, .frame_cycles, .bus_error, .*);

  axi_mem_model #(.DATA_W(DW), .DEPTH(DEPTH), .STALL(1'b1)) u_mem (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  longint n_rd_stall = 0, n_wr_stall = 0, n_pad = 0, n_mask = 0, n_skip = 0;
  longint n_multi_ig = 0, n_part_grp = 0, n_layers = 0, n_drain = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) count_events();
  end

  task automatic count_events();
    if (m_axi_arvalid && !m_axi_arready) n_rd_stall++;
    if (u_dut.wr_valid && !u_dut.wr_ready) n_wr_stall++;
    if (u_dut.drain && u_dut.wr_pending != 0) n_drain++;
    if (u_dut.u_eng.u_load.rsp_adv && !u_dut.u_eng.u_load.p_in) n_pad++;
    if (u_dut.u_eng.acc_en && !u_dut.u_eng.tap_ok) n_mask++;
    if (u_dut.u_eng.u_store.busy && !u_dut.u_eng.u_store.in_frame) n_skip++;
    if (u_dut.u_eng.acc_en && u_dut.u_eng.ig != 0) n_multi_ig++;
    if (u_dut.u_eng.acc_en && u_dut.u_eng.c.cin < 7'(LANES)) n_part_grp++;
    if (u_dut.u_eng.done) n_layers++;
  endtask

  initial begin
    #(WATCHDOG * 10);
    failures++;
    $display("watchdog expired: layer %0d state %0d tr0 %0d tc0 %0d og %0d ig %0d ld_busy %0d iss_end %0d rsp_end %0d st_busy %0d", cur_layer, u_dut.u_eng.state, u_dut.u_eng.tr0, u_dut.u_eng.tc0, u_dut.u_eng.og, u_dut.u_eng.ig, u_dut.u_eng.u_load.busy, u_dut.u_eng.u_load.iss_end, u_dut.u_eng.u_load.rsp_end, u_dut.u_eng.u_store.busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint expected_mac_cycles();
    longint t = 0;
    for (int l = 0; l < 5; l++) begin
      int k, gi, go, oh, ow, taps;
      k  = layer_k(l);
      gi = (layer_cin(l) + LANES - 1) / LANES;
      go = (layer_cout(l) + LANES - 1) / LANES;
      oh = (l == 4) ? H_OUT : H_IN;
      ow = (l == 4) ? W_OUT : W_IN;
      taps = (l == 4) ? 4 : k * k;
      t += longint'((oh + int'(TR) - 1) / int'(TR)) * longint'((ow + int'(TC) - 1) / int'(TC)) * go * gi * taps * TR * TC;
    end
    return t;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  int pix[], ref_out[];
  int ho, wo;
  longint t0, t1;

  initial begin
    pix = new[PLANE];
    foreach (pix[i]) pix[i] = int'($urandom % 256);
    for (int i = 0; i < DEPTH; i++) u_mem.mem[i] = '0;
    foreach (pix[i]) u_mem.mem[i] = DW'(pix[i]);
    ref_network(pix, H_IN, W_IN, NUM, DEN, ref_out, ho, wo);
    check(ho == H_OUT && wo == W_OUT, "output size");

    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    t0 = cyc;
    start <= 1'b0;
    while (!done) @(posedge clk);
    t1 = cyc;
    @(posedge clk);

    for (int y = 0; y < H_OUT; y++)
      for (int x = 0; x < W_OUT; x++) begin
        logic [DW-1:0] wd;
        wd = u_mem.mem[O_BASE + y*W_OUT + x];
        check(int'($signed(wd[FEAT_W-1:0])) == ref_out[y*W_OUT + x] &&
              wd[DW-1:FEAT_W] == '0,
              $sformatf("pixel (%0d,%0d) got %0d want %0d", y, x,
                        $signed(wd[FEAT_W-1:0]), ref_out[y*W_OUT + x]));
      end
    check(u_mem.out_of_range == 0 && u_mem.bad_len == 0 && !bus_error, "bus error or access out of range");
    check(longint'(mac_cycles) == expected_mac_cycles(),
          $sformatf("mac cycles %0d want %0d", mac_cycles, expected_mac_cycles()));
    check(longint'(frame_cycles) >= t1 - t0 - 2 && longint'(frame_cycles) <= t1 - t0 + 2,
          $sformatf("frame cycles %0d vs measured %0d", frame_cycles, t1 - t0));
    $display("frame: %0d cycles, %0d MAC-array cycles", frame_cycles, mac_cycles);
    $display("events: write_drain=%0d rd_stall=%0d wr_stall=%0d pad=%0d masked_tap=%0d skipped_store=%0d multi_group=%0d partial_group=%0d layers=%0d",
             n_drain, n_rd_stall, n_wr_stall, n_pad, n_mask, n_skip, n_multi_ig, n_part_grp, n_layers);
    check(n_rd_stall > 0, "no read back-pressure seen");
    check(n_wr_stall > 0, "no write back-pressure seen");
    check(n_pad > 0, "no zero padding seen");
    check(n_mask > 0, "no masked transposed-convolution tap seen");
    check(n_skip > 0, "no partial edge tile seen");
    check(n_multi_ig > 0, "no multi-group accumulation seen");
    check(n_part_grp > 0, "no partly used channel group seen");
    check(n_layers == 5, "not all five layers ran");
    check(n_drain > 0, "no wait for write responses at a layer end seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
