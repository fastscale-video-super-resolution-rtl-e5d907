// tb_layer_sequencer: a stand-in layer engine answers each eng_start with a
// done pulse after a random delay; the testbench checks that the sequencer
// issues exactly five layers per frame, in order, each with the FSRCNN-s
// shape (kernel, channels, kind, activation), the right feature-map sizes and
// the ping-pong addresses frame -> A -> B -> A -> B -> output, and that done
// follows the fifth layer. Two frames are run.
module tb_layer_sequencer;
  import fsr_pkg::*;
  localparam int unsigned H = 24, W = 30;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [31:0] in_base, out_base, scr_a_base, scr_b_base;
  logic busy, done, eng_start, eng_done;
  logic [2:0] cur_layer;
  layer_cfg_t eng_cfg;
  int checks = 0, failures = 0, nstart = 0;

  layer_sequencer #(.H_IN(H), .W_IN(W), .SCALE_NUM(9), .SCALE_DEN(2)) dut (.*);
  always #5 clk = ~clk;

  // stand-in engine
  int delay = -1;
  always @(posedge clk) begin
    eng_done <= 1'b0;
    if (rst_n && eng_start) delay <= 2 + int'($urandom % 10);
    else if (delay > 0) delay <= delay - 1;
    else if (delay == 0) begin eng_done <= 1'b1; delay <= -1; end
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  int exp_k[5]    = '{5, 1, 3, 1, 9};
  int exp_cin[5]  = '{1, 35, 5, 5, 35};
  int exp_cout[5] = '{35, 5, 5, 35, 1};

  always @(posedge clk) if (rst_n && eng_start) begin
    logic [31:0] ei, eo;
    int l;
    l = nstart % 5;
    case (l)
      0: begin ei = in_base;    eo = scr_a_base; end
      1: begin ei = scr_a_base; eo = scr_b_base; end
      2: begin ei = scr_b_base; eo = scr_a_base; end
      3: begin ei = scr_a_base; eo = scr_b_base; end
      default: begin ei = scr_b_base; eo = out_base; end
    endcase
    chk(eng_cfg.idx == 3'(l) && cur_layer == 3'(l), $sformatf("layer index %0d", l));
    chk(eng_cfg.k == 4'(exp_k[l]) && eng_cfg.cin == 7'(exp_cin[l]) && eng_cfg.cout == 7'(exp_cout[l]),
        $sformatf("layer %0d shape", l));
    chk(eng_cfg.kind == ((l == 4) ? LT_DECONV : LT_CONV) && eng_cfg.act == (l != 4),
        $sformatf("layer %0d kind/act", l));
    chk(eng_cfg.in_base == ei && eng_cfg.out_base == eo, $sformatf("layer %0d addresses", l));
    chk(eng_cfg.in_h == 16'(H) && eng_cfg.in_w == 16'(W) &&
        eng_cfg.out_h == ((l == 4) ? 16'(108) : 16'(H)) &&
        eng_cfg.out_w == ((l == 4) ? 16'(135) : 16'(W)), $sformatf("layer %0d sizes", l));
    nstart++;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_base = 32'h100; out_base = 32'h9000; scr_a_base = 32'h2000; scr_b_base = 32'h5000;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < 2; f++) begin
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      chk(busy, "busy after start");
      while (!done) @(negedge clk);
      chk(nstart == 5 * (f + 1), $sformatf("frame %0d: %0d layer starts", f, nstart));
      @(negedge clk);
      chk(!busy, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
