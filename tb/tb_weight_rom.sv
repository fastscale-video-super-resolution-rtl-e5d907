// tb_weight_rom: checks the fixed-weight block returned for random layers,
// channel groups and taps against fsr_pkg::weight_of, including the zeroing
// of channels beyond the layer's input and output channel counts.
module tb_weight_rom;
  import fsr_pkg::*;
  localparam int unsigned LANES = 5;
  logic [2:0] layer;
  logic [3:0] og, ig, ky, kx;
  logic [6:0] cin, cout;
  wgt_t w [LANES][LANES];
  int checks = 0, failures = 0, zeros = 0;

  weight_rom #(.LANES(LANES)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      int l;
      l = t % 5;
      layer = 3'(l);
      cin  = 7'(layer_cin(l));
      cout = 7'(layer_cout(l));
      og = 4'($urandom % 8);
      ig = 4'($urandom % 8);
      ky = 4'($urandom % layer_k(l));
      kx = 4'($urandom % layer_k(l));
      #1;
      for (int mo = 0; mo < LANES; mo++)
        for (int ni = 0; ni < LANES; ni++) begin
          int m, n;
          wgt_t exp;
          m = og * LANES + mo;
          n = ig * LANES + ni;
          exp = (m < cout && n < cin) ? weight_of(layer, 7'(m), 7'(n), ky, kx) : '0;
          if (!(m < cout && n < cin)) zeros++;
          checks++;
          if (w[mo][ni] !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL l%0d m%0d n%0d: %0d vs %0d", l, m, n, w[mo][ni], exp);
          end
        end
    end
    if (zeros == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
