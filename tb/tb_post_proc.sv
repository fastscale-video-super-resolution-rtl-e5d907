// tb_post_proc: checks bias addition, the drop of the weight fraction bits,
// PReLU (on and off) and saturation at both ends of the Q8.8 range, plus the
// zeroing of lanes past the layer's channel count, against the reference
// arithmetic of fsr_ref_pkg::ref_post. Counts that saturation and the
// negative PReLU branch were exercised.
module tb_post_proc;
  import fsr_pkg::*;
  import fsr_ref_pkg::*;
  localparam int unsigned LANES = 5;
  acc_t acc [LANES];
  logic [2:0] layer;
  logic [3:0] og;
  logic [6:0] cout;
  logic act;
  feat_t y [LANES];
  int checks = 0, failures = 0, n_sat = 0, n_neg = 0;

  post_proc #(.LANES(LANES)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      int l;
      l = t % 5;
      layer = 3'(l);
      cout = 7'(layer_cout(l));
      og = 4'($urandom % 8);
      act = (l != 4) && ($urandom % 4 != 0);
      foreach (acc[i]) begin
        case ($urandom % 4)
          0: acc[i] = acc_t'(longint'($urandom % 10000000) * 1000 - 64'sd5000000000);
          default: acc[i] = acc_t'(int'($urandom % 2000000) - 1000000);
        endcase
      end
      #1;
      for (int i = 0; i < LANES; i++) begin
        longint e;
        int m;
        m = og * LANES + i;
        e = (m < cout) ? ref_post(longint'(acc[i]), l, m, act) : 0;
        if (e == 32767 || e == -32768) n_sat++;
        if (act && e < 0 && e > -32768) n_neg++;
        checks++;
        if (longint'(y[i]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL l%0d m%0d acc %0d: %0d vs %0d", l, m, acc[i], y[i], e);
        end
      end
    end
    if (n_sat == 0 || n_neg == 0) failures++;
    $display("saturated %0d, negative PReLU %0d", n_sat, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
