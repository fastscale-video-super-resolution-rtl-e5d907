// tb_pe_array: drives the MAC array with random and extreme inputs and
// weights and compares each output lane with the sum of products computed in
// 64-bit integers; also checks that en_in = 0 gives zero.
module tb_pe_array;
  import fsr_pkg::*;
  localparam int unsigned LANES = 5;
  feat_t act [LANES];
  wgt_t  w [LANES][LANES];
  logic  en_in;
  acc_t  psum [LANES];
  int checks = 0, failures = 0;

  pe_array #(.LANES(LANES)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < LANES; i++) begin
        act[i] = (t < 5) ? ((t % 2) ? -16'sd32768 : 16'sd32767) : feat_t'($urandom);
        for (int j = 0; j < LANES; j++)
          w[i][j] = (t < 5) ? ((t % 2) ? -8'sd128 : -8'sd128) : wgt_t'($urandom);
      end
      en_in = (t % 7 != 3);
      #1;
      for (int mo = 0; mo < LANES; mo++) begin
        longint s;
        s = 0;
        for (int ni = 0; ni < LANES; ni++) s += longint'(act[ni]) * longint'(w[mo][ni]);
        if (!en_in) s = 0;
        checks++;
        if (longint'(psum[mo]) != s) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d: %0d vs %0d", mo, psum[mo], s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
