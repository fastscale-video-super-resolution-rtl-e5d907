// tb_acc_buffer: random accumulate / overwrite ('first') operations on the
// output tile accumulators against a 64-bit shadow model, read back through
// the asynchronous read port.
module tb_acc_buffer;
  import fsr_pkg::*;
  localparam int unsigned LANES = 5, DEPTH = 64;
  logic clk = 1'b0, acc_en, first;
  logic [$clog2(DEPTH)-1:0] addr, raddr;
  acc_t psum [LANES];
  acc_t racc [LANES];
  longint shadow [DEPTH][LANES];
  int checks = 0, failures = 0;

  acc_buffer #(.LANES(LANES), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc_en = 1'b0; first = 1'b0; addr = '0; raddr = '0;
    foreach (psum[i]) psum[i] = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      acc_en = 1'b1; first = 1'b1; addr = 6'(a);
      foreach (psum[i]) begin psum[i] = acc_t'(int'($urandom % 200000) - 100000); shadow[a][i] = longint'(psum[i]); end
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      acc_en = ($urandom % 4) != 0;
      first  = ($urandom % 8) == 0;
      addr   = 6'($urandom % DEPTH);
      foreach (psum[i]) psum[i] = acc_t'(int'($urandom % 2000000) - 1000000);
      if (acc_en) foreach (psum[i]) shadow[addr][i] = first ? longint'(psum[i]) : shadow[addr][i] + longint'(psum[i]);
      @(posedge clk); #1;
      acc_en = 1'b0;
      raddr = 6'($urandom % DEPTH);
      #1;
      for (int i = 0; i < LANES; i++) begin
        checks++;
        if (longint'(racc[i]) != shadow[raddr][i]) begin
          failures++;
          if (failures < 10) $display("FAIL addr %0d lane %0d: %0d vs %0d", raddr, i, racc[i], shadow[raddr][i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
