// tb_tile_buffer: random writes and reads of the input tile memory against a
// shadow array; a read returns the last word written to that address, in the
// cycle the address is applied.
module tb_tile_buffer;
  import fsr_pkg::*;
  localparam int unsigned LANES = 5, DEPTH = 144;
  logic clk = 1'b0, we;
  logic [$clog2(DEPTH)-1:0] waddr, raddr;
  feat_t wdata [LANES];
  feat_t rdata [LANES];
  feat_t shadow [DEPTH][LANES];
  int checks = 0, failures = 0;

  tile_buffer #(.LANES(LANES), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; waddr = '0; raddr = '0;
    foreach (wdata[i]) wdata[i] = '0;
    // fill everything once
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 8'(a);
      foreach (wdata[i]) begin wdata[i] = feat_t'($urandom); shadow[a][i] = wdata[i]; end
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = ($urandom % 2) == 1;
      waddr = 8'($urandom % DEPTH);
      foreach (wdata[i]) wdata[i] = feat_t'($urandom);
      if (we) foreach (wdata[i]) shadow[waddr][i] = wdata[i];
      @(posedge clk); #1;
      we = 1'b0;
      raddr = 8'($urandom % DEPTH);
      #1;
      for (int i = 0; i < LANES; i++) begin
        checks++;
        if (rdata[i] !== shadow[raddr][i]) begin
          failures++;
          if (failures < 10) $display("FAIL addr %0d lane %0d", raddr, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
