// tb_axi_master_bridge: drives the engine side of the AXI4 bridge with random
// word writes followed by reads of the same words, against the AXI memory
// model with random back-pressure on every channel. Checks that each read
// returns the last data written, that byte addresses are word * 16, that
// wr_pending counts unanswered writes and returns to zero, that the AW and W
// halves of a write are accepted in either order (both orders are counted),
// and that an access past the memory raises the sticky bus_error.
module tb_axi_master_bridge;
  import fsr_pkg::*;
  localparam int unsigned LANES = 5, DW = 128, DEPTH = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rd_req_valid = 1'b0, rd_req_ready, rd_resp_valid, rd_resp_ready = 1'b0;
  logic [31:0] rd_req_addr = '0, wr_addr = '0;
  logic [LANES*FEAT_W-1:0] rd_resp_data, wr_data = '0;
  logic wr_valid = 1'b0, wr_ready, bus_error;
  logic [15:0] wr_pending;
  logic m_axi_arvalid, m_axi_arready, m_axi_rvalid, m_axi_rready, m_axi_rlast;
  logic m_axi_awvalid, m_axi_awready, m_axi_wvalid, m_axi_wready, m_axi_wlast;
  logic m_axi_bvalid, m_axi_bready;
  logic [31:0] m_axi_araddr, m_axi_awaddr;
  logic [7:0] m_axi_arlen, m_axi_awlen;
  logic [2:0] m_axi_arsize, m_axi_awsize;
  logic [1:0] m_axi_arburst, m_axi_awburst, m_axi_rresp, m_axi_bresp;
  logic [DW-1:0] m_axi_rdata, m_axi_wdata;
  logic [DW/8-1:0] m_axi_wstrb;
  int checks = 0, failures = 0, n_aw_first = 0, n_w_first = 0, max_pend = 0;
  logic [LANES*FEAT_W-1:0] shadow [DEPTH];

  axi_master_bridge #(.LANES(LANES), .DATA_W(DW), .ADDR_W(32)) dut (.*);
  axi_mem_model #(.DATA_W(DW), .DEPTH(DEPTH), .STALL(1'b1)) u_mem (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (m_axi_awvalid && m_axi_awready && !(m_axi_wvalid && m_axi_wready)) n_aw_first++;
    if (m_axi_wvalid && m_axi_wready && !(m_axi_awvalid && m_axi_awready)) n_w_first++;
    if (int'(wr_pending) > max_pend) max_pend = int'(wr_pending);
    if (m_axi_awvalid && m_axi_awaddr[3:0] != 4'd0) failures++;
    if (m_axi_arvalid && (m_axi_arlen != 0 || m_axi_arsize != 3'd4 || m_axi_arburst != 2'b01)) failures++;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      u_mem.mem[a] = '0;
      shadow[a] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      wr_valid = 1'b1;
      wr_addr  = 32'($urandom % DEPTH);
      wr_data  = {$urandom, $urandom, $urandom};
      #1;
      chk(m_axi_awaddr == wr_addr * 16, "write byte address");
      shadow[wr_addr] = wr_data;
      do @(posedge clk); while (!wr_ready);
      @(negedge clk);
      wr_valid = 1'b0;
    end
    repeat (40) @(negedge clk);
    chk(wr_pending == 0, "writes still pending at rest");
    fork
      begin
        for (int t = 0; t < 300; t++) begin
          rd_req_valid = 1'b1;
          rd_req_addr  = 32'(t % DEPTH);
          do @(posedge clk); while (!rd_req_ready);
          @(negedge clk);
          rd_req_valid = 1'b0;
        end
      end
      begin
        for (int t = 0; t < 300; t++) begin
          rd_resp_ready = ($urandom % 3 != 0);
          @(posedge clk);
          while (!(rd_resp_valid && rd_resp_ready)) begin
            @(negedge clk);
            rd_resp_ready = ($urandom % 3 != 0);
            @(posedge clk);
          end
          chk(rd_resp_data == shadow[t % DEPTH], $sformatf("read %0d", t));
          @(negedge clk);
          rd_resp_ready = 1'b0;
        end
      end
    join
    chk(!bus_error, "no bus error on legal accesses");
    // out-of-range write
    wr_valid = 1'b1; wr_addr = 32'(DEPTH + 5); wr_data = '0;
    do @(posedge clk); while (!wr_ready);
    @(negedge clk);
    wr_valid = 1'b0;
    repeat (40) @(negedge clk);
    chk(bus_error, "bus error after an illegal write");
    chk(n_aw_first > 0 && n_w_first > 0, "both AW-first and W-first acceptance seen");
    chk(max_pend > 0, "pending writes seen");
    $display("aw first %0d, w first %0d, max pending %0d", n_aw_first, n_w_first, max_pend);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
