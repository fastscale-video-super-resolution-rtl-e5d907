// axi_mem_model: behavioural model of the external DRAM as an AXI4 slave,
// for testbenches only. Single-beat bursts; one word per DATA_W-bit beat,
// word index = byte address / (DATA_W/8). AR, AW and W are accepted with
// random back-pressure when STALL is set; read data and write responses come
// back in order after at least one cycle, also randomly delayed (write
// responses by up to 12 cycles). A write
// lands in `mem` when both its address and its data have arrived. Responses
// are OKAY unless the address is past DEPTH (then SLVERR, counted in
// out_of_range).
module axi_mem_model #(
  parameter int unsigned DATA_W = 128,
  parameter int unsigned DEPTH  = 1024,
  parameter bit          STALL  = 1'b1
) (
  input  logic              clk,
  input  logic              m_axi_arvalid,
  output logic              m_axi_arready,
  input  logic [31:0]       m_axi_araddr,
  input  logic [7:0]        m_axi_arlen,
  output logic              m_axi_rvalid,
  input  logic              m_axi_rready,
  output logic [DATA_W-1:0] m_axi_rdata,
  output logic [1:0]        m_axi_rresp,
  output logic              m_axi_rlast,
  input  logic              m_axi_awvalid,
  output logic              m_axi_awready,
  input  logic [31:0]       m_axi_awaddr,
  input  logic              m_axi_wvalid,
  output logic              m_axi_wready,
  input  logic [DATA_W-1:0] m_axi_wdata,
  output logic              m_axi_bvalid,
  input  logic              m_axi_bready,
  output logic [1:0]        m_axi_bresp
);
  localparam int unsigned SHIFT = $clog2(DATA_W / 8);
  logic [DATA_W-1:0] mem [DEPTH];
  logic [31:0] rq[$], awq[$];
  logic [DATA_W-1:0] wq[$];
  logic [1:0] bq[$];
  longint bt[$];
  longint cyc = 0;
  int unsigned out_of_range = 0, bad_len = 0;

  initial begin
    m_axi_arready = 1'b1; m_axi_awready = 1'b1; m_axi_wready = 1'b1;
    m_axi_rvalid = 1'b0; m_axi_rdata = '0; m_axi_rresp = 2'b00; m_axi_rlast = 1'b1;
    m_axi_bvalid = 1'b0; m_axi_bresp = 2'b00;
  end

  always @(posedge clk) begin
    cyc++;
    if (m_axi_rvalid && m_axi_rready) void'(rq.pop_front());
    if (m_axi_bvalid && m_axi_bready) begin void'(bq.pop_front()); void'(bt.pop_front()); end
    if (m_axi_arvalid && m_axi_arready) begin
      rq.push_back(m_axi_araddr >> SHIFT);
      if (m_axi_arlen != 8'd0) bad_len++;
    end
    if (m_axi_awvalid && m_axi_awready) awq.push_back(m_axi_awaddr >> SHIFT);
    if (m_axi_wvalid && m_axi_wready) wq.push_back(m_axi_wdata);
    if (awq.size() > 0 && wq.size() > 0) begin
      logic [31:0] a;
      logic [DATA_W-1:0] d;
      a = awq.pop_front();
      d = wq.pop_front();
      if (a < DEPTH) begin mem[a] = d; bq.push_back(2'b00); end
      else begin out_of_range++; bq.push_back(2'b10); end
      bt.push_back(cyc + (STALL ? longint'($urandom % 12) : 0));
    end
    m_axi_arready <= STALL ? ($urandom % 4 != 0) : 1'b1;
    m_axi_awready <= STALL ? ($urandom % 3 != 0) : 1'b1;
    m_axi_wready  <= STALL ? ($urandom % 3 != 0) : 1'b1;
  end

  always @(negedge clk) begin
    m_axi_rvalid = (rq.size() > 0) && (STALL ? ($urandom % 5 != 0) : 1'b1);
    if (m_axi_rvalid) begin
      if (rq[0] < DEPTH) begin m_axi_rdata = mem[rq[0]]; m_axi_rresp = 2'b00; end
      else begin m_axi_rdata = '0; m_axi_rresp = 2'b10; end
    end else begin
      m_axi_rdata = '0; m_axi_rresp = 2'b00;
    end
    m_axi_bvalid = (bq.size() > 0) && (bt[0] <= cyc) && (STALL ? ($urandom % 3 != 0) : 1'b1);
    m_axi_bresp  = m_axi_bvalid ? bq[0] : 2'b00;
  end
endmodule
