// axi_master_bridge: AXI4 master port of the accelerator.
//
// The layer engine moves one word (one channel group of one pixel, LANES x 16
// bits) per transfer over two simple channels: a read channel (request
// valid/ready + in-order response valid/ready) and a write channel
// (valid/ready). This bridge turns them into single-beat AXI4 bursts on a
// DATA_W-bit bus: word address w becomes byte address w * DATA_W/8, ARLEN and
// AWLEN are 0, the burst size is the full bus width, IDs are 0 and the word
// sits in the low LANES*16 data bits (upper bits written as zero, all strobes
// set). Reads map straight onto AR and R (responses return in order because
// all use one ID). A write is offered on AW and W at the same time; each
// channel is dropped once accepted, and the engine's write completes when both
// have been. Write responses are always accepted; `wr_pending` counts writes
// whose B response has not yet arrived, so the top can wait for the memory to
// hold a layer's results before the next layer reads them. A non-OKAY RRESP or
// BRESP sets the sticky `bus_error` until reset.
// The use of AXI for input and output data follows the design description,
// where the HLS tool generated these ports; burst length 1, one ID and the
// bus width are this design's choices.
module axi_master_bridge import fsr_pkg::*; #(
  parameter int unsigned LANES  = 5,
  parameter int unsigned DATA_W = 128,
  parameter int unsigned ADDR_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // engine side
  input  logic                    rd_req_valid,
  output logic                    rd_req_ready,
  input  logic [31:0]             rd_req_addr,
  output logic                    rd_resp_valid,
  input  logic                    rd_resp_ready,
  output logic [LANES*FEAT_W-1:0] rd_resp_data,
  input  logic                    wr_valid,
  output logic                    wr_ready,
  input  logic [31:0]             wr_addr,
  input  logic [LANES*FEAT_W-1:0] wr_data,
  output logic [15:0]             wr_pending,
  output logic                    bus_error,
  // AXI4 master
  output logic                    m_axi_arvalid,
  input  logic                    m_axi_arready,
  output logic [ADDR_W-1:0]       m_axi_araddr,
  output logic [7:0]              m_axi_arlen,
  output logic [2:0]              m_axi_arsize,
  output logic [1:0]              m_axi_arburst,
  input  logic                    m_axi_rvalid,
  output logic                    m_axi_rready,
  input  logic [DATA_W-1:0]       m_axi_rdata,
  input  logic [1:0]              m_axi_rresp,
  input  logic                    m_axi_rlast,
  output logic                    m_axi_awvalid,
  input  logic                    m_axi_awready,
  output logic [ADDR_W-1:0]       m_axi_awaddr,
  output logic [7:0]              m_axi_awlen,
  output logic [2:0]              m_axi_awsize,
  output logic [1:0]              m_axi_awburst,
  output logic                    m_axi_wvalid,
  input  logic                    m_axi_wready,
  output logic [DATA_W-1:0]       m_axi_wdata,
  output logic [DATA_W/8-1:0]     m_axi_wstrb,
  output logic                    m_axi_wlast,
  input  logic                    m_axi_bvalid,
  output logic                    m_axi_bready,
  input  logic [1:0]              m_axi_bresp
);
  localparam int unsigned BYTES_LOG = $clog2(DATA_W / 8);

  // ---------------- read ----------------
  assign m_axi_arvalid = rd_req_valid;
  assign rd_req_ready  = m_axi_arready;
  assign m_axi_araddr  = ADDR_W'(rd_req_addr) << BYTES_LOG;
  assign m_axi_arlen   = 8'd0;
  assign m_axi_arsize  = 3'(BYTES_LOG);
  assign m_axi_arburst = 2'b01;                     // INCR
  assign rd_resp_valid = m_axi_rvalid;
  assign m_axi_rready  = rd_resp_ready;
  assign rd_resp_data  = m_axi_rdata[LANES*FEAT_W-1:0];

  // ---------------- write ----------------
  logic aw_done, w_done;
  assign m_axi_awvalid = wr_valid && !aw_done;
  assign m_axi_wvalid  = wr_valid && !w_done;
  assign m_axi_awaddr  = ADDR_W'(wr_addr) << BYTES_LOG;
  assign m_axi_awlen   = 8'd0;
  assign m_axi_awsize  = 3'(BYTES_LOG);
  assign m_axi_awburst = 2'b01;
  assign m_axi_wdata   = DATA_W'(wr_data);
  assign m_axi_wstrb   = '1;
  assign m_axi_wlast   = 1'b1;
  assign m_axi_bready  = 1'b1;
  assign wr_ready = (aw_done || m_axi_awready) && (w_done || m_axi_wready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_done <= 1'b0; w_done <= 1'b0; wr_pending <= '0; bus_error <= 1'b0;
    end else begin
      if (wr_valid && wr_ready) begin
        aw_done <= 1'b0; w_done <= 1'b0;
      end else begin
        if (m_axi_awvalid && m_axi_awready) aw_done <= 1'b1;
        if (m_axi_wvalid && m_axi_wready)   w_done  <= 1'b1;
      end
      case ({wr_valid && wr_ready, m_axi_bvalid})
        2'b10:   wr_pending <= wr_pending + 16'd1;
        2'b01:   wr_pending <= wr_pending - 16'd1;
        default: ;
      endcase
      if ((m_axi_rvalid && m_axi_rready && m_axi_rresp != 2'b00) ||
          (m_axi_bvalid && m_axi_bresp != 2'b00))
        bus_error <= 1'b1;
    end
  end

  a_single_beat: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_rvalid |-> m_axi_rlast);
  a_no_b_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_bvalid |-> wr_pending != 0 || (wr_valid && wr_ready));
endmodule
