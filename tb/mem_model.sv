// mem_model: behavioural model of the external frame memory (the board's
// DRAM behind the accelerator's memory port), for testbenches only.
// Read requests are accepted when rd_req_ready is high; responses return in
// order after at least one cycle and are held until rd_resp_ready. With
// STALL set, request acceptance, response return and write acceptance
// are randomly withheld to exercise back-pressure.
module mem_model #(
  parameter int unsigned WORD_W = 80,
  parameter int unsigned DEPTH  = 1024,
  parameter bit          STALL  = 1'b1
) (
  input  logic              clk,
  input  logic              rd_req_valid,
  output logic              rd_req_ready,
  input  logic [31:0]       rd_req_addr,
  output logic              rd_resp_valid,
  input  logic              rd_resp_ready,
  output logic [WORD_W-1:0] rd_resp_data,
  input  logic              wr_valid,
  output logic              wr_ready,
  input  logic [31:0]       wr_addr,
  input  logic [WORD_W-1:0] wr_data
);
  logic [WORD_W-1:0] mem [DEPTH];
  logic [WORD_W-1:0] q[$];
  int unsigned out_of_range = 0;

  initial begin
    rd_req_ready = 1'b1; wr_ready = 1'b1; rd_resp_valid = 1'b0; rd_resp_data = '0;
  end

  always @(posedge clk) begin
    if (rd_resp_valid && rd_resp_ready) void'(q.pop_front());
    if (rd_req_valid && rd_req_ready) begin
      if (rd_req_addr < DEPTH) q.push_back(mem[rd_req_addr]);
      else begin q.push_back('0); out_of_range++; end
    end
    if (wr_valid && wr_ready) begin
      if (wr_addr < DEPTH) mem[wr_addr] <= wr_data;
      else out_of_range++;
    end
    rd_req_ready  <= STALL ? ($urandom % 4 != 0) : 1'b1;
    wr_ready      <= STALL ? ($urandom % 4 != 0) : 1'b1;
  end

  // response presented from the queue head; popped on the next edge
  always @(negedge clk) begin
    rd_resp_valid = (q.size() > 0) && (STALL ? ($urandom % 5 != 0) : 1'b1);
    rd_resp_data  = rd_resp_valid ? q[0] : '0;
  end
endmodule
