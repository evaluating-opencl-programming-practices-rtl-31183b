// gmem_model: behavioural model of the board's global memory (DDR) as seen by
// the kernel, for simulation only.
//
// 128-bit words in a sparse array.  Read requests are accepted on rd_req_*
// and answered in order on rd_rsp_* `latency` clocks later (the board
// description gives 240 clocks); writes are accepted on wr_*.  When
// stall_pct is non-zero, each of the three channels is held off at random
// for that percentage of clocks, to exercise the kernel's flow control.
// Testbenches preload and inspect the contents through mem[] directly.
module gmem_model
  import aes_pkg::*;
#(
  parameter int unsigned ADDR_W = 32
) (
  input  logic              clk,
  input  int                latency,
  input  int                stall_pct,
  input  logic              rd_req_valid,
  input  logic [ADDR_W-1:0] rd_req_addr,
  output logic              rd_req_ready,
  output logic              rd_rsp_valid,
  output block_t            rd_rsp_data,
  input  logic              rd_rsp_ready,
  input  logic              wr_valid,
  input  logic [ADDR_W-1:0] wr_addr,
  input  block_t            wr_data,
  output logic              wr_ready
);
  block_t mem [logic [ADDR_W-1:0]];
  typedef struct { logic [ADDR_W-1:0] addr; longint t; } req_t;
  req_t q [$];
  longint cyc = 0;
  logic rsp_gate = 1'b1;

  initial begin
    rd_req_ready = 1'b1;
    wr_ready     = 1'b1;
    rd_rsp_valid = 1'b0;
    rd_rsp_data  = '0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rd_req_valid && rd_req_ready) q.push_back('{rd_req_addr, cyc + longint'(latency)});
    if (rd_rsp_valid && rd_rsp_ready) void'(q.pop_front());
    if (wr_valid && wr_ready) mem[wr_addr] = wr_data;
  end

  // Outputs change on the falling edge so they are stable at the rising edge.
  always @(negedge clk) begin
    rd_req_ready <= stall_pct == 0 || ($urandom % 100) >= stall_pct;
    wr_ready     <= stall_pct == 0 || ($urandom % 100) >= stall_pct;
    rsp_gate      = stall_pct == 0 || ($urandom % 100) >= stall_pct;
    if (q.size() != 0 && q[0].t <= cyc && rsp_gate) begin
      rd_rsp_valid <= 1'b1;
      rd_rsp_data  <= mem.exists(q[0].addr) ? mem[q[0].addr] : '0;
    end else begin
      rd_rsp_valid <= 1'b0;
    end
  end
endmodule
