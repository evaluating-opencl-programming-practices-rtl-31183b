// tb_aes_kernel_payload: the benchmark workload on the kernel with its default
// parameters: one ECB encryption of a 4 MB random payload (262144 blocks,
// the first payload size of the benchmark sweep) with AES-128, through a
// global memory with a read latency of 240 clocks.
//
// Every output block is compared with the reference model, and the run must
// take no more than one clock per block plus a fixed start-up cost (key copy,
// memory latency, pipeline depth), i.e. it must sustain one block per clock.
// The throughput this implies at a given clock rate is printed.
`timescale 1ns/1ps
module tb_aes_kernel_payload;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int unsigned PAYLOAD_BYTES = 4 * 1024 * 1024;
  localparam int unsigned N       = PAYLOAD_BYTES / 16;
  localparam int unsigned IN_AT   = 32'h0010_0000;
  localparam int unsigned OUT_AT  = 32'h0100_0000;
  localparam int unsigned LATENCY = 240;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  mode_e mode = MODE_ECB_ENC;
  logic [3:0] num_rounds = 4'd10;
  logic [31:0] n_blocks = N;
  logic [6:0] tail_bits = '0;
  logic [31:0] in_base = IN_AT, out_base = OUT_AT, key1_base = '0, key2_base = 32'd16;
  block_t iv = '0;
  logic busy, done;
  logic rd_req_valid, rd_req_ready, rd_rsp_valid, rd_rsp_ready, wr_valid, wr_ready;
  logic [31:0] rd_req_addr, wr_addr;
  block_t rd_rsp_data, wr_data;
  int latency = LATENCY, stall_pct = 0;
  int checks = 0, failures = 0;

  aes_kernel dut (.*);
  gmem_model u_mem (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t rk [15];
    int nr, cycles, bound;
    blk_t got;
    expand_key({$urandom, $urandom, $urandom, $urandom, 128'h0}, 4, rk, nr);
    for (int r = 0; r < 15; r++) u_mem.mem[32'(r)] = rk[r];
    for (int j = 0; j < int'(N); j++) u_mem.mem[32'(IN_AT + j)] = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    for (int j = 0; j < int'(N); j++) begin
      got = u_mem.mem[32'(OUT_AT + j)];
      checks++;
      if (got !== encrypt(u_mem.mem[32'(IN_AT + j)], rk, nr)) begin
        failures++;
        if (failures < 10) $display("block %0d wrong", j);
      end
    end
    bound = int'(N) + 11 + LATENCY + 15 + 8;
    checks++;
    if (cycles > bound) begin
      failures++;
      $display("run took %0d clocks, bound %0d", cycles, bound);
    end
    $display("%0d blocks in %0d clocks: %0.3f blocks per clock, %0.1f MB/s at 254.84 MHz",
             N, cycles, real'(N) / real'(cycles), real'(PAYLOAD_BYTES) / real'(cycles) * 254.84);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
