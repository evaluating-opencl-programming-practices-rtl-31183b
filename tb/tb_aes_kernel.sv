// tb_aes_kernel: end-to-end testbench for the AES kernel, with its default
// parameters.
//
// A host model expands keys (the key schedule runs on the host), places round
// keys and message buffers in a behavioural global memory, launches the
// kernel and compares every word written back with an independent reference
// model.  Runs alternate between two buffer sets, and while the kernel works
// on one set the host fills the other one (host-side double buffering).
//
// Covered: FIPS-197 single-block answers for AES-128/192/256; the IEEE 1619
// XTS-AES-128 vector 1; random runs of every operation (ECB encrypt and
// decrypt, CTR, XTS encrypt and decrypt) for every key length, with and
// without a partial XTS block (ciphertext stealing), with memory latency from
// 1 to 240 clocks and with random hold-offs on all memory channels; an XTS
// encrypt/decrypt round trip; and a timing run showing one block per clock.
// Each mechanism (pipeline stall, read hold-off, tweak seed encryption,
// ciphertext stealing on encrypt and on decrypt, key-2 load, buffer set
// switch with overlapped host writes) is counted and must occur.
`timescale 1ns/1ps
module tb_aes_kernel;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int unsigned KEY1_AT = 0;
  localparam int unsigned KEY2_AT = 16;
  localparam int unsigned BUF_AT  = 1024;
  localparam int unsigned BUF_SET = 8192;   // words per buffer set
  localparam int unsigned OUT_OFF = 4096;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  mode_e mode = MODE_ECB_ENC;
  logic [3:0] num_rounds = 4'd10;
  logic [31:0] n_blocks = '0;
  logic [6:0] tail_bits = '0;
  logic [31:0] in_base = '0, out_base = '0, key1_base = '0, key2_base = '0;
  block_t iv = '0;
  logic busy, done;
  logic rd_req_valid, rd_req_ready, rd_rsp_valid, rd_rsp_ready, wr_valid, wr_ready;
  logic [31:0] rd_req_addr, wr_addr;
  block_t rd_rsp_data, wr_data;
  int latency = 1, stall_pct = 0;

  int checks = 0, failures = 0;

  aes_kernel dut (.*);
  gmem_model u_mem (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ----------------------------------------------------- mechanism counters
  int n_stall = 0, n_rd_holdoff = 0, n_tweak = 0, n_cts_enc = 0, n_cts_dec = 0;
  int n_key2 = 0, n_switch = 0, n_overlap = 0;
  int mode_runs [5] = '{default: 0};
  always @(posedge clk) if (rst_n) begin
    if (busy && !dut.en) n_stall++;
    if (rd_req_valid && !rd_req_ready) n_rd_holdoff++;
    if (dut.tw_load) n_tweak++;
    if (dut.en && dut.p_out_valid && dut.p_tag == TAG_CAPTURE) begin
      if (dut.a_dec) n_cts_dec++; else n_cts_enc++;
    end
    if (dut.rk_we && dut.rk_set) n_key2++;
  end

  // ------------------------------------------------------------ host model
  blk_t rk1 [15], rk2 [15];
  int   nr;

  task automatic put_keys(input logic [255:0] k1, input logic [255:0] k2, input int nk);
    int nr2;
    expand_key(k1, nk, rk1, nr);
    expand_key(k2, nk, rk2, nr2);
    for (int r = 0; r < 15; r++) begin
      u_mem.mem[32'(KEY1_AT + r)] = rk1[r];
      u_mem.mem[32'(KEY2_AT + r)] = rk2[r];
    end
  endtask

  task automatic put_buf(input int set, input blk_t msg [], input int words);
    for (int j = 0; j < words; j++) u_mem.mem[32'(BUF_AT + set*BUF_SET + j)] = msg[j];
  endtask

  int cur_set = 0;

  // Launch one run on buffer set `set`; returns its length in clocks.
  task automatic launch(input mode_e m, input int n, input int tail, input blk_t ivv,
                        input int set, output int cycles);
    @(negedge clk);
    mode = m; num_rounds = 4'(nr); n_blocks = 32'(n); tail_bits = 7'(tail);
    in_base = 32'(BUF_AT + set*BUF_SET); out_base = 32'(BUF_AT + set*BUF_SET + OUT_OFF);
    key1_base = KEY1_AT; key2_base = KEY2_AT; iv = ivv;
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    mode_runs[m]++;
    if (set != cur_set) n_switch++;
    cur_set = set;
  endtask

  task automatic expect_buf(input int set, input blk_t exp [], input int words, input string what);
    blk_t got;
    for (int j = 0; j < words; j++) begin
      got = u_mem.mem[32'(BUF_AT + set*BUF_SET + OUT_OFF + j)];
      checks++;
      if (got !== exp[j]) begin
        failures++;
        $display("%s: word %0d got %h exp %h", what, j, got, exp[j]);
      end
    end
  endtask

  function automatic blk_t rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // Reference result of one run.
  function automatic void reference(input mode_e m, input blk_t msg [], input int n, input int tail,
                                    input blk_t ivv, ref blk_t exp []);
    case (m)
      MODE_ECB_ENC: for (int j = 0; j < n; j++) exp[j] = encrypt(msg[j], rk1, nr);
      MODE_ECB_DEC: for (int j = 0; j < n; j++) exp[j] = decrypt(msg[j], rk1, nr);
      MODE_CTR:     for (int j = 0; j < n; j++) exp[j] = encrypt(ivv + blk_t'(j), rk1, nr) ^ msg[j];
      MODE_XTS_ENC: xts(0, msg, n, tail, rk1, rk2, nr, ivv, exp);
      default:      xts(1, msg, n, tail, rk1, rk2, nr, ivv, exp);
    endcase
  endfunction

  // One random run, with the host preparing the other buffer set meanwhile.
  task automatic random_run(input mode_e m, input int nk, input int n, input int tail);
    blk_t msg [], exp [], ivv, nxt [];
    int words, cyc, set;
    bit is_xts;
    is_xts = m == MODE_XTS_ENC || m == MODE_XTS_DEC;
    if (!is_xts || n == 0) tail = 0;
    words = n + (tail != 0 ? 1 : 0);
    msg = new[words];
    exp = new[words];
    nxt = new[words];
    foreach (msg[j]) msg[j] = rnd();
    foreach (nxt[j]) nxt[j] = rnd();
    ivv = rnd();
    put_keys({rnd(), rnd()}, {rnd(), rnd()}, nk);
    set = 1 - cur_set;
    put_buf(set, msg, words);
    reference(m, msg, n, tail, ivv, exp);
    fork
      launch(m, n, tail, ivv, set, cyc);
      begin  // host fills the other buffer set while the kernel runs
        repeat (2) @(negedge clk);
        if (busy) n_overlap++;
        put_buf(1 - set, nxt, words);
      end
    join
    expect_buf(set, exp, words, $sformatf("mode %0d nk %0d n %0d tail %0d", m, nk, n, tail));
  endtask

  initial begin
    blk_t msg [], exp [];
    int cyc;
    logic [255:0] fk;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // FIPS-197 Appendix C, through the kernel
    fk = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
    msg = new[1]; exp = new[1];
    msg[0] = 128'h00112233445566778899aabbccddeeff;
    for (int kl = 0; kl < 3; kl++) begin
      put_keys(fk, '0, 4 + 2*kl);
      put_buf(0, msg, 1);
      launch(MODE_ECB_ENC, 1, 0, '0, 0, cyc);
      exp[0] = kl == 0 ? 128'h69c4e0d86a7b0430d8cdb78070b4c55a :
               kl == 1 ? 128'hdda97ca4864cdfe06eaf70a0ec0d7191 :
                         128'h8ea2b7ca516745bfeafc49904b496089;
      expect_buf(0, exp, 1, "FIPS-197");
    end

    // IEEE 1619 XTS-AES-128 vector 1: zero keys, sequence number 0, 32 zero bytes
    put_keys('0, '0, 4);
    msg = new[2]; exp = new[2];
    msg[0] = '0; msg[1] = '0;
    put_buf(1, msg, 2);
    launch(MODE_XTS_ENC, 2, 0, '0, 1, cyc);
    exp[0] = 128'h917cf69ebd68b2ec9b9fe9a3eadda692;
    exp[1] = 128'hcd43d2f59598ed858c02c2652fbf922e;
    expect_buf(1, exp, 2, "IEEE 1619 vector 1");

    // timing: ECB, 200 blocks, memory latency 1, no hold-offs
    put_keys({rnd(), rnd()}, '0, 4);
    msg = new[200]; exp = new[200];
    foreach (msg[j]) msg[j] = rnd();
    put_buf(0, msg, 200);
    launch(MODE_ECB_ENC, 200, 0, '0, 0, cyc);
    reference(MODE_ECB_ENC, msg, 200, 0, '0, exp);
    expect_buf(0, exp, 200, "timing run");
    checks++;
    // 11 key words, 200 data words, 15 pipeline stages, a few clocks of handshake
    if (cyc > 200 + 11 + 15 + 8) begin
      failures++;
      $display("200-block run took %0d clocks, expected at most %0d", cyc, 200 + 11 + 15 + 8);
    end
    $display("200-block ECB run: %0d clocks", cyc);

    // random runs over every mode and key length, quiet and noisy memory
    for (int pass = 0; pass < 4; pass++) begin
      latency   = pass == 0 ? 1 : pass == 1 ? 240 : 1 + $urandom % 20;
      stall_pct = pass < 2 ? 0 : 30;
      for (int mi = 0; mi < 5; mi++)
        for (int kl = 0; kl < 3; kl++)
          random_run(mode_e'(mi), 4 + 2*kl, 1 + $urandom % 24,
                     ($urandom % 2) != 0 ? 1 + $urandom % 127 : 0);
    end
    // ciphertext stealing edge cases: one full block, 1 bit and 127 bits
    latency = 3; stall_pct = 20;
    random_run(MODE_XTS_ENC, 4, 1, 1);
    random_run(MODE_XTS_DEC, 4, 1, 127);
    random_run(MODE_XTS_ENC, 8, 5, 127);
    random_run(MODE_XTS_DEC, 6, 5, 8);

    // XTS round trip with a partial block: decrypting the ciphertext gives
    // the message back
    begin
      blk_t ct [];
      int tail = 77;
      msg = new[8]; ct = new[8];
      foreach (msg[j]) msg[j] = rnd();
      msg[7] = msg[7] & headmask(tail);
      put_keys({rnd(), rnd()}, {rnd(), rnd()}, 4);
      put_buf(0, msg, 8);
      launch(MODE_XTS_ENC, 7, tail, 128'h5, 0, cyc);
      for (int j = 0; j < 8; j++) ct[j] = u_mem.mem[32'(BUF_AT + OUT_OFF + j)];
      put_buf(1, ct, 8);
      launch(MODE_XTS_DEC, 7, tail, 128'h5, 1, cyc);
      expect_buf(1, msg, 8, "XTS round trip");
    end

    // every mechanism must have happened
    checks++; if (n_stall == 0)      begin failures++; $display("no pipeline stall"); end
    checks++; if (n_rd_holdoff == 0) begin failures++; $display("no read hold-off"); end
    checks++; if (n_tweak == 0)      begin failures++; $display("no tweak seed"); end
    checks++; if (n_cts_enc == 0)    begin failures++; $display("no stealing on encrypt"); end
    checks++; if (n_cts_dec == 0)    begin failures++; $display("no stealing on decrypt"); end
    checks++; if (n_key2 == 0)       begin failures++; $display("no key-2 load"); end
    checks++; if (n_switch == 0)     begin failures++; $display("no buffer switch"); end
    checks++; if (n_overlap == 0)    begin failures++; $display("no overlapped host write"); end
    for (int mi = 0; mi < 5; mi++) begin
      checks++;
      if (mode_runs[mi] == 0) begin failures++; $display("mode %0d never ran", mi); end
    end
    $display("stalls %0d, read hold-offs %0d, tweak seeds %0d, stealing enc %0d dec %0d, key-2 words %0d, buffer switches %0d, overlapped host writes %0d",
             n_stall, n_rd_holdoff, n_tweak, n_cts_enc, n_cts_dec, n_key2, n_switch, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
