// tb_aes_dec_pipe: self-checking testbench for aes_dec_pipe.
//
// Checks the FIPS-197 known-answer vectors for AES-128, -192 and -256 in decryption,
// then streams random blocks with random round counts (10/12/14) and key sets
// back to back while the enable is toggled at random, and compares every
// output with the independent reference model.  It also checks that each block
// leaves after exactly 15 enabled clocks and that, with the enable held high,
// one block enters and one leaves per clock (initiation interval 1).
`timescale 1ns/1ps
module tb_aes_dec_pipe;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  logic in_valid = 0;
  block_t in_data = '0;
  logic [3:0] in_nr = 4'd10;
  logic in_ksel = 0;
  logic [15:0] in_sb = '0;
  block_t rk [2][NUM_RK];
  logic out_valid;
  block_t out_data;
  logic [15:0] out_sb;

  int checks = 0, failures = 0;

  aes_dec_pipe #(.SB_W(16), .NKEYS(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  blk_t krk [3][2][15];   // [key length][key set][round]
  int   knr [3];
  typedef struct { blk_t exp; logic [15:0] sb; int t_in; } item_t;
  item_t q [$];
  int en_edges = 0;
  int pops = 0;

  task automatic load_keys(input int kl);
    for (int s = 0; s < 2; s++)
      for (int r = 0; r < 15; r++) rk[s][r] = krk[kl][s][r];
  endtask

  function automatic blk_t ref_op(input blk_t d, input blk_t k [15], input int nr);
    return decrypt(d, k, nr);
  endfunction

  // One clock: apply inputs at the falling edge, score the output that the
  // next rising edge consumes.
  task automatic cycle(input logic v, input blk_t d, input int kl, input logic ks, input logic e);
    item_t it, got;
    @(negedge clk);
    en = e; in_valid = v; in_data = d; in_ksel = ks;
    in_sb = in_sb + 1;
    in_nr = 4'(knr[kl]);
    if (e && out_valid) begin
      if (q.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        got = q.pop_front();
        pops++;
        checks++;
        if (out_data !== got.exp || out_sb !== got.sb) begin
          failures++;
          $display("mismatch: got %h exp %h", out_data, got.exp);
        end
        checks++;
        if (en_edges - got.t_in != 15) begin
          failures++;
          $display("latency %0d", en_edges - got.t_in);
        end
      end
    end
    if (e && v) begin
      it.exp = ref_op(d, krk[kl][ks], knr[kl]);
      it.sb = in_sb;
      it.t_in = en_edges;
      q.push_back(it);
    end
    @(posedge clk);
    if (e) en_edges++;
  endtask

  initial begin
    logic [255:0] fk;
    blk_t tmp [15];
    int nr_tmp;
    blk_t fpt, exp_kat [3];
    int outs, cyc;
    fk  = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
    fpt = 128'h00112233445566778899aabbccddeeff;
    exp_kat[0] = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    exp_kat[1] = 128'hdda97ca4864cdfe06eaf70a0ec0d7191;
    exp_kat[2] = 128'h8ea2b7ca516745bfeafc49904b496089;
    for (int kl = 0; kl < 3; kl++) begin
      expand_key(fk, 4 + 2*kl, tmp, nr_tmp);
      knr[kl] = nr_tmp;
      for (int r = 0; r < 15; r++) krk[kl][0][r] = tmp[r];
      expand_key({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom},
                 4 + 2*kl, tmp, nr_tmp);
      for (int r = 0; r < 15; r++) krk[kl][1][r] = tmp[r];
    end
    // key 000102..0f gives round key 10 = 13111d7fe3944a17f307a78b4d2b30c5
    checks++;
    if (krk[0][0][10] !== 128'h13111d7fe3944a17f307a78b4d2b30c5) begin
      failures++; $display("reference key expansion wrong");
    end
    rk = '{default: '{default: '0}};
    repeat (3) @(posedge clk);
    rst_n = 1;

    // known answers, one key length at a time
    for (int kl = 0; kl < 3; kl++) begin
      load_keys(kl);
      checks++;
      if (decrypt(exp_kat[kl], krk[kl][0], knr[kl]) !== fpt) begin
        failures++; $display("reference model disagrees with FIPS-197 for key length %0d", kl);
      end
      cycle(1, exp_kat[kl], kl, 0, 1);
      for (int i = 0; i < 20; i++) cycle(0, '0, kl, 0, 1);
    end

    // back-to-back random traffic, enable held high: one in and one out per clock
    for (int kl = 0; kl < 3; kl++) begin
      load_keys(kl);
      for (cyc = 0; cyc < 60; cyc++) begin
        cycle(cyc < 40, {$urandom, $urandom, $urandom, $urandom}, kl, 1'($urandom), 1);
      end
      checks++;
      if (q.size() != 0) begin failures++; $display("blocks left in flight"); end
    end
    // throughput: 40 consecutive inputs must produce 40 consecutive outputs
    load_keys(0);
    for (cyc = 0; cyc < 56; cyc++) begin
      if (cyc == 15) outs = pops;
      if (cyc == 55) outs = pops - outs;
      cycle(cyc < 40, {$urandom, $urandom, $urandom, $urandom}, 0, 0, 1);
    end
    checks++;
    if (outs != 40) begin failures++; $display("throughput: %0d outputs in 40 clocks", outs); end

    // random enable and random valid, mixed round counts (key sets of the
    // current key length; round count follows the key length)
    for (int kl = 0; kl < 3; kl++) begin
      load_keys(kl);
      for (cyc = 0; cyc < 400; cyc++)
        cycle(1'($urandom), {$urandom, $urandom, $urandom, $urandom}, kl, 1'($urandom),
              ($urandom % 4) != 0);
      for (cyc = 0; cyc < 40; cyc++) cycle(0, '0, kl, 0, 1);
      checks++;
      if (q.size() != 0) begin failures++; $display("blocks left in flight"); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
