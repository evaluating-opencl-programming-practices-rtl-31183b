// aes_kernel: single-work-item AES kernel for ECB, CTR and XTS.
//
// One run of the kernel processes a buffer of blocks held in global memory.
// The host fills in the run's arguments and pulses start; the kernel then
//   1. copies the expanded key(s) from global memory into round_key_regs
//      (Nr+1 round keys of key 1, then, for XTS, Nr+1 round keys of key 2);
//   2. for XTS, sends the tweak seed i through the forward cipher with key 2
//      and loads the result E_key2(i) into xts_tweak_gen;
//   3. streams the input buffer through a fully unrolled cipher pipeline, one
//      block per clock, and writes each result to the output buffer at the
//      same index;
//   4. pulses done once the last result has been written.
//
// Per mode, with block index j, message block M_j and the result written O_j:
//   ECB encrypt  O_j = E_k1(M_j)                 (aes_enc_pipe)
//   ECB decrypt  O_j = D_k1(M_j)                 (aes_dec_pipe)
//   CTR          O_j = E_k1(IV + j) xor M_j      (counter = 128-bit big-endian)
//   XTS encrypt  O_j = E_k1(M_j xor T_j) xor T_j,  T_j = E_k2(i) * alpha^j
//   XTS decrypt  O_j = D_k1(M_j xor T_j) xor T_j
// The pipeline carries a side-band word with each block: the message block
// for CTR, the tweak T_j for XTS, so that the final xor happens on the way out.
//
// XTS ciphertext stealing: when tail_bits (1..127) is non-zero in an XTS mode,
// the buffer holds n_blocks full blocks followed by one partial block m =
// n_blocks, stored left-aligned in a 128-bit word.  Block m-1 is processed as
// usual but its result X is kept instead of written.  Once X is back, the
// partial block is completed with the trailing bits of X, the hybrid block is
// processed and written to index m-1, and the first tail_bits bits of X (the
// rest zero) are written to index m.  Encryption uses T_{m-1} for block m-1
// and T_m for the hybrid; decryption swaps the two tweaks.  Holding the
// partial block until X has left the pipeline drains the pipeline once, which
// costs about one pipeline latency at the end of the run.
//
// Global memory interface: 128-bit words, word addresses.  Reads are split
// into a request channel (rd_req_*) and an in-order response channel
// (rd_rsp_*), both valid/ready.  Writes use one valid/ready channel.  Key
// words for round r of a key set are at key_base + r.  The pipeline stalls as
// a whole (en low) while a result waits for wr_ready.
//
// Timing: with a memory that answers every cycle the kernel takes in one data
// block per clock (II = 1); a run of n blocks takes about
// n + (key words) + memory latency + 15 clocks (+ 16 for the XTS tweak seed,
// + 16 for ciphertext stealing).
//
// From the source: the five operations, the equations above, ciphertext
// stealing, round keys copied into registers, one block per clock, key
// schedule done by the host.  This design's own choices: the argument list,
// 128-bit word memory ports with valid/ready handshakes, big-endian counter,
// little-endian tweak, zero-filled partial output word, partial block stored
// left-aligned, ignoring tail_bits in ECB/CTR and when n_blocks is 0.
module aes_kernel
  import aes_pkg::*;
#(
  parameter int unsigned ADDR_W = 32,  // global memory word address width
  parameter int unsigned CNT_W  = 32   // block count width
) (
  input  logic              clk,
  input  logic              rst_n,
  // run arguments, sampled at start
  input  logic              start,
  input  mode_e             mode,
  input  logic [3:0]        num_rounds,  // 10, 12 or 14
  input  logic [CNT_W-1:0]  n_blocks,    // number of full blocks
  input  logic [6:0]        tail_bits,   // XTS: bits in a partial last block
  input  logic [ADDR_W-1:0] in_base,
  input  logic [ADDR_W-1:0] out_base,
  input  logic [ADDR_W-1:0] key1_base,
  input  logic [ADDR_W-1:0] key2_base,
  input  block_t            iv,          // CTR initial counter, XTS tweak seed i
  output logic              busy,
  output logic              done,
  // global memory read
  output logic              rd_req_valid,
  output logic [ADDR_W-1:0] rd_req_addr,
  input  logic              rd_req_ready,
  input  logic              rd_rsp_valid,
  input  block_t            rd_rsp_data,
  output logic              rd_rsp_ready,
  // global memory write
  output logic              wr_valid,
  output logic [ADDR_W-1:0] wr_addr,
  output block_t            wr_data,
  input  logic              wr_ready
);

  localparam int unsigned SB_W = $bits(block_t) + $bits(tag_e);

  // ------------------------------------------------------------ arguments
  mode_e             a_mode;
  logic [3:0]        a_nr;
  logic [CNT_W-1:0]  a_n;
  logic [6:0]        a_tail;
  logic [ADDR_W-1:0] a_in, a_out, a_k1, a_k2;
  block_t            a_iv;
  logic              a_xts, a_dec, a_cts;

  // ----------------------------------------------------------------- state
  logic [CNT_W:0]    rq_cnt;      // read requests issued
  logic [CNT_W:0]    rs_cnt;      // read responses taken
  logic [CNT_W:0]    blk_cnt;     // data blocks sent into the pipeline
  logic [CNT_W:0]    wr_cnt;      // result words written
  logic              keys_done, tweak_sent, tweak_ready;
  logic              x_valid, tail_pending;
  block_t            x_reg, t_save;

  // Derived counts (one extra bit so n_blocks = 2^CNT_W - 1 plus a tail fits).
  logic [CNT_W:0]    n_keys, n_key1, n_data, n_total;
  assign n_key1  = (CNT_W+1)'(a_nr) + 1'b1;
  assign n_keys  = a_xts ? (n_key1 << 1) : n_key1;
  assign n_data  = (CNT_W+1)'(a_n) + (CNT_W+1)'(a_cts);
  assign n_total = n_keys + n_data;

  // ------------------------------------------------------------ submodules
  logic   rk_we;
  logic   rk_set;
  logic [3:0] rk_idx;
  block_t rk [2][NUM_RK];

  round_key_regs #(.NKEYS(2)) u_rk (
    .clk, .rst_n, .we(rk_we), .wset(rk_set), .widx(rk_idx),
    .wdata(rd_rsp_data), .rk
  );

  logic   tw_load, tw_step;
  block_t tweak, tweak_next;
  block_t pipe_res;          // pipeline result after the final xor

  xts_tweak_gen u_tweak (
    .clk, .rst_n, .load(tw_load), .seed(pipe_res), .step(tw_step),
    .tweak, .tweak_next
  );

  logic              en;
  logic              e_in_valid, d_in_valid;
  block_t            p_in_data;
  logic              p_in_ksel;
  logic [SB_W-1:0]   p_in_sb;
  logic              e_out_valid, d_out_valid;
  block_t            e_out_data, d_out_data;
  logic [SB_W-1:0]   e_out_sb, d_out_sb;

  aes_enc_pipe #(.SB_W(SB_W), .NKEYS(2)) u_enc (
    .clk, .rst_n, .en,
    .in_valid(e_in_valid), .in_data(p_in_data), .in_nr(a_nr),
    .in_ksel(p_in_ksel), .in_sb(p_in_sb), .rk,
    .out_valid(e_out_valid), .out_data(e_out_data), .out_sb(e_out_sb)
  );

  aes_dec_pipe #(.SB_W(SB_W), .NKEYS(2)) u_dec (
    .clk, .rst_n, .en,
    .in_valid(d_in_valid), .in_data(p_in_data), .in_nr(a_nr),
    .in_ksel(p_in_ksel), .in_sb(p_in_sb), .rk,
    .out_valid(d_out_valid), .out_data(d_out_data), .out_sb(d_out_sb)
  );

  // --------------------------------------------------------- pipeline exit
  // Only one of the two pipelines holds blocks at a time: the tweak seed goes
  // through the forward pipeline before any data block is sent.
  logic            p_out_valid;
  block_t          p_out_data, p_side;
  logic [SB_W-1:0] p_out_sb;
  tag_e            p_tag;

  assign p_out_valid = e_out_valid | d_out_valid;
  assign p_out_data  = e_out_valid ? e_out_data : d_out_data;
  assign p_out_sb    = e_out_valid ? e_out_sb : d_out_sb;
  assign p_side      = p_out_sb[SB_W-1 -: $bits(block_t)];
  assign p_tag       = tag_e'(p_out_sb[$bits(tag_e)-1:0]);
  // ECB results leave as they are; CTR and XTS add the side band.
  assign pipe_res = (a_mode == MODE_ECB_ENC || a_mode == MODE_ECB_DEC || p_tag == TAG_TWEAK)
                    ? p_out_data : (p_out_data ^ p_side);

  logic out_write;
  assign out_write = p_out_valid && p_tag == TAG_WRITE;
  assign en        = !(out_write && !wr_ready);

  assign tw_load   = p_out_valid && p_tag == TAG_TWEAK;

  always_comb begin
    wr_valid = 1'b0;
    wr_addr  = a_out + ADDR_W'(wr_cnt);
    wr_data  = pipe_res;
    if (out_write) begin
      wr_valid = 1'b1;
    end else if (tail_pending) begin
      wr_valid = 1'b1;
      wr_data  = x_reg & head_mask(a_tail);
    end
  end

  // --------------------------------------------------------- read requests
  assign rd_req_addr = (rq_cnt < n_key1) ? a_k1 + ADDR_W'(rq_cnt)          :
                       (rq_cnt < n_keys) ? a_k2 + ADDR_W'(rq_cnt - n_key1) :
                                           a_in + ADDR_W'(rq_cnt - n_keys);
  assign rd_req_valid = busy && rq_cnt < n_total;

  // ------------------------------------------------------ read responses
  logic is_key_rsp, data_ok, is_tail_blk, is_x_blk, take_data;
  logic [3:0]     key_off;
  assign is_key_rsp  = rs_cnt < n_keys;
  assign key_off     = 4'((rs_cnt < n_key1) ? rs_cnt : (rs_cnt - n_key1));
  assign rk_we       = busy && rd_rsp_valid && is_key_rsp;
  assign rk_set      = !(rs_cnt < n_key1);
  assign rk_idx      = key_off;

  assign data_ok     = keys_done && (!a_xts || tweak_ready);
  assign is_tail_blk = a_cts && blk_cnt == (CNT_W+1)'(a_n);
  assign is_x_blk    = a_cts && blk_cnt == (CNT_W+1)'(a_n) - 1'b1;
  assign take_data   = busy && rd_rsp_valid && !is_key_rsp && data_ok && en &&
                       (!is_tail_blk || x_valid);
  assign rd_rsp_ready = is_key_rsp ? busy : take_data;

  // --------------------------------------------------------- pipeline entry
  logic send_tweak;
  assign send_tweak = busy && a_xts && keys_done && !tweak_sent && en;

  block_t data_in, ctr;
  tag_e   in_tag;
  block_t in_tw;
  assign ctr     = a_iv + block_t'(blk_cnt);
  assign data_in = is_tail_blk
                   ? ((rd_rsp_data & head_mask(a_tail)) | (x_reg & ~head_mask(a_tail)))
                   : rd_rsp_data;

  always_comb begin
    // tweak for this block; ciphertext stealing swaps the last two on decrypt
    in_tw = tweak;
    if (a_dec && is_x_blk)         in_tw = tweak_next;
    else if (a_dec && is_tail_blk) in_tw = t_save;
    in_tag = is_x_blk ? TAG_CAPTURE : TAG_WRITE;

    p_in_ksel = 1'b0;
    p_in_data = data_in;
    p_in_sb   = {in_tw, in_tag};
    if (send_tweak) begin
      p_in_ksel = 1'b1;
      p_in_data = a_iv;
      p_in_sb   = {block_t'(0), TAG_TWEAK};
    end else begin
      unique case (a_mode)
        MODE_CTR: begin
          p_in_data = ctr;
          p_in_sb   = {rd_rsp_data, TAG_WRITE};
        end
        MODE_XTS_ENC, MODE_XTS_DEC: p_in_data = data_in ^ in_tw;
        default: p_in_sb = {block_t'(0), TAG_WRITE};
      endcase
    end
  end

  assign e_in_valid = send_tweak || (take_data && !a_dec);
  assign d_in_valid = take_data && a_dec;
  assign tw_step    = take_data && a_xts;

  // ------------------------------------------------------------- control
  logic [CNT_W:0] n_out;
  assign n_out = n_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      done         <= 1'b0;
      a_mode       <= MODE_ECB_ENC;
      a_nr         <= 4'd10;
      a_n          <= '0;
      a_tail       <= '0;
      a_in         <= '0;
      a_out        <= '0;
      a_k1         <= '0;
      a_k2         <= '0;
      a_iv         <= '0;
      a_xts        <= 1'b0;
      a_dec        <= 1'b0;
      a_cts        <= 1'b0;
      rq_cnt       <= '0;
      rs_cnt       <= '0;
      blk_cnt      <= '0;
      wr_cnt       <= '0;
      keys_done    <= 1'b0;
      tweak_sent   <= 1'b0;
      tweak_ready  <= 1'b0;
      x_valid      <= 1'b0;
      tail_pending <= 1'b0;
      x_reg        <= '0;
      t_save       <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy         <= 1'b1;
          a_mode       <= mode;
          a_nr         <= num_rounds;
          a_n          <= n_blocks;
          a_tail       <= tail_bits;
          a_in         <= in_base;
          a_out        <= out_base;
          a_k1         <= key1_base;
          a_k2         <= key2_base;
          a_iv         <= iv;
          a_xts        <= mode == MODE_XTS_ENC || mode == MODE_XTS_DEC;
          a_dec        <= mode == MODE_ECB_DEC || mode == MODE_XTS_DEC;
          a_cts        <= (mode == MODE_XTS_ENC || mode == MODE_XTS_DEC) &&
                          tail_bits != 0 && n_blocks != 0;
          rq_cnt       <= '0;
          rs_cnt       <= '0;
          blk_cnt      <= '0;
          wr_cnt       <= '0;
          keys_done    <= 1'b0;
          tweak_sent   <= 1'b0;
          tweak_ready  <= 1'b0;
          x_valid      <= 1'b0;
          tail_pending <= 1'b0;
        end
      end else begin
        if (rd_req_valid && rd_req_ready) rq_cnt <= rq_cnt + 1'b1;
        if (rd_rsp_valid && rd_rsp_ready) rs_cnt <= rs_cnt + 1'b1;
        if (rd_rsp_valid && rd_rsp_ready && rs_cnt == n_keys - 1'b1) keys_done <= 1'b1;
        if (send_tweak) tweak_sent <= 1'b1;
        if (tw_load)    tweak_ready <= 1'b1;
        if (take_data) begin
          blk_cnt <= blk_cnt + 1'b1;
          if (a_dec && is_x_blk) t_save <= tweak;
        end
        if (en && p_out_valid && p_tag == TAG_CAPTURE) begin
          x_reg   <= pipe_res;
          x_valid <= 1'b1;
        end
        if (wr_valid && wr_ready) begin
          wr_cnt <= wr_cnt + 1'b1;
          // the stolen tail follows the hybrid block's write
          if (out_write && a_cts && wr_cnt == (CNT_W+1)'(a_n) - 1'b1)
            tail_pending <= 1'b1;
          if (!out_write && tail_pending)
            tail_pending <= 1'b0;
        end
        if (wr_cnt == n_out && keys_done && (!a_xts || tweak_ready)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------------------ assertions
  // A response never arrives before its request.
  assert property (@(posedge clk) disable iff (!rst_n) rs_cnt <= rq_cnt);
  // Write data stays stable while the memory holds the write off.
  assert property (@(posedge clk) disable iff (!rst_n)
                   wr_valid && !wr_ready |=> wr_valid && $stable(wr_data) && $stable(wr_addr));

endmodule
