// aes_dec_pipe: AES inverse cipher, fully unrolled into a pipeline that takes
// one 128-bit block per clock (initiation interval 1).
//
// This is the straight inverse cipher, using the same expanded key as the
// forward cipher in reverse order.  Stage 0 adds round key Nr (chosen by the
// block's round count).  Stage k (1..14) stands for round index r = 14 - k:
// it is a plain register copy while r >= Nr, so a 10- or 12-round block first
// passes through idle stages; otherwise it applies InvShiftRows, InvSubBytes
// and AddRoundKey with round key r, followed by InvMixColumns except in the
// last stage (r = 0).  Because the round-key index of a stage does not depend
// on Nr, every stage reads a fixed key register.  The latency is always
// MAX_ROUNDS + 1 = 15 clocks.
//
// The inverse operations and the separate inverse S-box follow the source's
// description of the table-free ("small") AES variant; the stage layout,
// key-set select and side band are this design's own choices, shared with
// aes_enc_pipe.
//
// Interface: identical to aes_enc_pipe.  en advances the whole pipeline.
// rk[set][r] is round key r of key set `set`: words 4r..4r+3 of the expanded
// key, word 4r in bits 127:96.
module aes_dec_pipe
  import aes_pkg::*;
#(
  parameter int unsigned SB_W  = 128,  // side-band width
  parameter int unsigned NKEYS = 2,    // number of key sets
  localparam int unsigned KS_W = (NKEYS > 1) ? $clog2(NKEYS) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    in_valid,
  input  block_t                  in_data,
  input  logic [3:0]              in_nr,
  input  logic [KS_W-1:0]         in_ksel,
  input  logic [SB_W-1:0]         in_sb,
  input  block_t                  rk [NKEYS][NUM_RK],
  output logic                    out_valid,
  output block_t                  out_data,
  output logic [SB_W-1:0]         out_sb
);

  logic            v   [MAX_ROUNDS+1];
  block_t          st  [MAX_ROUNDS+1];
  logic [3:0]      nr  [MAX_ROUNDS+1];
  logic [KS_W-1:0] ks  [MAX_ROUNDS+1];
  logic [SB_W-1:0] sb  [MAX_ROUNDS+1];

  // Stage 0: key addition with the last round key.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v[0]  <= 1'b0;
      st[0] <= '0;
      nr[0] <= '0;
      ks[0] <= '0;
      sb[0] <= '0;
    end else if (en) begin
      v[0]  <= in_valid;
      st[0] <= in_data ^ rk[in_ksel][in_nr];
      nr[0] <= in_nr;
      ks[0] <= in_ksel;
      sb[0] <= in_sb;
    end
  end

  for (genvar r = 1; r <= MAX_ROUNDS; r++) begin : g_round
    localparam int unsigned RI = MAX_ROUNDS - r;  // round-key index
    block_t ark, nxt;
    always_comb begin
      ark = inv_sub_bytes(inv_shift_rows(st[r-1])) ^ rk[ks[r-1]][RI];
      if (4'(RI) >= nr[r-1])
        nxt = st[r-1];
      else if (RI != 0)
        nxt = inv_mix_columns(ark);
      else
        nxt = ark;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v[r]  <= 1'b0;
        st[r] <= '0;
        nr[r] <= '0;
        ks[r] <= '0;
        sb[r] <= '0;
      end else if (en) begin
        v[r]  <= v[r-1];
        st[r] <= nxt;
        nr[r] <= nr[r-1];
        ks[r] <= ks[r-1];
        sb[r] <= sb[r-1];
      end
    end
  end

  assign out_valid = v[MAX_ROUNDS];
  assign out_data  = st[MAX_ROUNDS];
  assign out_sb    = sb[MAX_ROUNDS];

endmodule
