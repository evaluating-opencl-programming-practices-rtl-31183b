// aes_enc_pipe: AES forward cipher, fully unrolled into a pipeline that takes
// one 128-bit block per clock (initiation interval 1).
//
// Stage 0 performs the initial AddRoundKey.  Stages 1..14 each hold one round:
// SubBytes, ShiftRows, MixColumns and AddRoundKey for rounds below the
// block's round count, the final round (no MixColumns) at the round count, and
// a plain register copy above it.  The round count (10, 12 or 14 for AES-128,
// -192, -256) therefore travels with each block, as does a key-set select and
// an opaque side-band word, so blocks of different key lengths or key sets can
// follow each other back to back.  The latency is always MAX_ROUNDS + 1 = 15
// clocks.
//
// The round structure and the round counts follow the AES description of the
// source; unrolling every round into its own stage mirrors its fully unrolled,
// II = 1 single-work-item kernel with the round keys in registers.  The fixed
// latency with pass-through stages, the key-set select and the side band are
// this design's own choices.
//
// Interface: en advances the whole pipeline (a global stall when low).
// rk[set][r] is round key r of key set `set`: words 4r..4r+3 of the expanded
// key, word 4r in bits 127:96.
module aes_enc_pipe
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

  // Stage 0: initial key addition.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v[0]  <= 1'b0;
      st[0] <= '0;
      nr[0] <= '0;
      ks[0] <= '0;
      sb[0] <= '0;
    end else if (en) begin
      v[0]  <= in_valid;
      st[0] <= in_data ^ rk[in_ksel][0];
      nr[0] <= in_nr;
      ks[0] <= in_ksel;
      sb[0] <= in_sb;
    end
  end

  for (genvar r = 1; r <= MAX_ROUNDS; r++) begin : g_round
    block_t sr, nxt;
    always_comb begin
      sr = shift_rows(sub_bytes(st[r-1]));
      if (4'(r) < nr[r-1])
        nxt = mix_columns(sr) ^ rk[ks[r-1]][r];
      else if (4'(r) == nr[r-1])
        nxt = sr ^ rk[ks[r-1]][r];
      else
        nxt = st[r-1];
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
