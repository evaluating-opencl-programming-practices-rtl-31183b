// xts_tweak_gen: running XTS tweak T_j = E_key2(i) * alpha^j.
//
// XTS whitens block j with T_j, the encrypted tweak seed multiplied j times by
// the primitive element alpha of GF(2^128) (field polynomial
// x^128 + x^7 + x^2 + 1).  Rather than raising alpha to the power j, the
// generator keeps T_j in a register and multiplies it by alpha once per block:
// load stores the seed T_0 = E_key2(i), and each step replaces T_j by T_{j+1}.
// tweak shows T_j and tweak_next shows T_{j+1} in the same cycle, which the
// ciphertext-stealing step of XTS decryption needs (it uses the tweaks of the
// last two blocks in swapped order).  Multiplying by alpha is a one-bit
// left shift of the tweak read as a little-endian number, with 0x87 folded
// back when bit 127 falls out.  load has priority over step.
//
// The field, polynomial and the incremental form follow the source; the byte
// order of the tweak (little-endian, as in IEEE 1619) is this design's choice.
module xts_tweak_gen
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  block_t seed,
  input  logic   step,
  output block_t tweak,
  output block_t tweak_next
);

  assign tweak_next = gf128_mul_alpha(tweak);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     tweak <= '0;
    else if (load)  tweak <= seed;
    else if (step)  tweak <= tweak_next;
  end

endmodule
