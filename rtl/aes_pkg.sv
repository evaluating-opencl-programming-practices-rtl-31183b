// aes_pkg: types, constants and pure functions shared by the AES kernel.
//
// A 128-bit block is held as a packed vector whose most significant byte
// (bits 127:120) is the first byte of the block in memory.  AES arranges the
// sixteen bytes column by column in a 4x4 grid, so column c is bits
// [127-32c -: 32] and row r of that column is its byte r counted from the top.
//
// The S-box is not stored as a pasted table: it is computed at elaboration as
// the multiplicative inverse in GF(2^8) (modulo x^8+x^4+x^3+x+1) followed by
// the AES affine map, and the inverse S-box is built by inverting that table.
// The round operations follow the AES standard: SubBytes, ShiftRows (rows
// rotated left by 0, 1, 2, 3), MixColumns and AddRoundKey, plus their inverses.
//
// gf128_mul_alpha() multiplies an XTS tweak by the primitive element alpha of
// GF(2^128) with field polynomial x^128 + x^7 + x^2 + 1.  The tweak is read as
// a little-endian number (first byte least significant), as in IEEE 1619;
// that byte order is this design's choice of convention.
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [255:0][7:0] sbox_t;

  // Largest number of rounds (AES-256) and number of 128-bit round keys.
  localparam int unsigned MAX_ROUNDS = 14;
  localparam int unsigned NUM_RK     = MAX_ROUNDS + 1;

  // Operations of the kernel.
  typedef enum logic [2:0] {
    MODE_ECB_ENC = 3'd0,
    MODE_ECB_DEC = 3'd1,
    MODE_CTR     = 3'd2,
    MODE_XTS_ENC = 3'd3,
    MODE_XTS_DEC = 3'd4
  } mode_e;

  // What the kernel does with a block leaving the cipher pipeline.
  typedef enum logic [1:0] {
    TAG_WRITE   = 2'd0,  // write to the output buffer
    TAG_CAPTURE = 2'd1,  // keep for ciphertext stealing, do not write
    TAG_TWEAK   = 2'd2   // encrypted XTS tweak seed E_key2(i)
  } tag_e;

  // ---------------------------------------------------------------- GF(2^8)
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, x;
    p = 8'h00;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = xtime(x);
    end
    return p;
  endfunction

  // a^254 is the inverse of a for a != 0, and 0 for a == 0.
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] r, sq;
    r  = 8'h01;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);   // exponent 254 = 0b1111_1110
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] b, input int n);
    return (b << n) | (b >> (8 - n));
  endfunction

  function automatic sbox_t gen_sbox();
    sbox_t t;
    logic [7:0] b;
    for (int i = 0; i < 256; i++) begin
      b = gf_inv(8'(i));
      t[i] = b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
    end
    return t;
  endfunction

  function automatic sbox_t gen_inv_sbox();
    sbox_t s, t;
    s = gen_sbox();
    t = '0;
    for (int i = 0; i < 256; i++) t[s[i]] = 8'(i);
    return t;
  endfunction

  localparam sbox_t SBOX     = gen_sbox();
  localparam sbox_t INV_SBOX = gen_inv_sbox();

  // ------------------------------------------------------- state access
  // Byte k of the block (k = 4*column + row).
  function automatic logic [7:0] get_byte(input block_t s, input int k);
    return s[127 - 8*k -: 8];
  endfunction

  function automatic block_t sub_bytes(input block_t s);
    block_t o;
    for (int k = 0; k < 16; k++) o[127 - 8*k -: 8] = SBOX[get_byte(s, k)];
    return o;
  endfunction

  function automatic block_t inv_sub_bytes(input block_t s);
    block_t o;
    for (int k = 0; k < 16; k++) o[127 - 8*k -: 8] = INV_SBOX[get_byte(s, k)];
    return o;
  endfunction

  // Row r is rotated left by r places: out[r][c] = in[r][(c + r) mod 4].
  function automatic block_t shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = get_byte(s, 4*((c + r) % 4) + r);
    return o;
  endfunction

  function automatic block_t inv_shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*((c + r) % 4) + r) -: 8] = get_byte(s, 4*c + r);
    return o;
  endfunction

  // Each column is multiplied by the circulant matrix (2 3 1 1).
  function automatic block_t mix_columns(input block_t s);
    block_t o;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c);     a1 = get_byte(s, 4*c + 1);
      a2 = get_byte(s, 4*c + 2); a3 = get_byte(s, 4*c + 3);
      o[127 - 32*c -: 32] = {
        xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3,
        a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3,
        a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3),
        (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3)};
    end
    return o;
  endfunction

  // Inverse matrix (e b d 9).
  function automatic block_t inv_mix_columns(input block_t s);
    block_t o;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c);     a1 = get_byte(s, 4*c + 1);
      a2 = get_byte(s, 4*c + 2); a3 = get_byte(s, 4*c + 3);
      o[127 - 32*c -: 32] = {
        gf_mul(a0, 8'h0e) ^ gf_mul(a1, 8'h0b) ^ gf_mul(a2, 8'h0d) ^ gf_mul(a3, 8'h09),
        gf_mul(a0, 8'h09) ^ gf_mul(a1, 8'h0e) ^ gf_mul(a2, 8'h0b) ^ gf_mul(a3, 8'h0d),
        gf_mul(a0, 8'h0d) ^ gf_mul(a1, 8'h09) ^ gf_mul(a2, 8'h0e) ^ gf_mul(a3, 8'h0b),
        gf_mul(a0, 8'h0b) ^ gf_mul(a1, 8'h0d) ^ gf_mul(a2, 8'h09) ^ gf_mul(a3, 8'h0e)};
    end
    return o;
  endfunction

  // ------------------------------------------------------------ GF(2^128)
  function automatic block_t byte_swap(input block_t s);
    block_t o;
    for (int k = 0; k < 16; k++) o[8*k +: 8] = s[127 - 8*k -: 8];
    return o;
  endfunction

  function automatic block_t gf128_mul_alpha(input block_t t);
    block_t le;
    le = byte_swap(t);
    le = {le[126:0], 1'b0} ^ (le[127] ? 128'h87 : 128'h0);
    return byte_swap(le);
  endfunction

  // Mask selecting the first n bits of a block (n = 0..127).
  function automatic block_t head_mask(input logic [6:0] n);
    return ~({128{1'b1}} >> n);
  endfunction

endpackage
