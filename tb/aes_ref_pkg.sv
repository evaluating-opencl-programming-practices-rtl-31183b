// aes_ref_pkg: behavioural reference model for the testbenches.
//
// An AES model written independently of the RTL: the S-box is generated with
// the exponent/logarithm walk over the generator 3 (not by inversion), the
// state is an array of bytes, and rounds are plain loops.  It also carries the
// host side of the system: the AES key expansion (which the kernel expects to
// find in global memory), and byte-level models of CTR and XTS (IEEE 1619
// little-endian tweak multiplication, ciphertext stealing) used to predict
// what the kernel writes.  Blocks are 128-bit vectors, first byte in bits
// 127:120.
package aes_ref_pkg;

  typedef logic [127:0] blk_t;
  typedef byte unsigned bytes16_t [16];

  function automatic byte unsigned rl(input byte unsigned x, input int n);
    return byte'((x << n) | (x >> (8 - n)));
  endfunction

  function automatic void make_sbox(output byte unsigned s [256], output byte unsigned is [256]);
    byte unsigned p, q, x;
    p = 1; q = 1;
    do begin
      p = p ^ byte'(p << 1) ^ ((p & 8'h80) != 0 ? 8'h1b : 8'h00);
      q = q ^ byte'(q << 1);
      q = q ^ byte'(q << 2);
      q = q ^ byte'(q << 4);
      if ((q & 8'h80) != 0) q = q ^ 8'h09;
      x = q ^ rl(q, 1) ^ rl(q, 2) ^ rl(q, 3) ^ rl(q, 4) ^ 8'h63;
      s[p] = x;
    end while (p != 1);
    s[0] = 8'h63;
    for (int i = 0; i < 256; i++) is[s[i]] = byte'(i);
  endfunction

  function automatic byte unsigned mul(input byte unsigned a, input byte unsigned b);
    byte unsigned r;
    r = 0;
    while (b != 0) begin
      if (b[0]) r ^= a;
      a = byte'(a << 1) ^ (a[7] ? 8'h1b : 8'h00);
      b = b >> 1;
    end
    return r;
  endfunction

  function automatic bytes16_t to_bytes(input blk_t b);
    bytes16_t o;
    for (int i = 0; i < 16; i++) o[i] = b[127-8*i -: 8];
    return o;
  endfunction

  function automatic blk_t from_bytes(input bytes16_t o);
    blk_t b;
    for (int i = 0; i < 16; i++) b[127-8*i -: 8] = o[i];
    return b;
  endfunction

  // Key expansion: key holds nk 32-bit words left-aligned in 256 bits.
  // Returns the round keys rk[r] (words 4r..4r+3, word 4r in bits 127:96).
  function automatic void expand_key(input logic [255:0] key, input int nk,
                                     output blk_t rk [15], output int nr);
    byte unsigned s [256], is [256];
    logic [31:0] w [60];
    logic [31:0] t;
    byte unsigned rc;
    make_sbox(s, is);
    nr = nk + 6;
    for (int i = 0; i < nk; i++) w[i] = key[255 - 32*i -: 32];
    rc = 1;
    for (int i = nk; i < 4*(nr+1); i++) begin
      t = w[i-1];
      if (i % nk == 0) begin
        t = {t[23:0], t[31:24]};
        t = {s[t[31:24]], s[t[23:16]], s[t[15:8]], s[t[7:0]]};
        t[31:24] = t[31:24] ^ rc;
        rc = mul(rc, 2);
      end else if (nk > 6 && i % nk == 4) begin
        t = {s[t[31:24]], s[t[23:16]], s[t[15:8]], s[t[7:0]]};
      end
      w[i] = w[i-nk] ^ t;
    end
    for (int r = 0; r < 15; r++) rk[r] = '0;
    for (int r = 0; r <= nr; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic blk_t encrypt(input blk_t pt, input blk_t rk [15], input int nr);
    byte unsigned s [256], is [256];
    bytes16_t a, b, k;
    make_sbox(s, is);
    a = to_bytes(pt ^ rk[0]);
    for (int r = 1; r <= nr; r++) begin
      for (int i = 0; i < 16; i++) a[i] = s[a[i]];
      // ShiftRows: byte (row, col) comes from (row, col + row)
      for (int c = 0; c < 4; c++)
        for (int w = 0; w < 4; w++) b[4*c + w] = a[4*((c + w) % 4) + w];
      if (r != nr)
        for (int c = 0; c < 4; c++)
          for (int w = 0; w < 4; w++)
            a[4*c + w] = mul(b[4*c + w], 2) ^ mul(b[4*c + (w+1)%4], 3) ^
                         b[4*c + (w+2)%4] ^ b[4*c + (w+3)%4];
      else a = b;
      k = to_bytes(rk[r]);
      for (int i = 0; i < 16; i++) a[i] ^= k[i];
    end
    return from_bytes(a);
  endfunction

  function automatic blk_t decrypt(input blk_t ct, input blk_t rk [15], input int nr);
    byte unsigned s [256], is [256];
    bytes16_t a, b, k;
    make_sbox(s, is);
    a = to_bytes(ct ^ rk[nr]);
    for (int r = nr - 1; r >= 0; r--) begin
      for (int c = 0; c < 4; c++)
        for (int w = 0; w < 4; w++) b[4*((c + w) % 4) + w] = a[4*c + w];
      for (int i = 0; i < 16; i++) b[i] = is[b[i]];
      k = to_bytes(rk[r]);
      for (int i = 0; i < 16; i++) b[i] ^= k[i];
      if (r != 0)
        for (int c = 0; c < 4; c++)
          for (int w = 0; w < 4; w++)
            a[4*c + w] = mul(b[4*c + w], 14) ^ mul(b[4*c + (w+1)%4], 11) ^
                         mul(b[4*c + (w+2)%4], 13) ^ mul(b[4*c + (w+3)%4], 9);
      else a = b;
    end
    return from_bytes(a);
  endfunction

  // Multiply an XTS tweak by alpha, byte-wise as in IEEE 1619.
  function automatic blk_t xts_alpha(input blk_t t);
    bytes16_t a;
    byte unsigned cin, cout;
    a = to_bytes(t);
    cin = 0;
    for (int i = 0; i < 16; i++) begin
      cout = a[i] >> 7;
      a[i] = byte'(a[i] << 1) | cin;
      cin = cout;
    end
    if (cin != 0) a[0] ^= 8'h87;
    return from_bytes(a);
  endfunction

  function automatic blk_t headmask(input int n);
    blk_t m;
    m = '0;
    for (int i = 0; i < n; i++) m[127 - i] = 1'b1;
    return m;
  endfunction

  // XTS over n full blocks plus an optional partial block of `tail` bits
  // (left-aligned in msg[n]).  Writes n (+1) result words into out.
  function automatic void xts(input bit dec, input blk_t msg [], input int n, input int tail,
                              input blk_t rk1 [15], input blk_t rk2 [15], input int nr,
                              input blk_t i_seed, ref blk_t out []);
    blk_t t, tl, tm, x, pp;
    bit cts;
    cts = tail != 0 && n != 0;
    t = encrypt(i_seed, rk2, nr);
    for (int j = 0; j < n; j++) begin
      if (cts && j == n - 1) begin
        tl = t;
        tm = xts_alpha(t);
        x = dec ? decrypt(msg[j] ^ tm, rk1, nr) ^ tm : encrypt(msg[j] ^ tl, rk1, nr) ^ tl;
        pp = (msg[n] & headmask(tail)) | (x & ~headmask(tail));
        out[n-1] = dec ? decrypt(pp ^ tl, rk1, nr) ^ tl : encrypt(pp ^ tm, rk1, nr) ^ tm;
        out[n] = x & headmask(tail);
      end else begin
        out[j] = dec ? decrypt(msg[j] ^ t, rk1, nr) ^ t : encrypt(msg[j] ^ t, rk1, nr) ^ t;
      end
      t = xts_alpha(t);
    end
  endfunction

endpackage
