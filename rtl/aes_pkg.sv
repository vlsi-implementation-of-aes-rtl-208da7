// aes_pkg: types, constants and GF(2^8) helper functions shared by the AES-128 RTL.
//
// A 128-bit block is kept in the FIPS-197 byte order: byte 0 sits in bits
// [127:120], byte 15 in bits [7:0], and the 4x4 state is filled column by
// column (bytes 0..3 form column 0, byte k is row k%4 of column k/4).
// The S-box and inverse S-box are not typed in as tables; the functions below
// compute an entry from its definition (inverse in GF(2^8) modulo
// x^8+x^4+x^3+x+1, then the affine map) and the S-box modules evaluate them
// for all 256 inputs at elaboration, so the hardware is still a lookup table.
package aes_pkg;

  localparam int unsigned NR = 10;  // rounds of AES-128

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;
  // round key r is rk[r]; rk[0] is the cipher key itself
  typedef logic [NR:0][127:0] round_keys_t;

  // byte k of a block (k = 0 is the first byte, in the top bits)
  function automatic byte_t get_byte(block_t b, int unsigned k);
    return b[127-8*k -: 8];
  endfunction

  // multiply by x in GF(2^8)
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = '0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // multiplicative inverse as a^254 (maps 0 to 0)
  function automatic byte_t gf_inv(byte_t a);
    byte_t r  = 8'h01;
    byte_t sq = a;
    for (int i = 1; i < 8; i++) begin
      sq = gf_mul(sq, sq);   // a^(2^i)
      r  = gf_mul(r, sq);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(byte_t b, int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic byte_t sbox_calc(byte_t a);
    byte_t b = gf_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic byte_t inv_sbox_calc(byte_t a);
    return gf_inv(rotl8(a, 1) ^ rotl8(a, 3) ^ rotl8(a, 6) ^ 8'h05);
  endfunction

  // one column through MixColumns: matrix rows (02 03 01 01) rotated
  function automatic word_t mix_column(word_t c);
    byte_t a0 = c[31:24], a1 = c[23:16], a2 = c[15:8], a3 = c[7:0];
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  // one column through InvMixColumns: matrix rows (0e 0b 0d 09) rotated
  function automatic word_t inv_mix_column(word_t c);
    byte_t a0 = c[31:24], a1 = c[23:16], a2 = c[15:8], a3 = c[7:0];
    return {gf_mul(a0, 8'h0e) ^ gf_mul(a1, 8'h0b) ^ gf_mul(a2, 8'h0d) ^ gf_mul(a3, 8'h09),
            gf_mul(a0, 8'h09) ^ gf_mul(a1, 8'h0e) ^ gf_mul(a2, 8'h0b) ^ gf_mul(a3, 8'h0d),
            gf_mul(a0, 8'h0d) ^ gf_mul(a1, 8'h09) ^ gf_mul(a2, 8'h0e) ^ gf_mul(a3, 8'h0b),
            gf_mul(a0, 8'h0b) ^ gf_mul(a1, 8'h0d) ^ gf_mul(a2, 8'h09) ^ gf_mul(a3, 8'h0e)};
  endfunction

endpackage
