// aes_model_pkg: behavioural AES-128 reference used by the testbenches only.
//
// Written independently of the RTL: GF(2^8) products use log/antilog tables
// built from the generator 03h, the S-box applies the affine map bit by bit
// (b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i, c = 63h), the
// inverse S-box is found by inverting the S-box table, and the state is a
// 4x4 array indexed [row][column]. Call model_init() once before use.
// Blocks use the same convention as the RTL: byte 0 in bits [127:120],
// filled column by column.
package aes_model_pkg;

  typedef logic [7:0]   u8;
  typedef logic [127:0] u128;
  typedef u8 state_t [4][4];

  u8  exp_t [256];
  int log_t [256];
  u8  sb_t  [256];
  u8  isb_t [256];

  function automatic u8 slow_mul(u8 a, u8 b);
    u8 r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return r;
  endfunction

  function automatic void model_init();
    u8 x = 8'h01;
    for (int i = 0; i < 255; i++) begin
      exp_t[i] = x;
      log_t[x] = i;
      x = slow_mul(x, 8'h03);
    end
    exp_t[255] = exp_t[0];
    for (int a = 0; a < 256; a++) begin
      u8 inv = (a == 0) ? 8'h00 : exp_t[(255 - log_t[a]) % 255];
      u8 s;
      u8 c = 8'h63;
      for (int i = 0; i < 8; i++)
        s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ c[i];
      sb_t[a] = s;
    end
    for (int a = 0; a < 256; a++) isb_t[sb_t[a]] = u8'(a);
  endfunction

  function automatic u8 mul(u8 a, u8 b);
    if (a == 0 || b == 0) return 0;
    return exp_t[(log_t[a] + log_t[b]) % 255];
  endfunction

  function automatic state_t to_state(u128 b);
    state_t s;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        s[r][c] = b[127 - 8*(4*c + r) -: 8];
    return s;
  endfunction

  function automatic u128 from_state(state_t s);
    u128 b;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        b[127 - 8*(4*c + r) -: 8] = s[r][c];
    return b;
  endfunction

  function automatic u128 m_sub_bytes(u128 b, bit inverse);
    state_t s = to_state(b);
    foreach (s[r, c]) s[r][c] = inverse ? isb_t[s[r][c]] : sb_t[s[r][c]];
    return from_state(s);
  endfunction

  function automatic u128 m_shift_rows(u128 b, bit inverse);
    state_t s = to_state(b);
    state_t t;
    foreach (s[r, c]) begin
      if (inverse) t[r][(c + r) % 4] = s[r][c];
      else         t[r][c] = s[r][(c + r) % 4];
    end
    return from_state(t);
  endfunction

  function automatic u128 m_mix_columns(u128 b, bit inverse);
    state_t s = to_state(b);
    state_t t;
    u8 m [4];
    if (inverse) m = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    else         m = '{8'h02, 8'h03, 8'h01, 8'h01};
    foreach (s[r, c]) begin
      t[r][c] = 0;
      for (int k = 0; k < 4; k++) t[r][c] ^= mul(m[(k - r + 4) % 4], s[k][c]);
    end
    return from_state(t);
  endfunction

  // all round keys; rk[r] is round key r
  function automatic void m_expand(u128 key, output u128 rk [11]);
    logic [31:0] w [44];
    u8 rcon = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb_t[t[31:24]], sb_t[t[23:16]], sb_t[t[15:8]], sb_t[t[7:0]]};
        t[31:24] ^= rcon;
        rcon = mul(rcon, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic u128 model_encrypt(u128 key, u128 pt);
    u128 rk [11];
    u128 s;
    m_expand(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = m_shift_rows(m_sub_bytes(s, 0), 0);
      if (r != 10) s = m_mix_columns(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic u128 model_decrypt(u128 key, u128 ct);
    u128 rk [11];
    u128 s;
    m_expand(key, rk);
    s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = m_sub_bytes(m_shift_rows(s, 1), 1) ^ rk[r];
      if (r != 0) s = m_mix_columns(s, 1);
    end
    return s;
  endfunction

  function automatic u128 rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
