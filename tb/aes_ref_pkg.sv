// aes_ref_pkg: software AES-128 reference used by the testbenches.
// The S-box is computed, not tabulated: S(x) = A * x^-1 + 0x63 in GF(2^8)
// with the reduction polynomial x^8 + x^4 + x^3 + x + 1, where A is the
// standard affine map b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) (indices mod 8).
// Bytes are numbered as in FIPS-197: block byte k sits at state row k % 4,
// column k / 4.
package aes_ref_pkg;

  typedef logic [7:0] u8;

  function automatic u8 xtime(u8 a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic u8 gmul(u8 a, u8 b);
    u8 p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = xtime(a);
    end
    return p;
  endfunction

  function automatic u8 sbox(u8 x);
    u8 inv = 0;
    u8 s;
    if (x != 0)
      for (int c = 1; c < 256; c++)
        if (gmul(x, u8'(c)) == 8'h01) inv = u8'(c);
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  // round keys: rk[r][k] is byte k of round key r
  typedef u8 rk_t [11][16];

  function automatic rk_t expand(u8 key [16]);
    rk_t rk;
    u8 w [44][4];
    u8 t [4];
    u8 rcon = 8'h01;
    for (int i = 0; i < 4; i++)
      for (int b = 0; b < 4; b++) w[i][b] = key[4*i+b];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = '{sbox(w[i-1][1]) ^ rcon, sbox(w[i-1][2]), sbox(w[i-1][3]), sbox(w[i-1][0])};
        rcon = xtime(rcon);
      end
      for (int b = 0; b < 4; b++) w[i][b] = w[i-4][b] ^ t[b];
    end
    for (int r = 0; r < 11; r++)
      for (int k = 0; k < 16; k++) rk[r][k] = w[4*r + k/4][k%4];
    return rk;
  endfunction

  typedef u8 blk_t [16];

  function automatic blk_t encrypt(u8 pt [16], u8 key [16]);
    rk_t  rk = expand(key);
    u8    s [16];
    u8    t [16];
    for (int k = 0; k < 16; k++) s[k] = pt[k] ^ rk[0][k];
    for (int r = 1; r <= 10; r++) begin
      for (int k = 0; k < 16; k++) s[k] = sbox(s[k]);
      for (int row = 0; row < 4; row++)
        for (int c = 0; c < 4; c++) t[row + 4*c] = s[row + 4*((c+row)%4)];
      s = t;
      if (r < 10)
        for (int c = 0; c < 4; c++)
          for (int row = 0; row < 4; row++)
            t[row+4*c] = gmul(8'h02, s[row+4*c]) ^ gmul(8'h03, s[(row+1)%4+4*c])
                       ^ s[(row+2)%4+4*c] ^ s[(row+3)%4+4*c];
      if (r < 10) s = t;
      for (int k = 0; k < 16; k++) s[k] = s[k] ^ rk[r][k];
    end
    return s;
  endfunction

endpackage
