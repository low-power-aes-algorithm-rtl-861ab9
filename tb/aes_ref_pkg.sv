// aes_ref_pkg: software model of AES-128 encryption used by the testbenches as the
// independent reference. The S-box is built from exponent/logarithm tables of the
// generator 03 (a different construction from the RTL's power chain), multiplication by
// 02/03 is done by repeated doubling, and the key expansion and rounds follow FIPS-197
// word by word on a 16-byte array in the usual byte order.
package aes_ref_pkg;

  typedef logic [7:0] b8_t;
  typedef b8_t blk_t [16];

  function automatic b8_t mul2(b8_t a);
    return b8_t'({a[6:0], 1'b0}) ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic b8_t gmul(b8_t a, b8_t b);
    b8_t p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = mul2(a);
    end
    return p;
  endfunction

  function automatic b8_t sbox(b8_t x);
    b8_t exp_t [256];
    int  log_t [256];
    b8_t g = 8'h01, inv, s;
    for (int i = 0; i < 255; i++) begin
      exp_t[i] = g;
      log_t[g] = i;
      g = g ^ mul2(g);          // g * 03
    end
    inv = (x == 0) ? 8'h00 : exp_t[(255 - log_t[x]) % 255];
    s = 8'h63;
    for (int i = 0; i < 8; i++)
      s[i] = s[i] ^ inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return s;
  endfunction

  // next round key from the previous one, rc = round constant
  function automatic blk_t next_key(blk_t k, b8_t rc);
    blk_t n;
    b8_t  t [4];
    t[0] = sbox(k[13]) ^ rc;
    t[1] = sbox(k[14]);
    t[2] = sbox(k[15]);
    t[3] = sbox(k[12]);
    for (int j = 0; j < 4; j++) n[j] = k[j] ^ t[j];
    for (int w = 1; w < 4; w++)
      for (int j = 0; j < 4; j++) n[4*w+j] = k[4*w+j] ^ n[4*(w-1)+j];
    return n;
  endfunction

  function automatic b8_t rcon(int r);  // r = 1..10
    b8_t c = 8'h01;
    for (int i = 1; i < r; i++) c = mul2(c);
    return c;
  endfunction

  function automatic blk_t round_key(blk_t key, int r);
    blk_t k = key;
    for (int i = 1; i <= r; i++) k = next_key(k, rcon(i));
    return k;
  endfunction

  function automatic blk_t encrypt(blk_t pt, blk_t key);
    blk_t s = pt, t, k = key;
    for (int i = 0; i < 16; i++) s[i] ^= k[i];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) s[i] = sbox(s[i]);
      for (int c = 0; c < 4; c++)
        for (int row = 0; row < 4; row++) t[4*c+row] = s[4*((c+row)%4)+row];
      s = t;
      if (r != 10)
        for (int c = 0; c < 4; c++) begin
          t[4*c+0] = gmul(s[4*c],2) ^ gmul(s[4*c+1],3) ^ s[4*c+2] ^ s[4*c+3];
          t[4*c+1] = s[4*c] ^ gmul(s[4*c+1],2) ^ gmul(s[4*c+2],3) ^ s[4*c+3];
          t[4*c+2] = s[4*c] ^ s[4*c+1] ^ gmul(s[4*c+2],2) ^ gmul(s[4*c+3],3);
          t[4*c+3] = gmul(s[4*c],3) ^ s[4*c+1] ^ s[4*c+2] ^ gmul(s[4*c+3],2);
          for (int row = 0; row < 4; row++) s[4*c+row] = t[4*c+row];
        end
      k = next_key(k, rcon(r));
      for (int i = 0; i < 16; i++) s[i] ^= k[i];
    end
    return s;
  endfunction

  function automatic blk_t from128(logic [127:0] v);
    blk_t b;
    for (int i = 0; i < 16; i++) b[i] = v[127-8*i -: 8];
    return b;
  endfunction

endpackage
