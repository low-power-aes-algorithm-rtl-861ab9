// aes_sbox: combinational AES S-box (SubByte of one byte).
//
// The S-box is computed, not looked up: the multiplicative inverse in GF(2^8) is formed
// as a^254 with a fixed chain of squarings and multiplications (a^3, a^15, a^63, a^127,
// a^254; the inverse of 0 comes out as 0), and the AES affine transform follows:
//     s_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i,   c = 8'h63.
// Using a combinational S-box rather than a clocked ROM is the design's own low-power
// choice; the way the inverse is formed is an implementation choice of this RTL.
// One byte in, one byte out, no clock.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t a,
  output byte_t y
);

  function automatic byte_t gf_mul(byte_t x, byte_t z);
    byte_t p, v;
    p = '0;
    v = x;
    for (int i = 0; i < 8; i++) begin
      if (z[i]) p = p ^ v;
      v = {v[6:0], 1'b0} ^ (v[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  localparam byte_t AFFINE_C = 8'h63;

  byte_t a2, a3, a12, a15, a60, a63, a126, a127, inv;

  always_comb begin
    a2   = gf_mul(a, a);
    a3   = gf_mul(a2, a);
    a12  = gf_mul(gf_mul(a3, a3), gf_mul(a3, a3));
    a15  = gf_mul(a12, a3);
    a60  = gf_mul(gf_mul(a15, a15), gf_mul(a15, a15));
    a63  = gf_mul(a60, a3);
    a126 = gf_mul(a63, a63);
    a127 = gf_mul(a126, a);
    inv  = gf_mul(a127, a127);
    for (int i = 0; i < 8; i++) begin
      y[i] = inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^ inv[(i + 6) % 8]
           ^ inv[(i + 7) % 8] ^ AFFINE_C[i];
    end
  end

endmodule
