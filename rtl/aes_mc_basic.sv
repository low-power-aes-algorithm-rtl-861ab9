// aes_mc_basic: the MixColumn basic module, which produces one output byte of a column.
//
// For a column (A0, A1, A2, A3) with column sum T = A0 ^ A1 ^ A2 ^ A3, every output byte
// of MixColumn can be written with the same structure,
//     B_i = xtime(A_i ^ A_i+1) ^ A_i ^ T      (indices mod 4),
// which equals 02*A_i ^ 03*A_i+1 ^ A_i+2 ^ A_i+3. One xtime element and three byte XORs
// are therefore enough; the data unit applies this module four times in a row, once per
// byte, instead of building four copies. Purely combinational.
//
// Inputs: a = A_i, b = A_i+1, t = column sum T. Output: y = B_i.
module aes_mc_basic
  import aes_pkg::*;
(
  input  byte_t a,
  input  byte_t b,
  input  byte_t t,
  output byte_t y
);

  byte_t pair, dbl;

  assign pair = a ^ b;

  aes_xtime u_xtime (.a(pair), .y(dbl));

  assign y = dbl ^ a ^ t;

endmodule
