// aes_xtime: multiplication of a byte by x (that is, by 02) in GF(2^8) modulo
// x^8 + x^4 + x^3 + x + 1.
//
// The byte is shifted left by one position with plain wiring, and the bit shifted out
// (a7) is fed back into bit positions 0, 1, 3 and 4: three XOR gates plus one wire.
// This is the xtime element of the MixColumn basic module. Purely combinational.
module aes_xtime
  import aes_pkg::*;
(
  input  byte_t a,
  output byte_t y
);

  always_comb begin
    y[0] = a[7];
    y[1] = a[0] ^ a[7];
    y[2] = a[1];
    y[3] = a[2] ^ a[7];
    y[4] = a[3] ^ a[7];
    y[5] = a[4];
    y[6] = a[5];
    y[7] = a[6];
  end

endmodule
