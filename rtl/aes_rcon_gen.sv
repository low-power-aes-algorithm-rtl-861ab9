// aes_rcon_gen: round constant generator of the key schedule unit.
//
// An 8-bit shift register that starts from 8'h01 and, on each step, shifts left by one
// with the bit shifted out fed back into bits 0, 1, 3 and 4 (multiplication by x in
// GF(2^8)). It yields 01 02 04 08 10 20 40 80 1b 36 for rounds 1..10.
// init (synchronous) reloads 8'h01; step advances to the next constant. Reset gives 8'h01.
module aes_rcon_gen
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  init,
  input  logic  step,
  output byte_t rcon
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rcon <= RCON_INIT;
    else if (init)  rcon <= RCON_INIT;
    else if (step)  rcon <= {rcon[6:0], rcon[7]} ^ {3'b000, rcon[7], rcon[7], 1'b0, rcon[7], 1'b0};
  end

endmodule
