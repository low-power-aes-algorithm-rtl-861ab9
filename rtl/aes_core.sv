// aes_core: low power byte-serial AES-128 encryption core.
//
// The core trades throughput for area and switching activity: it processes one byte per
// cycle with a single S-box per unit, a one-byte MixColumn basic module and two 16-byte
// register memories, instead of a 128-bit round datapath.
//   aes_data_unit     data encryption unit (state memory, S-box, MC basic module, Reg1/2)
//   aes_key_schedule  key schedule unit (key memory, S-box, Rcon, Kreg), 17 cycles/round key
//   aes_data_ctrl     pass sequencer for the data unit, also starts the key schedule
// Use: write the 16 key bytes with key_we/key_addr/keyin and the 16 plaintext bytes with
// din_we/din_addr/din (byte i = AES input byte i), pulse start, wait for done (765 cycles
// after start), read the ciphertext with dout_addr/dout. The key memory holds the last
// round key after a block, so the cipher key is written again before the next block.
// Loads are only accepted while busy is low.
module aes_core
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_we,
  input  baddr_t key_addr,
  input  byte_t  keyin,
  input  logic   din_we,
  input  baddr_t din_addr,
  input  byte_t  din,
  input  logic   start,
  output logic   busy,
  output logic   done,
  input  baddr_t dout_addr,
  output byte_t  dout
);

  dctl_t  ctl;
  logic   ks_init, ks_start, ks_busy;
  baddr_t rk_addr;
  byte_t  roundkey;

  aes_data_ctrl u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .din_we  (din_we),
    .din_addr(din_addr),
    .ks_busy (ks_busy),
    .ks_init (ks_init),
    .ks_start(ks_start),
    .ctl     (ctl),
    .busy    (busy),
    .done    (done)
  );

  aes_data_unit u_data (
    .clk      (clk),
    .rst_n    (rst_n),
    .ctl      (ctl),
    .din      (din),
    .roundkey (roundkey),
    .rk_addr  (rk_addr),
    .dout_addr(dout_addr),
    .dout     (dout)
  );

  aes_key_schedule u_key (
    .clk   (clk),
    .rst_n (rst_n),
    .key_we(key_we && !busy),
    .key_wa(key_addr),
    .keyin (keyin),
    .init  (ks_init),
    .start (ks_start),
    .busy  (ks_busy),
    .done  (),
    .kaddr (rk_addr),
    .keyout(roundkey)
  );

endmodule
