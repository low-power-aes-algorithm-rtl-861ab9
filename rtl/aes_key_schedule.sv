// aes_key_schedule: byte-serial AES-128 key schedule unit.
//
// The 16-byte key memory is first loaded with the cipher key through keyin (mux3 input
// 0). Each start pulse then replaces the round key in the memory by the next one, in
// place, in 17 cycles; the round constant comes from aes_rcon_gen, which init reloads
// with 8'h01 before the first round key of a block.
//
// Datapath: the S-box reads the last word (S12..S15) in rotated order S13, S14, S15, S12.
// mux1 adds the round constant to the S-box output (first byte only); mux2 chooses the
// S-box path or a byte of the key memory; Kreg holds that byte for one cycle; the XOR of
// Kreg with the old key byte goes through mux3 back into the memory.
//   cycle 0      Kreg <= S-box(S13) ^ Rcon
//   cycle 1..3   S[c-1] <= S[c-1] ^ Kreg;  Kreg <= S-box(S14 / S15 / S12)
//   cycle 4..15  S[c-1] <= S[c-1] ^ Kreg;  Kreg <= S[c-4]   (new byte of previous word)
//   cycle 16     S[15]  <= S[15] ^ Kreg;   Rcon steps, done pulses
// busy is high for the 17 cycles after start; done is high in the last of them, and the
// new round key is readable from the edge that ends it.
//
// keyout is an asynchronous read of the key memory at kaddr (the round key byte used by
// AddRoundKey). key_we and start must not be asserted while busy.
module aes_key_schedule
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_we,     // load one byte of the cipher key
  input  baddr_t key_wa,
  input  byte_t  keyin,
  input  logic   init,       // reload the round constant (start of a block)
  input  logic   start,      // compute the next round key
  output logic   busy,
  output logic   done,
  input  baddr_t kaddr,
  output byte_t  keyout
);

  localparam int unsigned P_SBOX = 0, P_XOR = 1, P_KREG = 2, P_OUT = 3;

  logic [4:0] cnt;
  byte_t      kreg, rcon, sbox_in, sbox_out, mux1, mux2, mux3;
  baddr_t     ra [4];
  byte_t      rd [4];
  logic       we;
  baddr_t     wa;

  // sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (start && !busy) begin
      busy <= 1'b1;
      cnt  <= '0;
    end else if (busy) begin
      if (cnt == 5'(KS_CYCLES - 1)) busy <= 1'b0;
      cnt <= cnt + 5'd1;
    end
  end

  assign done = busy && (cnt == 5'(KS_CYCLES - 1));

  aes_rcon_gen u_rcon (
    .clk  (clk),
    .rst_n(rst_n),
    .init (init),
    .step (done),
    .rcon (rcon)
  );

  // read addresses
  always_comb begin
    ra[P_SBOX] = 4'd12 + 4'((cnt + 5'd1) % 5'd4);  // 13, 14, 15, 12
    ra[P_XOR]  = 4'(cnt - 5'd1);
    ra[P_KREG] = 4'(cnt - 5'd4);
    ra[P_OUT]  = kaddr;
  end

  aes_byte_mem #(.NRD(4)) u_kmem (
    .clk(clk), .we(we), .wa(wa), .wd(mux3), .ra(ra), .rd(rd)
  );

  // operand isolation: the S-box input is held at zero outside cycles 0..3
  assign sbox_in = (busy && cnt < 5'd4) ? rd[P_SBOX] : 8'h00;

  aes_sbox u_sbox (.a(sbox_in), .y(sbox_out));

  assign mux1 = (cnt == 5'd0) ? (sbox_out ^ rcon) : sbox_out;   // mux1: with / without Rcon
  assign mux2 = (cnt < 5'd4) ? mux1 : rd[P_KREG];               // mux2: S-box path / key memory

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        kreg <= '0;
    else if (busy && cnt < 5'd16)      kreg <= mux2;
  end

  // mux3: key memory input, keyin when loading, Kreg ^ old byte when scheduling
  always_comb begin
    if (busy) begin
      we   = (cnt != 5'd0);
      wa   = ra[P_XOR];
      mux3 = kreg ^ rd[P_XOR];
    end else begin
      we   = key_we;
      wa   = key_wa;
      mux3 = keyin;
    end
  end

  assign keyout = rd[P_OUT];

  a_no_load_while_busy : assert property (@(posedge clk) disable iff (!rst_n) busy |-> !key_we)
    else $error("key load during key schedule");
  a_no_start_while_busy : assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start)
    else $error("start during key schedule");

endmodule
