// aes_data_unit: datapath of the byte-serial AES data encryption unit.
//
// The state lives in a 16-byte register memory (aes_byte_mem, byte i = AES byte i in
// column-major order). Around it sit one combinational S-box, the MixColumn basic module
// and two 8-bit registers:
//   mux1  memory byte (port A) or its S-box image
//   mux6  round key byte or Reg1, XORed with mux1
//   mux2  mux1 or the XOR; loads Reg1 (SubByte, AddRoundKey, ShiftRow temporary and
//         the MixColumn column sum all pass through Reg1)
//   Reg2  a byte of port A kept for MixColumn (the first byte of the column)
//   MC    xtime(port A ^ (port B or Reg2)) ^ port A ^ Reg1
//   mux3  port B (byte move for ShiftRow) or Reg1
//   mux4  MixColumn result or mux3
//   mux5  external din (loading a plaintext) or mux4; this is the memory's write data
// The datapath has no sequencing of its own: every select, enable and address comes from
// the control word ctl (aes_pkg::dctl_t), driven by aes_data_ctrl. A write takes effect at
// the rising edge; Reg1 and Reg2 are loaded at the same edge.
//
// rk_addr tells the key schedule unit which round key byte to put on roundkey (it is the
// port A address, so AddRoundKey pairs state byte i with key byte i). dout reads the
// state memory asynchronously at dout_addr.
// Operand isolation: the S-box input is forced to zero when mux1 bypasses it.
module aes_data_unit
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  dctl_t  ctl,
  input  byte_t  din,
  input  byte_t  roundkey,
  output baddr_t rk_addr,
  input  baddr_t dout_addr,
  output byte_t  dout
);

  localparam int unsigned P_A = 0, P_B = 1, P_OUT = 2;

  baddr_t ra [3];
  byte_t  rd [3];
  byte_t  reg1, reg2;
  byte_t  sbox_in, sbox_out, mux1, mux6, mux2, mc_b, mc_out, mux3, mux4, mux5;

  always_comb begin
    ra[P_A]   = ctl.ra;
    ra[P_B]   = ctl.rb;
    ra[P_OUT] = dout_addr;
  end

  aes_byte_mem #(.NRD(3)) u_mem (
    .clk(clk), .we(ctl.we), .wa(ctl.wa), .wd(mux5), .ra(ra), .rd(rd)
  );

  assign sbox_in = ctl.mux1_byp ? 8'h00 : rd[P_A];

  aes_sbox u_sbox (.a(sbox_in), .y(sbox_out));

  assign mux1 = ctl.mux1_byp ? rd[P_A] : sbox_out;
  assign mux6 = ctl.mux6_key ? roundkey : reg1;
  assign mux2 = ctl.mux2_xor ? (mux1 ^ mux6) : mux1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg1 <= '0;
      reg2 <= '0;
    end else begin
      if (ctl.reg1_en) reg1 <= mux2;
      if (ctl.reg2_en) reg2 <= rd[P_A];
    end
  end

  assign mc_b = ctl.mc_reg2 ? reg2 : rd[P_B];

  aes_mc_basic u_mc (.a(rd[P_A]), .b(mc_b), .t(reg1), .y(mc_out));

  assign mux3 = ctl.mux3_mem ? rd[P_B] : reg1;
  assign mux4 = ctl.mux4_mc ? mc_out : mux3;
  assign mux5 = ctl.mux5_int ? mux4 : din;

  assign rk_addr = ctl.ra;
  assign dout    = rd[P_OUT];

endmodule
