// aes_pkg: types and constants shared by the byte-serial AES-128 encryption core.
//
// The core keeps the 128-bit state and the 128-bit round key in two 16-byte register
// memories. Byte address i holds AES byte i in the usual column-major order
// (row = i % 4, column = i / 4), so a column is four consecutive addresses and a row is
// every fourth address. dctl_t is the control word that the round controller drives into
// the data encryption unit each cycle; its fields are named after the multiplexers and
// registers of the data unit (mux1..mux6, Reg1, Reg2).
package aes_pkg;

  typedef logic [7:0] byte_t;
  typedef logic [3:0] baddr_t;

  localparam int unsigned NBYTES    = 16;  // bytes in state and key memories
  localparam int unsigned NROUNDS   = 10;  // AES-128
  localparam int unsigned KS_CYCLES = 17;  // cycles for one round key
  localparam byte_t       RCON_INIT = 8'h01;

  // Cycles of each pass of the data unit (see aes_data_ctrl).
  localparam int unsigned ARK_CYCLES = 17;  // 16 bytes + 1 cycle through Reg1
  localparam int unsigned SB_CYCLES  = 17;
  localparam int unsigned SR_CYCLES  = 12;  // rows 1..3, four moves each
  localparam int unsigned MC_CYCLES  = 32;  // 4 columns x (4 sum + 4 write)
  localparam int unsigned ENC_CYCLES = ARK_CYCLES
                                     + (NROUNDS - 1) * (SB_CYCLES + SR_CYCLES + MC_CYCLES + ARK_CYCLES)
                                     + (SB_CYCLES + SR_CYCLES + ARK_CYCLES);

  // Per-cycle control of the data encryption unit.
  typedef struct packed {
    baddr_t ra;        // read port A: S-box / mux1 path, MixColumn operand A_i, round key index
    baddr_t rb;        // read port B: direct memory move (mux3) and MixColumn operand A_i+1
    logic   mux1_byp;  // mux1: 1 = memory byte, 0 = S-box output
    logic   mux6_key;  // mux6: 1 = round key byte, 0 = Reg1
    logic   mux2_xor;  // mux2: 1 = mux1 ^ mux6, 0 = mux1
    logic   reg1_en;   // load Reg1 from mux2
    logic   reg2_en;   // load Reg2 from read port A
    logic   mux3_mem;  // mux3: 1 = read port B, 0 = Reg1
    logic   mux4_mc;   // mux4: 1 = MixColumn basic module, 0 = mux3
    logic   mc_reg2;   // MixColumn second operand: 1 = Reg2, 0 = read port B
    logic   mux5_int;  // mux5: 1 = internal result (mux4), 0 = external din
    logic   we;        // write one byte of the data memory
    baddr_t wa;        // write address
  } dctl_t;

  localparam dctl_t DCTL_IDLE = '0;

endpackage
