// aes_data_ctrl: round controller of the byte-serial AES-128 encryption core.
//
// It drives the data unit's control word (dctl_t) one cycle at a time, pass by pass, and
// starts the key schedule unit. One block is encrypted as
//   ARK(K0), then for rounds 1..9: SB, SR, MC, ARK(Kr), then round 10: SB, SR, ARK(K10)
// with these passes (all in place in the 16-byte state memory):
//   ARK  17 cycles  byte i -> port A -> XOR round key byte i -> Reg1 -> written back to i
//                   one cycle later, while byte i+1 is read
//   SB   17 cycles  the same through the S-box, without the key
//   SR   12 cycles  rows 1..3 rotated with four byte moves each (port B -> mux3 -> memory),
//                   Reg1 holding the one byte that a rotation would overwrite
//   MC   32 cycles  per column: 4 cycles summing the column into Reg1 (T = A0^A1^A2^A3,
//                   A0 also kept in Reg2), then 4 cycles writing B_i = MC basic(A_i,
//                   A_i+1, T) to address i; the last byte takes A0 from Reg2 because
//                   address 0 already holds B0
// The key schedule (17 cycles) is started when an ARK pass ends and runs while SB, SR and
// MC use the data memory, so the next round key is ready before the next ARK pass.
// A block takes ENC_CYCLES = 765 cycles from start to done.
//
// Interface: while idle, din_we writes din_addr through mux5 (plaintext load). start
// begins a block and also reloads the round constant (ks_init). busy is high from the
// cycle after start until done; done is a one-cycle pulse in the cycle after the last
// state byte is written, when the ciphertext can be read.
module aes_data_ctrl
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   din_we,
  input  baddr_t din_addr,
  input  logic   ks_busy,
  output logic   ks_init,
  output logic   ks_start,
  output dctl_t  ctl,
  output logic   busy,
  output logic   done
);

  typedef enum logic [2:0] {S_IDLE, S_ARK, S_SB, S_SR, S_MC} pass_t;

  pass_t      pass;
  logic [5:0] cnt;
  logic [3:0] round;
  logic       last_cycle;

  // number of cycles of the current pass, minus one
  always_comb begin
    unique case (pass)
      S_ARK:   last_cycle = (cnt == 6'(ARK_CYCLES - 1));
      S_SB:    last_cycle = (cnt == 6'(SB_CYCLES - 1));
      S_SR:    last_cycle = (cnt == 6'(SR_CYCLES - 1));
      S_MC:    last_cycle = (cnt == 6'(MC_CYCLES - 1));
      default: last_cycle = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pass  <= S_IDLE;
      cnt   <= '0;
      round <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (pass == S_IDLE) begin
        if (start) begin
          pass  <= S_ARK;
          cnt   <= '0;
          round <= '0;
        end
      end else if (!last_cycle) begin
        cnt <= cnt + 6'd1;
      end else begin
        cnt <= '0;
        unique case (pass)
          S_ARK: begin
            if (round == 4'(NROUNDS)) begin
              pass <= S_IDLE;
              done <= 1'b1;
            end else begin
              pass  <= S_SB;
              round <= round + 4'd1;
            end
          end
          S_SB:    pass <= S_SR;
          S_SR:    pass <= (round == 4'(NROUNDS)) ? S_ARK : S_MC;
          S_MC:    pass <= S_ARK;
          default: pass <= S_IDLE;
        endcase
      end
    end
  end

  assign busy     = (pass != S_IDLE);
  assign ks_init  = (pass == S_IDLE) && start;
  assign ks_start = (pass == S_ARK) && last_cycle && (round != 4'(NROUNDS));

  // ShiftRow move table: row r (1..3), step k (0..3).
  // ld: Reg1 <= byte at column ldc; dst column gets the byte of column src, or Reg1.
  typedef struct packed {
    logic       ld;
    logic [1:0] ldc;
    logic [1:0] dst;
    logic       from_reg1;
    logic [1:0] src;
  } srmove_t;

  function automatic srmove_t sr_move(logic [1:0] r, logic [1:0] k);
    srmove_t m;
    m = '0;
    unique case ({r, k})
      // row 1: rotate left by one
      {2'd1, 2'd0}: m = '{ld: 1'b1, ldc: 2'd0, dst: 2'd0, from_reg1: 1'b0, src: 2'd1};
      {2'd1, 2'd1}: m = '{ld: 1'b0, ldc: 2'd0, dst: 2'd1, from_reg1: 1'b0, src: 2'd2};
      {2'd1, 2'd2}: m = '{ld: 1'b0, ldc: 2'd0, dst: 2'd2, from_reg1: 1'b0, src: 2'd3};
      {2'd1, 2'd3}: m = '{ld: 1'b0, ldc: 2'd0, dst: 2'd3, from_reg1: 1'b1, src: 2'd0};
      // row 2: two swaps
      {2'd2, 2'd0}: m = '{ld: 1'b1, ldc: 2'd0, dst: 2'd0, from_reg1: 1'b0, src: 2'd2};
      {2'd2, 2'd1}: m = '{ld: 1'b0, ldc: 2'd0, dst: 2'd2, from_reg1: 1'b1, src: 2'd0};
      {2'd2, 2'd2}: m = '{ld: 1'b1, ldc: 2'd1, dst: 2'd1, from_reg1: 1'b0, src: 2'd3};
      {2'd2, 2'd3}: m = '{ld: 1'b0, ldc: 2'd0, dst: 2'd3, from_reg1: 1'b1, src: 2'd0};
      // row 3: rotate right by one
      {2'd3, 2'd0}: m = '{ld: 1'b1, ldc: 2'd3, dst: 2'd3, from_reg1: 1'b0, src: 2'd2};
      {2'd3, 2'd1}: m = '{ld: 1'b0, ldc: 2'd0, dst: 2'd2, from_reg1: 1'b0, src: 2'd1};
      {2'd3, 2'd2}: m = '{ld: 1'b0, ldc: 2'd0, dst: 2'd1, from_reg1: 1'b0, src: 2'd0};
      {2'd3, 2'd3}: m = '{ld: 1'b0, ldc: 2'd0, dst: 2'd0, from_reg1: 1'b1, src: 2'd0};
      default:      m = '0;
    endcase
    return m;
  endfunction

  // control word
  always_comb begin
    srmove_t    m;
    logic [1:0] col, i;
    ctl = DCTL_IDLE;
    m   = '0;
    col = '0;
    i   = '0;
    ctl.mux5_int = 1'b1;
    unique case (pass)
      S_IDLE: begin
        ctl.mux5_int = 1'b0;
        ctl.we       = din_we;
        ctl.wa       = din_addr;
      end
      S_ARK, S_SB: begin
        ctl.ra       = cnt[3:0];
        ctl.mux1_byp = (pass == S_ARK);
        ctl.mux6_key = 1'b1;
        ctl.mux2_xor = (pass == S_ARK);
        ctl.reg1_en  = (cnt < 6'd16);
        ctl.mux3_mem = 1'b0;
        ctl.mux4_mc  = 1'b0;
        ctl.we       = (cnt != 6'd0);
        ctl.wa       = 4'(cnt - 6'd1);
      end
      S_SR: begin
        m            = sr_move(2'(cnt[5:2] + 4'd1), cnt[1:0]);
        ctl.mux1_byp = 1'b1;
        ctl.reg1_en  = m.ld;
        ctl.ra       = {m.ldc, 2'(cnt[5:2] + 4'd1)};
        ctl.rb       = {m.src, 2'(cnt[5:2] + 4'd1)};
        ctl.mux3_mem = !m.from_reg1;
        ctl.we       = 1'b1;
        ctl.wa       = {m.dst, 2'(cnt[5:2] + 4'd1)};
      end
      S_MC: begin
        col          = cnt[4:3];
        i            = cnt[1:0];
        ctl.mux1_byp = 1'b1;
        if (!cnt[2]) begin
          // column sum into Reg1, first byte also into Reg2
          ctl.ra       = {col, i};
          ctl.mux6_key = 1'b0;
          ctl.mux2_xor = (i != 2'd0);
          ctl.reg1_en  = 1'b1;
          ctl.reg2_en  = (i == 2'd0);
        end else begin
          // B_i = xtime(A_i ^ A_i+1) ^ A_i ^ T, written to address i
          ctl.ra       = {col, i};
          ctl.rb       = {col, 2'(i + 2'd1)};
          ctl.mc_reg2  = (i == 2'd3);
          ctl.mux4_mc  = 1'b1;
          ctl.we       = 1'b1;
          ctl.wa       = {col, i};
        end
      end
      default: ;
    endcase
  end

  a_key_ready : assert property (@(posedge clk) disable iff (!rst_n)
                                 (pass == S_ARK && cnt == 6'd0) |-> !ks_busy)
    else $error("round key not ready at AddRoundKey");
  a_no_load_while_busy : assert property (@(posedge clk) disable iff (!rst_n) busy |-> !din_we)
    else $error("plaintext load while busy");

endmodule
