// tb_aes_data_unit: drives the data unit's control word directly, one micro-operation per
// cycle, without the round controller. It loads random states through din and runs:
// an AddRoundKey pass (key bytes served by the testbench at rk_addr), a SubByte pass, a
// ShiftRow rotation of row 1 by byte moves, and MixColumn of one column (each column
// in turn, twenty rounds of this sequence); after each the
// whole state is read back through dout and compared with the reference operations.
module tb_aes_data_unit;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic   clk = 0, rst_n = 0;
  dctl_t  ctl;
  byte_t  din, roundkey, dout;
  baddr_t rk_addr, dout_addr;
  blk_t   st, rk;
  int checks = 0, failures = 0;

  aes_data_unit dut (
    .clk(clk), .rst_n(rst_n), .ctl(ctl), .din(din), .roundkey(roundkey),
    .rk_addr(rk_addr), .dout_addr(dout_addr), .dout(dout)
  );

  always #5 clk = ~clk;
  assign roundkey = rk[rk_addr];

  task automatic load_state();
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      ctl = DCTL_IDLE; ctl.we = 1; ctl.wa = 4'(i);
      st[i] = 8'($urandom); din = st[i];
    end
    @(negedge clk);
    ctl = DCTL_IDLE;
  endtask

  task automatic compare(string what);
    for (int i = 0; i < 16; i++) begin
      dout_addr = 4'(i);
      #1;
      checks++;
      if (dout !== st[i]) begin
        failures++;
        $display("FAIL %s byte %0d: got %02h expected %02h", what, i, dout, st[i]);
      end
    end
    @(negedge clk);
  endtask

  // byte pass through Reg1: read i, write i-1
  task automatic byte_pass(logic use_key);
    for (int c = 0; c <= 16; c++) begin
      ctl = DCTL_IDLE;
      ctl.mux5_int = 1;
      ctl.ra = 4'(c);
      ctl.mux1_byp = use_key;
      ctl.mux6_key = 1;
      ctl.mux2_xor = use_key;
      ctl.reg1_en = (c < 16);
      ctl.we = (c > 0);
      ctl.wa = 4'(c - 1);
      @(negedge clk);
    end
    ctl = DCTL_IDLE;
  endtask

  initial begin
    blk_t t;
    byte_t a [4];
    ctl = DCTL_IDLE; din = 0; dout_addr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
    int col = n % 4;

    // AddRoundKey
    load_state();
    for (int i = 0; i < 16; i++) rk[i] = 8'($urandom);
    byte_pass(1'b1);
    for (int i = 0; i < 16; i++) st[i] ^= rk[i];
    compare("AddRoundKey");

    // SubByte
    byte_pass(1'b0);
    for (int i = 0; i < 16; i++) st[i] = sbox(st[i]);
    compare("SubByte");

    // ShiftRow of row 1 (addresses 1, 5, 9, 13): Reg1 <= a0, a0 <= a1, a1 <= a2, a2 <= a3, a3 <= Reg1
    for (int k = 0; k < 4; k++) begin
      ctl = DCTL_IDLE;
      ctl.mux5_int = 1;
      ctl.mux1_byp = 1;
      ctl.ra = 4'd1;
      ctl.reg1_en = (k == 0);
      ctl.rb = 4'(4 * (k + 1) + 1);
      ctl.mux3_mem = (k != 3);
      ctl.we = 1;
      ctl.wa = 4'(4 * k + 1);
      @(negedge clk);
    end
    ctl = DCTL_IDLE;
    t = st;
    for (int c = 0; c < 4; c++) st[4*c+1] = t[4*((c+1)%4)+1];
    compare("ShiftRow row 1");

    // MixColumn of one column (addresses 4*col .. 4*col+3)
    for (int k = 0; k < 4; k++) begin
      ctl = DCTL_IDLE;
      ctl.mux5_int = 1;
      ctl.mux1_byp = 1;
      ctl.ra = 4'(4 * col + k);
      ctl.mux2_xor = (k != 0);
      ctl.reg1_en = 1;
      ctl.reg2_en = (k == 0);
      @(negedge clk);
    end
    for (int k = 0; k < 4; k++) begin
      ctl = DCTL_IDLE;
      ctl.mux5_int = 1;
      ctl.ra = 4'(4 * col + k);
      ctl.rb = 4'(4 * col + (k + 1) % 4);
      ctl.mc_reg2 = (k == 3);
      ctl.mux4_mc = 1;
      ctl.we = 1;
      ctl.wa = 4'(4 * col + k);
      @(negedge clk);
    end
    ctl = DCTL_IDLE;
    for (int r = 0; r < 4; r++) a[r] = st[4 * col + r];
    for (int r = 0; r < 4; r++)
      st[4 * col + r] = gmul(a[r], 2) ^ gmul(a[(r+1)%4], 3) ^ a[(r+2)%4] ^ a[(r+3)%4];
    compare("MixColumn");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
