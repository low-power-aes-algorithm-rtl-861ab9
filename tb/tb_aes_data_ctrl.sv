// tb_aes_data_ctrl: the round controller drives a real data unit, while the testbench
// plays the key schedule unit: it answers ks_start by staying busy for 17 cycles and then
// presenting the next reference round key, and serves key bytes at the requested address.
// Checked: ciphertexts of random blocks against the reference model, the 765-cycle
// latency from start to done, ten key schedule starts per block, busy/done behaviour,
// and the number of cycles spent in each pass.
module tb_aes_data_ctrl;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic   clk = 0, rst_n = 0;
  logic   start = 0, din_we = 0;
  baddr_t din_addr = '0, dout_addr = '0, rk_addr;
  byte_t  din = '0, dout, roundkey;
  logic   ks_busy, ks_init, ks_start, busy, done;
  dctl_t  ctl;
  blk_t   key, kcur;
  int     kround, ks_cnt, starts;
  int checks = 0, failures = 0;

  aes_data_ctrl dut (
    .clk(clk), .rst_n(rst_n), .start(start), .din_we(din_we), .din_addr(din_addr),
    .ks_busy(ks_busy), .ks_init(ks_init), .ks_start(ks_start), .ctl(ctl),
    .busy(busy), .done(done)
  );

  aes_data_unit u_data (
    .clk(clk), .rst_n(rst_n), .ctl(ctl), .din(din), .roundkey(roundkey),
    .rk_addr(rk_addr), .dout_addr(dout_addr), .dout(dout)
  );

  always #5 clk = ~clk;

  // key schedule stand-in
  assign ks_busy  = (ks_cnt != 0);
  assign roundkey = kcur[rk_addr];
  always @(posedge clk) begin
    if (ks_init) kround <= 0;
    if (ks_start) begin
      starts <= starts + 1;
      ks_cnt <= KS_CYCLES;
      kround <= kround + 1;
    end else if (ks_cnt != 0) begin
      ks_cnt <= ks_cnt - 1;
      if (ks_cnt == 1) kcur <= round_key(key, kround);
    end
  end

  task automatic encrypt_one(blk_t pt, blk_t k);
    blk_t exp;
    int   cyc;
    key = k;
    kcur = k;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      din_we = 1; din_addr = 4'(i); din = pt[i];
    end
    @(negedge clk);
    din_we = 0;
    starts = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    checks++;
    if (!busy) begin failures++; $display("FAIL busy not set"); end
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != ENC_CYCLES + 1) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", cyc - 1, ENC_CYCLES);
    end
    checks++;
    if (starts != NROUNDS) begin failures++; $display("FAIL %0d key starts", starts); end
    checks++;
    if (busy) begin failures++; $display("FAIL busy at done"); end
    exp = encrypt(pt, k);
    for (int i = 0; i < 16; i++) begin
      dout_addr = 4'(i);
      #1;
      checks++;
      if (dout !== exp[i]) begin
        failures++;
        $display("FAIL byte %0d: got %02h expected %02h", i, dout, exp[i]);
      end
    end
  endtask

  // cycles per pass
  int n_ark, n_sb, n_sr, n_mc;
  always @(posedge clk) begin
    if (rst_n) begin
      case (dut.pass)
        dut.S_ARK: n_ark++;
        dut.S_SB:  n_sb++;
        dut.S_SR:  n_sr++;
        dut.S_MC:  n_mc++;
        default: ;
      endcase
    end
  end

  initial begin
    blk_t pt, k;
    ks_cnt = 0; kround = 0; starts = 0;
    n_ark = 0; n_sb = 0; n_sr = 0; n_mc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    encrypt_one(from128(128'h3243f6a8885a308d313198a2e0370734),
                from128(128'h2b7e151628aed2a6abf7158809cf4f3c));
    checks++;
    if (n_ark != 11 * ARK_CYCLES || n_sb != 10 * SB_CYCLES || n_sr != 10 * SR_CYCLES ||
        n_mc != 9 * MC_CYCLES) begin
      failures++;
      $display("FAIL pass cycles ark=%0d sb=%0d sr=%0d mc=%0d", n_ark, n_sb, n_sr, n_mc);
    end
    for (int n = 0; n < 6; n++) begin
      for (int i = 0; i < 16; i++) begin pt[i] = 8'($urandom); k[i] = 8'($urandom); end
      encrypt_one(pt, k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
