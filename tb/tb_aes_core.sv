// tb_aes_core: end-to-end test of the AES-128 encryption core at its default size.
// Encrypts the two FIPS-197 example blocks (appendix B and C.1) and random blocks with
// random keys, compares each ciphertext with the reference model, and checks the
// 765-cycle latency from start to done. It also counts how often each mechanism of the
// design was used and fails if one never was: plaintext load through mux5, key load
// through the key unit's mux3, key schedule running during SubByte/ShiftRow/MixColumn,
// the Rcon path of the key unit, MixColumn's last byte taken from Reg2, ShiftRow byte
// moves through mux3, and a final round without MixColumn.
module tb_aes_core;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic   clk = 0, rst_n = 0;
  logic   key_we = 0, din_we = 0, start = 0;
  baddr_t key_addr = '0, din_addr = '0, dout_addr = '0;
  byte_t  keyin = '0, din = '0, dout;
  logic   busy, done;
  int checks = 0, failures = 0;

  aes_core dut (
    .clk(clk), .rst_n(rst_n), .key_we(key_we), .key_addr(key_addr), .keyin(keyin),
    .din_we(din_we), .din_addr(din_addr), .din(din), .start(start),
    .busy(busy), .done(done), .dout_addr(dout_addr), .dout(dout)
  );

  always #5 clk = ~clk;

  // mechanism counters
  int n_din_load, n_key_load, n_ks_overlap, n_rcon_path, n_mc_reg2, n_sr_move, n_final_round;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.ctl.we && !dut.ctl.mux5_int) n_din_load++;
      if (dut.u_key.we && !dut.u_key.busy) n_key_load++;
      if (dut.ks_busy && dut.u_ctrl.pass inside {dut.u_ctrl.S_SB, dut.u_ctrl.S_SR,
                                                 dut.u_ctrl.S_MC}) n_ks_overlap++;
      if (dut.u_key.busy && dut.u_key.cnt == 0) n_rcon_path++;
      if (dut.ctl.we && dut.ctl.mux4_mc && dut.ctl.mc_reg2) n_mc_reg2++;
      if (dut.ctl.we && !dut.ctl.mux4_mc && dut.ctl.mux3_mem) n_sr_move++;
      if (dut.u_ctrl.pass == dut.u_ctrl.S_SR && dut.u_ctrl.last_cycle &&
          dut.u_ctrl.round == 4'(NROUNDS)) n_final_round++;
    end
  end

  task automatic encrypt_one(blk_t pt, blk_t k, logic [127:0] known, logic use_known);
    blk_t exp;
    int   cyc;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      key_we = 1; key_addr = 4'(i); keyin = k[i];
      din_we = 1; din_addr = 4'(15 - i); din = pt[15 - i];
    end
    @(negedge clk);
    key_we = 0; din_we = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (cyc > 4 * ENC_CYCLES) break;
    end
    checks++;
    if (cyc != ENC_CYCLES + 1) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", cyc - 1, ENC_CYCLES);
    end
    exp = use_known ? from128(known) : encrypt(pt, k);
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

  task automatic need(int n, string what);
    checks++;
    $display("mechanism %-40s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never used: %s", what);
    end
  endtask

  initial begin
    blk_t pt, k;
    n_din_load = 0; n_key_load = 0; n_ks_overlap = 0; n_rcon_path = 0;
    n_mc_reg2 = 0; n_sr_move = 0; n_final_round = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    encrypt_one(from128(128'h3243f6a8885a308d313198a2e0370734),
                from128(128'h2b7e151628aed2a6abf7158809cf4f3c),
                128'h3925841d02dc09fbdc118597196a0b32, 1'b1);
    encrypt_one(from128(128'h00112233445566778899aabbccddeeff),
                from128(128'h000102030405060708090a0b0c0d0e0f),
                128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1'b1);
    for (int n = 0; n < 10; n++) begin
      for (int i = 0; i < 16; i++) begin pt[i] = 8'($urandom); k[i] = 8'($urandom); end
      encrypt_one(pt, k, '0, 1'b0);
    end
    need(n_din_load, "plaintext load (mux5 = din)");
    need(n_key_load, "cipher key load (key mux3 = keyin)");
    need(n_ks_overlap, "key schedule during SB/SR/MC");
    need(n_rcon_path, "round constant added (key mux1)");
    need(n_mc_reg2, "MixColumn operand from Reg2");
    need(n_sr_move, "ShiftRow byte move (mux3 = memory)");
    need(n_final_round, "final round without MixColumn");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
