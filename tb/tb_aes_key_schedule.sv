// tb_aes_key_schedule: loads a cipher key, runs the ten round key computations and
// compares every byte of every round key with the reference key expansion. The FIPS-197
// key 2b7e1516... is checked against its published round keys 1 and 10; random keys
// follow. Each round key must take exactly 17 cycles from start to done.
module tb_aes_key_schedule;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic   clk = 0, rst_n = 0;
  logic   key_we = 0, init = 0, start = 0;
  baddr_t key_wa = '0, kaddr = '0;
  byte_t  keyin = '0, keyout;
  logic   busy, done;
  int checks = 0, failures = 0;

  aes_key_schedule dut (
    .clk(clk), .rst_n(rst_n), .key_we(key_we), .key_wa(key_wa), .keyin(keyin),
    .init(init), .start(start), .busy(busy), .done(done), .kaddr(kaddr), .keyout(keyout)
  );

  always #5 clk = ~clk;

  task automatic read_key(output blk_t k);
    for (int i = 0; i < 16; i++) begin
      kaddr = 4'(i);
      #1 k[i] = keyout;
    end
  endtask

  task automatic run_key(blk_t key, logic [127:0] rk1, logic [127:0] rk10, logic known);
    blk_t got, exp;
    int   cyc;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      key_we = 1; key_wa = 4'(i); keyin = key[i];
    end
    @(negedge clk);
    key_we = 0; init = 1;
    @(negedge clk);
    init = 0;
    read_key(got);
    checks++;
    if (got != key) begin failures++; $display("FAIL key load"); end
    for (int r = 1; r <= 10; r++) begin
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != KS_CYCLES) begin
        failures++;
        $display("FAIL round %0d took %0d cycles", r, cyc);
      end
      @(negedge clk);
      read_key(got);
      exp = round_key(key, r);
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (got[i] !== exp[i]) begin
          failures++;
          $display("FAIL round %0d byte %0d: got %02h expected %02h", r, i, got[i], exp[i]);
        end
      end
      if (known && (r == 1 || r == 10)) begin
        exp = from128(r == 1 ? rk1 : rk10);
        checks++;
        if (got != exp) begin failures++; $display("FAIL published round key %0d", r); end
      end
    end
  endtask

  initial begin
    blk_t k;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_key(from128(128'h2b7e151628aed2a6abf7158809cf4f3c),
            128'ha0fafe1788542cb123a339392a6c7605,
            128'hd014f9a8c9ee2589e13f0cc8b6630ca6, 1'b1);
    for (int n = 0; n < 8; n++) begin
      for (int i = 0; i < 16; i++) k[i] = 8'($urandom);
      run_key(k, '0, '0, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
