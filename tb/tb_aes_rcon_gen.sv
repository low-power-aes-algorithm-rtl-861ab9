// tb_aes_rcon_gen: the round constant register must run through the ten AES-128 round
// constants 01..36, hold when not stepped, and restart at 01 on init.
module tb_aes_rcon_gen;
  logic clk = 0, rst_n = 0, init = 0, step = 0;
  logic [7:0] rcon;
  int checks = 0, failures = 0;
  localparam logic [7:0] EXP [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10,
                                      8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  aes_rcon_gen dut (.clk(clk), .rst_n(rst_n), .init(init), .step(step), .rcon(rcon));

  always #5 clk = ~clk;

  task automatic check(logic [7:0] exp, string what);
    checks++;
    if (rcon !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, rcon, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int r = 0; r < 10; r++) begin
        check(EXP[r], $sformatf("rcon round %0d", r + 1));
        @(negedge clk); step = 1;
        @(negedge clk); step = 0;
        @(negedge clk);
        check((r == 9) ? 8'h6c : EXP[r + 1], "after step");
        check(rcon, "hold");
      end
      @(negedge clk); init = 1;
      @(negedge clk); init = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
