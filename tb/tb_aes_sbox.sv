// tb_aes_sbox: exhaustive check of the combinational S-box against the table-built
// reference S-box, plus a few published FIPS-197 entries.
module tb_aes_sbox;
  import aes_ref_pkg::*;

  logic [7:0] a, y;
  int checks = 0, failures = 0;

  aes_sbox dut (.a(a), .y(y));

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      check(y, sbox(a), $sformatf("sbox(%02h)", a));
    end
    a = 8'h00; #1 check(y, 8'h63, "sbox(00)");
    a = 8'h53; #1 check(y, 8'hed, "sbox(53)");
    a = 8'hff; #1 check(y, 8'h16, "sbox(ff)");
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
