// tb_aes_mc_basic: the MixColumn basic module, used four times with rotated inputs, must
// give the four bytes of MixColumn. Random columns plus the FIPS-197 example column
// (d4 bf 5d 30 -> 04 66 81 e5) are checked against 02/03 products.
module tb_aes_mc_basic;
  import aes_ref_pkg::*;

  logic [7:0] a, b, t, y;
  logic [7:0] col [4];
  logic [7:0] exp;
  int checks = 0, failures = 0;

  aes_mc_basic dut (.a(a), .b(b), .t(t), .y(y));

  task automatic run_col(logic [7:0] c0, c1, c2, c3, logic [31:0] known, logic use_known);
    col = '{c0, c1, c2, c3};
    for (int i = 0; i < 4; i++) begin
      a = col[i];
      b = col[(i+1)%4];
      t = c0 ^ c1 ^ c2 ^ c3;
      #1;
      exp = gmul(col[i], 2) ^ gmul(col[(i+1)%4], 3) ^ col[(i+2)%4] ^ col[(i+3)%4];
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL byte %0d: got %02h expected %02h", i, y, exp);
      end
      if (use_known) begin
        checks++;
        if (y !== known[31-8*i -: 8]) failures++;
      end
    end
  endtask

  initial begin
    run_col(8'hd4, 8'hbf, 8'h5d, 8'h30, 32'h046681e5, 1'b1);
    for (int n = 0; n < 500; n++)
      run_col(8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom), '0, 1'b0);
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
