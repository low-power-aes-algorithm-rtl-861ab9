// tb_aes_xtime: exhaustive check of xtime against multiplication by 02 done as a
// general GF(2^8) product, and against 57*02 = ae from FIPS-197.
module tb_aes_xtime;
  import aes_ref_pkg::*;

  logic [7:0] a, y;
  int checks = 0, failures = 0;

  aes_xtime dut (.a(a), .y(y));

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      checks++;
      if (y !== gmul(a, 8'h02)) begin
        failures++;
        $display("FAIL xtime(%02h) = %02h", a, y);
      end
    end
    a = 8'h57; #1;
    checks++;
    if (y !== 8'hae) failures++;
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
