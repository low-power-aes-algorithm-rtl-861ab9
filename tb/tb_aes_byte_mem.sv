// tb_aes_byte_mem: random writes and reads on all read ports of the 16-byte register
// memory, compared with a shadow array; a write must change only the addressed byte.
module tb_aes_byte_mem;
  import aes_pkg::*;

  logic   clk = 0;
  logic   we;
  baddr_t wa;
  byte_t  wd;
  baddr_t ra [3];
  byte_t  rd [3];
  byte_t  shadow [16];
  int checks = 0, failures = 0;

  aes_byte_mem dut (.clk(clk), .we(we), .wa(wa), .wd(wd), .ra(ra), .rd(rd));

  always #5 clk = ~clk;

  initial begin
    we = 0; wa = 0; wd = 0;
    for (int p = 0; p < 3; p++) ra[p] = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      we = 1; wa = 4'(i); wd = 8'($urandom); shadow[i] = wd;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = 1'($urandom);
      wa = 4'($urandom);
      wd = 8'($urandom);
      for (int p = 0; p < 3; p++) ra[p] = 4'($urandom);
      #1;
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (rd[p] !== shadow[ra[p]]) begin
          failures++;
          $display("FAIL port %0d addr %0d: got %02h expected %02h", p, ra[p], rd[p], shadow[ra[p]]);
        end
      end
      @(posedge clk);
      if (we) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
