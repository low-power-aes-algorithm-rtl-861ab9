// aes_byte_mem: the 16-byte register memory (S0..S15) used both for the AES state in the
// data encryption unit and for the round key in the key schedule unit.
//
// Each byte is an 8-bit register. There is one byte-wide write port and NRD asynchronous
// read ports, each a 16:1 byte multiplexer. Only the addressed byte is enabled on a write,
// so in a gated-clock netlist fifteen of the sixteen byte registers see no clock edge in
// any cycle: this per-byte enable is where clock gating of the memories applies.
// The contents are not reset; the user loads the memory before it is read.
// Timing: a write at a rising edge of clk is visible on the read ports after that edge.
module aes_byte_mem
  import aes_pkg::*;
#(
  parameter int unsigned NRD   = 3,
  parameter int unsigned DEPTH = NBYTES
) (
  input  logic   clk,
  input  logic   we,
  input  baddr_t wa,
  input  byte_t  wd,
  input  baddr_t ra [NRD],
  output byte_t  rd [NRD]
);

  byte_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wd;
  end

  always_comb begin
    for (int p = 0; p < NRD; p++) rd[p] = mem[ra[p]];
  end

endmodule
