// prime_ram: one 64 x 16-bit RAM of prime numbers of a mapping hash coder.
//
// The low six bits of a key character address the RAM (bit 7 only tells a
// letter from a digit and bit 8 is unused in ASCII), and the word read is the
// prime that stands for that character.  A read takes two clock cycles, as the
// specification allows for the RAM: the address is latched at the first edge
// and the data word at the second.  A write port lets the host replace the
// contents; at power-up the RAM holds the coder's table from himod_pkg.
// Interface: rd_addr is sampled when rd_en is 1; rd_data is valid two edges
// later.  we/wr_addr/wr_data write one word at a clock edge.
module prime_ram
  import himod_pkg::*;
#(
  parameter int unsigned CODER = 0   // which of the five coders' tables to start with
) (
  input  logic                  clk,
  input  logic                  rd_en,
  input  logic [RAM_ABITS-1:0]  rd_addr,
  output logic [PRIME_BITS-1:0] rd_data,
  input  logic                  we,
  input  logic [RAM_ABITS-1:0]  wr_addr,
  input  logic [PRIME_BITS-1:0] wr_data
);
  logic [PRIME_BITS-1:0] mem [RAM_WORDS];
  logic [RAM_ABITS-1:0]  addr_q;

  initial begin
    for (int unsigned a = 0; a < RAM_WORDS; a++) mem[a] = prime_init(CODER, a);
  end

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
    if (rd_en) addr_q <= rd_addr;    // cycle 1: address register
    rd_data <= mem[addr_q];           // cycle 2: data register
  end
endmodule
