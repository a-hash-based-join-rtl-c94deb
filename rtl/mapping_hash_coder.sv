// mapping_hash_coder: hardware mapping hash coder.
//
// Each of the 16 characters of a key addresses its own 64 x 16-bit prime RAM
// with its low six bits; the 16 primes read out are folded by 16 exclusive-OR
// modules, one per bit position, each a four-level XOR tree.  The low K bits of
// the 16-bit result are the bucket address (K = 8 gives 256 buckets).  Every
// part of this follows the specification; the write port, broadcast to all 16
// RAMs of the coder so that they hold identical tables, is this design's way of
// loading them.
// Timing: a new key may be given every cycle.  A key sampled with key_valid at
// clock edge n gives hash_valid and hash after edge n+3: two cycles for the RAM
// read and one for the XOR trees, the three cycles the specification states.
// Lint: the two high bits of each character are unused on purpose; only the
// low six bits address a RAM.
module mapping_hash_coder
  import himod_pkg::*;
#(
  parameter int unsigned CODER = 0,           // selects the initial prime table
  parameter int unsigned K     = HASH_BITS    // bucket address width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  key_valid,
  input  key_t                  key,
  output logic                  hash_valid,
  output logic [K-1:0]          hash,
  output logic [PRIME_BITS-1:0] hash_full,    // all 16 folded bits
  input  logic                  tbl_we,
  input  logic [RAM_ABITS-1:0]  tbl_addr,
  input  logic [PRIME_BITS-1:0] tbl_data
);
  logic [PRIME_BITS-1:0] prime [KEY_CHARS];
  logic [KEY_CHARS-1:0]  bit_slice [PRIME_BITS];
  logic [PRIME_BITS-1:0] folded;
  logic [1:0]            v_q;

  for (genvar c = 0; c < KEY_CHARS; c++) begin : g_ram
    prime_ram #(.CODER(CODER)) u_ram (
      .clk     (clk),
      .rd_en   (key_valid),
      .rd_addr (key[c*CHAR_BITS +: RAM_ABITS]),
      .rd_data (prime[c]),
      .we      (tbl_we),
      .wr_addr (tbl_addr),
      .wr_data (tbl_data)
    );
  end

  for (genvar b = 0; b < PRIME_BITS; b++) begin : g_xor
    for (genvar c = 0; c < KEY_CHARS; c++) begin : g_col
      assign bit_slice[b][c] = prime[c][b];
    end
    xor_module #(.N(KEY_CHARS)) u_xor (.in_bits(bit_slice[b]), .out_bit(folded[b]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q        <= '0;
      hash_valid <= 1'b0;
      hash_full  <= '0;
    end else begin
      v_q        <= {v_q[0], key_valid};
      hash_valid <= v_q[1];
      hash_full  <= folded;           // cycle 3: through the XOR trees
    end
  end

  assign hash = hash_full[K-1:0];
endmodule
