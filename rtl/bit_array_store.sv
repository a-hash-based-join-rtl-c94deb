// bit_array_store: one single-bit-wide 256-bit store (BAS) of the filter unit,
// with its next-bucket address register and address multiplexer.
//
// A hash address either marks its bit (set) or reads it (rd_bit).  The address
// register, which can increment, walks the store to find the next bucket whose
// bit is 1: nxt_start loads it with 0 and searches, nxt_step moves one past the
// bucket found and searches again.  The search looks at one address per clock
// cycle and stops at a 1 (nxt_valid = 1) or after the last address (nxt_valid =
// 0, the nil next address).  The multiplexer gives the read port the hash
// address, or the register while a search runs or when sel_next is 1.  The
// specification gives the store, the incrementing register and the multiplexer;
// building the store from flip-flops so that clr empties it in one cycle, and
// the one-address-per-cycle search, are this design's choices.
// Timing: set, clr, nxt_start and nxt_step act at the clock edge; rd_bit is
// combinational.  nxt_busy is 1 while a search runs.
module bit_array_store #(
  parameter int unsigned K = 8            // address bits: 2**K bits stored
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         set,
  input  logic [K-1:0] hash_addr,
  input  logic         sel_next,
  output logic         rd_bit,
  input  logic         nxt_start,
  input  logic         nxt_step,
  output logic         nxt_busy,
  output logic         nxt_valid,
  output logic [K-1:0] nxt_addr
);
  localparam int unsigned DEPTH = 1 << K;

  logic [DEPTH-1:0] bits;
  logic [K-1:0]     mux_addr;

  assign mux_addr = (nxt_busy || sel_next) ? nxt_addr : hash_addr;
  assign rd_bit   = bits[mux_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits <= '0;
    end else if (clr) begin
      bits <= '0;
    end else if (set) begin
      bits[hash_addr] <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nxt_addr  <= '0;
      nxt_busy  <= 1'b0;
      nxt_valid <= 1'b0;
    end else if (clr) begin
      nxt_addr  <= '0;
      nxt_busy  <= 1'b0;
      nxt_valid <= 1'b0;
    end else if (nxt_start) begin
      nxt_addr  <= '0;
      nxt_busy  <= 1'b1;
      nxt_valid <= 1'b0;
    end else if (nxt_step) begin
      nxt_valid <= 1'b0;
      if (nxt_addr == K'(DEPTH - 1)) begin
        nxt_busy <= 1'b0;                 // nothing after the last bucket
      end else begin
        nxt_addr <= nxt_addr + 1'b1;
        nxt_busy <= 1'b1;
      end
    end else if (nxt_busy) begin
      if (bits[nxt_addr]) begin
        nxt_busy  <= 1'b0;
        nxt_valid <= 1'b1;
      end else if (nxt_addr == K'(DEPTH - 1)) begin
        nxt_busy  <= 1'b0;                // nil
      end else begin
        nxt_addr  <= nxt_addr + 1'b1;
      end
    end
  end
endmodule
