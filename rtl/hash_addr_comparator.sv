// hash_addr_comparator: tells whether one hash coder produced only one hash
// address during a scan of a list.
//
// As specified, it holds an address register for the first hash address of the
// scan, loaded under control of a load flip-flop and an AND gate, a row of
// exclusive-OR gates and an OR gate that compare every later address with it,
// and a JK flip-flop whose output is 1 while all addresses were equal.  clr
// (the start of a scan) sets the JK flip-flop through J and arms the load
// flip-flop; the first address loads the register and disarms it; any later
// address that differs drives K and clears the JK output.
// Interface: addr is looked at in cycles where addr_valid is 1.  same is the JK
// output; first_addr is the register (the one bucket all keys fell in).
// Timing: same and first_addr change at the edge after addr_valid.
module hash_addr_comparator #(
  parameter int unsigned K = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         addr_valid,
  input  logic [K-1:0] addr,
  output logic         same,
  output logic [K-1:0] first_addr
);
  logic armed;       // load flip-flop: 1 until the first address has been loaded
  logic differ;      // output of the OR gate over the XOR gates

  assign differ = |(addr ^ first_addr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed      <= 1'b1;
      same       <= 1'b1;
      first_addr <= '0;
    end else if (clr) begin
      armed      <= 1'b1;
      same       <= 1'b1;     // J input
    end else if (addr_valid) begin
      if (armed) begin
        first_addr <= addr;
        armed      <= 1'b0;
      end else if (differ) begin
        same       <= 1'b0;   // K input
      end
    end
  end
endmodule
