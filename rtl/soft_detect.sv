// soft_detect: the hardware of the stack oriented filter technique (SOFT) that
// decides whether a list needs to be divided again.
//
// Five comparator outputs come in, one per hash coder.  AND gate A combines all
// five, B the upper four, C the upper three, D the upper two, and the fifth
// comparator's output is used alone; a 5-to-1 multiplexer steered by the stack
// pointer picks the one that matches the current level, so that only the
// current store and those above it count.  At the end of a scan (capture) the
// picked bit is clocked into a JK flip-flop, whose output 'identical' tells the
// controller that every key of the lists fell into one bucket of every active
// coder: the lists can be sent to the host for merging.  All of this follows
// the specification; clearing the JK flip-flop with clr is this design's choice.
// Timing: mux_out is combinational; identical changes at the edge after capture.
module soft_detect #(
  parameter int unsigned LEVELS = 5,
  parameter int unsigned SPW    = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              capture,
  input  logic [LEVELS-1:0] same,
  input  logic [SPW-1:0]    sp,
  output logic              mux_out,
  output logic              identical
);
  // and_gate[l] = AND of same[l..LEVELS-1]  (A = 0, B = 1, C = 2, D = 3)
  logic [LEVELS-1:0] and_gate;

  for (genvar l = 0; l < LEVELS; l++) begin : g_and
    assign and_gate[l] = &same[LEVELS-1:l];
  end

  always_comb begin
    mux_out = 1'b0;
    for (int unsigned l = 0; l < LEVELS; l++)
      if (sp == SPW'(l)) mux_out = and_gate[l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       identical <= 1'b0;
    else if (clr)     identical <= 1'b0;
    else if (capture) identical <= mux_out;   // J = mux_out, K = !mux_out
  end
endmodule
