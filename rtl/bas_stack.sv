// bas_stack: the stack pointer that makes the five bit array stores a stack.
//
// The pointer (Top) names the current store.  push makes the store above it
// current, saving the current one with its contents; pop makes the store below
// current again.  bottom says the current store is the lowest, which cannot be
// popped; full says it is the fifth, onto which nothing can be pushed.  active
// has a 1 for the current store and every store above it: those take part in
// filtering.  The stack operations come from the specification; ignoring a push
// when full and a pop at the bottom is this design's choice.
// Timing: sp changes at the clock edge after push or pop; reset and init put
// it at the lowest store.
module bas_stack #(
  parameter int unsigned LEVELS = 5,
  parameter int unsigned SPW    = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              push,
  input  logic              pop,
  output logic [SPW-1:0]    sp,
  output logic              bottom,
  output logic              full,
  output logic [LEVELS-1:0] active
);
  assign bottom = (sp == '0);
  assign full   = (sp == SPW'(LEVELS - 1));

  for (genvar i = 0; i < LEVELS; i++) begin : g_act
    assign active[i] = (SPW'(i) >= sp);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              sp <= '0;
    else if (init)           sp <= '0;
    else if (push && !full)  sp <= sp + 1'b1;
    else if (pop && !bottom) sp <= sp - 1'b1;
  end
endmodule
