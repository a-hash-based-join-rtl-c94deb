// xor_module: the exclusive-OR module for one hash address bit.
//
// Folds bit i of the 16 primes looked up for a key into bit i of the hash
// value.  As in the specification, the 16 inputs go through four levels of
// two-input exclusive-OR gates: pairs (1,2), (3,4), ... at level 1, pairs of
// those results at level 2, and so on, a tree of 15 gates in four levels.  The
// result equals the serial XOR of all 16 inputs (XOR is associative), which is
// what a software version of the mapping hash computes.
// Interface: in_bits[j] is the bit of the prime selected for character j.
// Timing: purely combinational; the hash coder registers the output.
module xor_module #(
  parameter int unsigned N = 16   // number of inputs, a power of two
) (
  input  logic [N-1:0] in_bits,
  output logic         out_bit
);
  localparam int unsigned LEVELS = $clog2(N);

  // level l holds N >> l partial results; level 0 is the input.
  logic [N-1:0] lvl [LEVELS+1];

  assign lvl[0] = in_bits;

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    for (genvar g = 0; g < (N >> l); g++) begin : g_gate
      assign lvl[l][g] = lvl[l-1][2*g] ^ lvl[l-1][2*g+1];
    end
    if ((N >> l) < N) begin : g_pad
      assign lvl[l][N-1:(N >> l)] = '0;
    end
  end

  assign out_bit = lvl[LEVELS][0];
endmodule
