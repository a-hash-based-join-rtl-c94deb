// himod_dbcp_workload_tb: the five joins of the name-relation experiment, each
// on its own coprocessor at default parameters.  2048 tuples are split into a
// source and a target relation at five points (155/1893, 646/1402, 799/1249,
// 1196/852, 1961/87).  Random 16-character keys stand in for the last names;
// each key pool is sized so that the join result has about as many tuples as
// the experiment reports (355, 919, 902, 846, 205).  Each join must give
// exactly the brute-force result; the number of tuples handed to the host is
// printed next to it.
module himod_dbcp_workload_tb;
  logic clk = 0, rst_n = 0, go = 0;
  logic [4:0] finished;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tb_host_join #(.NS(155),  .NT(1893), .POOL(551)) w_a (.clk, .rst_n, .go, .finished(finished[0]));
  tb_host_join #(.NS(646),  .NT(1402), .POOL(657)) w_e (.clk, .rst_n, .go, .finished(finished[1]));
  tb_host_join #(.NS(799),  .NT(1249), .POOL(738)) w_g (.clk, .rst_n, .go, .finished(finished[2]));
  tb_host_join #(.NS(1196), .NT(852),  .POOL(803)) w_k (.clk, .rst_n, .go, .finished(finished[3]));
  tb_host_join #(.NS(1961), .NT(87),   .POOL(555)) w_v (.clk, .rst_n, .go, .finished(finished[4]));

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog: a join did not finish, finished=%b", finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); go = 1;
    wait (&finished);
    checks   = w_a.checks + w_e.checks + w_g.checks + w_k.checks + w_v.checks;
    failures = w_a.failures + w_e.failures + w_g.failures + w_k.failures + w_v.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
