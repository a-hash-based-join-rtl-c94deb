// bas_stack_tb: random pushes and pops against a counter model; checks bottom,
// full, the active mask and that a push on a full stack or a pop at the bottom
// leaves the pointer alone.
module bas_stack_tb;
  logic clk = 0, rst_n = 0;
  logic init, push, pop, bottom, full;
  logic [2:0] sp;
  logic [4:0] active;
  int model = 0;
  int checks = 0, failures = 0;
  int n_full_push = 0, n_bottom_pop = 0;

  always #5 clk = ~clk;

  bas_stack #(.LEVELS(5), .SPW(3)) dut (.clk, .rst_n, .init, .push, .pop, .sp, .bottom, .full, .active);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init = 0; push = 0; pop = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      int r;
      logic [4:0] exp_act;
      r = $urandom_range(0, 20);
      push = (r < 10); pop = (r >= 10 && r < 20); init = (r == 20);
      @(negedge clk);
      if (init) model = 0;
      else if (push) begin if (model < 4) model++; else n_full_push++; end
      else if (pop)  begin if (model > 0) model--; else n_bottom_pop++; end
      for (int l = 0; l < 5; l++) exp_act[l] = (l >= model);
      checks += 4;
      if (sp != 3'(model)) begin failures++; $display("FAIL sp=%0d exp %0d", sp, model); end
      if (bottom != (model == 0)) begin failures++; $display("FAIL bottom"); end
      if (full != (model == 4)) begin failures++; $display("FAIL full"); end
      if (active != exp_act) begin failures++; $display("FAIL active=%b exp %b", active, exp_act); end
    end
    checks++;
    if (n_full_push == 0 || n_bottom_pop == 0) begin failures++; $display("FAIL limits not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
