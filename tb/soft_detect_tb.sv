// soft_detect_tb: every combination of comparator outputs and stack level;
// the decision must be the AND of the comparators at and above the level.
module soft_detect_tb;
  logic clk = 0, rst_n = 0;
  logic clr, capture, mux_out, identical;
  logic [4:0] same;
  logic [2:0] sp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  soft_detect #(.LEVELS(5), .SPW(3)) dut (.clk, .rst_n, .clr, .capture, .same, .sp, .mux_out, .identical);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; capture = 0; same = 0; sp = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < 5; l++) begin
      for (int s = 0; s < 32; s++) begin
        logic exp;
        exp = 1;
        for (int i = l; i < 5; i++) exp &= s[i];
        sp = 3'(l); same = 5'(s);
        @(negedge clk); clr = 1;
        @(negedge clk); clr = 0;
        checks += 2;
        if (identical !== 1'b0) begin failures++; $display("FAIL not cleared"); end
        if (mux_out !== exp) begin failures++; $display("FAIL mux l=%0d s=%b", l, same); end
        capture = 1;
        @(negedge clk); capture = 0;
        same = ~same;   // later changes must not reach the flip-flop
        @(negedge clk);
        checks++;
        if (identical !== exp) begin failures++; $display("FAIL identical l=%0d s=%b", l, 5'(s)); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
