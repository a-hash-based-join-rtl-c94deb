// hash_addr_comparator_tb: feeds scans of addresses to the comparator and checks
// that 'same' stays 1 exactly when every address of the scan equals the first,
// and that the first address is kept.
module hash_addr_comparator_tb;
  logic clk = 0, rst_n = 0;
  logic clr, addr_valid, same;
  logic [7:0] addr, first_addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hash_addr_comparator #(.K(8)) dut (.clk, .rst_n, .clr, .addr_valid, .addr, .same, .first_addr);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; addr_valid = 0; addr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int scan = 0; scan < 200; scan++) begin
      int n;
      logic [7:0] first;
      logic exp_same;
      n = $urandom_range(1, 12);
      first = 8'($urandom);
      exp_same = 1;
      @(negedge clk); clr = 1;
      @(negedge clk); clr = 0;
      checks++;
      if (!same) begin failures++; $display("FAIL same not set by clear"); end
      for (int i = 0; i < n; i++) begin
        logic [7:0] a;
        // most scans keep one address; some change it once
        a = (i > 0 && $urandom_range(0, 9) == 0) ? 8'($urandom) : first;
        if (i > 0 && a != first) exp_same = 0;
        addr = a; addr_valid = 1;
        @(negedge clk);
        addr_valid = 0;
        addr = 8'($urandom);     // not valid: must be ignored
        @(negedge clk);
      end
      checks += 2;
      if (same !== exp_same) begin failures++; $display("FAIL scan %0d same=%b exp=%b", scan, same, exp_same); end
      if (first_addr !== first) begin failures++; $display("FAIL first=%h exp=%h", first_addr, first); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
