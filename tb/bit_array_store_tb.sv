// bit_array_store_tb: sets random bits, reads every address back, then walks the
// store with the next-bucket register and checks that it visits exactly the set
// bits in increasing order and ends with nil; checks clearing.
module bit_array_store_tb;
  logic clk = 0, rst_n = 0;
  logic clr, set, sel_next, rd_bit, nxt_start, nxt_step, nxt_busy, nxt_valid;
  logic [7:0] hash_addr, nxt_addr;
  logic [255:0] model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bit_array_store #(.K(8)) dut (.clk, .rst_n, .clr, .set, .hash_addr, .sel_next, .rd_bit,
    .nxt_start, .nxt_step, .nxt_busy, .nxt_valid, .nxt_addr);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic walk();
    int exp_a;
    exp_a = -1;
    @(negedge clk); nxt_start = 1;
    @(negedge clk); nxt_start = 0;
    forever begin
      int guard;
      guard = 0;
      while (nxt_busy && guard < 300) begin @(negedge clk); guard++; end
      // expected: next set bit after exp_a
      exp_a++;
      while (exp_a < 256 && !model[exp_a]) exp_a++;
      checks++;
      if (exp_a == 256) begin
        if (nxt_valid) begin failures++; $display("FAIL walk did not end, at %0d", nxt_addr); end
        break;
      end
      if (!nxt_valid || nxt_addr != 8'(exp_a)) begin
        failures++; $display("FAIL walk got %b/%0d expected %0d", nxt_valid, nxt_addr, exp_a);
        break;
      end
      // the multiplexer gives the register to the read port when asked
      sel_next = 1; #1;
      checks++;
      if (rd_bit !== 1'b1) begin failures++; $display("FAIL sel_next read"); end
      @(negedge clk); sel_next = 0; nxt_step = 1;
      @(negedge clk); nxt_step = 0;
    end
  endtask

  initial begin
    clr = 0; set = 0; sel_next = 0; nxt_start = 0; nxt_step = 0; hash_addr = 0;
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      int n;
      n = (round == 0) ? 0 : (round == 3) ? 40 : $urandom_range(1, 8);
      for (int i = 0; i < n; i++) begin
        logic [7:0] a;
        a = (round == 3 && i == 0) ? 8'd255 : (round == 3 && i == 1) ? 8'd0 : 8'($urandom);
        @(negedge clk); set = 1; hash_addr = a; model[a] = 1;
      end
      @(negedge clk); set = 0;
      for (int a = 0; a < 256; a++) begin
        hash_addr = 8'(a); #1;
        checks++;
        if (rd_bit !== model[a]) begin failures++; $display("FAIL bit %0d = %b", a, rd_bit); end
      end
      walk();
      @(negedge clk); clr = 1; model = '0;
      @(negedge clk); clr = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
