// xor_module_tb: checks the 16-input exclusive-OR tree against the parity of
// its input, for walking ones and for random vectors.
module xor_module_tb;
  logic [15:0] in_bits;
  logic        out_bit;
  int checks = 0, failures = 0;

  xor_module #(.N(16)) dut (.in_bits, .out_bit);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [15:0] v);
    logic exp;
    exp = 1'b0;
    for (int i = 0; i < 16; i++) exp = exp ^ v[i];
    in_bits = v;
    #1;
    checks++;
    if (out_bit !== exp) begin
      failures++;
      $display("FAIL in=%h out=%b exp=%b", v, out_bit, exp);
    end
  endtask

  initial begin
    check(16'h0000);
    check(16'hFFFF);
    for (int i = 0; i < 16; i++) check(16'(1) << i);
    for (int i = 0; i < 16; i++) check(~(16'(1) << i));
    for (int i = 0; i < 500; i++) check(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
