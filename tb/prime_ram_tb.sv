// prime_ram_tb: checks the initial prime tables against published values, the
// two-cycle read latency and the write port.
module prime_ram_tb;
  import himod_pkg::*;
  logic clk = 0;
  logic rd_en, we;
  logic [5:0] rd_addr, wr_addr;
  logic [15:0] rd_data0, rd_data1, wr_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  prime_ram #(.CODER(0)) dut0 (.clk, .rd_en, .rd_addr, .rd_data(rd_data0), .we, .wr_addr, .wr_data);
  prime_ram #(.CODER(1)) dut1 (.clk, .rd_en, .rd_addr, .rd_data(rd_data1), .we(1'b0), .wr_addr, .wr_data);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // read one word; the data must appear exactly two edges after the address
  task automatic rd(logic [5:0] a, output logic [15:0] d0, output logic [15:0] d1);
    @(negedge clk);
    rd_addr = a; rd_en = 1;
    @(negedge clk);
    rd_en = 0; rd_addr = ~a;
    @(negedge clk);
    d0 = rd_data0; d1 = rd_data1;
  endtask

  initial begin
    logic [15:0] d0, d1;
    rd_en = 0; we = 0; rd_addr = 0; wr_addr = 0; wr_data = 0;
    // words printed in the prime table (even addresses carry +1)
    rd(0, d0, d1);  expect_eq("c0 a0", d0, 2730);  expect_eq("c1 a0", d1, 2064);
    rd(1, d0, d1);  expect_eq("c0 a1", d0, 2063);  expect_eq("c1 a1", d1, 7927);
    rd(9, d0, d1);  expect_eq("c0 a9", d0, 223);   expect_eq("c1 a9", d1, 7481);
    rd(10, d0, d1); expect_eq("c0 a10", d0, 104);  expect_eq("c1 a10", d1, 524);
    rd(63, d0, d1); expect_eq("c0 a63", d0, 3709); expect_eq("c1 a63", d1, 6763);
    rd(55, d0, d1); expect_eq("c0 a55", d0, 967);  expect_eq("c1 a55", d1, 5627);
    // latency: one edge after the address is too early
    @(negedge clk); rd_addr = 6'd1; rd_en = 1;
    @(negedge clk); rd_en = 0;
    checks++;
    if (rd_data0 == 16'd2063) begin failures++; $display("FAIL data one cycle early"); end
    @(negedge clk);
    expect_eq("latency 2", rd_data0, 2063);
    // write then read back
    for (int i = 0; i < 20; i++) begin
      logic [5:0]  a;
      logic [15:0] v;
      a = 6'($urandom); v = 16'($urandom);
      @(negedge clk); we = 1; wr_addr = a; wr_data = v;
      @(negedge clk); we = 0;
      rd(a, d0, d1);
      expect_eq("write/read", d0, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
