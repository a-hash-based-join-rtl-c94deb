// bus_interface_unit_tb: host bus cycles to the coprocessor interface
// registers: operand writes, the join and filter-only commands, the response
// flags, reading
// list pairs out of the FIFO (including a full FIFO refusing more), prime
// loading through register select, the control register, and DSACK timing
// through the strobe synchronizer.
module bus_interface_unit_tb;
  import himod_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cs, ds, rw, dsack;
  logic [4:0] addr;
  word_t wdata, rdata;
  logic start, filter_only, cancel, busy, done, merge_valid, merge_ready, tbl_we;
  word_t src_head, tgt_head, tbl_base, merge_s, merge_t;
  logic [2:0] tbl_coder;
  logic [5:0] tbl_addr;
  logic [15:0] tbl_data;
  int checks = 0, failures = 0;
  int n_start = 0, n_filter = 0, n_cancel = 0, n_tbl = 0;
  logic [31:0] last_tbl;

  always #5 clk = ~clk;

  bus_interface_unit #(.PAIRS(4)) dut (
    .clk, .rst_n, .cs, .ds, .rw, .addr, .wdata, .rdata, .dsack,
    .start, .filter_only, .cancel, .src_head, .tgt_head, .tbl_base, .busy, .done,
    .merge_valid, .merge_s, .merge_t, .merge_ready,
    .tbl_we, .tbl_coder, .tbl_addr, .tbl_data
  );

  always @(posedge clk) begin
    if (start)  n_start++;
    if (start && filter_only) n_filter++;
    if (cancel) n_cancel++;
    if (tbl_we) begin n_tbl++; last_tbl = {tbl_coder, 7'b0, tbl_addr, tbl_data}; end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string m);
    failures++;
    $display("FAIL %s", m);
  endtask

  // one bus cycle; the strobe passes a two-flop synchronizer, so DSACK must
  // come on the third clock edge after the strobe and fall on the third edge
  // after the strobe is removed
  task automatic bus(logic r, logic [4:0] a, word_t d, output word_t q);
    @(negedge clk); cs = 1; ds = 1; rw = r; addr = a; wdata = d;
    repeat (3) begin
      checks++;
      if (dsack) fail("dsack before the access");
      @(negedge clk);
    end
    checks++;
    if (!dsack) fail("no dsack on the third edge");
    q = rdata;
    @(negedge clk);        // strobe held one more cycle: the access must not repeat
    cs = 0; ds = 0; wdata = ~d;
    repeat (2) begin
      @(negedge clk);
      checks++;
      if (!dsack) fail("dsack fell early");
    end
    @(negedge clk);
    checks++;
    if (dsack) fail("dsack stuck");
  endtask

  initial begin
    word_t q;
    cs = 0; ds = 0; rw = 1; addr = 0; wdata = 0;
    busy = 0; done = 0; merge_valid = 0; merge_s = 0; merge_t = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // operands, then the join command
    bus(0, 5'h10, 32'h0000_1000, q);
    bus(0, 5'h10, 32'h0000_2000, q);
    bus(0, 5'h10, 32'h0000_8000, q);
    checks += 3;
    if (src_head != 32'h1000) fail("src_head");
    if (tgt_head != 32'h2000) fail("tgt_head");
    if (tbl_base != 32'h8000) fail("tbl_base");
    bus(0, 5'h0A, 32'h0000_0001, q);
    checks += 2;
    if (n_start != 1) fail($sformatf("start pulses %0d", n_start));
    if (n_filter != 0) fail("join command started a filter-only pass");
    // the filter-only command
    bus(0, 5'h0A, 32'h0000_0002, q);
    checks += 2;
    if (n_start != 2) fail("filter-only command did not start");
    if (n_filter != 1) fail("filter-only command not flagged");
    // operands restart at the source head after a command
    bus(0, 5'h10, 32'h0000_1100, q);
    checks += 2;
    if (src_head != 32'h1100) fail("operand order after command");
    if (tgt_head != 32'h2000) fail("tgt_head changed");
    // a command while busy is refused; other command words do nothing
    busy = 1;
    bus(0, 5'h0A, 32'h0000_0001, q);
    bus(0, 5'h0A, 32'h0000_0007, q);
    checks++;
    if (n_start != 2) fail("start while busy");
    bus(1, 5'h00, 0, q);
    checks++;
    if (q[15:13] != 3'b100) fail($sformatf("response %h while busy", q));
    // the controller hands over 5 pairs; the FIFO takes 4
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); merge_valid = 1; merge_s = 32'h100 + i; merge_t = 32'h200 + i;
      checks++;
      if (merge_ready != (i < 4)) fail($sformatf("merge_ready=%b with %0d waiting", merge_ready, i));
    end
    @(negedge clk); merge_valid = 0;
    @(negedge clk); done = 1;
    @(negedge clk); done = 0; busy = 0;
    bus(1, 5'h00, 0, q);
    checks++;
    if (q[15:13] != 3'b011) fail($sformatf("response %h after done", q));
    for (int i = 0; i < 4; i++) begin
      bus(1, 5'h10, 0, q);
      checks++;
      if (q != 32'h100 + i) fail($sformatf("pair %0d source %h", i, q));
      bus(1, 5'h10, 0, q);
      checks++;
      if (q != 32'h200 + i) fail($sformatf("pair %0d target %h", i, q));
    end
    bus(1, 5'h00, 0, q);
    checks++;
    if (q[14] != 0) fail("FIFO not empty");
    bus(1, 5'h10, 0, q);
    checks++;
    if (q != NIL) fail("empty FIFO read");
    // register select loads a prime
    bus(0, 5'h14, {3'd3, 7'd0, 6'd17, 16'd4243}, q);
    checks += 2;
    if (n_tbl != 1) fail("prime load count");
    if (last_tbl != {3'd3, 7'd0, 6'd17, 16'd4243}) fail("prime load fields");
    // control register abandons the operation and empties the FIFO
    @(negedge clk); merge_valid = 1; merge_s = 32'h300; merge_t = 32'h400;
    @(negedge clk); merge_valid = 0;
    bus(0, 5'h02, 32'h1, q);
    checks++;
    if (n_cancel != 1) fail("cancel");
    bus(1, 5'h00, 0, q);
    checks++;
    if (q[14] != 0) fail("FIFO kept a pair after cancel");
    // an unused CIR reads 0
    bus(1, 5'h1C, 0, q);
    checks++;
    if (q != 0) fail("unused CIR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
