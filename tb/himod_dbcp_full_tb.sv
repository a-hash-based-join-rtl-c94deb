// himod_dbcp_full_tb: one complete join on the coprocessor with every
// parameter at its default (256 buckets, five coders, 4-pair FIFO): 1024 source
// and 1024 target tuples of 16-character keys.  The host model writes the
// operands and the join command, polls the response CIR and reads every list
// pair out of the operand CIR, screening it by key comparison.  The result must
// be exactly the join of the two relations.  A filter-only pass over the
// same relations follows, checked against the reference hash.
module himod_dbcp_full_tb;
  import himod_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cs, ds, rw, dsack;
  logic [4:0] addr;
  word_t wdata, rdata;
  logic mem_req, mem_we, mem_ack;
  word_t mem_addr, mem_wdata, mem_rdata;
  join_stats_t stats;
  logic host_fire = 0;
  word_t host_s, host_t;
  int checks = 0, failures = 0;
  int max_sp = 0;

  always #5 clk = ~clk;

  himod_dbcp dut (
    .clk, .rst_n, .cs, .ds, .rw, .addr, .wdata, .rdata, .dsack,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ack, .stats
  );

  tb_join_env #(.NS(1024), .NT(1024), .POOL(600)) env (
    .clk, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ack,
    .merge_fire(host_fire), .merge_s(host_s), .merge_t(host_t)
  );

  always @(posedge clk) begin
    if (rst_n && int'(dut.u_ctrl.sp) > max_sp) max_sp = int'(dut.u_ctrl.sp);
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog: join did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one host bus cycle, four-phase: strobe, wait for dsack, release, wait
  // for dsack to fall
  task automatic bus(logic r, logic [4:0] a, word_t d, output word_t q);
    int guard;
    @(negedge clk); cs = 1; ds = 1; rw = r; addr = a; wdata = d;
    guard = 0;
    while (!dsack && guard < 10) begin @(negedge clk); guard++; end
    if (guard >= 10) begin failures++; $display("FAIL no dsack"); end
    q = rdata;
    cs = 0; ds = 0;
    guard = 0;
    while (dsack && guard < 10) begin @(negedge clk); guard++; end
    if (guard >= 10) begin failures++; $display("FAIL dsack stuck"); end
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL never happened: %s", what); end
  endtask

  initial begin
    word_t q;
    int bad, polls;
    cs = 0; ds = 0; rw = 1; addr = 0; wdata = 0;
    env.build();
    repeat (2) @(negedge clk);
    rst_n = 1;
    bus(0, 5'h10, env.src_head(), q);
    bus(0, 5'h10, env.tgt_head(), q);
    bus(0, 5'h10, env.tbl_base(), q);
    bus(0, 5'h0A, 32'h1, q);
    bus(1, 5'h00, 0, q);
    checks++;
    if (!q[15]) begin failures++; $display("FAIL response does not show the join running"); end
    polls = 0;
    forever begin
      // a slow host: poll now and then
      repeat ($urandom_range(0, 20)) @(negedge clk);
      bus(1, 5'h00, 0, q);
      polls++;
      if (q[14]) begin
        bus(1, 5'h10, 0, q); host_s = q;
        bus(1, 5'h10, 0, q); host_t = q;
        @(negedge clk); host_fire = 1;
        @(negedge clk); host_fire = 0;
      end else if (!q[15]) begin
        break;
      end
    end
    checks++;
    if (!q[13]) begin failures++; $display("FAIL done flag not set"); end
    bad = env.check();
    checks++;
    if (bad != 0) begin failures++; $display("FAIL join result: %0d wrong pairs", bad); end
    checks++;
    if (env.n_found != env.n_expected) begin failures++; $display("FAIL pairs found %0d of %0d", env.n_found, env.n_expected); end
    $display("expected %0d found %0d lists %0d spurious %0d; push %0d pop %0d discard %0d identical %0d drain %0d merge %0d stall %0d max level %0d",
      env.n_expected, env.n_found, env.n_lists, env.n_spurious, stats.pushes, stats.pops,
      stats.discards, stats.identicals, stats.drains, stats.merges, stats.stalls, max_sp);
    checks++;
    if (stats.merges != 16'(env.n_lists)) begin failures++; $display("FAIL merge count"); end
    expect_seen("join pairs", env.n_found);
    expect_seen("target discarded by the filter", stats.discards);
    // a filter-only pass over both whole relations, as for a union
    env.relink();
    bus(0, 5'h10, env.src_head(), q);
    bus(0, 5'h10, env.tgt_head(), q);
    bus(0, 5'h10, env.tbl_base(), q);
    bus(0, 5'h0A, 32'h2, q);
    do begin
      repeat (200) @(negedge clk);
      bus(1, 5'h00, 0, q);
    end while (q[15]);
    bad = env.check_filter(HASH_BITS);
    checks++;
    if (bad != 0) begin failures++; $display("FAIL filter-only pass: %0d errors", bad); end
    checks++;
    if (stats.discards != 16'(env.n_rej)) begin failures++; $display("FAIL filter-only discard count"); end
    $display("filter-only over %0d sources: passed %0d rejected %0d", env.NS, env.n_pass, env.n_rej);
    expect_seen("filter-only pass rejecting targets", env.n_rej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
