// join_controller_tb: runs whole joins through the join controller and a filter
// unit on a memory with random wait states, with the host taking list pairs at
// random times, after a first join has been abandoned half way.  The bucket address is cut to K = 2 bits so that different keys
// share buckets often enough to reach every level of the stack, including the
// fifth, where lists are handed over without further division.  The list pairs
// are screened by key comparison and must give exactly the join result; every
// mechanism of the algorithm must have happened at least once.  Then three
// filter-only passes, as used for union, difference and intersection, are
// checked against the reference hash.
module join_controller_tb;
  import himod_pkg::*;
  localparam int unsigned K = 2;
  logic clk = 0, rst_n = 0;
  logic start, filter_only, busy, done, cancel;
  word_t src_head, tgt_head, tbl_base, merge_s, merge_t;
  logic merge_valid, merge_ready;
  logic mem_req, mem_we, mem_ack;
  word_t mem_addr, mem_wdata, mem_rdata;
  logic stack_init, push, pop, bottom, full;
  logic [2:0] sp;
  logic key_valid, res_valid, res_pass, clr_active, capture, identical;
  key_t key;
  filter_op_e op;
  logic [K-1:0] res_bucket, one_bucket, nxt_addr;
  logic [4:0][K-1:0] res_addr;
  logic nxt_start, nxt_step, nxt_busy, nxt_valid;
  join_stats_t stats;
  int checks = 0, failures = 0;
  int max_sp = 0, n_cancel = 0;

  always #5 clk = ~clk;

  join_controller #(.K(K)) dut (
    .clk, .rst_n, .cancel, .start, .filter_only, .src_head, .tgt_head, .tbl_base, .busy, .done,
    .merge_valid, .merge_s, .merge_t, .merge_ready,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ack,
    .stack_init, .push, .pop, .sp, .bottom, .full,
    .key_valid, .key, .op, .res_valid, .res_pass, .res_bucket,
    .clr_active, .capture, .identical, .one_bucket,
    .nxt_start, .nxt_step, .nxt_busy, .nxt_valid, .nxt_addr, .stats
  );

  filter_unit #(.K(K)) u_filter (
    .clk, .rst_n, .stack_init, .push, .pop, .sp, .bottom, .full,
    .key_valid, .key, .op, .res_valid, .res_pass, .res_bucket, .res_addr,
    .clr_active, .capture, .identical, .one_bucket,
    .nxt_start, .nxt_step, .nxt_busy, .nxt_valid, .nxt_addr,
    .tbl_we(1'b0), .tbl_coder(3'd0), .tbl_addr(6'd0), .tbl_data(16'd0)
  );

  tb_join_env #(.NS(60), .NT(80), .POOL(40)) env (
    .clk, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ack,
    .merge_fire(merge_valid && merge_ready), .merge_s, .merge_t
  );

  always @(posedge clk) if (rst_n && int'(sp) > max_sp) max_sp = int'(sp);
  always @(negedge clk) merge_ready = ($urandom_range(0, 2) == 0);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: join did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL never happened: %s", what); end
  endtask

  initial begin
    int bad;
    start = 0; cancel = 0; filter_only = 0;
    env.build();
    src_head = env.src_head(); tgt_head = env.tgt_head(); tbl_base = env.tbl_base();
    repeat (2) @(negedge clk);
    rst_n = 1;
    // a join abandoned half way: the controller must stop at once
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat ($urandom_range(2000, 6000)) @(negedge clk);
    cancel = 1;
    @(negedge clk); cancel = 0;
    checks++;
    if (busy || mem_req || merge_valid) begin failures++; $display("FAIL still active after cancel"); end
    else n_cancel++;
    repeat (20) @(negedge clk);
    env.relink();
    env.reset_found();
    // the whole join
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL not busy after start"); end
    while (!done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (busy || sp != 0) begin failures++; $display("FAIL not idle at the bottom after done"); end
    bad = env.check();
    checks++;
    if (bad != 0) begin failures++; $display("FAIL join result: %0d wrong pairs", bad); end
    $display("expected %0d found %0d lists %0d spurious %0d; push %0d pop %0d discard %0d identical %0d drain %0d merge %0d stall %0d max level %0d",
      env.n_expected, env.n_found, env.n_lists, env.n_spurious, stats.pushes, stats.pops,
      stats.discards, stats.identicals, stats.drains, stats.merges, stats.stalls, max_sp);
    checks++;
    if (stats.merges != 16'(env.n_lists)) begin failures++; $display("FAIL merge count"); end
    checks++;
    if (stats.pushes != stats.pops) begin failures++; $display("FAIL pushes and pops differ"); end
    expect_seen("push", stats.pushes);
    expect_seen("pop", stats.pops);
    expect_seen("target discarded by the filter", stats.discards);
    expect_seen("one bucket on every active coder", stats.identicals);
    expect_seen("fifth level handed over undivided", stats.drains);
    expect_seen("merge", stats.merges);
    expect_seen("host not ready", stats.stalls);
    expect_seen("join abandoned by cancel", n_cancel);
    // filter-only passes (set operations): one level, rejected targets listed
    for (int pass = 0; pass < 3; pass++) begin
      int unsigned ns;
      ns = (pass == 0) ? 60 : (pass == 1) ? 3 : 1;
      env.relink(ns);
      @(negedge clk); start = 1; filter_only = 1;
      @(negedge clk); start = 0; filter_only = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      bad = env.check_filter(K, ns);
      checks++;
      if (bad != 0) begin failures++; $display("FAIL filter-only pass over %0d sources: %0d errors", ns, bad); end
      checks++;
      if (stats.merges != 0 || stats.pushes != 0 || sp != 0) begin failures++; $display("FAIL filter-only pass divided or merged"); end
      checks++;
      if (stats.discards != 16'(env.n_rej)) begin failures++; $display("FAIL discard count %0d, rejected list %0d", stats.discards, env.n_rej); end
      $display("filter-only over %0d sources: passed %0d rejected %0d", ns, env.n_pass, env.n_rej);
      if (pass == 1) expect_seen("filter-only pass rejecting targets", env.n_rej);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
