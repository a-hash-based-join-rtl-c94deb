// himod_dbcp_tb: end-to-end test of the database coprocessor.  A host model
// loads a few primes through the register select CIR, writes the operands and
// the join command, then polls the response CIR and reads every list pair out
// of the operand CIR, screening it by key comparison as the host processor
// would.  The result must be exactly the join of the two relations.  The
// bucket address is cut to K = 2 bits (parameter) so that every stack level is
// reached; each mechanism of the design must have happened at least once.
// A filter-only pass, the building block of union, difference and
// intersection, follows and is checked against the reference hash.
module himod_dbcp_tb;
  import himod_pkg::*;
  localparam int unsigned K = 2;
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
  int max_sp = 0, n_full_fifo = 0, n_reload = 0;

  always #5 clk = ~clk;

  himod_dbcp #(.K(K), .PAIRS(2)) dut (
    .clk, .rst_n, .cs, .ds, .rw, .addr, .wdata, .rdata, .dsack,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ack, .stats
  );

  tb_join_env #(.NS(70), .NT(90), .POOL(45)) env (
    .clk, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ack,
    .merge_fire(host_fire), .merge_s(host_s), .merge_t(host_t)
  );

  always @(posedge clk) begin
    if (rst_n && int'(dut.u_ctrl.sp) > max_sp) max_sp = int'(dut.u_ctrl.sp);
    if (dut.u_ctrl.merge_valid && !dut.u_ctrl.merge_ready) n_full_fifo++;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog: join did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one host bus cycle, four-phase: strobe, wait for dsack, release, wait
  // for dsack to fall.  The host runs on no common clock: its strobe edges
  // fall at random points within the coprocessor's clock period.
  task automatic bus(logic r, logic [4:0] a, word_t d, output word_t q);
    int guard;
    @(negedge clk); #($urandom_range(0, 9));
    rw = r; addr = a; wdata = d; cs = 1; ds = 1;
    guard = 0;
    while (!dsack && guard < 10) begin @(negedge clk); guard++; end
    if (guard >= 10) begin failures++; $display("FAIL no dsack"); end
    #($urandom_range(0, 9));
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
    // give coder 4 a different prime at word 5 (characters 'E' and 0x05)
    bus(0, 5'h14, {3'd4, 7'd0, 6'd5, 16'd7919}, q);
    n_reload++;
    bus(0, 5'h10, env.src_head(), q);
    bus(0, 5'h10, env.tgt_head(), q);
    bus(0, 5'h10, env.tbl_base(), q);
    bus(0, 5'h0A, 32'h1, q);
    bus(1, 5'h00, 0, q);
    checks++;
    if (!q[15]) begin failures++; $display("FAIL response does not show the join running"); end
    polls = 0;
    // the host is busy elsewhere for a while: list pairs pile up in the FIFO
    repeat (20000) @(negedge clk);
    forever begin
      // a slow host: poll now and then
      repeat ($urandom_range(0, 60)) @(negedge clk);
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
    expect_seen("prime reload", n_reload);
    expect_seen("push (divide again)", stats.pushes);
    expect_seen("pop", stats.pops);
    expect_seen("target discarded by the filter", stats.discards);
    expect_seen("one bucket on every active coder", stats.identicals);
    expect_seen("fifth level handed over undivided", stats.drains);
    expect_seen("list pair FIFO full", n_full_fifo);
    expect_seen("fifth level reached", max_sp == 4);
    // a filter-only pass (set operations) over a short source list, with the
    // reloaded prime put back so that the reference hash applies
    bus(0, 5'h14, {3'd4, 7'd0, 6'd5, 16'(himod_ref_pkg::ref_prime(4, 5))}, q);
    n_reload++;
    env.relink(4);
    bus(0, 5'h10, env.src_head(), q);
    bus(0, 5'h10, env.tgt_head(), q);
    bus(0, 5'h10, env.tbl_base(), q);
    bus(0, 5'h0A, 32'h2, q);
    do begin
      repeat (50) @(negedge clk);
      bus(1, 5'h00, 0, q);
    end while (q[15]);
    checks++;
    if (q[14:13] != 2'b01) begin failures++; $display("FAIL response %h after the filter-only pass", q); end
    bad = env.check_filter(K, 4);
    checks++;
    if (bad != 0) begin failures++; $display("FAIL filter-only pass: %0d errors", bad); end
    checks++;
    if (stats.discards != 16'(env.n_rej) || stats.merges != 0) begin failures++; $display("FAIL filter-only counters"); end
    $display("filter-only over 4 sources: passed %0d rejected %0d", env.n_pass, env.n_rej);
    expect_seen("filter-only pass rejecting targets", env.n_rej);
    expect_seen("filter-only pass letting targets through", env.n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
