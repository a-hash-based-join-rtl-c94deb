// tb_host_join: one coprocessor at its default parameters, its memory and a
// host model, for the workload testbench.  On go, the host writes the operands
// and the join command over the host bus, polls the response CIR, reads every
// list pair out of the operand CIR and screens it by key comparison.  When the
// join is over it checks the result against the brute-force join of the two
// relations, sets finished, and leaves its counts in checks and failures.
// Relation sizes are parameters: NS source and NT target tuples, keys drawn
// from a pool of POOL random keys.
module tb_host_join #(
  parameter int unsigned NS   = 155,
  parameter int unsigned NT   = 1893,
  parameter int unsigned POOL = 551
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic finished
);
  import himod_pkg::*;
  logic cs, ds, rw, dsack;
  logic [4:0] addr;
  word_t wdata, rdata;
  logic mem_req, mem_we, mem_ack;
  word_t mem_addr, mem_wdata, mem_rdata;
  join_stats_t stats;
  logic host_fire = 0;
  word_t host_s, host_t;
  int checks = 0, failures = 0;
  int cycles = 0;

  himod_dbcp dut (
    .clk, .rst_n, .cs, .ds, .rw, .addr, .wdata, .rdata, .dsack,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ack, .stats
  );

  tb_join_env #(.NS(NS), .NT(NT), .POOL(POOL)) env (
    .clk, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ack,
    .merge_fire(host_fire), .merge_s(host_s), .merge_t(host_t)
  );

  always @(posedge clk) if (dut.u_ctrl.busy) cycles++;

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

  initial begin
    word_t q;
    int bad;
    finished = 0;
    cs = 0; ds = 0; rw = 1; addr = 0; wdata = 0;
    env.build();
    wait (go && rst_n);
    bus(0, 5'h10, env.src_head(), q);
    bus(0, 5'h10, env.tgt_head(), q);
    bus(0, 5'h10, env.tbl_base(), q);
    bus(0, 5'h0A, 32'h1, q);
    forever begin
      repeat ($urandom_range(0, 20)) @(negedge clk);
      bus(1, 5'h00, 0, q);
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
    if (!q[13]) begin failures++; $display("FAIL %0d/%0d: done flag not set", NS, NT); end
    bad = env.check();
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %0d/%0d: %0d wrong pairs", NS, NT, bad); end
    checks++;
    if (env.n_found != env.n_expected) begin failures++; $display("FAIL %0d/%0d: pairs found %0d of %0d", NS, NT, env.n_found, env.n_expected); end
    checks++;
    if (stats.merges != 16'(env.n_lists)) begin failures++; $display("FAIL %0d/%0d: merge count", NS, NT); end
    $display("source %0d target %0d: result %0d, tuples handed to the host %0d in %0d list pairs, discarded %0d, %0d cycles",
      NS, NT, env.n_expected, env.n_host_tuples, env.n_lists, stats.discards, cycles);
    finished = 1;
  end
endmodule
