// tb_join_env: memory and join workload for the end-to-end testbenches.
//
// build() lays out a source relation of NS tuples and a target relation of NT
// tuples as linked lists in memory.  Source keys are drawn from a pool of POOL
// random keys (so some repeat); each target key is a pool key or a fresh key
// that matches nothing.  The expected join result, every (source, target) pair
// with equal keys, is worked out by comparing keys directly.  While the
// coprocessor runs, every list pair it hands over is walked in memory and
// screened the way the host would (key comparison); check() then compares
// the pairs found with the expected ones and reports pairs found twice.
// check_filter() checks the outcome of a filter-only pass (set operations).
module tb_join_env #(
  parameter int unsigned NS       = 40,
  parameter int unsigned NT       = 60,
  parameter int unsigned POOL     = 24,
  parameter int unsigned MAX_WAIT = 2
) (
  input  logic        clk,
  input  logic        mem_req,
  input  logic        mem_we,
  input  logic [31:0] mem_addr,
  input  logic [31:0] mem_wdata,
  output logic [31:0] mem_rdata,
  output logic        mem_ack,
  input  logic        merge_fire,
  input  logic [31:0] merge_s,
  input  logic [31:0] merge_t
);
  import himod_pkg::*;
  import himod_ref_pkg::*;

  localparam int unsigned STRIDE   = 8;
  localparam int unsigned SRC_BASE = 32'h100;
  localparam int unsigned TGT_BASE = SRC_BASE + NS * STRIDE;
  localparam int unsigned TBL_BASE = 32'h8000;

  tb_mem #(.WORDS(65536), .MAX_WAIT(MAX_WAIT)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .rdata(mem_rdata), .ack(mem_ack)
  );

  key_t src_key [NS];
  key_t tgt_key [NT];
  bit   expected [NS][NT];
  bit   found    [NS][NT];
  int   n_host_tuples = 0;   // tuples in the list pairs handed to the host
  int   n_expected = 0, n_found = 0, n_dup = 0, n_lists = 0, n_spurious = 0, n_bad = 0;

  function automatic word_t src_head();  return NS ? SRC_BASE : NIL; endfunction
  function automatic word_t tgt_head();  return NT ? TGT_BASE : NIL; endfunction
  function automatic word_t tbl_base();  return TBL_BASE; endfunction

  task automatic build();
    key_t pool [POOL];
    foreach (pool[i]) pool[i] = rand_key();
    for (int i = 0; i < NS; i++) src_key[i] = pool[$urandom_range(0, POOL-1)];
    for (int j = 0; j < NT; j++) tgt_key[j] = ($urandom_range(0, 2) != 0) ? pool[$urandom_range(0, POOL-1)] : rand_key();
    for (int i = 0; i < NS; i++) begin
      for (int w = 0; w < 4; w++) u_mem.mem[SRC_BASE + i*STRIDE + w] = src_key[i][w*32 +: 32];
      u_mem.mem[SRC_BASE + i*STRIDE + 5] = 32'hA000_0000 + i;     // tuple payload
    end
    for (int j = 0; j < NT; j++) begin
      for (int w = 0; w < 4; w++) u_mem.mem[TGT_BASE + j*STRIDE + w] = tgt_key[j][w*32 +: 32];
      u_mem.mem[TGT_BASE + j*STRIDE + 5] = 32'hB000_0000 + j;
    end
    relink();
    for (int i = 0; i < NS; i++)
      for (int j = 0; j < NT; j++) begin
        expected[i][j] = (src_key[i] == tgt_key[j]);
        found[i][j]    = 0;
        if (expected[i][j]) n_expected++;
      end
  endtask

  // forget the pairs seen so far (after an abandoned join)
  task automatic reset_found();
    foreach (found[i, j]) found[i][j] = 0;
    n_found = 0; n_dup = 0; n_lists = 0; n_spurious = 0; n_bad = 0; n_host_tuples = 0;
  endtask

  // (re)build both relations as lists in tuple order, the source list cut
  // after its first ns tuples; a join relinks them
  task automatic relink(int unsigned ns = NS);
    for (int i = 0; i < NS; i++) u_mem.mem[SRC_BASE + i*STRIDE + 4] = (i >= ns-1) ? NIL : SRC_BASE + (i+1)*STRIDE;
    for (int j = 0; j < NT; j++) u_mem.mem[TGT_BASE + j*STRIDE + 4] = (j == NT-1) ? NIL : TGT_BASE + (j+1)*STRIDE;
  endtask

  // Result of a filter-only pass with k-bit bucket addresses over the first ns
  // source tuples, checked against the reference hash: every such source tuple exactly once in the level-0 source
  // list of its coder-0 bucket; every target tuple exactly once, in the target
  // list of its coder-0 bucket if its bits are set in all five reference bit
  // arrays built from the source keys, on the rejected list otherwise; no
  // rejected target has an equal source key.  Counts passed and rejected.
  int n_pass = 0, n_rej = 0, n_rej_match = 0;
  function automatic int check_filter(int unsigned k, int unsigned ns = NS);
    int bad, idx, guard;
    bit bits [NUM_CODERS][int unsigned];
    bit seen_s [NS];
    bit seen_t [NT];
    bit pass [NT];
    word_t q;
    bad = 0; n_pass = 0; n_rej = 0; n_rej_match = 0;
    foreach (seen_s[i]) seen_s[i] = (i >= ns);
    foreach (seen_t[j]) seen_t[j] = 0;
    for (int i = 0; i < ns; i++)
      for (int c = 0; c < NUM_CODERS; c++) bits[c][ref_hash(c, src_key[i], k)] = 1;
    for (int j = 0; j < NT; j++) begin
      pass[j] = 1;
      for (int c = 0; c < NUM_CODERS; c++) if (!bits[c].exists(ref_hash(c, tgt_key[j], k))) pass[j] = 0;
    end
    for (int unsigned b = 0; b < (1 << k); b++) begin
      q = u_mem.mem[TBL_BASE + 2*b];
      guard = 0;
      while (q != NIL && guard <= NS) begin
        idx = (q - SRC_BASE) / STRIDE;
        if (q < SRC_BASE || q >= SRC_BASE + ns*STRIDE || seen_s[idx] || ref_hash(0, src_key[idx], k) != b) bad++;
        else seen_s[idx] = 1;
        q = u_mem.mem[q + 4]; guard++;
      end
      if (guard > NS) bad++;
      q = u_mem.mem[TBL_BASE + 2*b + 1];
      guard = 0;
      while (q != NIL && guard <= NT) begin
        idx = (q - TGT_BASE) / STRIDE;
        if (q < TGT_BASE || q >= TGT_BASE + NT*STRIDE || seen_t[idx] || !pass[idx] || ref_hash(0, tgt_key[idx], k) != b) bad++;
        else begin seen_t[idx] = 1; n_pass++; end
        q = u_mem.mem[q + 4]; guard++;
      end
      if (guard > NT) bad++;
    end
    q = u_mem.mem[TBL_BASE + (NUM_CODERS << (k + 1))];
    guard = 0;
    while (q != NIL && guard <= NT) begin
      idx = (q - TGT_BASE) / STRIDE;
      if (q < TGT_BASE || q >= TGT_BASE + NT*STRIDE || seen_t[idx] || pass[idx]) bad++;
      else begin
        seen_t[idx] = 1; n_rej++;
        for (int i = 0; i < ns; i++) if (src_key[i] == tgt_key[idx]) n_rej_match++;
      end
      q = u_mem.mem[q + 4]; guard++;
    end
    if (guard > NT) bad++;
    foreach (seen_s[i]) if (!seen_s[i]) bad++;
    foreach (seen_t[j]) if (!seen_t[j]) bad++;
    return bad + n_rej_match;
  endfunction

  function automatic key_t key_at(word_t p);
    key_t kk;
    for (int w = 0; w < 4; w++) kk[w*32 +: 32] = u_mem.mem[p + w];
    return kk;
  endfunction

  // screen a handed-over list pair as the host would
  always @(posedge clk) if (merge_fire) begin
    int hits, guard_s;
    word_t ps;
    hits = 0;
    n_lists++;
    for (word_t q = merge_s; q != NIL && n_host_tuples < 8 * (NS + NT); q = u_mem.mem[q + 4]) n_host_tuples++;
    for (word_t q = merge_t; q != NIL && n_host_tuples < 8 * (NS + NT); q = u_mem.mem[q + 4]) n_host_tuples++;
    ps = merge_s;
    guard_s = 0;
    while (ps != NIL && guard_s < NS + 1) begin
      word_t pt;
      int guard_t;
      pt = merge_t;
      guard_t = 0;
      while (pt != NIL && guard_t < NT + 1) begin
        if (key_at(ps) == key_at(pt)) begin
          int i, j;
          i = (ps - SRC_BASE) / STRIDE;
          j = (pt - TGT_BASE) / STRIDE;
          if (ps < SRC_BASE || ps >= TGT_BASE || pt < TGT_BASE || pt >= TGT_BASE + NT*STRIDE) n_bad++;
          else begin
            if (found[i][j]) n_dup++;
            found[i][j] = 1;
            n_found++;
            hits++;
          end
        end
        pt = u_mem.mem[pt + 4];
        guard_t++;
      end
      if (guard_t > NT) n_bad++;
      ps = u_mem.mem[ps + 4];
      guard_s++;
    end
    if (guard_s > NS) n_bad++;
    if (hits == 0) n_spurious++;
  end

  // number of mismatches between the pairs found and the expected join
  function automatic int check();
    int bad;
    bad = n_dup + n_bad;
    for (int i = 0; i < NS; i++)
      for (int j = 0; j < NT; j++)
        if (expected[i][j] != found[i][j]) bad++;
    return bad;
  endfunction
endmodule
