// filter_unit_tb: drives the filter unit the way the join controller does, at
// every stack level, and compares with a model built from the reference hash:
// which target keys pass the AND of the active bit array stores, which bucket
// each key goes to, the 'identical' decision and the next-bucket walk of the
// current store.  Checks that stores below the current level are left alone.
module filter_unit_tb;
  import himod_pkg::*;
  import himod_ref_pkg::*;
  localparam int unsigned K = 8;
  logic clk = 0, rst_n = 0;
  logic stack_init, push, pop, bottom, full;
  logic [2:0] sp;
  logic key_valid, res_valid, res_pass, clr_active, capture, identical;
  key_t key;
  filter_op_e op;
  logic [K-1:0] res_bucket, one_bucket, nxt_addr;
  logic [4:0][K-1:0] res_addr;
  logic nxt_start, nxt_step, nxt_busy, nxt_valid;
  logic tbl_we = 0;
  int checks = 0, failures = 0;
  int n_pass = 0, n_drop = 0, n_ident = 0;

  bit model [5][256];

  always #5 clk = ~clk;

  filter_unit #(.K(K)) dut (
    .clk, .rst_n, .stack_init, .push, .pop, .sp, .bottom, .full,
    .key_valid, .key, .op, .res_valid, .res_pass, .res_bucket, .res_addr,
    .clr_active, .capture, .identical, .one_bucket,
    .nxt_start, .nxt_step, .nxt_busy, .nxt_valid, .nxt_addr,
    .tbl_we, .tbl_coder(3'd0), .tbl_addr(6'd0), .tbl_data(16'd0)
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string m);
    failures++;
    $display("FAIL %s", m);
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1;
    @(negedge clk); s = 0;
  endtask

  // hash one key; returns pass and bucket
  task automatic hash_key(key_t kk, filter_op_e o, output logic p, output logic [K-1:0] b);
    @(negedge clk); key = kk; op = o; key_valid = 1;
    @(negedge clk); key_valid = 0;
    while (!res_valid) @(negedge clk);
    p = res_pass; b = res_bucket;
  endtask

  initial begin
    stack_init = 0; push = 0; pop = 0; key_valid = 0; key = '0; op = OP_MARK;
    clr_active = 0; capture = 0; nxt_start = 0; nxt_step = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    pulse(stack_init);
    for (int lvl = 0; lvl < 5; lvl++) begin
      for (int trial = 0; trial < 3; trial++) begin
        key_t src [$], tgt [$], seen [$];
        int ns;
        logic exp_ident;
        // trial 1 uses one repeated source key: every address equal
        src.delete(); tgt.delete(); seen.delete();
        ns = (trial == 1) ? 3 : $urandom_range(2, 20);
        pulse(clr_active);
        for (int l = lvl; l < 5; l++) for (int a = 0; a < 256; a++) model[l][a] = 0;
        checks++;
        if (sp != 3'(lvl)) fail("stack level");
        for (int i = 0; i < ns; i++) src.push_back((trial == 1 && i > 0) ? src[0] : rand_key());
        for (int i = 0; i < 12; i++) tgt.push_back(($urandom_range(0, 1) == 0) ? src[$urandom_range(0, ns-1)] : rand_key());
        if (trial == 1) begin tgt.delete(); tgt.push_back(src[0]); end
        foreach (src[i]) begin
          logic p;
          logic [K-1:0] b;
          hash_key(src[i], OP_MARK, p, b);
          for (int l = lvl; l < 5; l++) model[l][ref_hash(l, src[i], K)] = 1;
          seen.push_back(src[i]);
          checks++;
          if (b != K'(ref_hash(lvl, src[i], K))) fail("source bucket");
        end
        foreach (tgt[i]) begin
          logic p, exp_p;
          logic [K-1:0] b;
          hash_key(tgt[i], OP_PROBE, p, b);
          exp_p = 1;
          for (int l = lvl; l < 5; l++) exp_p &= model[l][ref_hash(l, tgt[i], K)];
          if (exp_p) begin n_pass++; seen.push_back(tgt[i]); end else n_drop++;
          checks += 2;
          if (p != exp_p) fail($sformatf("pass lvl %0d got %b", lvl, p));
          if (b != K'(ref_hash(lvl, tgt[i], K))) fail("target bucket");
        end
        // identical: every seen key has the first key's address on every active coder
        exp_ident = 1;
        foreach (seen[i])
          for (int l = lvl; l < 5; l++)
            if (ref_hash(l, seen[i], K) != ref_hash(l, seen[0], K)) exp_ident = 0;
        pulse(capture);
        checks++;
        if (identical != exp_ident) fail($sformatf("identical=%b exp %b lvl %0d", identical, exp_ident, lvl));
        if (exp_ident) begin
          n_ident++;
          checks++;
          if (one_bucket != K'(ref_hash(lvl, seen[0], K))) fail("one_bucket");
        end
        // walk the current store
        pulse(nxt_start);
        for (int a = 0; a <= 256; a++) begin
          while (nxt_busy) @(negedge clk);
          while (a < 256 && !model[lvl][a]) a++;
          checks++;
          if (a == 256) begin
            if (nxt_valid) fail("walk does not end");
            break;
          end
          if (!nxt_valid || nxt_addr != K'(a)) begin fail("walk order"); break; end
          pulse(nxt_step);
        end
      end
      // stores below the next level must survive: probe a key marked at this level
      if (lvl < 4) pulse(push);
    end
    checks++;
    if (!full) fail("not at the top");
    // at the top only store 4 filters: a key that sets its bit passes
    begin
      logic p;
      logic [K-1:0] b;
      key_t kk;
      kk = rand_key();
      pulse(clr_active);
      hash_key(kk, OP_MARK, p, b);
      hash_key(kk, OP_PROBE, p, b);
      checks++;
      if (!p) fail("top-level probe");
    end
    repeat (4) pulse(pop);
    checks++;
    if (!bottom) fail("pop to bottom");
    checks++;
    if (n_pass == 0 || n_drop == 0 || n_ident == 0) fail("a filter outcome never occurred");
    $display("passed %0d dropped %0d identical %0d", n_pass, n_drop, n_ident);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
