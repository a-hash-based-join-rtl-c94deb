// mapping_hash_coder_tb: streams random keys, one per cycle, through a coder
// and compares every bucket address with a serial software-style computation;
// checks the three-cycle latency and reloading of the prime table.
module mapping_hash_coder_tb;
  import himod_pkg::*;
  import himod_ref_pkg::*;
  localparam int unsigned CODER = 2;
  logic clk = 0, rst_n = 0;
  logic key_valid, hash_valid, tbl_we;
  key_t key;
  logic [7:0]  hash;
  logic [15:0] hash_full, tbl_data;
  logic [5:0]  tbl_addr;
  int checks = 0, failures = 0;
  key_t sent [$];
  int   cycle = 0, sent_cycle [$];
  logic table_loaded = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  mapping_hash_coder #(.CODER(CODER), .K(8)) dut (
    .clk, .rst_n, .key_valid, .key, .hash_valid, .hash, .hash_full,
    .tbl_we, .tbl_addr, .tbl_data
  );

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checked at the falling edge: 'cycle' then counts the rising edges so far,
  // and a key set up at cycle c is sampled by rising edge c+1
  // expected full 16-bit fold
  function automatic int unsigned fold(key_t kk);
    int unsigned t = 0;
    for (int i = 0; i < 16; i++)
      t ^= table_loaded ? 16'hA5A5 ^ 16'(kk[i*8 +: 6])
                        : ref_prime(CODER, kk[i*8 +: 8] % 64);
    return t;
  endfunction

  always @(negedge clk) if (rst_n && hash_valid) begin
    key_t kk;
    int   c0;
    kk = sent.pop_front();
    c0 = sent_cycle.pop_front();
    checks += 2;
    if (hash_full != 16'(fold(kk)) || hash != 8'(fold(kk))) begin
      failures++;
      $display("FAIL key=%h hash=%h exp=%h", kk, hash_full, fold(kk));
    end
    if (cycle - c0 != 3) begin
      failures++;
      $display("FAIL latency %0d cycles", cycle - c0);
    end
  end

  initial begin
    key_valid = 0; key = '0; tbl_we = 0; tbl_addr = 0; tbl_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // a key of one repeated character folds to 0 (16 equal primes)
    @(negedge clk);
    key = {16{8'h41}}; key_valid = 1; sent.push_back(key); sent_cycle.push_back(cycle);
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      key_valid = ($urandom_range(0, 3) != 0);
      key = rand_key();
      if (key_valid) begin sent.push_back(key); sent_cycle.push_back(cycle); end
    end
    @(negedge clk); key_valid = 0;
    repeat (5) @(negedge clk);
    // reload the table of every RAM: word a = 0xA5A5 ^ a
    for (int a = 0; a < 64; a++) begin
      tbl_we = 1; tbl_addr = 6'(a); tbl_data = 16'hA5A5 ^ 16'(a);
      @(negedge clk);
    end
    tbl_we = 0; table_loaded = 1;
    for (int i = 0; i < 50; i++) begin
      key_valid = 1; key = rand_key(); sent.push_back(key); sent_cycle.push_back(cycle);
      @(negedge clk);
    end
    key_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (sent.size() != 0) begin failures++; $display("FAIL %0d keys lost", sent.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
