// filter_unit: the filter of the database coprocessor.
//
// Five mapping hash coders, each with its bit array store (BAS) and hash
// address comparator, a stack pointer over the stores, the AND that combines
// the addressed bits of the active stores, and the SOFT detect logic.  The
// current store (stack pointer) and those above it are active; the ones below
// are saved and left alone.
//
// A key given with key_valid is hashed by all five coders at once.  When the
// five addresses are ready (res_valid, three cycles later) the unit applies op:
//   OP_MARK  (source key): sets the addressed bit in every active store and
//            shows the address to every active comparator;
//   OP_PROBE (target key): res_pass = AND of the addressed bits of the active
//            stores; a passing key is shown to the active comparators.
// res_bucket is the address from the current level's coder: the bucket the
// tuple goes into.  clr_active empties the active stores and comparators and
// the SOFT flip-flop before a new pair of lists is scanned; capture clocks the
// 'no further division' decision (identical) at the end of the scan.  The
// current store's next-bucket register is driven with nxt_start/nxt_step.
// The structure is the one specified; the op encoding and control pulses are
// this design's choices.
// Timing: res_valid, res_pass and res_bucket are valid in the same cycle; the
// marks and comparator updates happen at the end of that cycle.
// Lint: the coders' 16-bit folded values (hash_full) and the SOFT multiplexer
// output are left unconnected on purpose: only the K-bit bucket address and
// the registered decision are used.
module filter_unit
  import himod_pkg::*;
#(
  parameter int unsigned K = HASH_BITS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // stack
  input  logic                  stack_init,
  input  logic                  push,
  input  logic                  pop,
  output logic [SP_BITS-1:0]    sp,
  output logic                  bottom,
  output logic                  full,
  // keys
  input  logic                  key_valid,
  input  key_t                  key,
  input  filter_op_e            op,
  output logic                  res_valid,
  output logic                  res_pass,
  output logic [K-1:0]          res_bucket,
  output logic [NUM_CODERS-1:0][K-1:0] res_addr,
  // scan control and decision
  input  logic                  clr_active,
  input  logic                  capture,
  output logic                  identical,
  output logic [K-1:0]          one_bucket,
  // next-bucket register of the current store
  input  logic                  nxt_start,
  input  logic                  nxt_step,
  output logic                  nxt_busy,
  output logic                  nxt_valid,
  output logic [K-1:0]          nxt_addr,
  // prime table loading
  input  logic                  tbl_we,
  input  logic [SP_BITS-1:0]    tbl_coder,
  input  logic [RAM_ABITS-1:0]  tbl_addr,
  input  logic [PRIME_BITS-1:0] tbl_data
);
  logic [NUM_CODERS-1:0]         active, hv, rd_bit, same, cur;
  logic [NUM_CODERS-1:0]         n_busy, n_valid;
  logic [NUM_CODERS-1:0][K-1:0]  haddr, n_addr, f_addr;
  logic                          pass_all, show;

  bas_stack #(.LEVELS(NUM_CODERS), .SPW(SP_BITS)) u_stack (
    .clk, .rst_n, .init(stack_init), .push, .pop, .sp, .bottom, .full, .active
  );

  for (genvar i = 0; i < NUM_CODERS; i++) begin : g_level
    logic [PRIME_BITS-1:0] hfull;

    assign cur[i] = (sp == SP_BITS'(i));

    mapping_hash_coder #(.CODER(i), .K(K)) u_coder (
      .clk, .rst_n,
      .key_valid (key_valid),
      .key       (key),
      .hash_valid(hv[i]),
      .hash      (haddr[i]),
      .hash_full (hfull),
      .tbl_we    (tbl_we && tbl_coder == SP_BITS'(i)),
      .tbl_addr  (tbl_addr),
      .tbl_data  (tbl_data)
    );

    bit_array_store #(.K(K)) u_bas (
      .clk, .rst_n,
      .clr      (clr_active && active[i]),
      .set      (hv[i] && op == OP_MARK && active[i]),
      .hash_addr(haddr[i]),
      .sel_next (1'b0),
      .rd_bit   (rd_bit[i]),
      .nxt_start(nxt_start && cur[i]),
      .nxt_step (nxt_step && cur[i]),
      .nxt_busy (n_busy[i]),
      .nxt_valid(n_valid[i]),
      .nxt_addr (n_addr[i])
    );

    hash_addr_comparator #(.K(K)) u_cmp (
      .clk, .rst_n,
      .clr       (clr_active && active[i]),
      .addr_valid(show && active[i]),
      .addr      (haddr[i]),
      .same      (same[i]),
      .first_addr(f_addr[i])
    );
  end

  // a store below the current one does not take part: its input to the AND is 1
  assign pass_all = &(rd_bit | ~active);
  assign show     = hv[0] && (op == OP_MARK || pass_all);

  assign res_valid  = hv[0];
  assign res_pass   = (op == OP_MARK) ? 1'b1 : pass_all;
  assign res_addr   = haddr;
  assign res_bucket = haddr[sp];
  assign one_bucket = f_addr[sp];
  assign nxt_busy   = n_busy[sp];
  assign nxt_valid  = n_valid[sp];
  assign nxt_addr   = n_addr[sp];

  soft_detect #(.LEVELS(NUM_CODERS), .SPW(SP_BITS)) u_soft (
    .clk, .rst_n,
    .clr      (clr_active),
    .capture  (capture),
    .same     (same),
    .sp       (sp),
    .mux_out  (),
    .identical(identical)
  );
endmodule
