// himod_dbcp: the HIMOD database coprocessor (DBCP), a join filter attached to
// a host processor.
//
// Three units, as specified: the bus interface unit talks to the host through
// the coprocessor interface registers; the coprocessor control unit (here the
// join controller) runs the stack oriented filter join; the filter unit holds
// the five mapping hash coders, bit array stores and hash address comparators.
// The coprocessor reads and relinks the tuple lists itself, as a bus master on
// the memory port, and hands the host only pairs of source and target lists
// whose join attributes very probably all match, for the final comparison and
// concatenation.
// Interface: host bus (cs, ds, rw, addr, wdata, rdata, dsack), see
// bus_interface_unit; memory master (mem_*), see join_controller; stats, the
// controller's event counters.  The bus request and grant of a real host bus
// are outside this design: the memory port is a plain request/acknowledge port.
// Timing: one clock; a bucket address takes three cycles, a tuple about ten
// plus memory waits.
// Lint: the filter unit's five per-coder addresses (res_addr) are not used at
// this level; the controller needs only the current level's bucket.  They stay
// on the filter unit for tests and for other operations.
module himod_dbcp
  import himod_pkg::*;
#(
  parameter int unsigned K     = HASH_BITS,   // bucket address bits (256 buckets)
  parameter int unsigned PAIRS = 4            // list pairs waiting for the host
) (
  input  logic        clk,
  input  logic        rst_n,
  // host bus
  input  logic        cs,
  input  logic        ds,
  input  logic        rw,
  input  logic [4:0]  addr,
  input  word_t       wdata,
  output word_t       rdata,
  output logic        dsack,
  // memory master
  output logic        mem_req,
  output logic        mem_we,
  output word_t       mem_addr,
  output word_t       mem_wdata,
  input  word_t       mem_rdata,
  input  logic        mem_ack,
  // event counters
  output join_stats_t stats
);
  logic                  start, filter_only, cancel, busy, done;
  word_t                 src_head, tgt_head, tbl_base, merge_s, merge_t;
  logic                  merge_valid, merge_ready;
  logic                  tbl_we;
  logic [SP_BITS-1:0]    tbl_coder, sp;
  logic [RAM_ABITS-1:0]  tbl_addr;
  logic [PRIME_BITS-1:0] tbl_data;
  logic                  stack_init, push, pop, bottom, full;
  logic                  key_valid, res_valid, res_pass, clr_active, capture, identical;
  key_t                  key;
  filter_op_e            op;
  logic [K-1:0]          res_bucket, one_bucket, nxt_addr;
  logic [NUM_CODERS-1:0][K-1:0] res_addr;
  logic                  nxt_start, nxt_step, nxt_busy, nxt_valid;

  bus_interface_unit #(.PAIRS(PAIRS)) u_biu (
    .clk, .rst_n, .cs, .ds, .rw, .addr, .wdata, .rdata, .dsack,
    .start, .filter_only, .cancel, .src_head, .tgt_head, .tbl_base, .busy, .done,
    .merge_valid, .merge_s, .merge_t, .merge_ready,
    .tbl_we, .tbl_coder, .tbl_addr, .tbl_data
  );

  join_controller #(.K(K)) u_ctrl (
    .clk, .rst_n, .cancel,
    .start, .filter_only, .src_head, .tgt_head, .tbl_base, .busy, .done,
    .merge_valid, .merge_s, .merge_t, .merge_ready,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ack,
    .stack_init, .push, .pop, .sp, .bottom, .full,
    .key_valid, .key, .op, .res_valid, .res_pass, .res_bucket,
    .clr_active, .capture, .identical, .one_bucket,
    .nxt_start, .nxt_step, .nxt_busy, .nxt_valid, .nxt_addr,
    .stats
  );

  filter_unit #(.K(K)) u_filter (
    .clk, .rst_n,
    .stack_init, .push, .pop, .sp, .bottom, .full,
    .key_valid, .key, .op, .res_valid, .res_pass, .res_bucket, .res_addr,
    .clr_active, .capture, .identical, .one_bucket,
    .nxt_start, .nxt_step, .nxt_busy, .nxt_valid, .nxt_addr,
    .tbl_we, .tbl_coder, .tbl_addr, .tbl_data
  );
endmodule
