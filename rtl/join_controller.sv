// join_controller: the sequencer of the hash-based join with the stack
// oriented filter technique (SOFT).
//
// The source and target relations are linked lists of tuples in memory (layout
// in himod_pkg).  For each pair of lists, starting with the whole relations at
// the lowest stack level, the controller
//   1. empties the active bit array stores and comparators and this level's
//      hash table (2**K buckets, each a source and a target list head);
//   2. walks the source list: hashes each key (all five coders), marks the
//      active stores and links the tuple into its bucket of this level;
//   3. walks the target list: drops every tuple whose addressed bits are not
//      all 1 in the active stores, links the rest into their buckets;
//   4. if the SOFT logic says that every key fell in one bucket of each active
//      coder, sends that bucket's source and target list heads to the host
//      (merge); at the fifth level, with no store left to divide with, it sends
//      every bucket holding both source and target tuples; otherwise it finds
//      the next bucket with a 1 in the current store, saves the search position
//      in the store's address register, pushes and divides that pair again;
//   5. when a level has no next bucket left it pops, and it ends when the lowest
//      level has none left.
// This is the join algorithm of the specification, nested if-then-else and
// all.  There it runs as microcode in a two-level microsequencer whose contents
// are not given; here it is a state machine.  Skipping buckets that hold no
// target tuple (which the specification does by examining the store bits) and
// clearing the hash table word by word are this design's choices.
// With filter_only set at start, the controller runs one pass at the lowest
// level for the set operations (union, difference, intersection, project):
// steps 1-3 with all five stores, except that targets failing the filter are
// chained, through their next pointers, on a rejected list whose head is then
// written to tbl_base + 5 * 2**(K+1), after the five level tables; no SOFT
// decision, division or hand-over follows.  The host compares inside buckets.
// The pass is the specification's; the rejected list and its place are this
// design's.
// Interface: start with src_head/tgt_head/tbl_base starts a join; busy stays 1
// until done pulses.  mem_* is a word-addressed memory master: a transfer ends
// in a cycle with mem_req and mem_ack both 1, read data in mem_rdata in that
// cycle.  merge_valid/merge_ready hand list pairs to the host.
module join_controller
  import himod_pkg::*;
#(
  parameter int unsigned K = HASH_BITS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cancel,
  // command
  input  logic               start,
  input  logic               filter_only,
  input  word_t              src_head,
  input  word_t              tgt_head,
  input  word_t              tbl_base,
  output logic               busy,
  output logic               done,
  // list pairs to the host
  output logic               merge_valid,
  output word_t              merge_s,
  output word_t              merge_t,
  input  logic               merge_ready,
  // memory master
  output logic               mem_req,
  output logic               mem_we,
  output word_t              mem_addr,
  output word_t              mem_wdata,
  input  word_t              mem_rdata,
  input  logic               mem_ack,
  // filter unit
  output logic               stack_init,
  output logic               push,
  output logic               pop,
  input  logic [SP_BITS-1:0] sp,
  input  logic               bottom,
  input  logic               full,
  output logic               key_valid,
  output key_t               key,
  output filter_op_e         op,
  input  logic               res_valid,
  input  logic               res_pass,
  input  logic [K-1:0]       res_bucket,
  output logic               clr_active,
  output logic               capture,
  input  logic               identical,
  input  logic [K-1:0]       one_bucket,
  output logic               nxt_start,
  output logic               nxt_step,
  input  logic               nxt_busy,
  input  logic               nxt_valid,
  input  logic [K-1:0]       nxt_addr,
  // statistics
  output join_stats_t        stats
);
  typedef enum logic [4:0] {
    S_IDLE, S_INITLVL, S_CLEAR, S_SCAN, S_RDKEY, S_HASH, S_WAITH,
    S_LINK_RD, S_LINK_WN, S_LINK_WH, S_CAPTURE, S_DECIDE, S_NXT_WAIT,
    S_HEAD_S, S_HEAD_T, S_AFTER, S_EMIT, S_RESUME, S_DONE,
    S_REJ_LINK, S_REJ_STORE
  } state_e;

  typedef enum logic [1:0] { CTX_IDENT, CTX_DRAIN, CTX_DESC } ctx_e;

  localparam int unsigned TBL_WORDS = 2 << K;   // source and target head per bucket

  state_e      state;
  ctx_e        ctx;
  word_t       src_q, tgt_q, base_q;
  logic        filt_q;                 // filter-only operation
  word_t       rej_q;                  // head of the rejected target list
  word_t       cur_t, p, nextp, head, hs, ht;
  logic [2:0]  widx;
  logic [K:0]  cidx;
  logic [K-1:0] bucket;
  word_t       lvl_base;

  assign lvl_base = base_q + (word_t'(sp) << (K + 1));

  // where a filter-only operation leaves the head of its rejected target list:
  // the word after the tables of all five levels
  word_t rej_addr;
  assign rej_addr = base_q + (word_t'(NUM_CODERS) << (K + 1));

  // ---------------------------------------------------------------- outputs
  always_comb begin
    mem_req     = 1'b0;
    mem_we      = 1'b0;
    mem_addr    = '0;
    mem_wdata   = '0;
    stack_init  = 1'b0;
    push        = 1'b0;
    pop         = 1'b0;
    key_valid   = 1'b0;
    clr_active  = 1'b0;
    capture     = 1'b0;
    nxt_start   = 1'b0;
    nxt_step    = 1'b0;
    merge_valid = 1'b0;
    unique case (state)
      S_IDLE:    stack_init = start;
      S_INITLVL: clr_active = 1'b1;
      S_CLEAR: begin
        mem_req = 1'b1; mem_we = 1'b1; mem_addr = lvl_base + word_t'(cidx); mem_wdata = NIL;
      end
      S_RDKEY: begin
        mem_req = 1'b1; mem_addr = p + word_t'(widx);
      end
      S_HASH:    key_valid = 1'b1;
      S_LINK_RD: begin
        mem_req = 1'b1; mem_addr = lvl_base + (word_t'(bucket) << 1) + word_t'(op);
      end
      S_LINK_WN: begin
        mem_req = 1'b1; mem_we = 1'b1; mem_addr = p + TUPLE_NEXT_OFS; mem_wdata = head;
      end
      S_LINK_WH: begin
        mem_req = 1'b1; mem_we = 1'b1;
        mem_addr = lvl_base + (word_t'(bucket) << 1) + word_t'(op); mem_wdata = p;
      end
      S_CAPTURE: capture = 1'b1;
      S_DECIDE:  nxt_start = !identical;
      S_HEAD_S: begin
        mem_req = 1'b1; mem_addr = lvl_base + (word_t'(bucket) << 1);
      end
      S_HEAD_T: begin
        mem_req = 1'b1; mem_addr = lvl_base + (word_t'(bucket) << 1) + 1;
      end
      S_AFTER: begin
        nxt_step = (ctx != CTX_IDENT);
        push     = (ctx == CTX_DESC) && hs != NIL && ht != NIL;
      end
      S_EMIT:    merge_valid = 1'b1;
      S_REJ_LINK: begin
        mem_req = 1'b1; mem_we = 1'b1; mem_addr = p + TUPLE_NEXT_OFS; mem_wdata = rej_q;
      end
      S_REJ_STORE: begin
        mem_req = 1'b1; mem_we = 1'b1; mem_addr = rej_addr; mem_wdata = rej_q;
      end
      S_RESUME:  pop = !bottom;
      default: ;
    endcase
  end

  assign busy    = (state != S_IDLE);
  assign merge_s = hs;
  assign merge_t = ht;

  // ------------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ctx   <= CTX_DESC;
      op    <= OP_MARK;
      {src_q, tgt_q, base_q, cur_t, p, nextp, head, hs, ht, rej_q} <= '0;
      filt_q <= 1'b0;
      widx  <= '0;
      cidx  <= '0;
      bucket <= '0;
      key   <= '0;
      done  <= 1'b0;
      stats <= '0;
    end else if (cancel) begin
      state <= S_IDLE;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          src_q  <= src_head;
          tgt_q  <= tgt_head;
          base_q <= tbl_base;
          filt_q <= filter_only;
          rej_q  <= NIL;
          stats  <= '0;
          state  <= S_INITLVL;
        end
        S_INITLVL: begin
          cidx  <= '0;
          state <= S_CLEAR;
        end
        S_CLEAR: if (mem_ack) begin
          if (cidx == (K+1)'(TBL_WORDS - 1)) begin
            p     <= src_q;
            cur_t <= tgt_q;
            op    <= OP_MARK;
            state <= S_SCAN;
          end
          cidx <= cidx + 1'b1;
        end
        S_SCAN: begin
          if (p == NIL) begin
            if (op == OP_MARK) begin
              op <= OP_PROBE;
              p  <= cur_t;
            end else begin
              state <= filt_q ? S_REJ_STORE : S_CAPTURE;
            end
          end else begin
            widx  <= '0;
            state <= S_RDKEY;
          end
        end
        S_RDKEY: if (mem_ack) begin
          if (widx == 3'(TUPLE_NEXT_OFS)) begin
            nextp <= mem_rdata;
            state <= S_HASH;
          end else begin
            key[widx[1:0]*WORD_BITS +: WORD_BITS] <= mem_rdata;
          end
          widx <= widx + 1'b1;
        end
        S_HASH: state <= S_WAITH;
        S_WAITH: if (res_valid) begin
          if (res_pass) begin
            bucket <= res_bucket;
            state  <= S_LINK_RD;
          end else begin
            stats.discards <= stats.discards + 1'b1;
            if (filt_q) begin
              state <= S_REJ_LINK;
            end else begin
              p     <= nextp;
              state <= S_SCAN;
            end
          end
        end
        S_LINK_RD: if (mem_ack) begin
          head  <= mem_rdata;
          state <= S_LINK_WN;
        end
        S_LINK_WN: if (mem_ack) state <= S_LINK_WH;
        S_LINK_WH: if (mem_ack) begin
          p     <= nextp;
          state <= S_SCAN;
        end
        S_CAPTURE: state <= S_DECIDE;
        S_DECIDE: begin
          if (identical) begin
            stats.identicals <= stats.identicals + 1'b1;
            ctx    <= CTX_IDENT;
            bucket <= one_bucket;
            state  <= S_HEAD_S;
          end else begin
            if (full) stats.drains <= stats.drains + 1'b1;
            ctx   <= full ? CTX_DRAIN : CTX_DESC;
            state <= S_NXT_WAIT;
          end
        end
        S_NXT_WAIT: if (!nxt_busy) begin
          if (!nxt_valid) begin
            state <= S_RESUME;
          end else begin
            bucket <= nxt_addr;
            state  <= S_HEAD_S;
          end
        end
        S_HEAD_S: if (mem_ack) begin
          hs    <= mem_rdata;
          state <= S_HEAD_T;
        end
        S_HEAD_T: if (mem_ack) begin
          ht    <= mem_rdata;
          state <= S_AFTER;
        end
        S_AFTER: begin
          if (hs == NIL || ht == NIL) begin
            state <= (ctx == CTX_IDENT) ? S_RESUME : S_NXT_WAIT;
          end else if (ctx == CTX_DESC) begin
            stats.pushes <= stats.pushes + 1'b1;
            src_q <= hs;
            tgt_q <= ht;
            state <= S_INITLVL;
          end else begin
            state <= S_EMIT;
          end
        end
        S_EMIT: begin
          if (merge_ready) begin
            stats.merges <= stats.merges + 1'b1;
            state <= (ctx == CTX_IDENT) ? S_RESUME : S_NXT_WAIT;
          end else begin
            stats.stalls <= stats.stalls + 1'b1;
          end
        end
        S_RESUME: begin
          if (bottom) begin
            state <= S_DONE;
          end else begin
            stats.pops <= stats.pops + 1'b1;
            ctx   <= CTX_DESC;
            state <= S_NXT_WAIT;
          end
        end
        S_REJ_LINK: if (mem_ack) begin
          rej_q <= p;
          p     <= nextp;
          state <= S_SCAN;
        end
        S_REJ_STORE: if (mem_ack) state <= S_DONE;
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
