// bus_interface_unit: the coprocessor interface of the DBCP towards the host.
//
// The host reaches the coprocessor interface registers (CIRs) like memory: a
// chip select, decoded outside from the host's function codes and address,
// picks the DBCP and the low address bits pick the register.  The register map
// follows the M68000-family coprocessor convention:
//   0x00 response   (read)  bit 15 join running, bit 14 a list pair is waiting,
//                           bit 13 the last join has finished
//   0x02 control    (write) bit 0 abandons the running operation
//   0x0A command    (write) 0x0001 starts a join with the operands below;
//                           0x0002 starts a filter-only pass (set operations)
//   0x10 operand    (write) source list head, target list head, hash table base,
//                           in that order (the order restarts with each command)
//                   (read)  the waiting list pair: source head, then target head
//   0x14 register select (write) loads a prime: bits 31:29 coder, 21:16 word
//                           address, 15:0 prime; all 16 RAMs of the coder
// Other CIR addresses read as 0.  List pairs wait in a FIFO of PAIRS entries; a
// full FIFO stalls the join controller.  The specification gives the CIRs, the
// register select and DSACK logic and the status flags; the bit assignments,
// the operand order, the prime loading register and the FIFO are this design's.
// Timing: the host bus is asynchronous, so the coprocessor may run on its own
// clock.  The strobe (cs and ds) passes a two-flop synchronizer; the access
// happens in the first clock in which the synchronized strobe is 1, and dsack
// rises on the next edge (the third clock edge after the strobe) and falls on
// the third edge after the strobe is removed.  The host holds rw, addr and wdata while
// it waits for dsack and starts no new cycle before dsack has fallen (the
// usual four-phase handshake).  rdata is valid while dsack is 1.
module bus_interface_unit
  import himod_pkg::*;
#(
  parameter int unsigned PAIRS = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host bus
  input  logic                  cs,
  input  logic                  ds,
  input  logic                  rw,       // 1 = read
  input  logic [4:0]            addr,
  input  word_t                 wdata,
  output word_t                 rdata,
  output logic                  dsack,
  // join controller
  output logic                  start,
  output logic                  filter_only,
  output logic                  cancel,
  output word_t                 src_head,
  output word_t                 tgt_head,
  output word_t                 tbl_base,
  input  logic                  busy,
  input  logic                  done,
  input  logic                  merge_valid,
  input  word_t                 merge_s,
  input  word_t                 merge_t,
  output logic                  merge_ready,
  // prime table loading
  output logic                  tbl_we,
  output logic [SP_BITS-1:0]    tbl_coder,
  output logic [RAM_ABITS-1:0]  tbl_addr,
  output logic [PRIME_BITS-1:0] tbl_data
);
  localparam logic [4:0] CIR_RESPONSE = 5'h00;
  localparam logic [4:0] CIR_CONTROL  = 5'h02;
  localparam logic [4:0] CIR_COMMAND  = 5'h0A;
  localparam logic [4:0] CIR_OPERAND  = 5'h10;
  localparam logic [4:0] CIR_REGSEL   = 5'h14;
  localparam logic [15:0] CMD_JOIN    = 16'h0001;
  localparam logic [15:0] CMD_FILTER  = 16'h0002;
  localparam int unsigned PW = $clog2(PAIRS);

  logic        act;
  logic [1:0]  strobe_sync;            // cs & ds through two flip-flops
  logic [1:0]  opnd_idx;
  logic        done_flag;
  logic        half;                 // source head of the head pair already read
  word_t       fifo_s [PAIRS];
  word_t       fifo_t [PAIRS];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [PW:0]   count;
  logic        push_f, pop_f;

  assign act = strobe_sync[1] && !dsack;

  assign merge_ready = (count != (PW+1)'(PAIRS)) && !cancel;
  assign push_f      = merge_valid && merge_ready;
  assign pop_f       = act && rw && addr == CIR_OPERAND && count != '0 && half;

  always_comb begin
    start     = 1'b0;
    filter_only = (wdata[15:0] == CMD_FILTER);
    cancel    = 1'b0;
    tbl_we    = 1'b0;
    tbl_coder = wdata[31:29];
    tbl_addr  = wdata[21:16];
    tbl_data  = wdata[15:0];
    if (act && !rw) begin
      unique case (addr)
        CIR_COMMAND: start  = (wdata[15:0] == CMD_JOIN || wdata[15:0] == CMD_FILTER) && !busy;
        CIR_CONTROL: cancel = wdata[0];
        CIR_REGSEL:  tbl_we = 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dsack     <= 1'b0;
      strobe_sync <= '0;
      rdata     <= '0;
      opnd_idx  <= '0;
      src_head  <= '0;
      tgt_head  <= '0;
      tbl_base  <= '0;
      done_flag <= 1'b0;
      half      <= 1'b0;
      rd_ptr    <= '0;
      wr_ptr    <= '0;
      count     <= '0;
    end else begin
      strobe_sync <= {strobe_sync[0], cs && ds};
      dsack <= strobe_sync[1];
      if (done)  done_flag <= 1'b1;
      if (start) done_flag <= 1'b0;

      if (act) begin
        if (rw) begin
          unique case (addr)
            CIR_RESPONSE: rdata <= {16'h0, busy, count != '0, done_flag || done, 13'h0};
            CIR_OPERAND: begin
              if (count == '0)  rdata <= NIL;
              else if (!half)   rdata <= fifo_s[rd_ptr];
              else              rdata <= fifo_t[rd_ptr];
              if (count != '0) half <= !half;
            end
            default:      rdata <= '0;
          endcase
        end else begin
          unique case (addr)
            CIR_COMMAND: opnd_idx <= '0;
            CIR_OPERAND: begin
              unique case (opnd_idx)
                2'd0:    src_head <= wdata;
                2'd1:    tgt_head <= wdata;
                default: tbl_base <= wdata;
              endcase
              if (opnd_idx != 2'd2) opnd_idx <= opnd_idx + 1'b1;
            end
            default: ;
          endcase
        end
      end

      if (cancel) begin
        rd_ptr <= '0;
        wr_ptr <= '0;
        count  <= '0;
        half   <= 1'b0;
      end else begin
        if (push_f) begin
          fifo_s[wr_ptr] <= merge_s;
          fifo_t[wr_ptr] <= merge_t;
          wr_ptr <= wr_ptr + 1'b1;
        end
        if (pop_f) rd_ptr <= rd_ptr + 1'b1;
        count <= count + (PW+1)'(push_f) - (PW+1)'(pop_f);
      end
    end
  end
endmodule
