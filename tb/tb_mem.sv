// tb_mem: word-addressed memory for the testbenches, answering the
// coprocessor's memory master port.  A transfer is acknowledged after 0 to
// MAX_WAIT random wait cycles; read data is given with the acknowledge.
// Testbenches read and fill 'mem' directly.
module tb_mem #(
  parameter int unsigned WORDS    = 65536,
  parameter int unsigned MAX_WAIT = 2
) (
  input  logic        clk,
  input  logic        req,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        ack
);
  logic [31:0] mem [WORDS];
  int unsigned wait_cnt = 0;
  int unsigned accesses = 0;

  assign ack   = req && (wait_cnt == 0);
  assign rdata = (addr < WORDS) ? mem[addr] : 32'h0;

  always @(posedge clk) begin
    if (req) begin
      if (wait_cnt == 0) begin
        if (we && addr < WORDS) mem[addr] <= wdata;
        accesses++;
        wait_cnt <= $urandom_range(0, MAX_WAIT);
      end else begin
        wait_cnt <= wait_cnt - 1;
      end
    end
  end
endmodule
