// code_fifo -- small single-clock queue of codes waiting to be packed.
//
// A new code arrives every sample period, but a code that spills into a
// second or third output word keeps the packing FSM busy for longer than
// one period. The queue absorbs these bursts. It is DEPTH entries of
// {code, len}, written with `push`, read from `rd_*` and advanced with
// `pop`. A push into a full queue is dropped and sets the sticky `overflow`
// flag until reset. Reads show the oldest entry combinationally
// (first-word-fall-through). The queue is this design's addition: the
// source design does not say how a long code and the next sample are
// reconciled.
module code_fifo
  import huffman_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              push,
  input  logic [CODE_W-1:0] wr_code,
  input  logic [LEN_W-1:0]  wr_len,
  input  logic              pop,
  output logic              empty,
  output logic [CODE_W-1:0] rd_code,
  output logic [LEN_W-1:0]  rd_len,
  output logic              overflow
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [CODE_W-1:0] mem_code [DEPTH];
  logic [LEN_W-1:0]  mem_len  [DEPTH];
  logic [AW-1:0]     wr_ptr, rd_ptr;
  logic [AW:0]       count;
  logic              full, do_push, do_pop;

  always_comb begin
    empty   = (count == '0);
    full    = (count == (AW+1)'(DEPTH));
    do_pop  = pop && !empty;
    do_push = push && (!full || do_pop);
    rd_code = mem_code[rd_ptr];
    rd_len  = mem_len[rd_ptr];
  end

  always_ff @(posedge clk) begin
    if (do_push) begin
      mem_code[wr_ptr] <= wr_code;
      mem_len[wr_ptr]  <= wr_len;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_push) wr_ptr <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
      if (push && !do_push) overflow <= 1'b1;
    end
  end

  // The FSM pops only when it has seen the queue non-empty.
  assert property (@(posedge clk) disable iff (rst) pop |-> !empty);

endmodule
