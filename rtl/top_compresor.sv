// top_compresor -- packing processor: takes variable-length codes and packs
// them into 10-bit words (packing clock domain).
//
// The sample side presents a code, its length, a valid bit and a toggle that
// flips once per new code; these change only on the sample clock. Here the
// toggle passes through two flip-flops, and when the synchronised toggle
// changes, the code (stable by then, since it only changes once per sample
// period) is pushed into a small queue. The five-state FSM takes codes from
// the queue and drives the big datapath, which fills a 10-bit buffer from
// its MSB and sends it on SALFIN with a one-cycle `flag` each time it is
// full. A code longer than the space left is split: the first part
// completes the current word, the rest starts the next.
//
// The FSM, the datapath and the shift register follow the source design;
// the toggle synchroniser and the queue are this design's own, chosen so
// the two clocks need no fixed phase relation. The packing clock must be at
// least about 4 times the sample clock (the source design uses 50 and
// 10 MHz). `overflow` is sticky and reports a code lost to a full queue.
// Latency from the code register to the word that completes it is about
// 3 cycles of synchronisation plus 4-5 cycles of packing.
module top_compresor
  import huffman_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 32
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_toggle,
  input  logic              in_valid,
  input  logic [CODE_W-1:0] in_code,
  input  logic [LEN_W-1:0]  in_len,
  output logic [BUF_W-1:0]  salfin,
  output logic              flag,
  output logic              overflow
);

  logic [2:0]        tog_sync;
  logic              push;
  logic              empty;
  logic [CODE_W-1:0] q_code;
  logic [LEN_W-1:0]  q_len;
  dp_ctrl_t          ctrl;
  fsm_state_t        state;
  logic [CNT_W-1:0]  bitsAcubuff;
  logic [LEN_W-1:0]  bitsAcucode;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) tog_sync <= '0;
    else     tog_sync <= {tog_sync[1:0], in_toggle};
  end

  always_comb push = (tog_sync[2] != tog_sync[1]) && in_valid;

  code_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .push, .wr_code(in_code), .wr_len(in_len),
    .pop(ctrl.load), .empty, .rd_code(q_code), .rd_len(q_len), .overflow
  );

  compressor_fsm u_fsm (
    .clk, .rst, .start_FSM(!empty),
    .bitsAcubuff_FSM(bitsAcubuff), .bitsAcucode_FSM(bitsAcucode),
    .ctrl, .state, .flag
  );

  big_datapath u_dp (
    .clk, .rst, .ctrl, .code(q_code), .lengthcode_D(q_len),
    .bitsAcubuff, .bitsAcucode, .salfin
  );

endmodule
