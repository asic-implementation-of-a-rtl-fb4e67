// datapath -- bit counters of the packing processor.
//
// Keeps two counts: bitsAcubuff, how many of the BUF_W output-buffer bits are
// already filled, and bitsAcucode, how many bits of the current code still
// have to be placed. Each pass works on the free space 10 - bitsAcubuff:
//
//   compute (ACUMULATE):  comp  = bitsAcucode > 10 - bitsAcubuff
//                         NACUM = comp ? 10 - bitsAcubuff : bitsAcucode
//   update  (ACTUALIZE):  bitsAcubuff = comp ? 10 : bitsAcubuff + bitsAcucode
//                         bitsAcucode = comp ? bitsAcucode - NACUM : 0
//   load    (STANDBY):    bitsAcucode = lengthcode_D
//   out_charge:           bitsAcubuff = 0
//
// This follows the source design's datapath schematic: a "10 -" subtractor,
// a ">" comparator giving comp, an adder, a mux choosing 10 or the sum, and a
// "NACUM -" subtractor with a mux choosing its result or 0. Latching comp and
// NACUM in registers between the two states is this design's reading of the
// two-state split. All registers reset to 0 (asynchronous, active high).
// NACUM is also given to the shift register, which moves that many bits.
module datapath
  import huffman_pkg::*;
#(
  parameter int unsigned BUF_W_P = BUF_W
) (
  input  logic             clk,
  input  logic             rst,
  input  dp_ctrl_t         ctrl,
  input  logic [LEN_W-1:0] lengthcode_D,
  output logic [CNT_W-1:0] bitsAcubuff,
  output logic [LEN_W-1:0] bitsAcucode,
  output logic [CNT_W-1:0] nacum,
  output logic             comp
);

  logic [CNT_W-1:0] free_bits;

  always_comb free_bits = CNT_W'(BUF_W_P) - bitsAcubuff;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      bitsAcubuff <= '0;
      bitsAcucode <= '0;
      nacum       <= '0;
      comp        <= 1'b0;
    end else begin
      if (ctrl.load)
        bitsAcucode <= lengthcode_D;
      if (ctrl.compute) begin
        comp  <= bitsAcucode > LEN_W'(free_bits);
        nacum <= (bitsAcucode > LEN_W'(free_bits)) ? free_bits : CNT_W'(bitsAcucode);
      end
      if (ctrl.update) begin
        bitsAcubuff <= comp ? CNT_W'(BUF_W_P) : bitsAcubuff + CNT_W'(bitsAcucode);
        bitsAcucode <= comp ? bitsAcucode - LEN_W'(nacum) : '0;
      end
      if (ctrl.out_charge)
        bitsAcubuff <= '0;
    end
  end

  // The buffer never holds more than BUF_W bits, nor a code more than 17.
  assert property (@(posedge clk) disable iff (rst) bitsAcubuff <= CNT_W'(BUF_W_P));
  assert property (@(posedge clk) disable iff (rst) bitsAcucode <= LEN_W'(CODE_W));

endmodule
