// big_datapath -- the packing processor's datapath: bit counters plus shift
// register and output buffer.
//
// Instantiates `datapath` (bitsAcubuff, bitsAcucode, comp, NACUM) and
// `shft_acumular` (code shift register, 10-bit buffer, SALFIN register) and
// wires NACUM and the buffer fill count from the first to the second. Both
// are driven by the same control bundle from the FSM. The split into these
// two parts follows the source design; the control bundle is this design's.
module big_datapath
  import huffman_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  dp_ctrl_t          ctrl,
  input  logic [CODE_W-1:0] code,
  input  logic [LEN_W-1:0]  lengthcode_D,
  output logic [CNT_W-1:0]  bitsAcubuff,
  output logic [LEN_W-1:0]  bitsAcucode,
  output logic [BUF_W-1:0]  salfin
);

  logic [CNT_W-1:0] nacum;
  logic             comp;

  datapath u_datapath (
    .clk, .rst, .ctrl, .lengthcode_D,
    .bitsAcubuff, .bitsAcucode, .nacum, .comp
  );

  shft_acumular u_shft (
    .clk, .rst, .ctrl, .code, .len(lengthcode_D),
    .nacum, .fill(bitsAcubuff), .salfin
  );

endmodule
