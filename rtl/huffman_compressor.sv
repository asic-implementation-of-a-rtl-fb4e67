// huffman_compressor -- lossless compressor for 10-bit detector samples.
//
// Each 10-bit sample arriving on CLK_10MHz is subtracted from the previous
// one; the difference is Huffman-coded (1 to 9 bits for -15..+15, a 17-bit
// escape code carrying the raw difference otherwise). On CLK_50MHz the
// codes are packed back to back into 10-bit words, sent on SALFIN with a
// one-cycle `flag` pulse per word. The first code bit of a word is SALFIN[9].
//
// Structure, as in the source design's version 2: rest_codif (differential
// and Huffman encoding, sample clock) feeding top_compresor (five-state FSM
// and datapath, packing clock), with two independent clock inputs. The
// `overflow` output is this design's addition: it is sticky and tells that
// a code was dropped because bursts of long codes outran the packer's
// queue. FIFO_DEPTH (32 codes, this design's choice) is sized for the runs
// of 17-bit escape codes a steep detector pulse produces: simulated pulses
// up to 900 counts needed 26 entries. Reset is asynchronous and active high
// for both clock domains.
module huffman_compressor
  import huffman_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 32
) (
  input  logic              CLK_10MHz,
  input  logic              CLK_50MHz,
  input  logic              reset,
  input  logic [DATA_W-1:0] DATA,
  output logic [BUF_W-1:0]  SALFIN,
  output logic              flag,
  output logic              overflow
);

  logic [CODE_W-1:0] code;
  logic [LEN_W-1:0]  len;
  logic              valid;
  logic              toggle;

  rest_codif u_rest_codif (
    .clk(CLK_10MHz), .rst(reset), .data(DATA),
    .code, .len, .valid, .toggle
  );

  top_compresor #(.FIFO_DEPTH(FIFO_DEPTH)) u_top_compresor (
    .clk(CLK_50MHz), .rst(reset),
    .in_toggle(toggle), .in_valid(valid), .in_code(code), .in_len(len),
    .salfin(SALFIN), .flag, .overflow
  );

endmodule
