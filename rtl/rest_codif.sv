// rest_codif -- differential encoding and Huffman encoding (sample domain).
//
// On every rising edge of the 10 MHz sample clock, Reg.1 takes the new
// sample and Reg.2 takes the old content of Reg.1. The subtractor forms
// Reg.1 - Reg.2 and the encoder turns it into a variable-length code. This
// follows the source design's Reg.1/Reg.2/subtractor/encoder structure.
//
// This design adds an output register: code/len are registered one edge
// later so they stay stable for a whole sample period while the packing
// side, on its own clock, picks them up. `toggle` flips each time a new
// code is registered, which is how the packing side sees a new code
// without sharing a clock. `valid` goes high with the first code.
//
// Reset (asynchronous, active high) clears both sample registers, so the
// first code after reset is the first sample minus zero, normally an escape
// code carrying the absolute value. A receiver that also starts from zero
// rebuilds the samples exactly.
//
// Latency: the sample taken at edge k has its code on the outputs after
// edge k+1.
module rest_codif
  import huffman_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [DATA_W-1:0]  data,
  output logic [CODE_W-1:0]  code,
  output logic [LEN_W-1:0]   len,
  output logic               valid,
  output logic               toggle
);

  logic [DATA_W-1:0]        reg1, reg2;
  logic                     reg1_valid;
  logic signed [DIFF_W-1:0] diff;
  logic [CODE_W-1:0]        enc_code;
  logic [LEN_W-1:0]         enc_len;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      reg1       <= '0;
      reg2       <= '0;
      reg1_valid <= 1'b0;
    end else begin
      reg1       <= data;
      reg2       <= reg1;
      reg1_valid <= 1'b1;
    end
  end

  restador u_restador (.cur(reg1), .prev(reg2), .diff(diff));

  codificador u_codificador (.diff(diff), .code(enc_code), .len(enc_len));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      code   <= '0;
      len    <= '0;
      valid  <= 1'b0;
      toggle <= 1'b0;
    end else if (reg1_valid) begin
      code   <= enc_code;
      len    <= enc_len;
      valid  <= 1'b1;
      toggle <= ~toggle;
    end
  end

endmodule
