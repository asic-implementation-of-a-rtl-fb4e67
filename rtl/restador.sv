// restador -- differential-encoding subtractor.
//
// Computes diff = cur - prev for two unsigned 10-bit samples. The result is
// an 11-bit two's-complement number covering -1023..+1023, so nothing is ever
// lost. Purely combinational. Subtracting the previous sample from the
// current one removes the channel's DC baseline (as in the source design);
// the 11-bit result width is what the escape path's 11 raw bits carry.
module restador
  import huffman_pkg::*;
(
  input  logic [DATA_W-1:0]        cur,
  input  logic [DATA_W-1:0]        prev,
  output logic signed [DIFF_W-1:0] diff
);

  always_comb diff = signed'({1'b0, cur}) - signed'({1'b0, prev});

endmodule
