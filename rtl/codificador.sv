// codificador -- Huffman encoder for the sample differences.
//
// Maps an 11-bit signed difference to a prefix code, returned right-aligned
// in `code` (the first bit to send is code[len-1]) with its length in `len`.
// Combinational.
//
// The codes for 0, +-1, +-2 and the 6-bit escape header 111000 are the
// source design's own dictionary entries. Its full 31-entry dictionary is
// not available, so the codes for +-3..+-15 below are this design's choice:
// they fill the code space the given entries leave free, give shorter codes
// to smaller magnitudes (the differences are peaked at 0) and keep the
// longest dictionary code at 9 bits, as the source design does.
//
//   value      code           len     value      code           len
//     0        0               1
//    +1        100             3       -1        101             3
//    +2        1100            4       -2        1101            4
//    +3        111010          6       -3        111011          6
//    +4        1110010         7       -4        1110011         7
//    +5        1111000         7       -5        1111001         7
//    +6        11110100        8       -6        11110101        8
//    +7        11110110        8       -7        11110111        8
//  +8..+15     111110 + (v-8)  9     -8..-15     111111 + (|v|-8) 9
//  otherwise   111000 + 11-bit two's-complement difference       17
module codificador
  import huffman_pkg::*;
(
  input  logic signed [DIFF_W-1:0] diff,
  output logic [CODE_W-1:0]        code,
  output logic [LEN_W-1:0]         len
);

  logic [DIFF_W-1:0] mag;
  logic              neg;

  always_comb begin
    neg = diff[DIFF_W-1];
    mag = neg ? DIFF_W'(-diff) : DIFF_W'(diff);
    code = '0;
    len  = '0;
    if (mag > DIFF_W'(MAX_DICT)) begin
      code = {ESC_HDR, diff};
      len  = LEN_W'(ESC_LEN);
    end else begin
      unique case (mag[3:0])
        4'd0: begin code = CODE_W'(1'b0);               len = 5'd1; end
        4'd1: begin code = CODE_W'({2'b10,   neg});     len = 5'd3; end
        4'd2: begin code = CODE_W'({3'b110,  neg});     len = 5'd4; end
        4'd3: begin code = CODE_W'({5'b11101, neg});    len = 5'd6; end
        4'd4: begin code = CODE_W'({6'b111001, neg});   len = 5'd7; end
        4'd5: begin code = CODE_W'({6'b111100, neg});   len = 5'd7; end
        4'd6: begin code = CODE_W'({7'b1111010, neg});  len = 5'd8; end
        4'd7: begin code = CODE_W'({7'b1111011, neg});  len = 5'd8; end
        default: begin
          // 8..15: 11111, sign, (magnitude - 8) in three bits
          code = CODE_W'({5'b11111, neg, mag[2:0]});
          len  = 5'd9;
        end
      endcase
    end
  end

endmodule
