// shft_acumular -- code shift register and 10-bit output buffer.
//
// On load the code is placed left-aligned in a CODE_W-bit shift register,
// so its first bit sits in the top position. On update the top `nacum` bits
// are copied into the output buffer just below the `fill` bits already
// there, and the shift register moves left by `nacum`. The buffer fills from
// its MSB: the first code bit sent is SALFIN[9]. On out_charge the full
// buffer is copied to the SALFIN register and cleared.
//
// The source design names this part (a shift register next to the datapath)
// and says the codes are compacted into a 10-bit buffer; the bit order and
// the left-aligned shift register are this design's choices. Registers
// reset to 0 asynchronously. The caller keeps nacum <= 10 - fill.
module shft_acumular
  import huffman_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  dp_ctrl_t          ctrl,
  input  logic [CODE_W-1:0] code,
  input  logic [LEN_W-1:0]  len,
  input  logic [CNT_W-1:0]  nacum,
  input  logic [CNT_W-1:0]  fill,
  output logic [BUF_W-1:0]  salfin
);

  logic [CODE_W-1:0] sreg;
  logic [BUF_W-1:0]  buffer;
  logic [BUF_W-1:0]  chunk;

  // top nacum bits of the shift register, the rest cleared
  always_comb chunk = sreg[CODE_W-1 -: BUF_W] & ~({BUF_W{1'b1}} >> nacum);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sreg   <= '0;
      buffer <= '0;
      salfin <= '0;
    end else begin
      if (ctrl.load)
        sreg <= code << (LEN_W'(CODE_W) - len);
      if (ctrl.update) begin
        buffer <= buffer | (chunk >> fill);
        sreg   <= sreg << nacum;
      end
      if (ctrl.out_charge) begin
        salfin <= buffer;
        buffer <= '0;
      end
    end
  end

  // Bits moved in one pass must fit in the free part of the buffer.
  assert property (@(posedge clk) disable iff (rst)
                   ctrl.update |-> (int'(nacum) + int'(fill) <= BUF_W));

endmodule
