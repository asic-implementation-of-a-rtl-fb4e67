// tb_top_compresor -- checks the packing processor on its own.
//
// A 10 MHz process presents random codes with the toggle/valid handshake;
// the block runs on an unrelated 50 MHz clock. Code lengths follow the mix
// the dictionary produces on detector data (mostly 1 and 3 bits, 1 % of
// 17-bit escapes). Every SALFIN word taken on `flag` must equal the next 10
// bits of the reference stream, and the packer must keep up with one code
// per sample period without overflowing its queue. A run of 17-bit codes
// at the end must make it overflow.
module tb_top_compresor;
  import huffman_pkg::*;
  logic clk = 0, sclk = 0, rst = 1;
  logic in_toggle = 0, in_valid = 0;
  logic [16:0] in_code = '0;
  logic [4:0]  in_len = '0;
  logic [9:0]  salfin;
  logic flag, overflow;
  int checks = 0, failures = 0, words = 0, codes = 0;
  bit q[$];
  bit checking = 1;  // off once codes are dropped on purpose

  top_compresor dut (.clk, .rst, .in_toggle, .in_valid, .in_code, .in_len, .salfin, .flag, .overflow);

  always #50 sclk = ~sclk;
  initial begin #7; forever #10 clk = ~clk; end

  always @(posedge clk) if (!rst && flag && checking) begin
    logic [9:0] exp;
    for (int b = 9; b >= 0; b--) exp[b] = q.pop_front();
    words++; checks++;
    if (salfin != exp) begin
      failures++;
      $display("FAIL word %0d got %b expected %b", words, salfin, exp);
    end
  end

  task automatic send(int l);
    @(posedge sclk);
    in_len  <= 5'(l);
    in_code <= 17'($urandom) & 17'((1 << l) - 1);
    in_valid <= 1;
    in_toggle <= ~in_toggle;
    #1;
    for (int i = l - 1; i >= 0; i--) q.push_back(in_code[i]);
    codes++;
  endtask

  // code lengths in the proportions the dictionary gives real data
  function automatic int pick_len();
    int r = int'($urandom_range(999));
    if (r < 413) return 1;
    if (r < 852) return 3;
    if (r < 938) return 4;
    if (r < 990) return int'($urandom_range(9, 6));
    return 17;
  endfunction

  initial begin
    #120 rst = 0;
    repeat (8000) send(pick_len());
    repeat (20) @(posedge sclk);
    checks++;
    if (overflow) begin failures++; $display("FAIL overflow at one code per period"); end
    checks++;
    if (words < 8000 * 2 / 10) begin failures++; $display("FAIL too few words: %0d", words); end
    checking = 0;
    repeat (200) send(17);
    repeat (20) @(posedge sclk);
    checks++;
    if (!overflow) begin failures++; $display("FAIL no overflow under 17-bit codes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
