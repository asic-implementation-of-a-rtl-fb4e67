// tb_shft_acumular -- checks the code shift register and output buffer.
//
// Packs random codes of random lengths, driving load / update / out_charge
// with the NACUM and fill values the datapath would give, and compares each
// SALFIN word with the next 10 bits of a reference bit queue built from the
// same codes (first code bit into SALFIN[9]).
module tb_shft_acumular;
  import huffman_pkg::*;
  logic clk = 0, rst = 1;
  dp_ctrl_t ctrl;
  logic [16:0] code;
  logic [4:0]  len;
  logic [3:0]  nacum, fill;
  logic [9:0]  salfin;
  int checks = 0, failures = 0, words = 0;
  bit q[$];

  shft_acumular dut (.clk, .rst, .ctrl, .code, .len, .nacum, .fill, .salfin);

  always #10 clk = ~clk;

  task automatic step(dp_ctrl_t c);
    ctrl = c;
    @(posedge clk); #1;
    ctrl = '0;
  endtask

  initial begin
    int f = 0, left, mv, l;
    ctrl = '0; code = '0; len = '0; nacum = '0; fill = '0;
    #25 rst = 0;
    repeat (2000) begin
      l = ($urandom_range(7) == 0) ? 17 : int'($urandom_range(9, 1));
      code = 17'($urandom) & 17'((1 << l) - 1);
      len = 5'(l);
      for (int i = l - 1; i >= 0; i--) q.push_back(code[i]);
      step('{load:1, compute:0, update:0, out_charge:0});
      code = 17'($urandom);  // the code input may change after the load
      left = l;
      while (left > 0) begin
        mv = (left < 10 - f) ? left : 10 - f;
        nacum = 4'(mv); fill = 4'(f);
        step('{load:0, compute:0, update:1, out_charge:0});
        f += mv; left -= mv;
        if (f == 10) begin
          logic [9:0] exp;
          step('{load:0, compute:0, update:0, out_charge:1});
          for (int b = 9; b >= 0; b--) exp[b] = q.pop_front();
          checks++; words++;
          if (salfin != exp) begin
            failures++;
            $display("FAIL word %0d got %b expected %b", words, salfin, exp);
          end
          f = 0;
        end
      end
    end
    checks++;
    if (words < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
