// tb_big_datapath -- checks counters and shift register working together.
//
// Drives the control sequence of the FSM, but decides the next step from
// its own model of the fill level rather than from the block's outputs, and
// compares the SALFIN words with a reference bit queue and the counters
// with the model.
module tb_big_datapath;
  import huffman_pkg::*;
  logic clk = 0, rst = 1;
  dp_ctrl_t ctrl;
  logic [16:0] code;
  logic [4:0]  lengthcode_D, bitsAcucode;
  logic [3:0]  bitsAcubuff;
  logic [9:0]  salfin;
  int checks = 0, failures = 0, words = 0, splits = 0;
  bit q[$];

  big_datapath dut (.clk, .rst, .ctrl, .code, .lengthcode_D, .bitsAcubuff, .bitsAcucode, .salfin);

  always #10 clk = ~clk;

  task automatic step(dp_ctrl_t c);
    ctrl = c;
    @(posedge clk); #1;
    ctrl = '0;
  endtask

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int f = 0, left, l;
    ctrl = '0; code = '0; lengthcode_D = '0;
    #25 rst = 0;
    repeat (2000) begin
      l = ($urandom_range(7) == 0) ? 17 : int'($urandom_range(9, 1));
      code = 17'($urandom) & 17'((1 << l) - 1);
      lengthcode_D = 5'(l);
      for (int i = l - 1; i >= 0; i--) q.push_back(code[i]);
      step('{load:1, compute:0, update:0, out_charge:0});
      left = l;
      while (left > 0) begin
        int mv = 0;
        mv = (left < 10 - f) ? left : 10 - f;
        if (mv < left) splits++;
        step('{load:0, compute:1, update:0, out_charge:0});
        step('{load:0, compute:0, update:1, out_charge:0});
        f += mv; left -= mv;
        expect_eq("bitsAcubuff", int'(bitsAcubuff), f);
        expect_eq("bitsAcucode", int'(bitsAcucode), left);
        if (f == 10) begin
          logic [9:0] exp;
          step('{load:0, compute:0, update:0, out_charge:1});
          for (int b = 9; b >= 0; b--) exp[b] = q.pop_front();
          words++;
          expect_eq("salfin", int'(salfin), int'(exp));
          f = 0;
        end
      end
    end
    expect_eq("enough words and splits", int'(words > 100 && splits > 100), 1);
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
