// tb_datapath -- checks the bit counters of the packing datapath.
//
// Runs random code lengths (1..17) through the load / compute / update /
// out_charge sequence the FSM uses and compares bitsAcubuff, bitsAcucode,
// comp and NACUM with a model built on min(): each pass moves
// min(bits left, free space) bits. Counts split codes to make sure the
// comp=1 path is taken.
module tb_datapath;
  import huffman_pkg::*;
  logic clk = 0, rst = 1;
  dp_ctrl_t ctrl;
  logic [4:0] lengthcode_D;
  logic [3:0] bitsAcubuff, nacum;
  logic [4:0] bitsAcucode;
  logic comp;
  int checks = 0, failures = 0, splits = 0;

  datapath dut (.clk, .rst, .ctrl, .lengthcode_D, .bitsAcubuff, .bitsAcucode, .nacum, .comp);

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
    int fill = 0, left, mv;
    ctrl = '0;
    lengthcode_D = '0;
    #25 rst = 0;
    expect_eq("reset buff", int'(bitsAcubuff), 0);
    repeat (3000) begin
      int l;
      if ($urandom_range(9) == 0) l = 17;
      else l = int'($urandom_range(9, 1));
      lengthcode_D = 5'(l);
      step('{load:1, compute:0, update:0, out_charge:0});
      expect_eq("load", int'(bitsAcucode), l);
      left = l;
      forever begin
        mv = (left < 10 - fill) ? left : 10 - fill;
        step('{load:0, compute:1, update:0, out_charge:0});
        expect_eq("nacum", int'(nacum), mv);
        expect_eq("comp", int'(comp), int'(left > 10 - fill));
        if (left > 10 - fill) splits++;
        step('{load:0, compute:0, update:1, out_charge:0});
        fill += mv;
        left -= mv;
        expect_eq("buff", int'(bitsAcubuff), fill);
        expect_eq("code", int'(bitsAcucode), left);
        if (fill == 10) begin
          step('{load:0, compute:0, update:0, out_charge:1});
          fill = 0;
          expect_eq("clear", int'(bitsAcubuff), 0);
        end
        if (left == 0) break;
      end
    end
    expect_eq("splits seen", int'(splits > 100), 1);
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
