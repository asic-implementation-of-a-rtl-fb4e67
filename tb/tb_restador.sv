// tb_restador -- checks the subtractor on corner values and random pairs.
module tb_restador;
  import huffman_pkg::*;
  logic [9:0] cur, prev;
  logic signed [10:0] diff;
  int checks = 0, failures = 0;

  restador dut (.cur, .prev, .diff);

  task automatic check(int c, int p);
    cur = 10'(c); prev = 10'(p);
    #1;
    checks++;
    if (int'(diff) != c - p) begin
      failures++;
      $display("FAIL %0d - %0d gave %0d", c, p, diff);
    end
  endtask

  initial begin
    check(0, 0); check(1023, 0); check(0, 1023); check(512, 511); check(511, 512);
    check(1023, 1023);
    repeat (2000) check(int'($urandom_range(1023)), int'($urandom_range(1023)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
