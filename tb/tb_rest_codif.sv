// tb_rest_codif -- checks differential plus Huffman encoding on the sample
// clock.
//
// Feeds a random walk with occasional large jumps. The sample taken at edge
// k must appear as code/len after edge k+1, equal to the reference code of
// (sample k - sample k-1), with sample -1 taken as 0 after reset. `toggle`
// must flip once per code and `valid` must rise with the first code.
module tb_rest_codif;
  import huffman_pkg::*;
  import tb_huff_ref::*;
  logic clk = 0, rst = 1;
  logic [9:0]  data;
  logic [16:0] code;
  logic [4:0]  len;
  logic valid, toggle;
  int checks = 0, failures = 0, escapes = 0;

  rest_codif dut (.clk, .rst, .data, .code, .len, .valid, .toggle);

  always #50 clk = ~clk;

  function automatic string rtl_str();
    string s = "";
    for (int i = int'(len) - 1; i >= 0; i--) s = {s, code[i] ? "1" : "0"};
    return s;
  endfunction

  int samples[$];
  initial begin
    int cur = 500, k = 0;
    logic last_toggle;
    data = 10'(cur);
    #120 rst = 0;
    checks++;
    if (valid !== 1'b0) begin failures++; $display("FAIL valid during reset"); end
    repeat (600) begin
      // drive a new sample before the rising edge
      if ($urandom_range(20) == 0) cur = int'($urandom_range(1023));
      else cur = cur + int'($urandom_range(6)) - 3;
      if (cur < 0) cur = 0;
      if (cur > 1023) cur = 1023;
      data = 10'(cur);
      samples.push_back(cur);
      last_toggle = toggle;
      @(posedge clk); #1;
      if (samples.size() >= 2) begin
        // outputs now hold the code of samples[k]
        int prev, d;
        prev = (k == 0) ? 0 : samples[k-1];
        d = samples[k] - prev;
        checks++;
        if (!valid || rtl_str() != ref_code(d) || toggle == last_toggle) begin
          failures++;
          $display("FAIL sample %0d diff %0d got %s expected %s", k, d, rtl_str(), ref_code(d));
        end
        if (d > 15 || d < -15) escapes++;
        k++;
      end
    end
    checks++;
    if (escapes == 0) begin failures++; $display("FAIL no escape code seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
