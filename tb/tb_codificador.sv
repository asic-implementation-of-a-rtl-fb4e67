// tb_codificador -- checks the Huffman encoder exhaustively.
//
// For every difference -1023..1023 the RTL code must equal the reference
// string, and decoding it must give the difference back. The entries of the
// source dictionary (0, +-1, +-2 and the escape header) are also checked
// literally, and the longest dictionary code must be 9 bits.
module tb_codificador;
  import huffman_pkg::*;
  import tb_huff_ref::*;
  logic signed [10:0] diff;
  logic [16:0] code;
  logic [4:0]  len;
  int checks = 0, failures = 0;

  codificador dut (.diff, .code, .len);

  function automatic string rtl_str();
    string s = "";
    for (int i = int'(len) - 1; i >= 0; i--) s = {s, code[i] ? "1" : "0"};
    return s;
  endfunction

  task automatic expect_str(int v, string s);
    diff = 11'(v);
    #1;
    checks++;
    if (rtl_str() != s) begin
      failures++;
      $display("FAIL v=%0d got %s len %0d expected %s", v, rtl_str(), len, s);
    end
  endtask

  initial begin
    bit q[$];
    int v, maxlen;
    bit esc;
    // source dictionary entries
    expect_str(0, "0");
    expect_str(1, "100");
    expect_str(-1, "101");
    expect_str(2, "1100");
    expect_str(-2, "1101");
    expect_str(16, "11100000000010000");
    expect_str(-16, "11100011111110000");
    maxlen = 0;
    for (int d = -1023; d <= 1023; d++) begin
      expect_str(d, ref_code(d));
      if (d >= -15 && d <= 15 && int'(len) > maxlen) maxlen = int'(len);
      q.delete();
      push_bits(q, rtl_str());
      checks++;
      if (!pop_symbol(q, v, esc) || v != d || q.size() != 0 || esc != (d > 15 || d < -15)) begin
        failures++;
        $display("FAIL decode of %0d gave %0d", d, v);
      end
    end
    checks++;
    if (maxlen != 9) begin
      failures++;
      $display("FAIL longest dictionary code %0d", maxlen);
    end
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
