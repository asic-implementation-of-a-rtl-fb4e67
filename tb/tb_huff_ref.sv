// tb_huff_ref -- reference model used by the testbenches.
//
// Holds the code table as bit strings (written independently of the RTL
// encoder), a reference encoder giving the string for a difference, and a
// bit-serial decoder that matches a bit queue against the table. The
// testbenches compare the RTL against these.
package tb_huff_ref;

  // Code string for a difference v (-1023..1023).
  function automatic string ref_code(int v);
    int a = (v < 0) ? -v : v;
    string s;
    if (a > 15) begin
      logic [10:0] raw = 11'(v);
      return {"111000", $sformatf("%011b", raw)};
    end
    case (a)
      0: return "0";
      1: s = "10";
      2: s = "110";
      3: s = "11101";
      4: s = "111001";
      5: s = "111100";
      6: s = "1111010";
      7: s = "1111011";
      default: return $sformatf("11111%0d%03b", (v < 0) ? 1 : 0, a - 8);
    endcase
    return {s, (v < 0) ? "1" : "0"};
  endfunction

  // Append a code string to a bit queue.
  function automatic void push_bits(ref bit q[$], input string s);
    foreach (s[i]) q.push_back(s[i] == "1");
  endfunction

  // Decode one symbol from the front of q. Returns 1 and removes its bits
  // if a whole symbol is present; returns 0 and leaves q alone otherwise.
  // `esc` tells whether it was an escape code.
  function automatic bit pop_symbol(ref bit q[$], output int v, output bit esc);
    string pref;
    esc = 0;
    v = 0;
    pref = "";
    for (int n = 0; n < q.size() && n < 9; n++) begin
      pref = {pref, q[n] ? "1" : "0"};
      if (pref == "111000") begin
        logic [10:0] raw;
        if (q.size() < 17) return 0;
        for (int k = 0; k < 11; k++) raw[10-k] = q[6+k];
        v = int'(signed'(raw));
        esc = 1;
        repeat (17) void'(q.pop_front());
        return 1;
      end
      for (int c = -15; c <= 15; c++) begin
        if (ref_code(c) == pref) begin
          v = c;
          repeat (n + 1) void'(q.pop_front());
          return 1;
        end
      end
    end
    return 0;
  endfunction

endpackage
