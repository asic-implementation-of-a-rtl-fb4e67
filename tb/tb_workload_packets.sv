// tb_workload_packets -- the compressor on packet-shaped detector data.
//
// Two data sets of the sizes the source design was evaluated with:
//   A: collision rate 10 kHz, 1099 packets of 1000 samples
//   B: collision rate 50 kHz, 5495 packets of 200 samples
// Both are sent back to back at 10 MS/s. Each packet has its own baseline
// (the channel's DC level) with a wandering noise of a few counts, and half
// the packets carry one shaped pulse: a rise over three samples and an
// exponential decay (6 samples), with a small amplitude (0..40 counts) or,
// in one case in twenty, a large one (80..AMP_MAX). This gives difference
// statistics close to the source data: roughly 40 % zero, 40 % +-1 and
// under 1 % outside +-15. The data are generated here.
//
// Every SALFIN word is decoded with the reference decoder, the samples are
// rebuilt from the differences and compared with what was sent. The
// testbench prints the compression ratio of each set and the number of
// escape codes, and fails if the code queue overflows.
module tb_workload_packets;
  import huffman_pkg::*;
  import tb_huff_ref::*;

  // largest pulse amplitude in ADC counts
  localparam int AMP_MAX = 400;

  logic CLK_10MHz = 0, CLK_50MHz = 0, reset = 1;
  logic [9:0] DATA;
  logic [9:0] SALFIN;
  logic flag, overflow;
  int checks = 0, failures = 0;

  huffman_compressor dut (.CLK_10MHz, .CLK_50MHz, .reset, .DATA, .SALFIN, .flag, .overflow);

  always #50 CLK_10MHz = ~CLK_10MHz;
  initial begin
    #4;
    forever #10 CLK_50MHz = ~CLK_50MHz;
  end

  int sent[$];          // samples not yet matched by the decoder
  bit bits[$];
  longint nbits = 0;
  int rebuilt = 0, escapes = 0, decoded = 0;
  bit in_sync = 1;

  always @(posedge CLK_50MHz) if (!reset && flag) begin
    int v;
    bit esc;
    int nb;
    for (int b = 9; b >= 0; b--) bits.push_back(SALFIN[b]);
    forever begin
      nb = bits.size();
      if (!pop_symbol(bits, v, esc)) break;
      nbits += nb - bits.size();
      if (esc) escapes++;
      rebuilt += v;
      if (in_sync) begin
        checks++;
        if (sent.size() == 0 || rebuilt != sent[0]) begin
          // after one lost code the stream cannot be followed any further
          failures++;
          in_sync = 0;
          $display("FAIL sample %0d rebuilt as %0d", decoded, rebuilt);
        end
      end
      if (sent.size() != 0) void'(sent.pop_front());
      decoded++;
    end
  end

  int walk = 0;  // slowly wandering noise around the baseline

  // one packet: baseline, noise, an optional shaped pulse
  task automatic send_packet(int len);
    int base, t0, amp, s, r;
    bit has_pulse;
    real p, dt;
    base = int'($urandom_range(120, 40));
    t0 = int'($urandom_range(len - 1));
    amp = ($urandom_range(19) == 0) ? int'($urandom_range(AMP_MAX, 80)) : int'($urandom_range(40, 0));
    has_pulse = ($urandom_range(1) != 0);
    for (int t = 0; t < len; t++) begin
      p = 0.0;
      if (has_pulse && t >= t0) begin
        dt = real'(t - t0);
        p = (dt < 3.0) ? amp * dt / 3.0 : amp * $exp(-(dt - 3.0) / 6.0);
      end
      r = int'($urandom_range(99));
      if (r < 44) walk += ($urandom_range(1) != 0) ? 1 : -1;
      else if (r < 53) walk += ($urandom_range(1) != 0) ? 2 : -2;
      else if (r < 57) walk += (($urandom_range(1) != 0) ? 1 : -1) * int'($urandom_range(6, 3));
      if (walk > 4) walk -= 2;
      if (walk < -4) walk += 2;
      s = base + int'(p) + walk;
      if (s < 0) s = 0;
      if (s > 1023) s = 1023;
      @(negedge CLK_10MHz);
      DATA = 10'(s);
      sent.push_back(s);
    end
  endtask

  task automatic run_set(string name, int packets, int len);
    longint b0 = nbits;
    int d0 = decoded, e0 = escapes;
    for (int p = 0; p < packets; p++) send_packet(len);
    // hold the last value so the partly filled word is pushed out
    repeat (100) begin
      @(negedge CLK_10MHz);
      sent.push_back(int'(DATA));
    end
    $display("%s: %0d packets x %0d samples, ratio %0.2f, escape codes %0d",
             name, packets, len, real'(10 * (decoded - d0)) / real'(nbits - b0), escapes - e0);
  endtask

  initial begin
    DATA = '0;
    sent.push_back(0);
    #130 reset = 0;
    run_set("set A (10 kHz)", 1099, 1000);
    run_set("set B (50 kHz)", 5495, 200);
    checks++;
    if (overflow) begin failures++; $display("FAIL code queue overflowed"); end
    checks++;
    if (decoded < 1099 * 1000 + 5495 * 200) begin failures++; $display("FAIL only %0d samples decoded", decoded); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #240000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
