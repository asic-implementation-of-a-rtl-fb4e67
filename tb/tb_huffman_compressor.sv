// tb_huffman_compressor -- end-to-end test of the compressor at its default
// parameters.
//
// Phase 1 sends NSAMP samples at 10 MHz while the packer runs at 50 MHz with
// an unrelated phase. The samples are a random walk whose steps follow the
// shape of the source data: about 41 % zero, 22 % each +-1, a few percent
// +-2, a thin tail to +-15 and about 0.5 % jumps outside that range. The
// testbench collects every SALFIN word on `flag`, decodes the bit stream with
// the reference decoder, rebuilds the samples (starting from 0, as the
// encoder does after reset) and compares them with what was sent. It counts
// each mechanism: escape codes, output words, codes split over two words,
// 17-bit codes split over three words, more than one code waiting in the
// queue. Each must happen at least once, and the queue must never overflow
// at this sample rate. It prints the compression ratio reached.
//
// Phase 2 sends a long run of full-scale jumps (every code 17 bits), more
// than the packer can keep up with, and checks that the sticky `overflow`
// output rises.
module tb_huffman_compressor;
  import huffman_pkg::*;
  import tb_huff_ref::*;

  localparam int NSAMP = 20000;

  logic CLK_10MHz = 0, CLK_50MHz = 0, reset = 1;
  logic [9:0] DATA = '0;
  logic [9:0] SALFIN;
  logic flag, overflow;
  int checks = 0, failures = 0;

  huffman_compressor dut (.CLK_10MHz, .CLK_50MHz, .reset, .DATA, .SALFIN, .flag, .overflow);

  always #50 CLK_10MHz = ~CLK_10MHz;
  initial begin
    #3;
    forever #10 CLK_50MHz = ~CLK_50MHz;
  end

  int sent[$];
  bit bits[$];
  longint bitpos = 0;
  int decoded = 0, words = 0, escapes = 0, splits = 0, splits3 = 0, backlog = 0;
  int prev_sample = 0;

  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endtask

  // collect and decode the output stream
  always @(posedge CLK_50MHz) if (!reset && flag) begin
    int v;
    bit esc;
    words++;
    for (int b = 9; b >= 0; b--) bits.push_back(SALFIN[b]);
    forever begin
      int nb, l;
      longint w0, w1;
      nb = bits.size();
      if (!pop_symbol(bits, v, esc)) break;
      begin
        l = nb - bits.size();
        w0 = bitpos / 10;
        w1 = (bitpos + l - 1) / 10;
        if (w1 != w0) splits++;
        if (w1 - w0 == 2) splits3++;
        bitpos += l;
      end
      if (esc) escapes++;
      prev_sample += v;
      if (decoded < NSAMP) begin
        checks++;
        if (prev_sample != sent[decoded])
          fail($sformatf("sample %0d rebuilt as %0d, sent %0d", decoded, prev_sample, sent[decoded]));
      end
      decoded++;
    end
  end

  always @(posedge CLK_50MHz) if (!reset && dut.u_top_compresor.u_fifo.count > 1) backlog++;

  function automatic int next_step();
    int r = int'($urandom_range(99999));
    int sgn = $urandom_range(1) ? 1 : -1;
    if (r < 41350) return 0;
    if (r < 85250) return sgn;
    if (r < 93850) return 2 * sgn;
    if (r < 99500) return sgn * int'($urandom_range(15, 3));
    return sgn * int'($urandom_range(400, 16));
  endfunction

  initial begin
    int cur = 512, total_bits;
    // the first edge after reset takes the starting value
    DATA = 10'(cur);
    sent.push_back(cur);
    #130 reset = 0;
    for (int k = 1; k < NSAMP + 200; k++) begin
      @(negedge CLK_10MHz);
      if (k < NSAMP) begin
        cur += next_step();
        if (cur < 0) cur = -cur;
        if (cur > 1023) cur = 2046 - cur;
      end
      DATA = 10'(cur);
      sent.push_back(cur);
    end
    repeat (20) @(negedge CLK_10MHz);
    checks++;
    if (decoded < NSAMP) fail($sformatf("only %0d of %0d samples came out", decoded, NSAMP));
    checks++;
    if (overflow) fail("queue overflow at the nominal sample rate");
    total_bits = int'(bitpos);
    $display("phase 1: %0d samples, %0d words, ratio %0.2f, escapes %0d, split codes %0d, three-word codes %0d, backlog cycles %0d",
             NSAMP, words, real'(10 * NSAMP) / real'(total_bits), escapes, splits, splits3, backlog);
    checks++; if (words == 0)   fail("no output word");
    checks++; if (escapes == 0) fail("no escape code");
    checks++; if (splits == 0)  fail("no code split over two words");
    checks++; if (splits3 == 0) fail("no code split over three words");
    checks++; if (backlog == 0) fail("queue never held more than one code");
    // phase 2: every sample a full-scale jump
    for (int k = 0; k < 200; k++) begin
      @(negedge CLK_10MHz);
      DATA = (k % 2) ? 10'd1023 : 10'd0;
    end
    checks++;
    if (!overflow) fail("overflow never flagged under a burst of escape codes");
    else $display("phase 2: overflow flagged under sustained 17-bit codes");
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
