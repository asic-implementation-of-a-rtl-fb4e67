// huffman_pkg -- widths, constants and shared types of the Huffman compressor.
//
// Samples are 10 bits wide and arrive at 10 MHz. The difference of two
// samples needs 11 bits (two's complement). Differences in -15..+15 get a
// Huffman code of at most 9 bits; every other difference is sent as a 6-bit
// escape header followed by its 11 raw bits, so the longest code is 17 bits.
// Codes are packed into 10-bit output words. The widths, the 6-bit header
// and the 11 raw bits follow the source design; the code-length field width
// and the control bundle are this implementation's own.
package huffman_pkg;

  localparam int unsigned DATA_W = 10;            // input sample width
  localparam int unsigned DIFF_W = DATA_W + 1;    // signed difference width
  localparam int unsigned CODE_W = 17;            // longest code: header + raw
  localparam int unsigned LEN_W  = 5;             // holds 0..17
  localparam int unsigned BUF_W  = 10;            // packed output word
  localparam int unsigned CNT_W  = 4;             // holds 0..10

  // Escape header for differences outside -15..+15 (Table 1: "111000").
  localparam logic [5:0] ESC_HDR = 6'b111000;
  localparam int unsigned ESC_LEN = 6 + DIFF_W;   // 17
  // Range coded by the dictionary.
  localparam int MAX_DICT = 15;

  // Control lines from the packing FSM to the big datapath.
  typedef struct packed {
    logic load;        // STANDBY -> ACUMULATE: take the next code
    logic compute;     // ACUMULATE: compare and latch NACUM
    logic update;      // ACTUALIZE: move NACUM bits into the buffer
    logic out_charge;  // OUTPUT CHARGE: copy buffer to SALFIN, clear it
  } dp_ctrl_t;

  typedef enum logic [2:0] {
    ST_STANDBY    = 3'd0,
    ST_ACUMULATE  = 3'd1,
    ST_ACTUALIZE  = 3'd2,
    ST_DETERMINE  = 3'd3,
    ST_OUTCHARGE  = 3'd4
  } fsm_state_t;

endpackage
