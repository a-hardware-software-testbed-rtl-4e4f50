// testbed_pkg: types and constants shared by the baseband processing board.
//
// Sample words: every FIFO word carries one complex sample as two signed
// 16-bit halves, {I, Q}. The 12-bit converter samples are sign-extended
// into these halves; the frequency-domain values of the equaliser use the
// full 16 bits. On the Ethernet side a word travels as four bytes, I first,
// most significant byte first.
//
// Frame constants follow the 802.11a-style frame the testbed was exercised
// with: ten 16-sample short training sequences, a 32-sample guard interval,
// two 64-sample long training sequences, one 80-sample SIGNAL symbol and a
// run of 80-sample DATA symbols (22 in the reference case), with 411 idle
// samples between frames. The long-training values per subcarrier are the
// 802.11a ones (standard, not printed with the frame description).
//
// Also here: the byte-wise Ethernet CRC-32 (reflected polynomial 0xEDB88320)
// used by the MAC transmitter and receiver.
package testbed_pkg;

  localparam int unsigned SAMPLE_W   = 16;  // one I or Q half of a FIFO word
  localparam int unsigned WORD_W     = 2 * SAMPLE_W;
  localparam int unsigned ADC_W      = 12;  // converter resolution
  localparam int unsigned NFFT       = 64;  // subcarriers

  // Reference frame (samples at the 20 MHz converter rate).
  localparam int unsigned STS_LEN    = 16;
  localparam int unsigned STS_REPS   = 10;
  localparam int unsigned GI2_LEN    = 32;
  localparam int unsigned LTS_LEN    = 64;
  localparam int unsigned LTS_REPS   = 2;
  localparam int unsigned SYM_LEN    = 80;
  localparam int unsigned DATA_SYMS  = 22;
  localparam int unsigned FRAME_GAP  = 411;
  localparam int unsigned FRAME_LEN  = STS_LEN*STS_REPS + GI2_LEN + LTS_LEN*LTS_REPS
                                       + SYM_LEN + SYM_LEN*DATA_SYMS;  // 2160

  // Ethernet II + IPv4 + UDP header, prepared by the MCU.
  localparam int unsigned HDR_BYTES  = 42;

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] re;
    logic signed [SAMPLE_W-1:0] im;
  } cplx_t;

  // Which part of a frame a frequency-domain value belongs to.
  typedef enum logic [1:0] {
    SYM_OTHER = 2'd0,
    SYM_LT1   = 2'd1,
    SYM_LT2   = 2'd2,
    SYM_DATA  = 2'd3   // SIGNAL and DATA symbols
  } sym_kind_e;

  // 802.11a long training value on FFT bin k (0..63): +1, -1 or 0 (unused bin).
  // Returned as {is_used, is_negative}.
  // Bin k = 1..26 carries L(k), bin k = 38..63 carries L(k-64). Bit i of
  // LTS_POS_NEG is set when L(i+1) = -1; bit i of LTS_NEG_NEG when L(i-26) = -1.
  localparam logic [25:0] LTS_POS_NEG = 26'b00001010110011111010100110;
  localparam logic [25:0] LTS_NEG_NEG = 26'b00001010011000000101001100;

  function automatic logic [1:0] lts_value(input logic [5:0] k);
    logic [1:0] v;
    if (k >= 6'd1 && k <= 6'd26)       v = {1'b1, LTS_POS_NEG[5'(k - 6'd1)]};
    else if (k >= 6'd38)               v = {1'b1, LTS_NEG_NEG[5'(k - 6'd38)]};
    else                               v = 2'b00;
    return v;
  endfunction

  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] d);
    logic [31:0] c;
    c = crc ^ {24'd0, d};
    for (int i = 0; i < 8; i++)
      c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    return c;
  endfunction

endpackage
