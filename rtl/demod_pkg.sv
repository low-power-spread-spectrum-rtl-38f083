// demod_pkg: types and constants shared by the spread-spectrum demodulator.
//
// Samples travel through the demodulator as 4-bit sign-magnitude numbers
// (sign bit, 3-bit magnitude, range -7..+7), the representation chosen for
// the ADC output because the PN and Walsh multiplications only toggle the
// sign bit. Binary code chips use the antipodal convention of the design:
// logic 0 means +1 and logic 1 means -1, so multiplying a sample by a chip
// is an XOR into the sign bit.
//
// The timing constants are the design's: 64-chip symbols, 1024-chip long
// correlations made of 16 symbols, and a 1088-chip (17 symbol) update frame.
// The PN seed is the state 32767 steps before all ones of the 16-bit LFSR
// with taps 15, 13, 4 and 0, so that the truncated sequence is 32768 chips
// long and ends on the all-ones state; the seed value itself is worked out
// for this implementation from that rule.
package demod_pkg;

  typedef struct packed {
    logic       sign;  // 1 = negative
    logic [2:0] mag;
  } sm4_t;

  localparam int unsigned SYMBOL_CHIPS = 64;     // chips per DQPSK symbol
  localparam int unsigned LONG_SYMBOLS = 16;     // 64-chip blocks in a long correlation
  localparam int unsigned FRAME_CHIPS  = 1088;   // update frame (17 blocks)
  localparam int unsigned PN_LEN       = 32768;  // truncated PN period
  localparam logic [15:0] PN_SEED      = 16'h2A88;

  localparam int unsigned SHORT_W = 10;  // signed 64-chip correlation result
  localparam int unsigned LONG_W  = 13;  // unsigned sum of 16 magnitudes
  localparam int unsigned THRA_W  = 14;
  localparam int unsigned THRB_W  = 15;
  localparam int unsigned THRC_W  = 15;

  // Register addresses of the programmable register block.
  typedef enum logic [1:0] {
    REG_WALSH = 2'b00,
    REG_THRA  = 2'b01,
    REG_THRB  = 2'b10,
    REG_THRC  = 2'b11
  } reg_addr_e;

  // Input data formats selected by TSTMODE.
  typedef enum logic [1:0] {
    TM_NORMAL = 2'b00,  // ADC sign-magnitude streams, unchanged
    TM_BIN    = 2'b01,  // offset binary 0..15 on IIN/QIN
    TM_TWOS   = 2'b10,  // four parallel two's-complement streams
    TM_UNDEF  = 2'b11
  } tstmode_e;

  function automatic logic signed [4:0] sm_to_int(sm4_t s);
    return s.sign ? -$signed({2'b00, s.mag}) : $signed({2'b00, s.mag});
  endfunction

  function automatic sm4_t int_to_sm(logic signed [4:0] v);
    sm4_t r;
    logic signed [4:0] a;
    a     = (v < 0) ? -v : v;
    r.sign = (v < 0);
    r.mag  = (a > 7) ? 3'd7 : a[2:0];
    return r;
  endfunction

endpackage
