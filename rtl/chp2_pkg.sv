// chp2_pkg: types and constants shared by the CHP2 programmable-logic blocks.
//
// The CHP2 node timestamps every event with a 42-bit primary timer running
// at the 40 MHz sample clock. IQ samples are 16-bit signed I and Q; four
// receive/transmit channels travel together as one 128-bit word
// (channel 0 in bits [31:0], I in the low half of each 32-bit lane).
//
// RC_COEF holds the 65 taps of the raised-cosine pulse-shaping filter:
//   h[n] = sinc(t) * cos(pi*beta*t) / (1 - (2*beta*t)^2),  t = n/4,
//   n = -32..32, beta = 0.25 (at |2*beta*t| = 1 the limit
//   (pi/4)*sinc(1/(2*beta)) is used), scaled so that sum(h) = 1 and
//   rounded to Q1.15. The roll-off, span and samples per symbol follow the
//   filter description of the design; the unity-DC-gain scaling and the
//   16-bit quantisation are this implementation's choice.
package chp2_pkg;

  localparam int TS_W     = 42;   // primary timer width (integer bits)
  localparam int IQ_W     = 16;   // one I or Q component
  localparam int N_CH     = 4;    // 4x4 MIMO
  localparam int LANE_W   = 2 * IQ_W;
  localparam int WORD_W   = N_CH * LANE_W;  // 128-bit engine data path

  typedef logic [TS_W-1:0] ts_t;

  typedef struct packed {
    logic signed [IQ_W-1:0] q;
    logic signed [IQ_W-1:0] i;
  } iq_t;

  typedef iq_t [N_CH-1:0] iq4_t;   // one sample of all four channels

  localparam int RC_TAPS = 65;
  localparam logic signed [15:0] RC_COEF [RC_TAPS] = '{
    16'sd0,     16'sd17,    16'sd25,    16'sd17,    16'sd0,     -16'sd15,   -16'sd16,   -16'sd7,
    16'sd0,     -16'sd9,    -16'sd28,   -16'sd33,   16'sd0,     16'sd69,    16'sd132,   16'sd121,
    16'sd0,     -16'sd191,  -16'sd333,  -16'sd287,  16'sd0,     16'sd418,   16'sd708,   16'sd601,
    16'sd0,     -16'sd876,  -16'sd1518, -16'sd1343, 16'sd0,     16'sd2375,  16'sd5131,  16'sd7336,
    16'sd8178,
    16'sd7336,  16'sd5131,  16'sd2375,  16'sd0,     -16'sd1343, -16'sd1518, -16'sd876,  16'sd0,
    16'sd601,   16'sd708,   16'sd418,   16'sd0,     -16'sd287,  -16'sd333,  -16'sd191,  16'sd0,
    16'sd121,   16'sd132,   16'sd69,    16'sd0,     -16'sd33,   -16'sd28,   -16'sd9,    16'sd0,
    -16'sd7,    -16'sd16,   -16'sd15,   16'sd0,     16'sd17,    16'sd25,    16'sd17,    16'sd0
  };

endpackage
