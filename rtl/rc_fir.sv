// rc_fir: 65-tap raised-cosine pulse-shaping filter for one complex stream.
//
// Eight of these sit on the IQ paths: one per channel in the Tx engine and one
// per channel in the Rx engine. They keep the signal inside 10 MHz and limit
// inter-symbol interference (roll-off 0.25, 16-symbol span, 4 samples per
// symbol, taps in chp2_pkg::RC_COEF).
//
// Structure: a 65-sample delay line per component that shifts on in_valid,
// folded around the centre tap (the response is symmetric), then
//   stage 0  shift the new sample into the delay line
//   stage 1  pre-add the 32 mirrored pairs (+ centre sample)
//   stage 2  33 multiplies by the Q1.15 coefficients
//   stage 3  sum of the 33 products
//   stage 4  round to nearest, shift by 15, saturate to 16 bits
// out_valid follows in_valid five cycles later, so the pipeline latency is 5
// clocks on top of the filter's own 32-sample group delay. One sample per
// clock is accepted. Input and output are signed 16-bit as in the design; the
// folded pipeline structure is this implementation's choice.
module rc_fir
  import chp2_pkg::*;
#(
  parameter int N_TAPS = 65,
  parameter int DATA_W = 16,
  parameter int COEF_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_i,
  input  logic signed [DATA_W-1:0] in_q,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_i,
  output logic signed [DATA_W-1:0] out_q
);

  localparam int HALF   = N_TAPS / 2;          // 32 mirrored pairs
  localparam int NPROD  = HALF + 1;            // + centre tap
  localparam int PRE_W  = DATA_W + 1;
  localparam int PROD_W = PRE_W + COEF_W;
  localparam int SUM_W  = PROD_W + $clog2(NPROD);

  initial begin
    assert (N_TAPS == RC_TAPS) else $error("rc_fir: N_TAPS must match RC_COEF");
    assert (N_TAPS % 2 == 1)   else $error("rc_fir: odd tap count expected");
  end

  logic signed [DATA_W-1:0] dl_i [N_TAPS];
  logic signed [DATA_W-1:0] dl_q [N_TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_TAPS; k++) begin
        dl_i[k] <= '0;
        dl_q[k] <= '0;
      end
    end else if (in_valid) begin
      dl_i[0] <= in_i;
      dl_q[0] <= in_q;
      for (int k = 1; k < N_TAPS; k++) begin
        dl_i[k] <= dl_i[k-1];
        dl_q[k] <= dl_q[k-1];
      end
    end
  end

  // delay line is updated on in_valid, so stage 1 starts the cycle after
  logic [4:0] vpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[3:0], in_valid};
  end

  logic signed [PRE_W-1:0]  pre_i  [NPROD];
  logic signed [PRE_W-1:0]  pre_q  [NPROD];
  logic signed [PROD_W-1:0] prod_i [NPROD];
  logic signed [PROD_W-1:0] prod_q [NPROD];
  logic signed [SUM_W-1:0]  sum_i, sum_q;

  always_ff @(posedge clk) begin
    for (int k = 0; k < HALF; k++) begin
      pre_i[k] <= PRE_W'(dl_i[k]) + PRE_W'(dl_i[N_TAPS-1-k]);
      pre_q[k] <= PRE_W'(dl_q[k]) + PRE_W'(dl_q[N_TAPS-1-k]);
    end
    pre_i[HALF] <= PRE_W'(dl_i[HALF]);
    pre_q[HALF] <= PRE_W'(dl_q[HALF]);
    for (int k = 0; k < NPROD; k++) begin
      prod_i[k] <= pre_i[k] * PROD_W'(RC_COEF[k]);
      prod_q[k] <= pre_q[k] * PROD_W'(RC_COEF[k]);
    end
  end

  always_ff @(posedge clk) begin
    logic signed [SUM_W-1:0] ai, aq;
    ai = '0;
    aq = '0;
    for (int k = 0; k < NPROD; k++) begin
      ai += SUM_W'(prod_i[k]);
      aq += SUM_W'(prod_q[k]);
    end
    sum_i <= ai;
    sum_q <= aq;
  end

  function automatic logic signed [DATA_W-1:0] round_sat(input logic signed [SUM_W-1:0] v);
    logic signed [SUM_W-1:0] r;
    r = (v + SUM_W'(1 <<< (COEF_W-2))) >>> (COEF_W-1);
    if (r > SUM_W'((1 <<< (DATA_W-1)) - 1))   return {1'b0, {(DATA_W-1){1'b1}}};
    else if (r < -SUM_W'(1 <<< (DATA_W-1)))   return {1'b1, {(DATA_W-1){1'b0}}};
    else                                      return r[DATA_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_i <= '0;
      out_q <= '0;
    end else begin
      out_i <= round_sat(sum_i);
      out_q <= round_sat(sum_q);
    end
  end

  assign out_valid = vpipe[4];

endmodule
