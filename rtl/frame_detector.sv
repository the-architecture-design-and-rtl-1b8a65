// frame_detector: preamble detector of the CHP2 receive engine.
//
// The preamble is a 128-symbol BPSK Gold sequence sent at 4 samples per
// symbol. The detector correlates the received stream with it using only the
// first sample of each symbol, i.e. a 128-tap matched filter whose taps are 4
// samples apart, which needs no true multipliers: every tap value is -1, 0 or
// +1 on I and on Q. The statistic is normalised,
//     g[k] = |sum z[k-4(127-i)] conj(x[i])| / (||z_k|| * ||x||),
// and compared with a threshold (0.6 after reset). To avoid a divider and a
// square root the test is done as
//     |c|^2 * 2^32 >= thr^2 * Ez * Ex          (thr in Q0.16)
// where Ez is the energy of the 128 samples under the taps (kept exactly by a
// running sum per symbol phase) and Ex the energy of the taps.
//
// Pipeline (six registered stages after the sample enters the delay line):
//   1 tap products and energy update   2 partial sums of 8 taps
//   3 full sum c                       4 |c|^2
//   5 threshold product                6 compare
// A crossing starts a local-maximum search: the largest |c|^2 is kept until
// PEAK_WIN samples pass without a larger one, then `det` pulses once. This
// keeps multipath copies of the preamble from triggering twice.
//
// det_ts is the coarse receive timestamp: the timer value at which the first
// preamble sample reached this detector, i.e. the tag of the peak sample
// minus (N_TAPS-1)*SPS (one sample per clock assumed). The preamble taps are
// loaded through pre_we/pre_idx. The 128 taps, symbol-spaced taps, 0.6
// threshold, normalisation, six-stage pipeline and local peak follow the
// design; the exact stage split, the squared test and PEAK_WIN are this
// implementation's choices.
module frame_detector #(
  parameter int N_TAPS    = 128,
  parameter int SPS       = 4,
  parameter int DATA_W    = 16,
  parameter int TS_W      = 42,
  parameter int PEAK_WIN  = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       z_valid,
  input  logic signed [DATA_W-1:0]   z_i,
  input  logic signed [DATA_W-1:0]   z_q,
  input  logic [TS_W-1:0]            timer,
  input  logic                       enable,
  input  logic [15:0]                thr,
  input  logic                       pre_we,
  input  logic [$clog2(N_TAPS)-1:0]  pre_idx,
  input  logic signed [1:0]          pre_i,
  input  logic signed [1:0]          pre_q,
  output logic                       det,
  output logic [TS_W-1:0]            det_ts,
  output logic [63:0]                det_metric
);

  localparam int DL_LEN = N_TAPS * SPS;
  localparam int PW     = DATA_W + 1;                 // one tap product
  localparam int GRP    = 8;
  localparam int NGRP   = N_TAPS / GRP;
  localparam int GW     = PW + $clog2(GRP);
  localparam int CW     = PW + $clog2(N_TAPS);        // correlation
  localparam int PWR_W  = 2 * DATA_W;                 // |z|^2 of one sample
  localparam int EZ_W   = PWR_W + $clog2(N_TAPS);
  localparam int EX_W   = $clog2(2 * N_TAPS) + 1;
  localparam int MAG_W  = 2 * CW;
  localparam int CMP_W  = MAG_W + 33;
  localparam logic [TS_W-1:0] PRE_SPAN = TS_W'((N_TAPS - 1) * SPS);

  initial assert (N_TAPS % GRP == 0) else $error("frame_detector: N_TAPS must be a multiple of 8");

  // ---- preamble taps ----------------------------------------------------
  logic signed [1:0] tap_i [N_TAPS];
  logic signed [1:0] tap_q [N_TAPS];
  logic [EX_W-1:0]   ex;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_TAPS; i++) begin
        tap_i[i] <= '0;
        tap_q[i] <= '0;
      end
    end else if (pre_we) begin
      tap_i[pre_idx] <= pre_i;
      tap_q[pre_idx] <= pre_q;
    end
  end

  always_ff @(posedge clk) begin
    logic [EX_W-1:0] acc;
    acc = '0;
    for (int i = 0; i < N_TAPS; i++)
      acc += EX_W'(tap_i[i] != 0) + EX_W'(tap_q[i] != 0);
    ex <= acc;
  end

  // ---- stage 0: delay line and sample powers ---------------------------
  logic signed [DATA_W-1:0] dl_i [DL_LEN];
  logic signed [DATA_W-1:0] dl_q [DL_LEN];
  logic [PWR_W-1:0]         p_new, p_old;
  logic [TS_W-1:0]          tag [7];
  logic [6:0]               v;
  logic [$clog2(SPS)-1:0]   ph0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DL_LEN; k++) begin
        dl_i[k] <= '0;
        dl_q[k] <= '0;
      end
      p_new <= '0;
      p_old <= '0;
      ph0   <= '0;
    end else if (z_valid) begin
      dl_i[0] <= z_i;
      dl_q[0] <= z_q;
      for (int k = 1; k < DL_LEN; k++) begin
        dl_i[k] <= dl_i[k-1];
        dl_q[k] <= dl_q[k-1];
      end
      p_new <= PWR_W'(z_i * z_i) + PWR_W'(z_q * z_q);
      p_old <= PWR_W'(dl_i[DL_LEN-1] * dl_i[DL_LEN-1]) + PWR_W'(dl_q[DL_LEN-1] * dl_q[DL_LEN-1]);
      ph0   <= ph0 + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0;
      for (int s = 0; s < 7; s++) tag[s] <= '0;
    end else begin
      v[0]   <= z_valid;
      tag[0] <= timer;
      for (int s = 1; s < 7; s++) begin
        v[s]   <= v[s-1];
        tag[s] <= tag[s-1];
      end
    end
  end

  // ---- stage 1: tap products and energy --------------------------------
  logic signed [PW-1:0] pr_r [N_TAPS];
  logic signed [PW-1:0] pr_q [N_TAPS];
  logic [EZ_W-1:0]      ez_ring [SPS];
  logic [EZ_W-1:0]      ez1;

  function automatic logic signed [PW-1:0] tmul(input logic signed [DATA_W-1:0] a,
                                                input logic signed [1:0] t);
    if (t > 0)       return PW'(a);
    else if (t < 0)  return -PW'(a);
    else             return '0;
  endfunction

  always_ff @(posedge clk) begin
    for (int i = 0; i < N_TAPS; i++) begin
      // tap i sees the sample (N_TAPS-1-i) symbols old;
      // z * conj(x) = (zi xi + zq xq) + j (zq xi - zi xq)
      pr_r[i] <= tmul(dl_i[(N_TAPS-1-i)*SPS], tap_i[i]) + tmul(dl_q[(N_TAPS-1-i)*SPS], tap_q[i]);
      pr_q[i] <= tmul(dl_q[(N_TAPS-1-i)*SPS], tap_i[i]) - tmul(dl_i[(N_TAPS-1-i)*SPS], tap_q[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SPS; s++) ez_ring[s] <= '0;
      ez1 <= '0;
    end else if (v[0]) begin
      ez_ring[ph0 - 1'b1] <= ez_ring[ph0 - 1'b1] + EZ_W'(p_new) - EZ_W'(p_old);
      ez1                 <= ez_ring[ph0 - 1'b1] + EZ_W'(p_new) - EZ_W'(p_old);
    end
  end

  // ---- stages 2 and 3: adder tree --------------------------------------
  logic signed [GW-1:0] g_r [NGRP];
  logic signed [GW-1:0] g_q [NGRP];
  logic signed [CW-1:0] c_r, c_q;
  logic [EZ_W-1:0]      ez2, ez3, ez4;

  always_ff @(posedge clk) begin
    for (int g = 0; g < NGRP; g++) begin
      logic signed [GW-1:0] ar, aq;
      ar = '0;
      aq = '0;
      for (int k = 0; k < GRP; k++) begin
        ar += GW'(pr_r[g*GRP+k]);
        aq += GW'(pr_q[g*GRP+k]);
      end
      g_r[g] <= ar;
      g_q[g] <= aq;
    end
    ez2 <= ez1;
  end

  always_ff @(posedge clk) begin
    logic signed [CW-1:0] ar, aq;
    ar = '0;
    aq = '0;
    for (int g = 0; g < NGRP; g++) begin
      ar += CW'(g_r[g]);
      aq += CW'(g_q[g]);
    end
    c_r <= ar;
    c_q <= aq;
    ez3 <= ez2;
  end

  // ---- stages 4 to 6: magnitude, threshold, compare --------------------
  logic [MAG_W-1:0] mag4, mag5, mag6;
  logic [CMP_W-1:0] rhs5;
  logic [31:0]      thr2;
  logic             above6;

  always_ff @(posedge clk) begin
    thr2 <= thr * thr;
    mag4 <= MAG_W'(c_r * c_r) + MAG_W'(c_q * c_q);
    ez4  <= ez3;
    mag5 <= mag4;
    rhs5 <= CMP_W'(thr2) * CMP_W'(ez4) * CMP_W'(ex);
    mag6 <= mag5;
    above6 <= (CMP_W'({mag5, 32'b0}) >= rhs5) && (mag5 != '0);
  end

  // ---- local peak search -------------------------------------------------
  typedef enum logic {S_SEARCH, S_TRACK} state_t;
  state_t                        state;
  logic [MAG_W-1:0]              best;
  logic [TS_W-1:0]               best_ts;
  logic [$clog2(PEAK_WIN+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_SEARCH;
      best       <= '0;
      best_ts    <= '0;
      cnt        <= '0;
      det        <= 1'b0;
      det_ts     <= '0;
      det_metric <= '0;
    end else begin
      det <= 1'b0;
      if (!enable) begin
        state <= S_SEARCH;
      end else if (v[6]) begin
        unique case (state)
          S_SEARCH: if (above6) begin
            state   <= S_TRACK;
            best    <= mag6;
            best_ts <= tag[6];
            cnt     <= '0;
          end
          S_TRACK: begin
            if (above6 && mag6 > best) begin
              best    <= mag6;
              best_ts <= tag[6];
              cnt     <= '0;
            end else if (cnt == ($bits(cnt))'(PEAK_WIN - 1)) begin
              state      <= S_SEARCH;
              det        <= 1'b1;
              det_ts     <= best_ts - PRE_SPAN;
              det_metric <= 64'(best);
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
          default: state <= S_SEARCH;
        endcase
      end
    end
  end

endmodule
