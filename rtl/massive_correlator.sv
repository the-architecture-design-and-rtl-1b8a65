// massive_correlator: fine time-of-arrival correlator ("massive correlator").
//
// Finds where, to a hundredth of a sample, each received positioning
// waveform lines up with the known navigation sequence. Instead of
// upsampling, it uses a bank of N_FRAC reference copies, row f being the
// reference delayed by f/N_FRAC of a sample (prepared by software and loaded
// once), and N_LAG copies of the received waveform delayed by whole samples.
// Every (lag r, row f) pair is one delay hypothesis
//     bin b = r*N_FRAC + f,   delay = r + f/N_FRAC samples
// relative to input index 0, and its result is
//     g[b] = sum_{m<MC_LEN} z[m + r] * conj(ref_f[m]).
// The default 8 lags x 100 rows give 800 bins over 8 samples (two chips of
// 4 samples) with 0.25 ns spacing at 40 MS/s, i.e. a 4 GHz equivalent rate.
//
// N_CORR correlators (four per receive channel, one per remote transmit
// antenna: 16 waveforms) run in lock-step, each with N_LAG cmac3 units, so
// all waveforms are done in one pass over the reference bank. Rows are
// processed one after another: MC_LEN + N_LAG - 1 input samples are streamed
// through an N_LAG-deep window (one reference sample per clock is shared by
// all units), the pipeline drains (6 clocks) and the N_LAG accumulators of
// every correlator are written to its result memory (N_LAG clocks), while
// the largest |g|^2 and its bin are tracked per correlator.
// One pass takes N_FRAC * (MC_LEN + 2*N_LAG + 5) clocks: 402,100 clocks,
// 2.01 ms at 200 MHz for the defaults.
//
// Interface: ld_ref_* writes the reference bank (address f*MC_LEN + m),
// ld_in_* the input memories (MC_LEN + N_LAG - 1 samples per correlator),
// data {Q,I} 16 bits each. `start` begins a pass, `busy` is high during it,
// `done` pulses at the end. rd_* reads a result one clock after rd_en.
// peak_bin/peak_mag hold the peak of each correlator after `done`.
// Following the design: filter bank of fractional shifts, sample-delayed
// received bank with eight parallel rows, 800 bins, 16 correlators, three-
// multiplier pipelined MACs, input and result block memories. Own choices:
// the exact bin order, the row-serial schedule and the hardware peak search.
module massive_correlator #(
  parameter int N_CORR = 16,
  parameter int MC_LEN = 4000,
  parameter int N_FRAC = 100,
  parameter int N_LAG  = 8,
  parameter int DATA_W = 16,
  parameter int ACC_W  = 48,
  localparam int IN_LEN    = MC_LEN + N_LAG - 1,
  localparam int REF_DEPTH = N_FRAC * MC_LEN,
  localparam int N_BINS    = N_LAG * N_FRAC,
  localparam int RA_W      = $clog2(REF_DEPTH),
  localparam int IA_W      = $clog2(IN_LEN),
  localparam int BIN_W     = $clog2(N_BINS),
  localparam int CI_W      = (N_CORR > 1) ? $clog2(N_CORR) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // loading
  input  logic [2*DATA_W-1:0]  ld_data,
  input  logic                 ld_ref_we,
  input  logic [RA_W-1:0]      ld_ref_addr,
  input  logic                 ld_in_we,
  input  logic [CI_W-1:0]      ld_in_corr,
  input  logic [IA_W-1:0]      ld_in_addr,
  // control
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  // results
  input  logic                 rd_en,
  input  logic [CI_W-1:0]      rd_corr,
  input  logic [BIN_W-1:0]     rd_bin,
  output logic [2*ACC_W-1:0]   rd_data,
  output logic                 rd_valid,
  output logic [BIN_W-1:0]     peak_bin [N_CORR],
  output logic [2*ACC_W-1:0]   peak_mag [N_CORR]
);

  typedef enum logic [1:0] {S_IDLE, S_ROW, S_WAIT, S_DRAIN} state_t;
  state_t state;

  logic [IA_W-1:0]              j;        // input sample being read
  logic [RA_W-1:0]              ref_base; // f * MC_LEN
  logic [$clog2(N_FRAC+1)-1:0]  f;
  logic [$clog2(N_LAG+1)-1:0]   r;
  logic [BIN_W-1:0]             bin;
  logic [2:0]                   wcnt;
  logic                         rd_issue, mac_en1, mac_clr1, mac_en2, mac_clr2;
  logic [RA_W-1:0]              ref_addr;

  assign rd_issue = (state == S_ROW);
  assign ref_addr = ref_base + RA_W'(j) - RA_W'(N_LAG - 1);

  // ---- schedule -------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      j        <= '0;
      ref_base <= '0;
      f        <= '0;
      r        <= '0;
      bin      <= '0;
      wcnt     <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_ROW;
          j        <= '0;
          ref_base <= '0;
          f        <= '0;
        end
        S_ROW: begin
          if (j == IA_W'(IN_LEN - 1)) begin
            state <= S_WAIT;
            wcnt  <= '0;
          end else begin
            j <= j + 1'b1;
          end
        end
        S_WAIT: begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == 3'd5) begin
            state <= S_DRAIN;
            r     <= '0;
            bin   <= BIN_W'(f);
          end
        end
        S_DRAIN: begin
          r   <= r + 1'b1;
          bin <= bin + BIN_W'(N_FRAC);
          if (r == ($bits(r))'(N_LAG - 1)) begin
            if (f == ($bits(f))'(N_FRAC - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state    <= S_ROW;
              j        <= '0;
              f        <= f + 1'b1;
              ref_base <= ref_base + RA_W'(MC_LEN);
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // operands: read data one clock after issue, window/ref aligned one later
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {mac_en1, mac_clr1, mac_en2, mac_clr2} <= '0;
    end else begin
      mac_en1  <= rd_issue && (j >= IA_W'(N_LAG - 1));
      mac_clr1 <= rd_issue && (j == IA_W'(N_LAG - 1));
      mac_en2  <= mac_en1;
      mac_clr2 <= mac_clr1;
    end
  end

  // ---- reference bank -------------------------------------------------
  logic [2*DATA_W-1:0] ref_mem [REF_DEPTH];
  logic [2*DATA_W-1:0] ref_rd, ref_d;

  always_ff @(posedge clk) begin
    if (ld_ref_we) ref_mem[ld_ref_addr] <= ld_data;
    if (rd_issue)  ref_rd <= ref_mem[ref_addr];
    ref_d <= ref_rd;
  end

  // ---- correlators ----------------------------------------------------
  logic [2*ACC_W-1:0] res_rd [N_CORR];
  logic [CI_W-1:0]    rd_corr_q;
  logic               in_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_v      <= 1'b0;
      rd_valid  <= 1'b0;
      rd_corr_q <= '0;
    end else begin
      in_v     <= rd_issue;
      rd_valid <= rd_en;
      if (rd_en) rd_corr_q <= rd_corr;
    end
  end

  assign rd_data = res_rd[rd_corr_q];

  for (genvar c = 0; c < N_CORR; c++) begin : g_corr
    logic [2*DATA_W-1:0]       in_mem [IN_LEN];
    logic [2*DATA_W-1:0]       in_rd;
    logic [2*DATA_W-1:0]       win [N_LAG];
    logic signed [ACC_W-1:0]   acc_i [N_LAG];
    logic signed [ACC_W-1:0]   acc_q [N_LAG];
    logic [2*ACC_W-1:0]        res_mem [N_BINS];
    logic [2*ACC_W-1:0]        res_q;
    logic signed [ACC_W-1:0]   sel_i, sel_q;
    logic [2*ACC_W-1:0]        mag;

    always_ff @(posedge clk) begin
      if (ld_in_we && ld_in_corr == CI_W'(c)) in_mem[ld_in_addr] <= ld_data;
      if (rd_issue) in_rd <= in_mem[j];
    end

    // window: after sample j arrives, win[k] = z[j-(N_LAG-1)+k]
    always_ff @(posedge clk) begin
      if (in_v) begin
        for (int k = 0; k < N_LAG - 1; k++) win[k] <= win[k+1];
        win[N_LAG-1] <= in_rd;
      end
    end

    for (genvar l = 0; l < N_LAG; l++) begin : g_lag
      cmac3 #(.DATA_W(DATA_W), .ACC_W(ACC_W)) u_mac (
        .clk  (clk),
        .rst_n(rst_n),
        .en   (mac_en2),
        .clr  (mac_clr2),
        .z_i  (win[l][DATA_W-1:0]),
        .z_q  (win[l][2*DATA_W-1:DATA_W]),
        .x_i  (ref_d[DATA_W-1:0]),
        .x_q  (ref_d[2*DATA_W-1:DATA_W]),
        .acc_i(acc_i[l]),
        .acc_q(acc_q[l])
      );
    end

    assign sel_i = acc_i[r[$clog2(N_LAG)-1:0]];
    assign sel_q = acc_q[r[$clog2(N_LAG)-1:0]];
    assign mag   = (2*ACC_W)'(sel_i * sel_i) + (2*ACC_W)'(sel_q * sel_q);

    always_ff @(posedge clk) begin
      if (state == S_DRAIN) res_mem[bin] <= {sel_q, sel_i};
      if (rd_en) res_q <= res_mem[rd_bin];
    end
    assign res_rd[c] = res_q;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        peak_mag[c] <= '0;
        peak_bin[c] <= '0;
      end else if (state == S_IDLE && start) begin
        peak_mag[c] <= '0;
        peak_bin[c] <= '0;
      end else if (state == S_DRAIN && mag > peak_mag[c]) begin
        peak_mag[c] <= mag;
        peak_bin[c] <= bin;
      end
    end
  end

endmodule
