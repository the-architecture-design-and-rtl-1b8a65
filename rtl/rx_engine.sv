// rx_engine: CHP2 receive engine (frame acquisition).
//
// Four raised-cosine filters (rc_fir) clean the IQ streams of the four
// receive channels. Channel one feeds the preamble frame_detector. Every
// filtered sample of all channels is written into a ring buffer in block
// memory at the address given by the low RING_AW bits of the primary timer,
// so a timer value names a sample directly. When the detector fires it
// reports the timer value of the first preamble sample (the coarse receive
// timestamp); the engine then reads the ring from that value onward and sends
// FRAME_LEN samples of all four channels to the DMA as an AXI4-Stream
// (tlast on the final beat). The ring is deep enough to hold the preamble
// plus the detector latency.
//
// Back-pressure: the reader may fall behind while tready is low. If it falls
// so far behind that the writer is about to overwrite unread samples, the
// frame is cut short (the newest beat read carries tlast) and `overflows`
// counts it.
// While a frame is being read out, and while `enable` is low (transmit mode),
// detection is suspended.
//
// Interface: adc_data is 4 x {Q,I} of 16 bits, one sample per clock;
// m_axis_tdata has the same layout. coarse_ts/ts_valid: timestamp and a
// one-cycle strobe at detection; det_metric the peak |corr|^2. `frames` counts completed frames.
// Following the design: FIRs, detector, block memory, DMA output, coarse
// timestamp. Own choices: the timer-addressed ring, the frame start at the
// first preamble sample, the stream framing and the overflow handling.
module rx_engine #(
  parameter int N_CH      = 4,
  parameter int DATA_W    = 16,
  parameter int TS_W      = 42,
  parameter int FRAME_LEN = 52000,
  parameter int RING_AW   = 10,
  parameter int PEAK_WIN  = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [TS_W-1:0]          timer,
  input  logic [N_CH*2*DATA_W-1:0] adc_data,
  input  logic                     adc_valid,
  input  logic                     enable,
  input  logic [15:0]              thr,
  input  logic                     pre_we,
  input  logic [6:0]               pre_idx,
  input  logic signed [1:0]        pre_i,
  input  logic signed [1:0]        pre_q,
  output logic [N_CH*2*DATA_W-1:0] m_axis_tdata,
  output logic                     m_axis_tvalid,
  input  logic                     m_axis_tready,
  output logic                     m_axis_tlast,
  output logic [TS_W-1:0]          coarse_ts,
  output logic                     ts_valid,
  output logic [63:0]              det_metric,
  output logic                     capturing,
  output logic [15:0]              frames,
  output logic [15:0]              overflows
);

  localparam int W     = N_CH * 2 * DATA_W;
  localparam int DEPTH = 2 ** RING_AW;
  localparam int LEN_W = $clog2(FRAME_LEN + 1);

  // ---- filters ---------------------------------------------------------
  logic [W-1:0]    fir_data;
  logic [N_CH-1:0] fir_valid;

  for (genvar c = 0; c < N_CH; c++) begin : g_fir
    rc_fir #(.DATA_W(DATA_W)) u_fir (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (adc_valid),
      .in_i     (adc_data[c*2*DATA_W +: DATA_W]),
      .in_q     (adc_data[c*2*DATA_W+DATA_W +: DATA_W]),
      .out_valid(fir_valid[c]),
      .out_i    (fir_data[c*2*DATA_W +: DATA_W]),
      .out_q    (fir_data[c*2*DATA_W+DATA_W +: DATA_W])
    );
  end

  logic wr_en;
  assign wr_en = &fir_valid;

  // ---- detector on channel one ----------------------------------------
  logic            det;
  logic [TS_W-1:0] det_ts;

  typedef enum logic {S_IDLE, S_CAPT} state_t;
  state_t state;

  frame_detector #(
    .N_TAPS  (128),
    .SPS     (4),
    .DATA_W  (DATA_W),
    .TS_W    (TS_W),
    .PEAK_WIN(PEAK_WIN)
  ) u_det (
    .clk       (clk),
    .rst_n     (rst_n),
    .z_valid   (wr_en),
    .z_i       (fir_data[DATA_W-1:0]),
    .z_q       (fir_data[2*DATA_W-1:DATA_W]),
    .timer     (timer),
    .enable    (enable && state == S_IDLE),
    .thr       (thr),
    .pre_we    (pre_we),
    .pre_idx   (pre_idx),
    .pre_i     (pre_i),
    .pre_q     (pre_q),
    .det       (det),
    .det_ts    (det_ts),
    .det_metric(det_metric)
  );

  // ---- ring buffer -------------------------------------------------------
  logic [W-1:0]    ring [DEPTH];
  logic [TS_W-1:0] wr_next;    // timer value after the newest written sample
  logic            rd_en;
  logic [TS_W-1:0] rd_ts;
  logic [W-1:0]    rd_data;

  always_ff @(posedge clk) begin
    if (wr_en) ring[timer[RING_AW-1:0]] <= fir_data;
    if (rd_en) rd_data <= ring[rd_ts[RING_AW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     wr_next <= '0;
    else if (wr_en) wr_next <= timer + 1'b1;
  end

  // ---- read-out ----------------------------------------------------------
  logic [LEN_W-1:0] n;
  logic [TS_W-1:0]  lag;
  logic             avail, danger, last_rd;
  logic             rd_last_q;
  // two-entry output queue; occ counts queued + in-flight reads
  logic [W-1:0]     q_data [2];
  logic             q_last [2];
  logic [1:0]       q_cnt, occ;
  logic             q_wptr, q_rptr;
  logic             pop, push, abort;

  assign lag     = wr_next - rd_ts;
  assign avail   = (lag != '0) && (lag <= TS_W'(DEPTH));
  assign danger  = (lag >= TS_W'(DEPTH - 2));
  assign pop     = m_axis_tvalid && m_axis_tready;
  assign rd_en   = (state == S_CAPT) && avail && ((occ - 2'(pop)) < 2'd2);
  assign last_rd = (n == LEN_W'(FRAME_LEN - 1)) || danger;
  // the writer is about to overtake a reader stalled by a full queue: end the
  // frame on the newest queued beat
  assign abort   = (state == S_CAPT) && danger && !rd_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      rd_ts     <= '0;
      n         <= '0;
      coarse_ts <= '0;
      ts_valid  <= 1'b0;
      frames    <= '0;
      overflows <= '0;
      push      <= 1'b0;
      rd_last_q <= 1'b0;
    end else begin
      ts_valid  <= 1'b0;
      push      <= rd_en;
      rd_last_q <= rd_en && last_rd;
      unique case (state)
        S_IDLE: if (det) begin
          state     <= S_CAPT;
          rd_ts     <= det_ts;
          n         <= '0;
          coarse_ts <= det_ts;
          ts_valid  <= 1'b1;
        end
        S_CAPT: if (rd_en) begin
          rd_ts <= rd_ts + 1'b1;
          n     <= n + 1'b1;
          if (last_rd) begin
            state <= S_IDLE;
            if (danger) overflows <= overflows + 1'b1;
            else        frames    <= frames + 1'b1;
          end
        end else if (abort) begin
          state     <= S_IDLE;
          overflows <= overflows + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_cnt  <= '0;
      occ    <= '0;
      q_wptr <= 1'b0;
      q_rptr <= 1'b0;
      for (int k = 0; k < 2; k++) begin
        q_data[k] <= '0;
        q_last[k] <= 1'b0;
      end
    end else begin
      if (push) begin
        q_data[q_wptr] <= rd_data;
        q_last[q_wptr] <= rd_last_q | abort;
        q_wptr         <= ~q_wptr;
      end else if (abort) begin
        q_last[~q_wptr] <= 1'b1;
      end
      if (pop) q_rptr <= ~q_rptr;
      q_cnt <= q_cnt + 2'(push) - 2'(pop);
      occ   <= occ + 2'(rd_en) - 2'(pop);
    end
  end

  assign m_axis_tvalid = (q_cnt != '0);
  assign m_axis_tdata  = q_data[q_rptr];
  assign m_axis_tlast  = q_last[q_rptr];
  assign capturing     = (state == S_CAPT);

  // AXI4-Stream: data must hold while valid is stalled
  assert property (@(posedge clk) disable iff (!rst_n)
    m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata));

endmodule
