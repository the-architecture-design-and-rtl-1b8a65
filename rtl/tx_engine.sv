// tx_engine: CHP2 transmission engine.
//
// Holds one complete frame of IQ samples for the four transmit channels in
// block memory and sends it at an exact primary-timer value. Software writes
// the frame (preamble, payload, midamble, positioning sequences, postamble)
// one 32-bit channel sample at a time through buf_we/buf_ch/buf_addr, then
// programs tx_ts and frame_len and pulses `arm`. While armed the state
// machine compares the timer with tx_ts every cycle; on equality it reads
// the buffer, one sample of all channels per clock, through four 65-tap
// pulse-shaping filters (rc_fir) to the transceiver interface. After
// frame_len samples it feeds the filters N_TAPS-1 zeros so their tails go
// out, then pulses `done`.
//
// Timing: the first filtered sample reaches dac_data TX_LAT = 6 clocks after
// the cycle in which timer == tx_ts (1 for the buffer read, 5 for the
// filter). This bias is constant and is removed by calibration. A timestamp
// that is already in the past while armed sets `late` and disarms.
//
// `chp2_mode` is the path switch: 1 puts this engine on the DAC path,
// 0 passes the vendor DMA stream (dma_data/dma_valid) straight through, so
// existing transceiver software keeps working.
// Following the design: buffer + timer-controlled state machine, FIRs inside
// the engine, the switch to the DMA path. Own choices: the write port, the
// single-shot arming, the zero flush and the late flag.
module tx_engine #(
  parameter int N_CH   = 4,
  parameter int TS_W   = 42,
  parameter int BUF_AW = 16,
  parameter int DATA_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [TS_W-1:0]          timer,
  // buffer fill
  input  logic                     buf_we,
  input  logic [$clog2(N_CH)-1:0]  buf_ch,
  input  logic [BUF_AW-1:0]        buf_addr,
  input  logic [2*DATA_W-1:0]      buf_wdata,   // {Q, I}
  // control
  input  logic [TS_W-1:0]          tx_ts,
  input  logic [BUF_AW:0]          frame_len,
  input  logic                     arm,
  input  logic                     chp2_mode,
  // vendor DMA path
  input  logic [N_CH*2*DATA_W-1:0] dma_data,
  input  logic                     dma_valid,
  // to the transceiver core
  output logic [N_CH*2*DATA_W-1:0] dac_data,
  output logic                     dac_valid,
  // status
  output logic                     armed,
  output logic                     busy,
  output logic                     done,
  output logic                     late
);

  localparam int FLUSH = chp2_pkg::RC_TAPS - 1;

  typedef enum logic [1:0] {S_IDLE, S_ARMED, S_SEND, S_FLUSH} state_t;
  state_t state;

  logic [BUF_AW:0]   rd_cnt;
  logic [7:0]        fl_cnt;
  logic              rd_en, rd_valid, fl_valid;
  logic [BUF_AW-1:0] rd_addr;
  logic [TS_W-1:0]   diff;
  logic [2:0]        drain;

  assign diff = tx_ts - timer;

  // ---- state machine ------------------------------------------------------
  always_comb begin
    rd_en   = 1'b0;
    rd_addr = rd_cnt[BUF_AW-1:0];
    if (state == S_ARMED && timer == tx_ts && frame_len != '0) begin
      rd_en   = 1'b1;
      rd_addr = '0;
    end else if (state == S_SEND) begin
      rd_en   = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      rd_cnt <= '0;
      fl_cnt <= '0;
      late   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (arm) begin
            state <= S_ARMED;
            late  <= 1'b0;
          end
        end
        S_ARMED: begin
          if (timer == tx_ts) begin
            state  <= (frame_len > (BUF_AW+1)'(1)) ? S_SEND : S_FLUSH;
            rd_cnt <= (BUF_AW+1)'(1);
            fl_cnt <= '0;
          end else if (diff[TS_W-1]) begin
            state <= S_IDLE;
            late  <= 1'b1;
          end
        end
        S_SEND: begin
          rd_cnt <= rd_cnt + 1'b1;
          if (rd_cnt == frame_len - 1'b1) begin
            state  <= S_FLUSH;
            fl_cnt <= '0;
          end
        end
        S_FLUSH: begin
          if (fl_cnt == 8'(FLUSH - 1)) begin
            state <= S_IDLE;
          end
          fl_cnt <= fl_cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
      if (drain == 3'd1) done <= 1'b1;
    end
  end

  // flush samples enter the filters one cycle after their state cycle,
  // aligned with the registered buffer reads
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      fl_valid <= 1'b0;
      drain    <= '0;
    end else begin
      rd_valid <= rd_en;
      fl_valid <= (state == S_FLUSH);
      if (state == S_FLUSH && fl_cnt == 8'(FLUSH - 1)) drain <= 3'd6;
      else if (drain != '0)                             drain <= drain - 1'b1;
    end
  end

  assign armed = (state == S_ARMED);
  assign busy  = (state == S_SEND) || (state == S_FLUSH) || (drain != '0);

  // ---- per-channel buffer and pulse-shaping filter ----------------------
  logic [N_CH*2*DATA_W-1:0] fir_data;
  logic [N_CH-1:0]          fir_valid;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    logic [2*DATA_W-1:0] mem [2**BUF_AW];
    logic [2*DATA_W-1:0] rdata;
    logic signed [DATA_W-1:0] fin_i, fin_q;

    always_ff @(posedge clk) begin
      if (buf_we && buf_ch == c) mem[buf_addr] <= buf_wdata;
      if (rd_en) rdata <= mem[rd_addr];
    end

    assign fin_i = rd_valid ? rdata[DATA_W-1:0]        : '0;
    assign fin_q = rd_valid ? rdata[2*DATA_W-1:DATA_W] : '0;

    rc_fir #(.DATA_W(DATA_W)) u_fir (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (rd_valid | fl_valid),
      .in_i     (fin_i),
      .in_q     (fin_q),
      .out_valid(fir_valid[c]),
      .out_i    (fir_data[c*2*DATA_W +: DATA_W]),
      .out_q    (fir_data[c*2*DATA_W+DATA_W +: DATA_W])
    );
  end

  assign dac_data  = chp2_mode ? fir_data     : dma_data;
  assign dac_valid = chp2_mode ? (&fir_valid) : dma_valid;

  // the engine never reads and flushes in the same cycle
  assert property (@(posedge clk) disable iff (!rst_n) !(rd_valid && fl_valid));

endmodule
