// chp2_pl_top: programmable-logic part of one CHP2 node.
//
// A CHP2 node measures its distance to a peer by exchanging frames at
// exactly known times: it transmits one frame per cycle at a timestamp of
// its primary timer, and timestamps the peer's frame on arrival, first
// coarsely (to a 25 ns sample) with a preamble detector and then to a
// fraction of a sample with the massive correlator. This top holds the
// hardware part of that chain; modulation, equalisation, frequency
// correction and the time-of-flight algorithms run as software.
//
// 40 MHz sample-clock domain (clk):
//   primary_timer   42-bit timestamp source
//   tx_engine       frame buffer, timed start, 4 Tx pulse-shaping filters,
//                   switch between this engine and the vendor DMA path
//   tr_switch_ctrl  TR board switching and amplifier enables
//   rx_engine       4 Rx filters, preamble detector, ring buffer, frame
//                   stream to the DMA, coarse receive timestamp
//   chp2_regs       AXI4-Lite register block for the above
// 200 MHz correlator domain (mc_clk):
//   mc_axis_wrapper AXI4-Lite + AXI4-Stream around massive_correlator
//
// The two domains exchange no signals: received frames reach the
// correlator only after software has corrected their frequency offset and
// cut out the 16 positioning waveforms, so the DMA streams of both sides
// are separate ports. Also outside: the transceiver interface core (IQ in
// adc_*, IQ out dac_*), the vendor DMA Tx path (dma_tx_*), the processor
// (both AXI4-Lite ports) and the TR switching board (trs_sw, pa_en, lna_en).
// Receive is enabled only while the TR controller is in receive mode and
// software's RX_CTRL bit is set.
module chp2_pl_top #(
  parameter int FRAME_LEN = 52000,
  parameter int N_CORR    = 16,
  parameter int MC_LEN    = 4000,
  parameter int N_FRAC    = 100,
  parameter int N_LAG     = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         mc_clk,
  input  logic         mc_rst_n,
  // baseband register port (clk)
  input  logic [7:0]   s_axil_awaddr,
  input  logic         s_axil_awvalid,
  output logic         s_axil_awready,
  input  logic [31:0]  s_axil_wdata,
  input  logic [3:0]   s_axil_wstrb,
  input  logic         s_axil_wvalid,
  output logic         s_axil_wready,
  output logic [1:0]   s_axil_bresp,
  output logic         s_axil_bvalid,
  input  logic         s_axil_bready,
  input  logic [7:0]   s_axil_araddr,
  input  logic         s_axil_arvalid,
  output logic         s_axil_arready,
  output logic [31:0]  s_axil_rdata,
  output logic [1:0]   s_axil_rresp,
  output logic         s_axil_rvalid,
  input  logic         s_axil_rready,
  // transceiver IQ (clk)
  input  logic [127:0] adc_data,
  input  logic         adc_valid,
  output logic [127:0] dac_data,
  output logic         dac_valid,
  input  logic [127:0] dma_tx_data,
  input  logic         dma_tx_valid,
  // received frames to the DMA (clk)
  output logic [127:0] m_axis_rx_tdata,
  output logic         m_axis_rx_tvalid,
  input  logic         m_axis_rx_tready,
  output logic         m_axis_rx_tlast,
  output logic         rx_irq,
  // TR switching board (clk)
  output logic         tx_mode,
  output logic [3:0]   trs_sw,
  output logic [3:0]   pa_en,
  output logic [3:0]   lna_en,
  // correlator register port (mc_clk)
  input  logic [7:0]   s_axil_mc_awaddr,
  input  logic         s_axil_mc_awvalid,
  output logic         s_axil_mc_awready,
  input  logic [31:0]  s_axil_mc_wdata,
  input  logic [3:0]   s_axil_mc_wstrb,
  input  logic         s_axil_mc_wvalid,
  output logic         s_axil_mc_wready,
  output logic [1:0]   s_axil_mc_bresp,
  output logic         s_axil_mc_bvalid,
  input  logic         s_axil_mc_bready,
  input  logic [7:0]   s_axil_mc_araddr,
  input  logic         s_axil_mc_arvalid,
  output logic         s_axil_mc_arready,
  output logic [31:0]  s_axil_mc_rdata,
  output logic [1:0]   s_axil_mc_rresp,
  output logic         s_axil_mc_rvalid,
  input  logic         s_axil_mc_rready,
  // correlator streams (mc_clk)
  input  logic [31:0]  s_axis_mc_tdata,
  input  logic         s_axis_mc_tvalid,
  output logic         s_axis_mc_tready,
  input  logic         s_axis_mc_tlast,
  output logic [95:0]  m_axis_mc_tdata,
  output logic         m_axis_mc_tvalid,
  input  logic         m_axis_mc_tready,
  output logic         m_axis_mc_tlast,
  output logic         mc_irq
);

  localparam int TS_W   = 42;
  localparam int BUF_AW = 16;

  logic [TS_W-1:0]   timer, timer_load_val, tx_ts, rx_ts;
  logic              timer_load;
  logic              txb_we, tx_arm, chp2_mode, tx_armed, tx_busy, tx_done, tx_late;
  logic [1:0]        txb_ch;
  logic [BUF_AW-1:0] txb_addr;
  logic [31:0]       txb_wdata;
  logic [BUF_AW:0]   frame_len;
  logic [15:0]       tr_lead, tr_tail, det_thr, rx_frames, rx_overflows;
  logic [3:0]        pa_bypass, lna_bypass;
  logic              pre_we, rx_sw_en, rx_enable, rx_ts_valid, rx_capturing;
  logic [6:0]        pre_idx;
  logic signed [1:0] pre_i, pre_q;
  logic [63:0]       det_metric;

  primary_timer #(.TS_W(TS_W)) u_timer (
    .clk(clk), .rst_n(rst_n), .load(timer_load), .load_val(timer_load_val), .timer(timer)
  );

  chp2_regs #(.TS_W(TS_W), .BUF_AW(BUF_AW)) u_regs (
    .clk(clk), .rst_n(rst_n),
    .s_axil_awaddr(s_axil_awaddr), .s_axil_awvalid(s_axil_awvalid), .s_axil_awready(s_axil_awready),
    .s_axil_wdata(s_axil_wdata), .s_axil_wstrb(s_axil_wstrb), .s_axil_wvalid(s_axil_wvalid),
    .s_axil_wready(s_axil_wready), .s_axil_bresp(s_axil_bresp), .s_axil_bvalid(s_axil_bvalid),
    .s_axil_bready(s_axil_bready), .s_axil_araddr(s_axil_araddr), .s_axil_arvalid(s_axil_arvalid),
    .s_axil_arready(s_axil_arready), .s_axil_rdata(s_axil_rdata), .s_axil_rresp(s_axil_rresp),
    .s_axil_rvalid(s_axil_rvalid), .s_axil_rready(s_axil_rready),
    .timer(timer), .timer_load(timer_load), .timer_load_val(timer_load_val),
    .txb_we(txb_we), .txb_ch(txb_ch), .txb_addr(txb_addr), .txb_wdata(txb_wdata),
    .tx_ts(tx_ts), .frame_len(frame_len), .tx_arm(tx_arm), .chp2_mode(chp2_mode),
    .tx_armed(tx_armed), .tx_busy(tx_busy), .tx_done(tx_done), .tx_late(tx_late),
    .tr_lead(tr_lead), .tr_tail(tr_tail), .pa_bypass(pa_bypass), .lna_bypass(lna_bypass),
    .det_thr(det_thr), .pre_we(pre_we), .pre_idx(pre_idx), .pre_i(pre_i), .pre_q(pre_q),
    .rx_sw_en(rx_sw_en), .rx_ts(rx_ts), .rx_ts_valid(rx_ts_valid),
    .rx_frames(rx_frames), .rx_overflows(rx_overflows)
  );

  tx_engine #(.N_CH(4), .TS_W(TS_W), .BUF_AW(BUF_AW), .DATA_W(16)) u_tx (
    .clk(clk), .rst_n(rst_n), .timer(timer),
    .buf_we(txb_we), .buf_ch(txb_ch), .buf_addr(txb_addr), .buf_wdata(txb_wdata),
    .tx_ts(tx_ts), .frame_len(frame_len), .arm(tx_arm), .chp2_mode(chp2_mode),
    .dma_data(dma_tx_data), .dma_valid(dma_tx_valid),
    .dac_data(dac_data), .dac_valid(dac_valid),
    .armed(tx_armed), .busy(tx_busy), .done(tx_done), .late(tx_late)
  );

  tr_switch_ctrl #(.TS_W(TS_W), .N_CH(4)) u_tr (
    .clk(clk), .rst_n(rst_n), .timer(timer), .tx_ts(tx_ts),
    .tx_armed(tx_armed), .tx_busy(tx_busy), .lead(tr_lead), .tail(tr_tail),
    .pa_bypass(pa_bypass), .lna_bypass(lna_bypass),
    .tx_mode(tx_mode), .trs_sw(trs_sw), .pa_en(pa_en), .lna_en(lna_en), .rx_enable(rx_enable)
  );

  rx_engine #(.N_CH(4), .DATA_W(16), .TS_W(TS_W), .FRAME_LEN(FRAME_LEN)) u_rx (
    .clk(clk), .rst_n(rst_n), .timer(timer),
    .adc_data(adc_data), .adc_valid(adc_valid),
    .enable(rx_enable && rx_sw_en), .thr(det_thr),
    .pre_we(pre_we), .pre_idx(pre_idx), .pre_i(pre_i), .pre_q(pre_q),
    .m_axis_tdata(m_axis_rx_tdata), .m_axis_tvalid(m_axis_rx_tvalid),
    .m_axis_tready(m_axis_rx_tready), .m_axis_tlast(m_axis_rx_tlast),
    .coarse_ts(rx_ts), .ts_valid(rx_ts_valid), .det_metric(det_metric),
    .capturing(rx_capturing), .frames(rx_frames), .overflows(rx_overflows)
  );

  assign rx_irq = rx_ts_valid;

  mc_axis_wrapper #(.N_CORR(N_CORR), .MC_LEN(MC_LEN), .N_FRAC(N_FRAC), .N_LAG(N_LAG)) u_mc (
    .clk(mc_clk), .rst_n(mc_rst_n),
    .s_axil_awaddr(s_axil_mc_awaddr), .s_axil_awvalid(s_axil_mc_awvalid), .s_axil_awready(s_axil_mc_awready),
    .s_axil_wdata(s_axil_mc_wdata), .s_axil_wstrb(s_axil_mc_wstrb), .s_axil_wvalid(s_axil_mc_wvalid),
    .s_axil_wready(s_axil_mc_wready), .s_axil_bresp(s_axil_mc_bresp), .s_axil_bvalid(s_axil_mc_bvalid),
    .s_axil_bready(s_axil_mc_bready), .s_axil_araddr(s_axil_mc_araddr), .s_axil_arvalid(s_axil_mc_arvalid),
    .s_axil_arready(s_axil_mc_arready), .s_axil_rdata(s_axil_mc_rdata), .s_axil_rresp(s_axil_mc_rresp),
    .s_axil_rvalid(s_axil_mc_rvalid), .s_axil_rready(s_axil_mc_rready),
    .s_axis_tdata(s_axis_mc_tdata), .s_axis_tvalid(s_axis_mc_tvalid),
    .s_axis_tready(s_axis_mc_tready), .s_axis_tlast(s_axis_mc_tlast),
    .m_axis_tdata(m_axis_mc_tdata), .m_axis_tvalid(m_axis_mc_tvalid),
    .m_axis_tready(m_axis_mc_tready), .m_axis_tlast(m_axis_mc_tlast),
    .irq_done(mc_irq)
  );

endmodule
