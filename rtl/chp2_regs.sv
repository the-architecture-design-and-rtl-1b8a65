// chp2_regs: control and status registers of the 40 MHz baseband IPs.
//
// One AXI4-Lite slave (through axil_slave) gives software access to the
// primary timer, the Tx engine, the TR switching controller and the Rx
// engine. Register map (32-bit words, byte offset = 4 x index):
//   0 TIMER_LO    R: timer[31:0]; the read also latches timer[41:32]
//   1 TIMER_HI    R: the latched timer[41:32]
//   2 TLOAD_LO    W: load value [31:0]
//   3 TLOAD_HI    W: load value [41:32] and load the timer
//   4 TX_TS_LO    W/R: transmission timestamp [31:0]
//   5 TX_TS_HI    W/R: transmission timestamp [41:32]
//   6 FRAME_LEN   W/R: samples per transmitted frame
//   7 TX_CTRL     W: bit0 arm, bit1 CHP2 mode (1) / vendor DMA path (0)
//                 R: bit0 armed, bit1 mode, bit2 busy, bit3 late, bit4 sent
//                    (set when a frame finished, cleared by arm)
//   8 TXB_ADDR    W/R: {channel[17:16], sample[15:0]} of the next buffer write
//   9 TXB_DATA    W: {Q,I} written at TXB_ADDR, then the sample index
//                    advances by one
//  10 TR_LEAD     W/R: cycles in transmit mode before the tx timestamp
//  11 TR_TAIL     W/R: cycles kept in transmit mode after the frame
//  12 AMP_BYPASS  W/R: {LNA bypass[7:4], PA bypass[3:0]}
//  13 DET_THR     W/R: detection threshold, Q0.16
//  14 PRE_TAP     W: {tap index[14:8], Q[3:2], I[1:0]} of the preamble
//  15 RX_TS_LO    R: coarse receive timestamp [31:0]
//  16 RX_TS_HI    R: [9:0] timestamp [41:32], bit31 new (cleared by this read)
//  17 RX_COUNT    R: {overflowed frames[31:16], received frames[15:0]}
//  18 RX_CTRL     W/R: bit0 receive enable (software side)
// The map and reset values (lead 40 cycles = 1 us, tail 80, threshold 0.6)
// are this implementation's; the design states only that the IPs are
// register-mapped on this bus.
module chp2_regs #(
  parameter int TS_W   = 42,
  parameter int BUF_AW = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  input  logic [7:0]        s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  // timer
  input  logic [TS_W-1:0]   timer,
  output logic              timer_load,
  output logic [TS_W-1:0]   timer_load_val,
  // tx engine
  output logic              txb_we,
  output logic [1:0]        txb_ch,
  output logic [BUF_AW-1:0] txb_addr,
  output logic [31:0]       txb_wdata,
  output logic [TS_W-1:0]   tx_ts,
  output logic [BUF_AW:0]   frame_len,
  output logic              tx_arm,
  output logic              chp2_mode,
  input  logic              tx_armed,
  input  logic              tx_busy,
  input  logic              tx_done,
  input  logic              tx_late,
  // tr switching
  output logic [15:0]       tr_lead,
  output logic [15:0]       tr_tail,
  output logic [3:0]        pa_bypass,
  output logic [3:0]        lna_bypass,
  // rx engine
  output logic [15:0]       det_thr,
  output logic              pre_we,
  output logic [6:0]        pre_idx,
  output logic signed [1:0] pre_i,
  output logic signed [1:0] pre_q,
  output logic              rx_sw_en,
  input  logic [TS_W-1:0]   rx_ts,
  input  logic              rx_ts_valid,
  input  logic [15:0]       rx_frames,
  input  logic [15:0]       rx_overflows
);

  logic        reg_we, reg_re;
  logic [5:0]  reg_waddr, reg_raddr;
  logic [31:0] reg_wdata, reg_rdata;

  axil_slave #(.ADDR_W(8)) u_axil (
    .clk(clk), .rst_n(rst_n),
    .s_axil_awaddr(s_axil_awaddr), .s_axil_awvalid(s_axil_awvalid), .s_axil_awready(s_axil_awready),
    .s_axil_wdata(s_axil_wdata), .s_axil_wstrb(s_axil_wstrb), .s_axil_wvalid(s_axil_wvalid),
    .s_axil_wready(s_axil_wready), .s_axil_bresp(s_axil_bresp), .s_axil_bvalid(s_axil_bvalid),
    .s_axil_bready(s_axil_bready), .s_axil_araddr(s_axil_araddr), .s_axil_arvalid(s_axil_arvalid),
    .s_axil_arready(s_axil_arready), .s_axil_rdata(s_axil_rdata), .s_axil_rresp(s_axil_rresp),
    .s_axil_rvalid(s_axil_rvalid), .s_axil_rready(s_axil_rready),
    .reg_we(reg_we), .reg_waddr(reg_waddr), .reg_wdata(reg_wdata),
    .reg_re(reg_re), .reg_raddr(reg_raddr), .reg_rdata(reg_rdata)
  );

  localparam int HI_W = TS_W - 32;

  logic [HI_W-1:0] timer_hi_latch;
  logic [31:0]     tload_lo;
  logic            tx_sent, rx_new;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer_hi_latch <= '0;
      tload_lo       <= '0;
      timer_load     <= 1'b0;
      timer_load_val <= '0;
      tx_ts          <= '0;
      frame_len      <= '0;
      tx_arm         <= 1'b0;
      chp2_mode      <= 1'b1;
      txb_we         <= 1'b0;
      txb_ch         <= '0;
      txb_addr       <= '0;
      txb_wdata      <= '0;
      tr_lead        <= 16'd40;
      tr_tail        <= 16'd80;
      pa_bypass      <= '0;
      lna_bypass     <= '0;
      det_thr        <= 16'd39322;   // 0.6
      pre_we         <= 1'b0;
      pre_idx        <= '0;
      pre_i          <= '0;
      pre_q          <= '0;
      rx_sw_en       <= 1'b1;
      tx_sent        <= 1'b0;
      rx_new         <= 1'b0;
    end else begin
      timer_load <= 1'b0;
      tx_arm     <= 1'b0;
      pre_we     <= 1'b0;
      if (txb_we) txb_addr <= txb_addr + 1'b1;
      txb_we     <= 1'b0;
      if (tx_done)     tx_sent <= 1'b1;
      if (rx_ts_valid) rx_new  <= 1'b1;
      if (reg_re && reg_raddr == 6'd0)  timer_hi_latch <= timer[TS_W-1:32];
      if (reg_re && reg_raddr == 6'd16) rx_new <= rx_ts_valid;
      if (reg_we) begin
        unique case (reg_waddr)
          6'd2:  tload_lo <= reg_wdata;
          6'd3: begin
            timer_load     <= 1'b1;
            timer_load_val <= {reg_wdata[HI_W-1:0], tload_lo};
          end
          6'd4:  tx_ts[31:0]      <= reg_wdata;
          6'd5:  tx_ts[TS_W-1:32] <= reg_wdata[HI_W-1:0];
          6'd6:  frame_len        <= reg_wdata[BUF_AW:0];
          6'd7: begin
            tx_arm    <= reg_wdata[0];
            chp2_mode <= reg_wdata[1];
            if (reg_wdata[0]) tx_sent <= 1'b0;
          end
          6'd8: begin
            txb_ch   <= reg_wdata[17:16];
            txb_addr <= reg_wdata[BUF_AW-1:0];
          end
          6'd9: begin
            txb_we    <= 1'b1;
            txb_wdata <= reg_wdata;
          end
          6'd10: tr_lead    <= reg_wdata[15:0];
          6'd11: tr_tail    <= reg_wdata[15:0];
          6'd12: {lna_bypass, pa_bypass} <= reg_wdata[7:0];
          6'd13: det_thr    <= reg_wdata[15:0];
          6'd14: begin
            pre_we  <= 1'b1;
            pre_idx <= reg_wdata[14:8];
            pre_q   <= reg_wdata[3:2];
            pre_i   <= reg_wdata[1:0];
          end
          6'd18: rx_sw_en <= reg_wdata[0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (reg_raddr)
      6'd0:    reg_rdata = timer[31:0];
      6'd1:    reg_rdata = 32'(timer_hi_latch);
      6'd4:    reg_rdata = tx_ts[31:0];
      6'd5:    reg_rdata = 32'(tx_ts[TS_W-1:32]);
      6'd6:    reg_rdata = 32'(frame_len);
      6'd7:    reg_rdata = {27'b0, tx_sent, tx_late, tx_busy, chp2_mode, tx_armed};
      6'd8:    reg_rdata = {14'b0, txb_ch, txb_addr};
      6'd10:   reg_rdata = {16'b0, tr_lead};
      6'd11:   reg_rdata = {16'b0, tr_tail};
      6'd12:   reg_rdata = {24'b0, lna_bypass, pa_bypass};
      6'd13:   reg_rdata = {16'b0, det_thr};
      6'd15:   reg_rdata = rx_ts[31:0];
      6'd16:   reg_rdata = {rx_new, 21'b0, rx_ts[TS_W-1:32]};
      6'd17:   reg_rdata = {rx_overflows, rx_frames};
      6'd18:   reg_rdata = {31'b0, rx_sw_en};
      default: reg_rdata = 32'hDEAD_BEEF;
    endcase
  end

endmodule
