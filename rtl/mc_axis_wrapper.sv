// mc_axis_wrapper: bus interface of the massive correlator.
//
// The correlator moves far more data than register accesses can carry
// (400,000 reference samples, 16 x 4,007 input samples, 16 x 800 results),
// so data goes through AXI4-Stream to a DMA engine while AXI4-Lite keeps the
// control and status registers. Register map (32-bit words, byte offset =
// 4 x index):
//   0 CTRL      W: bit0 start a pass; bits[2:1] stream mode
//                  (0 off, 1 load reference bank, 2 load input waveforms,
//                  3 send results). Writing CTRL restarts the stream counter.
//               R: bits[2:1] mode
//   1 STATUS    R: bit0 busy, bit1 done (cleared by start)
//   2 LD_CORR   W/R: correlator whose input memory mode 2 fills
//   3 PEAK_SEL  W/R: correlator whose peak registers 4..7 show
//   4 PEAK_BIN  R: bin of the largest |g|^2
//   5..7        R: that |g|^2, 96 bits, least significant word first
//   8 CYCLES    R: clocks taken by the last pass
// Load stream (s_axis, 32 bits {Q,I}): in mode 1 beat k writes reference
// address k; in mode 2 it writes sample k of correlator LD_CORR; tlast
// returns the counter to 0. tready is low while a pass runs.
// Result stream (m_axis, 96 bits {Q,I} of 48 bits): in mode 3 every result,
// correlator by correlator, bin 0 first; tlast on the very last one.
// Following the design: AXI4-Lite for control, AXI4-Stream to the DMA,
// stream wrapper around the core's block memories. Own choices: the
// register map, the stream order and the cycle counter.
module mc_axis_wrapper #(
  parameter int N_CORR = 16,
  parameter int MC_LEN = 4000,
  parameter int N_FRAC = 100,
  parameter int N_LAG  = 8,
  localparam int DATA_W = 16,
  localparam int ACC_W  = 48
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // AXI4-Lite
  input  logic [7:0]           s_axil_awaddr,
  input  logic                 s_axil_awvalid,
  output logic                 s_axil_awready,
  input  logic [31:0]          s_axil_wdata,
  input  logic [3:0]           s_axil_wstrb,
  input  logic                 s_axil_wvalid,
  output logic                 s_axil_wready,
  output logic [1:0]           s_axil_bresp,
  output logic                 s_axil_bvalid,
  input  logic                 s_axil_bready,
  input  logic [7:0]           s_axil_araddr,
  input  logic                 s_axil_arvalid,
  output logic                 s_axil_arready,
  output logic [31:0]          s_axil_rdata,
  output logic [1:0]           s_axil_rresp,
  output logic                 s_axil_rvalid,
  input  logic                 s_axil_rready,
  // load stream
  input  logic [2*DATA_W-1:0]  s_axis_tdata,
  input  logic                 s_axis_tvalid,
  output logic                 s_axis_tready,
  input  logic                 s_axis_tlast,
  // result stream
  output logic [2*ACC_W-1:0]   m_axis_tdata,
  output logic                 m_axis_tvalid,
  input  logic                 m_axis_tready,
  output logic                 m_axis_tlast,
  output logic                 irq_done
);

  localparam int IN_LEN    = MC_LEN + N_LAG - 1;
  localparam int REF_DEPTH = N_FRAC * MC_LEN;
  localparam int N_BINS    = N_LAG * N_FRAC;
  localparam int RA_W      = $clog2(REF_DEPTH);
  localparam int IA_W      = $clog2(IN_LEN);
  localparam int BIN_W     = $clog2(N_BINS);
  localparam int CI_W      = (N_CORR > 1) ? $clog2(N_CORR) : 1;
  localparam int CNT_W     = RA_W + 1;

  // ---- registers ------------------------------------------------------
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

  logic [1:0]      mode;
  logic            start, busy, done, done_flag;
  logic [CI_W-1:0] ld_corr, peak_sel;
  logic [31:0]     cycles, cyc_cnt;
  logic [CNT_W-1:0] cnt;
  logic            ld_fire;

  logic [BIN_W-1:0]   peak_bin [N_CORR];
  logic [2*ACC_W-1:0] peak_mag [N_CORR];

  assign start = reg_we && reg_waddr == 6'd0 && reg_wdata[0] && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode      <= '0;
      ld_corr   <= '0;
      peak_sel  <= '0;
      done_flag <= 1'b0;
      cycles    <= '0;
      cyc_cnt   <= '0;
    end else begin
      if (reg_we) begin
        unique case (reg_waddr)
          6'd0: mode     <= reg_wdata[2:1];
          6'd2: ld_corr  <= CI_W'(reg_wdata);
          6'd3: peak_sel <= CI_W'(reg_wdata);
          default: ;
        endcase
      end
      if (start)      done_flag <= 1'b0;
      else if (done)  done_flag <= 1'b1;
      if (start)      cyc_cnt <= 32'd0;
      else if (busy)  cyc_cnt <= cyc_cnt + 1'b1;
      if (done)       cycles  <= cyc_cnt;
    end
  end

  always_comb begin
    logic [2*ACC_W-1:0] pm;
    pm = peak_mag[peak_sel];
    unique case (reg_raddr)
      6'd0:    reg_rdata = {29'b0, mode, 1'b0};
      6'd1:    reg_rdata = {30'b0, done_flag, busy};
      6'd2:    reg_rdata = 32'(ld_corr);
      6'd3:    reg_rdata = 32'(peak_sel);
      6'd4:    reg_rdata = 32'(peak_bin[peak_sel]);
      6'd5:    reg_rdata = pm[31:0];
      6'd6:    reg_rdata = pm[63:32];
      6'd7:    reg_rdata = pm[95:64];
      6'd8:    reg_rdata = cycles;
      default: reg_rdata = 32'hDEAD_BEEF;
    endcase
  end

  assign irq_done = done_flag;

  // ---- load stream ----------------------------------------------------
  assign s_axis_tready = !busy && (mode == 2'd1 || mode == 2'd2);
  assign ld_fire       = s_axis_tvalid && s_axis_tready;

  // ---- result stream --------------------------------------------------
  logic             rd_en, rd_valid, rd_last, rd_last_q;
  logic [CI_W-1:0]  rd_corr;
  logic [BIN_W-1:0] rd_bin;
  logic [2*ACC_W-1:0] rd_data;
  logic             sending;
  logic [2*ACC_W-1:0] q_data [2];
  logic             q_last [2];
  logic [1:0]       q_cnt, occ;
  logic             q_wptr, q_rptr, pop;

  localparam int TOTAL = N_CORR * N_BINS;

  assign sending = !busy && mode == 2'd3 && cnt < CNT_W'(TOTAL);
  assign pop     = m_axis_tvalid && m_axis_tready;
  assign rd_en   = sending && ((occ - 2'(pop)) < 2'd2);
  assign rd_last = (cnt == CNT_W'(TOTAL - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      rd_corr <= '0;
      rd_bin  <= '0;
    end else if (reg_we && reg_waddr == 6'd0) begin
      cnt     <= '0;
      rd_corr <= '0;
      rd_bin  <= '0;
    end else if (ld_fire) begin
      cnt <= s_axis_tlast ? '0 : cnt + 1'b1;
    end else if (rd_en) begin
      cnt <= cnt + 1'b1;
      if (rd_bin == BIN_W'(N_BINS - 1)) begin
        rd_bin  <= '0;
        rd_corr <= rd_corr + 1'b1;
      end else begin
        rd_bin <= rd_bin + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_cnt     <= '0;
      occ       <= '0;
      q_wptr    <= 1'b0;
      q_rptr    <= 1'b0;
      rd_last_q <= 1'b0;
      for (int k = 0; k < 2; k++) begin
        q_data[k] <= '0;
        q_last[k] <= 1'b0;
      end
    end else begin
      rd_last_q <= rd_en && rd_last;
      if (rd_valid) begin
        q_data[q_wptr] <= rd_data;
        q_last[q_wptr] <= rd_last_q;
        q_wptr         <= ~q_wptr;
      end
      if (pop) q_rptr <= ~q_rptr;
      q_cnt <= q_cnt + 2'(rd_valid) - 2'(pop);
      occ   <= occ + 2'(rd_en) - 2'(pop);
    end
  end

  assign m_axis_tvalid = (q_cnt != '0);
  assign m_axis_tdata  = q_data[q_rptr];
  assign m_axis_tlast  = q_last[q_rptr];

  // ---- core ------------------------------------------------------------
  massive_correlator #(
    .N_CORR(N_CORR), .MC_LEN(MC_LEN), .N_FRAC(N_FRAC), .N_LAG(N_LAG),
    .DATA_W(DATA_W), .ACC_W(ACC_W)
  ) u_core (
    .clk        (clk),
    .rst_n      (rst_n),
    .ld_data    (s_axis_tdata),
    .ld_ref_we  (ld_fire && mode == 2'd1),
    .ld_ref_addr(RA_W'(cnt)),
    .ld_in_we   (ld_fire && mode == 2'd2),
    .ld_in_corr (ld_corr),
    .ld_in_addr (IA_W'(cnt)),
    .start      (start),
    .busy       (busy),
    .done       (done),
    .rd_en      (rd_en),
    .rd_corr    (rd_corr),
    .rd_bin     (rd_bin),
    .rd_data    (rd_data),
    .rd_valid   (rd_valid),
    .peak_bin   (peak_bin),
    .peak_mag   (peak_mag)
  );

  assert property (@(posedge clk) disable iff (!rst_n)
    m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata));

endmodule
