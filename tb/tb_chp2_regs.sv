// tb_chp2_regs: checks the baseband register block through its AXI4-Lite
// port: reset values, the 42-bit timer read (low word latches the high
// part) and load, the transmit timestamp, frame length, arm pulse and mode,
// the transmit buffer port with auto-incrementing address, the TR and
// amplifier settings, threshold and preamble taps, and the receive
// timestamp with its "new" flag and frame counters.
module tb_chp2_regs;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [7:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [1:0]  bresp, rresp;
  logic [41:0] timer, timer_load_val, tx_ts, rx_ts;
  logic        timer_load, txb_we, tx_arm, chp2_mode, tx_armed, tx_busy, tx_done, tx_late;
  logic [1:0]  txb_ch;
  logic [15:0] txb_addr, tr_lead, tr_tail, det_thr, rx_frames, rx_overflows;
  logic [31:0] txb_wdata;
  logic [16:0] frame_len;
  logic [3:0]  pa_bypass, lna_bypass;
  logic        pre_we, rx_sw_en, rx_ts_valid;
  logic [6:0]  pre_idx;
  logic signed [1:0] pre_i, pre_q;

  chp2_regs dut (
    .clk(clk), .rst_n(rst_n), .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(4'hF), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready), .s_axil_araddr(araddr),
    .s_axil_arvalid(arvalid), .s_axil_arready(arready), .s_axil_rdata(rdata), .s_axil_rresp(rresp),
    .s_axil_rvalid(rvalid), .s_axil_rready(rready), .timer(timer), .timer_load(timer_load),
    .timer_load_val(timer_load_val), .txb_we(txb_we), .txb_ch(txb_ch), .txb_addr(txb_addr),
    .txb_wdata(txb_wdata), .tx_ts(tx_ts), .frame_len(frame_len), .tx_arm(tx_arm), .chp2_mode(chp2_mode),
    .tx_armed(tx_armed), .tx_busy(tx_busy), .tx_done(tx_done), .tx_late(tx_late), .tr_lead(tr_lead),
    .tr_tail(tr_tail), .pa_bypass(pa_bypass), .lna_bypass(lna_bypass), .det_thr(det_thr),
    .pre_we(pre_we), .pre_idx(pre_idx), .pre_i(pre_i), .pre_q(pre_q), .rx_sw_en(rx_sw_en),
    .rx_ts(rx_ts), .rx_ts_valid(rx_ts_valid), .rx_frames(rx_frames), .rx_overflows(rx_overflows));

  // a timer that honours the load strobe
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)          timer <= 42'h0FF_FFFF_FFF0;
    else if (timer_load) timer <= timer_load_val;
    else                 timer <= timer + 1'b1;

  // record strobes
  int n_arm = 0, n_pre = 0;
  logic [31:0] bufw [4][16];
  always @(posedge clk) if (rst_n) begin
    if (tx_arm) n_arm++;
    if (pre_we) begin
      n_pre++;
      check(pre_idx == 7'd93 && pre_i == -2'sd1 && pre_q == 2'sd1, "preamble tap strobe fields");
    end
    if (txb_we && txb_addr < 16) bufw[txb_ch][txb_addr[3:0]] = txb_wdata;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int idx, input logic [31:0] d);
    awvalid = 1; awaddr = 8'(idx * 4); wvalid = 1; wdata = d;
    #1;
    while (!(awready && wready)) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    awvalid = 0; wvalid = 0; bready = 1;
    while (!bvalid) begin @(posedge clk); #1; end
    @(posedge clk); #1 bready = 0;
  endtask

  task automatic rd(input int idx, output logic [31:0] d);
    arvalid = 1; araddr = 8'(idx * 4);
    #1;
    while (!arready) begin @(posedge clk); #1; end
    @(posedge clk); #1 arvalid = 0;
    while (!rvalid) begin @(posedge clk); #1; end
    d = rdata; rready = 1;
    @(posedge clk); #1 rready = 0;
  endtask

  initial begin
    logic [31:0] d, lo, hi;
    logic [41:0] t_before;
    awaddr = 0; awvalid = 0; wdata = 0; wvalid = 0; bready = 0; araddr = 0; arvalid = 0; rready = 0;
    tx_armed = 0; tx_busy = 0; tx_done = 0; tx_late = 0;
    rx_ts = 42'h2AB_1234_5678; rx_ts_valid = 0; rx_frames = 16'd7; rx_overflows = 16'd2;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // reset values
    check(chp2_mode && rx_sw_en && tr_lead == 40 && tr_tail == 80 && det_thr == 39322,
          "reset values");
    rd(10, d); check(d == 40, "TR_LEAD reads back its reset value");
    // timer: low word read latches the high part (counter crosses 2^32 * 0xFF...)
    t_before = timer;
    rd(0, lo); rd(1, hi);
    check({hi[9:0], lo} >= t_before && {hi[9:0], lo} < t_before + 42'd20, "42-bit timer read");
    // load
    wr(2, 32'hDEAD_0000); wr(3, 32'h155);
    rd(0, lo); rd(1, hi);
    check({hi[9:0], lo} >= 42'h155_DEAD_0000 && {hi[9:0], lo} < 42'h155_DEAD_0020, "timer load");
    // tx timestamp, frame length
    wr(4, 32'h8765_4321); wr(5, 32'h3A5);
    check(tx_ts == 42'h3A5_8765_4321, "tx_ts output");
    rd(5, d); check(d == 32'h3A5, "TX_TS_HI read");
    wr(6, 32'd52000); check(frame_len == 17'd52000, "frame_len");
    // arm and mode
    wr(7, 32'b01); check(n_arm == 1 && chp2_mode == 0, "arm pulse, DMA mode");
    wr(7, 32'b10); check(n_arm == 1 && chp2_mode == 1, "mode without arm");
    tx_armed = 1; tx_busy = 1; tx_late = 0;
    rd(7, d); check(d[4:0] == 5'b00111, "TX_CTRL status while busy");
    tx_armed = 0; tx_busy = 0;
    tx_done = 1; @(posedge clk); #1 tx_done = 0;
    rd(7, d); check(d[4] == 1'b1, "sent flag after done");
    wr(7, 32'b11); rd(7, d); check(d[4] == 1'b0 && n_arm == 2, "arm clears sent flag");
    tx_late = 1; rd(7, d); check(d[3], "late flag"); tx_late = 0;
    // buffer port: channel 2, start at 5, three samples
    wr(8, {14'b0, 2'd2, 16'd5});
    wr(9, 32'h1111_0001); wr(9, 32'h2222_0002); wr(9, 32'h3333_0003);
    check(bufw[2][5] == 32'h1111_0001 && bufw[2][6] == 32'h2222_0002 && bufw[2][7] == 32'h3333_0003,
          "buffer writes with auto-increment");
    rd(8, d); check(d == {14'b0, 2'd2, 16'd8}, "TXB_ADDR advanced");
    // TR and amplifiers
    wr(10, 32'd123); wr(11, 32'd456); wr(12, 32'hA5);
    check(tr_lead == 123 && tr_tail == 456 && pa_bypass == 4'h5 && lna_bypass == 4'hA, "TR settings");
    // detection
    wr(13, 32'd45000); check(det_thr == 45000, "threshold");
    wr(14, {17'b0, 7'd93, 4'b0, 2'b01, 2'b11});
    check(n_pre == 1, "one preamble tap strobe");
    // receive timestamp
    rd(16, d); check(d[31] == 0, "no new timestamp yet");
    rx_ts_valid = 1; @(posedge clk); #1 rx_ts_valid = 0;
    rd(15, lo); rd(16, hi);
    check(hi[31] && {hi[9:0], lo} == 42'h2AB_1234_5678, "receive timestamp and new flag");
    rd(16, hi); check(!hi[31], "new flag cleared by read");
    rd(17, d); check(d == {16'd2, 16'd7}, "frame counters");
    wr(18, 0); check(!rx_sw_en, "receive disable");
    rd(18, d); check(d == 0, "RX_CTRL read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
