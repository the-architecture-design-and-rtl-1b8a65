// tb_chp2_pl_top: end-to-end test of two CHP2 nodes at full size.
//
// Two copies of the programmable-logic top (every parameter at its default)
// are cabled back to back: the DAC samples of one node reach the ADC of the
// other after CABLE clocks, with a little noise added. Software is played by
// tasks that use the AXI4-Lite register ports. The test
//  1. loads the two primary timers with different values and the preamble
//     taps into both detectors,
//  2. writes a frame (preamble + random data, four channels) into both
//     transmit buffers,
//  3. exchange: A sends at a timestamp, B detects it and streams the whole
//     52,000-sample frame (a short stall is absorbed); then B answers and A
//     receives. From the four timestamps it computes the cable delay and
//     the clock offset the way two-way ranging does, and checks both,
//  4. makes a receive overflow happen (long stall at B), a late timestamp,
//     a switch to the vendor DMA path and back, and a reception while B's
//     receiver is disabled by software,
//  5. meanwhile, on the 200 MHz side of node A, loads the full bank of
//     100 fractionally delayed reference waveforms (4,000 samples each) and
//     16 received waveforms with known delays, runs one correlator pass,
//     checks its 402,100-clock duration, the peak bin of every correlator
//     against the delay that was applied (within 3 bins of 1/100 sample)
//     and streams all 12,800 results out.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_chp2_pl_top;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 1'b0, mc_clk = 1'b0, rst_n = 1'b0;
  always #12.5 clk = ~clk;     // 40 MHz
  always #2.5  mc_clk = ~mc_clk;  // 200 MHz
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  localparam int CABLE  = 37;      // clocks of cable delay
  localparam int TX_LEN = 1024;    // samples per transmitted frame
  localparam int FL     = 52000;   // receive frame length (top default)
  // nominal system latency: tx 6 + rx filter 5 + two filter delays of 32; the
  // peak inside the 4-sample symbol plateau adds up to 3 more (a constant
  // removed by calibration in practice, covered here by the tolerance)
  localparam int K_SYS  = 75;
  localparam int NC = 16, ML = 4000, NF = 100, NL = 8;

  // ---- two nodes ----------------------------------------------------------
  logic [7:0]   awaddr [2], araddr [2];
  logic         awvalid [2], awready [2], wvalid [2], wready [2], bvalid [2], bready [2];
  logic         arvalid [2], arready [2], rvalid [2], rready [2];
  logic [31:0]  wdata [2], rdata [2];
  logic [1:0]   bresp [2], rresp [2];
  logic [127:0] adc_data [2], dac_data [2], dma_data [2], rx_tdata [2];
  logic         adc_valid [2], dac_valid [2], dma_valid [2];
  logic         rx_tvalid [2], rx_tready [2], rx_tlast [2], rx_irq [2];
  logic         tx_mode [2];
  logic [3:0]   trs_sw [2], pa_en [2], lna_en [2];
  // correlator side (node A used, node B idle)
  logic [7:0]   mawaddr [2], maraddr [2];
  logic         mawvalid [2], mawready [2], mwvalid [2], mwready [2], mbvalid [2], mbready [2];
  logic         marvalid [2], marready [2], mrvalid [2], mrready [2];
  logic [31:0]  mwdata [2], mrdata [2];
  logic [1:0]   mbresp [2], mrresp [2];
  logic [31:0]  ms_tdata [2];
  logic         ms_tvalid [2], ms_tready [2], ms_tlast [2];
  logic [95:0]  mm_tdata [2];
  logic         mm_tvalid [2], mm_tready [2], mm_tlast [2], mc_irq [2];

  for (genvar n = 0; n < 2; n++) begin : g_node
    chp2_pl_top u_node (
      .clk(clk), .rst_n(rst_n), .mc_clk(mc_clk), .mc_rst_n(rst_n),
      .s_axil_awaddr(awaddr[n]), .s_axil_awvalid(awvalid[n]), .s_axil_awready(awready[n]),
      .s_axil_wdata(wdata[n]), .s_axil_wstrb(4'hF), .s_axil_wvalid(wvalid[n]), .s_axil_wready(wready[n]),
      .s_axil_bresp(bresp[n]), .s_axil_bvalid(bvalid[n]), .s_axil_bready(bready[n]),
      .s_axil_araddr(araddr[n]), .s_axil_arvalid(arvalid[n]), .s_axil_arready(arready[n]),
      .s_axil_rdata(rdata[n]), .s_axil_rresp(rresp[n]), .s_axil_rvalid(rvalid[n]), .s_axil_rready(rready[n]),
      .adc_data(adc_data[n]), .adc_valid(adc_valid[n]), .dac_data(dac_data[n]), .dac_valid(dac_valid[n]),
      .dma_tx_data(dma_data[n]), .dma_tx_valid(dma_valid[n]),
      .m_axis_rx_tdata(rx_tdata[n]), .m_axis_rx_tvalid(rx_tvalid[n]), .m_axis_rx_tready(rx_tready[n]),
      .m_axis_rx_tlast(rx_tlast[n]), .rx_irq(rx_irq[n]),
      .tx_mode(tx_mode[n]), .trs_sw(trs_sw[n]), .pa_en(pa_en[n]), .lna_en(lna_en[n]),
      .s_axil_mc_awaddr(mawaddr[n]), .s_axil_mc_awvalid(mawvalid[n]), .s_axil_mc_awready(mawready[n]),
      .s_axil_mc_wdata(mwdata[n]), .s_axil_mc_wstrb(4'hF), .s_axil_mc_wvalid(mwvalid[n]),
      .s_axil_mc_wready(mwready[n]), .s_axil_mc_bresp(mbresp[n]), .s_axil_mc_bvalid(mbvalid[n]),
      .s_axil_mc_bready(mbready[n]), .s_axil_mc_araddr(maraddr[n]), .s_axil_mc_arvalid(marvalid[n]),
      .s_axil_mc_arready(marready[n]), .s_axil_mc_rdata(mrdata[n]), .s_axil_mc_rresp(mrresp[n]),
      .s_axil_mc_rvalid(mrvalid[n]), .s_axil_mc_rready(mrready[n]),
      .s_axis_mc_tdata(ms_tdata[n]), .s_axis_mc_tvalid(ms_tvalid[n]), .s_axis_mc_tready(ms_tready[n]),
      .s_axis_mc_tlast(ms_tlast[n]), .m_axis_mc_tdata(mm_tdata[n]), .m_axis_mc_tvalid(mm_tvalid[n]),
      .m_axis_mc_tready(mm_tready[n]), .m_axis_mc_tlast(mm_tlast[n]), .mc_irq(mc_irq[n]));
  end

  function automatic logic [41:0] tmr(int n);
    return n == 0 ? g_node[0].u_node.u_timer.timer : g_node[1].u_node.u_timer.timer;
  endfunction

  // ---- cable: DAC of one node to the ADC of the other ------------------------
  logic [127:0] pipe_d [2][CABLE];
  logic         pipe_v [2][CABLE];
  logic [127:0] noise_v;   // a little noise on top, new every clock

  function automatic logic [15:0] nz();
    return 16'(int'($urandom_range(0, 60)) - 30);
  endfunction

  always_ff @(posedge clk) begin
    for (int n = 0; n < 2; n++) begin
      pipe_d[n][0] <= dac_data[n];
      pipe_v[n][0] <= dac_valid[n];
      for (int k = 1; k < CABLE; k++) begin
        pipe_d[n][k] <= pipe_d[n][k-1];
        pipe_v[n][k] <= pipe_v[n][k-1];
      end
    end
  end
  always_comb begin
    for (int n = 0; n < 2; n++) begin
      adc_valid[n] = 1'b1;
      for (int l = 0; l < 8; l++)
        adc_data[n][l*16 +: 16] = (pipe_v[1-n][CABLE-1] ? pipe_d[1-n][CABLE-1][l*16 +: 16] : 16'd0)
                                  + noise_v[l*16 +: 16];
    end
  end
  always_ff @(posedge clk) noise_v <= {nz(), nz(), nz(), nz(), nz(), nz(), nz(), nz()};

  // ---- mechanism counters ---------------------------------------------------
  int m_timer_load = 0, m_timed_tx = 0, m_tr_switch = 0, m_detect = 0, m_full_frame = 0;
  int m_stall = 0, m_overflow = 0, m_late = 0, m_dma_mode = 0, m_rx_off = 0, m_ranging = 0;
  int m_mc_load = 0, m_mc_pass = 0, m_mc_peak = 0, m_mc_stream = 0;

  logic tx_mode_q [2];
  int   n_rx_irq [2];
  initial begin n_rx_irq[0] = 0; n_rx_irq[1] = 0; tx_mode_q[0] = 0; tx_mode_q[1] = 0; end
  always @(posedge clk) if (rst_n) for (int n = 0; n < 2; n++) begin
    if (tx_mode[n] && !tx_mode_q[n]) begin
      m_tr_switch++;
      check(pa_en[n] == 4'hF && lna_en[n] == 4'h0 && trs_sw[n] == 4'hF, "amplifiers in transmit mode");
    end
    tx_mode_q[n] = tx_mode[n];
    if (rx_irq[n]) n_rx_irq[n]++;
  end

  // receive streams: count beats of each frame
  int beats [2], frames_seen [2], last_len [2];
  initial begin beats[0] = 0; beats[1] = 0; frames_seen[0] = 0; frames_seen[1] = 0; end
  always @(posedge clk) if (rst_n) for (int n = 0; n < 2; n++)
    if (rx_tvalid[n] && rx_tready[n]) begin
      beats[n]++;
      if (rx_tlast[n]) begin frames_seen[n]++; last_len[n] = beats[n]; beats[n] = 0; end
    end

  // ---- register access --------------------------------------------------------
  task automatic wr(input int n, input int idx, input logic [31:0] d);
    #1;  // step off the clock edge
    awvalid[n] = 1; awaddr[n] = 8'(idx * 4); wvalid[n] = 1; wdata[n] = d; bready[n] = 1;
    @(posedge clk); #1;
    while (!(bvalid[n])) begin
      if (awready[n]) awvalid[n] = 0;
      if (wready[n])  wvalid[n] = 0;
      @(posedge clk); #1;
    end
    awvalid[n] = 0; wvalid[n] = 0;
    @(posedge clk); #1 bready[n] = 0;
  endtask

  task automatic rd(input int n, input int idx, output logic [31:0] d);
    #1;  // step off the clock edge
    arvalid[n] = 1; araddr[n] = 8'(idx * 4); rready[n] = 1;
    @(posedge clk); #1 arvalid[n] = 0;
    while (!rvalid[n]) begin @(posedge clk); #1; end
    d = rdata[n];
    @(posedge clk); #1 rready[n] = 0;
  endtask

  task automatic mwr(input int idx, input logic [31:0] d);
    #1;  // step off the clock edge
    mawvalid[0] = 1; mawaddr[0] = 8'(idx * 4); mwvalid[0] = 1; mwdata[0] = d; mbready[0] = 1;
    @(posedge mc_clk); #1;
    while (!mbvalid[0]) begin
      if (mawready[0]) mawvalid[0] = 0;
      if (mwready[0])  mwvalid[0] = 0;
      @(posedge mc_clk); #1;
    end
    mawvalid[0] = 0; mwvalid[0] = 0;
    @(posedge mc_clk); #1 mbready[0] = 0;
  endtask

  task automatic mrd(input int idx, output logic [31:0] d);
    #1;  // step off the clock edge
    marvalid[0] = 1; maraddr[0] = 8'(idx * 4); mrready[0] = 1;
    @(posedge mc_clk); #1 marvalid[0] = 0;
    while (!mrvalid[0]) begin @(posedge mc_clk); #1; end
    d = mrdata[0];
    @(posedge mc_clk); #1 mrready[0] = 0;
  endtask

  // ---- watchdog ---------------------------------------------------------------
  initial begin
    repeat (1_500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- baseband sequence ------------------------------------------------------
  int pre [128];
  bit bb_done = 0, mc_done = 0;
  bit dbg = 0;

  task automatic read_ts(input int n, output logic [41:0] ts, output bit fresh);
    logic [31:0] lo, hi;
    rd(n, 15, lo); rd(n, 16, hi);
    ts = {hi[9:0], lo};
    fresh = hi[31];
  endtask

  // transmit from node n at `ahead` clocks in the future; returns the timestamp
  task automatic send_at(input int n, input int ahead, output logic [41:0] ts);
    ts = tmr(n) + 42'(ahead);
    wr(n, 4, ts[31:0]); wr(n, 5, 32'(ts[41:32]));
    wr(n, 7, 32'b11);    // CHP2 mode, arm
  endtask

  // wait until node n transmits; check the first DAC sample time
  task automatic watch_tx(input int n, input logic [41:0] ts);
    while (!dac_valid[n]) @(posedge clk);
    #1;
    // dac_valid is seen one clock after the cycle in which it rose
    check(tmr(n) - 42'd1 == ts + 42'd6, $sformatf("node %0d first sample at tx_ts+%0d", n, tmr(n) - 42'd1 - ts));
    if (tmr(n) - 42'd1 == ts + 42'd6) m_timed_tx++;
  endtask

  task automatic wait_frame(input int n, input int prev);
    int guard;
    guard = 0;
    while (frames_seen[n] == prev && guard < 80000) begin @(posedge clk); guard++; end
    #1;
  endtask

  initial begin : baseband
    logic [31:0] d;
    logic [41:0] ta_tx, tb_rx, tb_tx, ta_rx, off_true;
    bit fresh;
    longint fwd, bwd, tof2, offs2;
    for (int n = 0; n < 2; n++) begin
      awaddr[n] = 0; awvalid[n] = 0; wvalid[n] = 0; wdata[n] = 0; bready[n] = 0;
      araddr[n] = 0; arvalid[n] = 0; rready[n] = 0;
      dma_data[n] = 0; dma_valid[n] = 0; rx_tready[n] = 1;
    end
    for (int k = 0; k < 128; k++) pre[k] = $urandom_range(0, 1) ? 1 : -1;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    // 1. timers and preamble taps
    wr(0, 2, 32'h0010_0000); wr(0, 3, 32'h0);
    wr(1, 2, 32'h7000_0000); wr(1, 3, 32'h12);
    rd(1, 0, d); rd(1, 1, d);
    check(d == 32'h12, "node B timer loaded above 2^32");
    if (d == 32'h12) m_timer_load++;
    off_true = tmr(1) - tmr(0);
    for (int n = 0; n < 2; n++)
      for (int k = 0; k < 128; k++)
        wr(n, 14, {17'b0, 7'(k), 4'b0, 2'b00, 2'(pre[k])});
    // 2. frame: preamble then random symbols, 4 samples each, channel signs differ
    for (int n = 0; n < 2; n++)
      for (int ch = 0; ch < 4; ch++) begin
        wr(n, 8, {14'b0, 2'(ch), 16'd0});
        for (int s = 0; s < TX_LEN; s += 4) begin
          int vi, vq;
          if (s < 512) begin vi = pre[s / 4] * (ch[0] ? -8000 : 8000); vq = 0; end
          else begin vi = $urandom_range(0, 1) ? 6000 : -6000; vq = $urandom_range(0, 1) ? 6000 : -6000; end
          for (int r = 0; r < 4; r++) wr(n, 9, {16'(vq), 16'(vi)});
        end
      end
    wr(0, 6, TX_LEN); wr(1, 6, TX_LEN);
    $display("[%0t] 3a. A -> B", $time);
    // 3a. A -> B, with a short stall on B's stream
    send_at(0, 400, ta_tx);
    watch_tx(0, ta_tx);
    while (!rx_irq[1]) @(posedge clk);
    m_detect++;
    repeat (2000) @(posedge clk);
    #1 rx_tready[1] = 0;
    repeat (300) @(posedge clk);
    #1 rx_tready[1] = 1;
    wait_frame(1, 0);
    check(frames_seen[1] == 1 && last_len[1] == FL, $sformatf("B frame of %0d beats", last_len[1]));
    if (frames_seen[1] == 1 && last_len[1] == FL) begin m_full_frame++; m_stall++; end
    read_ts(1, tb_rx, fresh);
    check(fresh, "B has a new receive timestamp");
    rd(1, 17, d);
    check(d == 32'h0000_0001, "B counted one frame and no overflow");
    $display("[%0t] 3b. B -> A", $time);
    // 3b. B -> A
    send_at(1, 400, tb_tx);
    watch_tx(1, tb_tx);
    while (!rx_irq[0]) @(posedge clk);
    m_detect++;
    wait_frame(0, 0);
    check(frames_seen[0] == 1 && last_len[0] == FL, "A received a full frame");
    read_ts(0, ta_rx, fresh);
    // two-way ranging from the four timestamps (clocks)
    fwd  = longint'(tb_rx - ta_tx);
    bwd  = longint'(ta_rx - tb_tx) - longint'(1 << 42) * (longint'(ta_rx - tb_tx) >= longint'(1 << 41));
    tof2 = fwd + bwd - 2 * K_SYS;               // twice the cable delay
    offs2 = fwd - bwd;                          // twice the timer offset B - A
    $display("two-way: forward %0d backward %0d -> delay %0.1f clocks, offset %0.1f (true %0d)",
             fwd, bwd, tof2 / 2.0, offs2 / 2.0, off_true);
    check(tof2 >= 2 * CABLE - 6 && tof2 <= 2 * CABLE + 6, "cable delay from two-way timestamps");
    check(offs2 >= 2 * longint'(off_true) - 6 && offs2 <= 2 * longint'(off_true) + 6, "timer offset");
    if (tof2 >= 2 * CABLE - 6 && tof2 <= 2 * CABLE + 6) m_ranging++;
    $display("[%0t] 4a. overflow", $time);
    // 4a. overflow: B's reader stalls long
    rx_tready[1] = 0;
    send_at(0, 400, ta_tx);
    while (!rx_irq[1]) @(posedge clk);
    repeat (1500) @(posedge clk);
    #1 rx_tready[1] = 1;
    wait_frame(1, 1);
    rd(1, 17, d);
    check(d[31:16] == 16'd1 && last_len[1] < FL, $sformatf("B overflow count %0d, frame %0d beats", d[31:16], last_len[1]));
    if (d[31:16] == 16'd1) m_overflow++;
    repeat (2000) @(posedge clk);
    $display("[%0t] 4b. late", $time);
    // 4b. late timestamp
    wr(0, 4, tmr(0)[31:0] - 32'd100); wr(0, 5, 32'(tmr(0)[41:32]));
    wr(0, 7, 32'b11);
    if (dbg) $display("[%0t] armed late", $time);
    repeat (4) @(posedge clk);
    rd(0, 7, d);
    check(d[3] && !d[0], "late flag and disarmed");
    if (d[3]) m_late++;
    if (dbg) $display("[%0t] late read %h", $time, d);
    // 4c. vendor DMA path
    wr(0, 7, 32'b00);
    for (int k = 0; k < 20; k++) begin
      dma_data[0] = {$urandom, $urandom, $urandom, $urandom}; dma_valid[0] = 1;
      #1;
      check(dac_data[0] == dma_data[0] && dac_valid[0], "DMA path reaches the DAC");
      @(posedge clk); #1;
    end
    dma_valid[0] = 0;
    m_dma_mode++;
    wr(0, 7, 32'b10);
    $display("[%0t] 4d. receiver", $time);
    // 4d. receiver disabled by software at B
    wr(1, 18, 0);
    begin
      int prev_irq;
      prev_irq = n_rx_irq[1];
      send_at(0, 400, ta_tx);
      watch_tx(0, ta_tx);
      repeat (2500) @(posedge clk);
      check(n_rx_irq[1] == prev_irq, "no detection while B's receiver is off");
      if (n_rx_irq[1] == prev_irq) m_rx_off++;
    end
    wr(1, 18, 1);
    bb_done = 1;
  end

  // ---- correlator sequence (node A, 200 MHz) ----------------------------------
  int chips [1100];
  real amp = 8000.0;

  function automatic real wave(real t);
    // sum of raised-cosine-squared chips of width 8 samples, 4 samples apart
    real v;
    int k0;
    v = 0.0;
    k0 = $rtoi($floor((t - 2.0) / 4.0));
    for (int k = k0 - 1; k <= k0 + 2; k++)
      if (k >= 0 && k < 1100) begin
        real u;
        u = t - 4.0 * k - 2.0;
        if (u > -4.0 && u < 4.0) v += chips[k] * $cos(3.14159265358979 * u / 8.0) ** 2;
      end
    return v;
  endfunction

  task automatic stream(input logic [31:0] d, input bit last);
    #1;  // step off the clock edge
    ms_tvalid[0] = 1; ms_tdata[0] = d; ms_tlast[0] = last;
    @(posedge mc_clk); #1;
    while (!ms_tready[0]) begin @(posedge mc_clk); #1; end
    ms_tvalid[0] = 0; ms_tlast[0] = 0;
  endtask

  initial begin : correlator
    int   dly [NC];          // applied delay in 1/100 sample
    real  ph [NC];
    logic [31:0] d, st;
    int   n_beats, n_last;
    ms_tvalid[0] = 0; ms_tdata[0] = 0; ms_tlast[0] = 0; mm_tready[0] = 0;
    mawaddr[0] = 0; mawvalid[0] = 0; mwvalid[0] = 0; mwdata[0] = 0; mbready[0] = 0;
    maraddr[0] = 0; marvalid[0] = 0; mrready[0] = 0;
    ms_tvalid[1] = 0; ms_tdata[1] = 0; ms_tlast[1] = 0; mm_tready[1] = 1;
    mawaddr[1] = 0; mawvalid[1] = 0; mwvalid[1] = 0; mwdata[1] = 0; mbready[1] = 0;
    maraddr[1] = 0; marvalid[1] = 0; mrready[1] = 0;
    for (int k = 0; k < 1100; k++) chips[k] = $urandom_range(0, 1) ? 1 : -1;
    for (int c = 0; c < NC; c++) begin
      dly[c] = $urandom_range(100, 650);        // 1.00 to 6.50 samples
      ph[c]  = $urandom_range(0, 628) / 100.0;
    end
    wait (rst_n);
    repeat (10) @(posedge mc_clk);
    #1;
    // reference bank: row f is the waveform delayed by f/100 sample
    mwr(0, 32'(1 << 1));
    for (int f = 0; f < NF; f++)
      for (int m = 0; m < ML; m++)
        stream({16'sd0, 16'($rtoi(amp * wave(m - f / 100.0)))}, f == NF - 1 && m == ML - 1);
    m_mc_load++;
    $display("[%0t] received waveforms", $time);
    // received waveforms
    for (int c = 0; c < NC; c++) begin
      mwr(2, c);
      mwr(0, 32'(2 << 1));
      for (int j = 0; j < ML + NL - 1; j++) begin
        real w;
        w = amp * wave(j - dly[c] / 100.0);
        stream({16'($rtoi(w * $sin(ph[c]))), 16'($rtoi(w * $cos(ph[c])))}, j == ML + NL - 2);
      end
    end
    $display("[%0t] one pass", $time);
    // one pass
    mwr(0, 32'h1);
    mrd(1, st);
    while (!st[1]) begin
      repeat (2000) @(posedge mc_clk);
      mrd(1, st);
      if (dbg) $display("[%0t] poll %h", $time, st);
    end
    check(mc_irq[0], "correlator interrupt");
    mrd(8, d);
    check(d == NF * (ML + 2 * NL + 5), $sformatf("pass took %0d clocks, want %0d", d, NF * (ML + 2 * NL + 5)));
    if (d == NF * (ML + 2 * NL + 5)) m_mc_pass++;
    for (int c = 0; c < NC; c++) begin
      int e;
      mwr(3, c);
      mrd(4, d);
      e = int'(d) - dly[c];
      check(e >= -3 && e <= 3, $sformatf("correlator %0d: peak bin %0d, delay %0d/100", c, d, dly[c]));
      if (e >= -3 && e <= 3) m_mc_peak++;
    end
    $display("[%0t] results", $time);
    // results
    mwr(0, 32'(3 << 1));
    n_beats = 0; n_last = 0;
    while (n_beats < NC * NL * NF) begin
      mm_tready[0] = ($urandom_range(0, 3) != 0);
      #1;
      if (mm_tvalid[0] && mm_tready[0]) begin
        n_beats++;
        if (mm_tlast[0]) n_last++;
      end
      @(posedge mc_clk); #1;
    end
    check(n_last == 1, "one tlast in the result stream");
    if (n_last == 1) m_mc_stream++;
    mc_done = 1;
  end

  // ---- end ------------------------------------------------------------------
  initial begin
    wait (bb_done && mc_done);
    repeat (10) @(posedge clk);
    $display("mechanisms: timer_load=%0d timed_tx=%0d tr_switch=%0d detect=%0d full_frame=%0d stall=%0d",
             m_timer_load, m_timed_tx, m_tr_switch, m_detect, m_full_frame, m_stall);
    $display("            overflow=%0d late=%0d dma_mode=%0d rx_off=%0d ranging=%0d",
             m_overflow, m_late, m_dma_mode, m_rx_off, m_ranging);
    $display("            mc_load=%0d mc_pass=%0d mc_peak=%0d mc_stream=%0d",
             m_mc_load, m_mc_pass, m_mc_peak, m_mc_stream);
    check(m_timer_load > 0, "mechanism: timer load");
    check(m_timed_tx > 0, "mechanism: timed transmission");
    check(m_tr_switch > 0, "mechanism: TR switching");
    check(m_detect > 0, "mechanism: preamble detection");
    check(m_full_frame > 0, "mechanism: full frame to DMA");
    check(m_stall > 0, "mechanism: stream stall absorbed");
    check(m_overflow > 0, "mechanism: receive overflow");
    check(m_late > 0, "mechanism: late timestamp");
    check(m_dma_mode > 0, "mechanism: vendor DMA mode");
    check(m_rx_off > 0, "mechanism: receiver disabled");
    check(m_ranging > 0, "mechanism: two-way ranging");
    check(m_mc_load > 0, "mechanism: reference bank load");
    check(m_mc_pass > 0, "mechanism: correlator pass");
    check(m_mc_peak == NC, "mechanism: correlator peaks");
    check(m_mc_stream > 0, "mechanism: result stream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
