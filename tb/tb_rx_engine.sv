// tb_rx_engine: checks frame acquisition end to end inside the receive
// engine. Four ADC channels carry noise, random data and copies of a known
// preamble (4 samples per symbol, channel-specific gain and sign). The test
// models the receive filters itself and checks that
//  - each preamble is detected once, with coarse_ts within 4 samples of the
//    filtered preamble start (filter group delay 32 + latency 5),
//  - every stream beat of all channels equals the modelled filter output
//    whose timer value is coarse_ts + beat index, FRAME_LEN beats, tlast on
//    the last one, data stable while tready is low,
//  - light back-pressure is absorbed, a long stall cuts the frame short and
//    counts an overflow, and no detection happens while enable is low.
module tb_rx_engine;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  localparam int FL = 1500;
  localparam int NS = 13000;

  logic [41:0]  timer, coarse_ts;
  logic [127:0] adc_data, m_axis_tdata;
  logic         adc_valid, enable, pre_we, m_axis_tvalid, m_axis_tready, m_axis_tlast;
  logic         ts_valid, capturing;
  logic [15:0]  thr, frames, overflows;
  logic [6:0]   pre_idx;
  logic signed [1:0] pre_i, pre_q;
  logic [63:0]  det_metric;

  rx_engine #(.FRAME_LEN(FL)) dut (
    .clk(clk), .rst_n(rst_n), .timer(timer), .adc_data(adc_data), .adc_valid(adc_valid),
    .enable(enable), .thr(thr), .pre_we(pre_we), .pre_idx(pre_idx), .pre_i(pre_i), .pre_q(pre_q),
    .m_axis_tdata(m_axis_tdata), .m_axis_tvalid(m_axis_tvalid), .m_axis_tready(m_axis_tready),
    .m_axis_tlast(m_axis_tlast), .coarse_ts(coarse_ts), .ts_valid(ts_valid), .det_metric(det_metric),
    .capturing(capturing), .frames(frames), .overflows(overflows));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) timer <= 42'd77;
    else        timer <= timer + 1'b1;

  int          x [4][2][NS];       // ADC samples [ch][i/q][n]
  int          y [4][2][NS];       // modelled filter output
  int          pre [128];
  logic [41:0] t0;                 // timer of ADC sample 0
  int          stall_mode = 0;     // 0 ready, 1 random, 2 long stall
  int          n_det = 0, n_beats = 0, bad_beats = 0, n_tlast = 0, unstable = 0;
  longint      ts_list [$];
  int          beats_per_frame [$];
  logic [127:0] held;
  bit           held_v = 0;

  task automatic add_pre(int s0);
    int g [4];
    g = '{3000, -2000, 1500, 2500};
    for (int k = 0; k < 128; k++)
      for (int s = 0; s < 4; s++)
        for (int ch = 0; ch < 4; ch++) x[ch][0][s0 + 4*k + s] += g[ch] * pre[k];
  endtask

  // collect the stream
  always @(posedge clk) if (rst_n) begin
    if (ts_valid) begin n_det++; ts_list.push_back(longint'(coarse_ts)); n_beats = 0; end
    if (held_v && !(m_axis_tvalid && m_axis_tdata == held)) unstable++;
    held_v = m_axis_tvalid && !m_axis_tready;
    held   = m_axis_tdata;
    if (m_axis_tvalid && m_axis_tready) begin
      longint idx;
      idx = longint'(ts_list[$] - t0) - 5 + n_beats;
      for (int ch = 0; ch < 4; ch++)
        for (int r = 0; r < 2; r++)
          if (idx < 0 || idx >= NS || m_axis_tdata[ch*32 + r*16 +: 16] != 16'(y[ch][r][idx])) bad_beats++;
      n_beats++;
      if (m_axis_tlast) begin n_tlast++; beats_per_frame.push_back(n_beats); end
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int starts [5];
    adc_valid = 0; adc_data = 0; enable = 1; thr = 16'd39322;
    pre_we = 0; pre_idx = 0; pre_i = 0; pre_q = 0; m_axis_tready = 1;
    for (int k = 0; k < 128; k++) pre[k] = $urandom_range(0, 1) ? 1 : -1;
    for (int n = 0; n < NS; n++)
      for (int ch = 0; ch < 4; ch++)
        for (int r = 0; r < 2; r++) x[ch][r][n] = int'($urandom_range(0, 300)) - 150;
    starts = '{1000, 3600, 6500, 8500, 10300};
    foreach (starts[k]) begin
      add_pre(starts[k]);
      // payload after the preamble
      for (int n = starts[k] + 512; n < starts[k] + 1500; n++)
        for (int ch = 0; ch < 4; ch++)
          for (int r = 0; r < 2; r++) x[ch][r][n] += int'($urandom_range(0, 8000)) - 4000;
    end
    // receive filter model
    for (int ch = 0; ch < 4; ch++)
      for (int r = 0; r < 2; r++)
        for (int n = 0; n < NS; n++) begin
          longint acc, v;
          acc = 0;
          for (int k = 0; k < 65; k++) if (n - k >= 0) acc += longint'(chp2_pkg::RC_COEF[k]) * x[ch][r][n-k];
          v = (acc + 16384) >>> 15;
          y[ch][r][n] = v > 32767 ? 32767 : (v < -32768 ? -32768 : int'(v));
        end

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 128; i++) begin
      pre_we = 1; pre_idx = 7'(i); pre_i = 2'(pre[i]); pre_q = 0;
      @(posedge clk); #1;
    end
    pre_we = 0;
    t0 = timer;
    for (int n = 0; n < NS; n++) begin
      adc_valid = 1;
      for (int ch = 0; ch < 4; ch++) adc_data[ch*32 +: 32] = {16'(x[ch][1][n]), 16'(x[ch][0][n])};
      // stream readiness: frame 2 random, frame 3 long stall
      if (n >= 3600 && n < 6300) m_axis_tready = ($urandom_range(0, 9) != 0);
      else if (n >= 6500 && n < 8000) m_axis_tready = 0;
      else m_axis_tready = 1;
      enable = !(n >= 8300 && n < 9400);
      @(posedge clk); #1;
    end
    adc_valid = 0;
    m_axis_tready = 1;
    repeat (100) @(posedge clk);

    check(n_det == 4, $sformatf("%0d detections, want 4 (one suppressed by enable)", n_det));
    for (int k = 0; k < ts_list.size() && k < 4; k++) begin
      longint d;
      int s;
      s = k < 3 ? starts[k] : starts[4];
      d = ts_list[k] - longint'(t0 + 42'(s + 37));
      check(d >= -4 && d <= 4, $sformatf("frame %0d: coarse_ts off by %0d", k, d));
    end
    check(bad_beats == 0, $sformatf("%0d beats differ from the filter model", bad_beats));
    check(unstable == 0, "stream data changed while stalled");
    check(n_tlast == 4, $sformatf("%0d frames ended with tlast", n_tlast));
    check(beats_per_frame.size() == 4 && beats_per_frame[0] == FL && beats_per_frame[1] == FL
          && beats_per_frame[3] == FL, "full frames have FRAME_LEN beats");
    check(beats_per_frame.size() == 4 && beats_per_frame[2] < FL, "stalled frame cut short");
    check(frames == 3 && overflows == 1, $sformatf("frames %0d overflows %0d", frames, overflows));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
