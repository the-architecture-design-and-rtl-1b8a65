// tb_frame_detector: checks the preamble detector against a reference model.
// A random +-1 preamble (128 symbols) is loaded into the taps. The input
// stream holds noise and several preamble copies at 4 samples per symbol:
// strong with a phase rotation, with a multipath echo, with gaps in
// z_valid, weak (below threshold), during enable low, and one with complex
// taps. The model here computes, for every accepted sample, the correlation
// over the symbol-spaced taps, the window energy and the threshold test,
// and runs the local-peak search, giving the exact list of detections
// (timestamp and |c|^2). The hardware list must match it, and for the
// clean copies the timestamp must lie on the first preamble sample
// (within the 4-sample symbol plateau; not with gaps, where det_ts is
// defined as peak time minus 508 clocks).
module tb_frame_detector;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  localparam int NT = 128, SPS = 4, DL = NT * SPS, PW = 16;
  localparam int NS = 9000;

  logic               z_valid, enable, pre_we, det;
  logic signed [15:0] z_i, z_q;
  logic [41:0]        timer, det_ts;
  logic [15:0]        thr;
  logic [6:0]         pre_idx;
  logic signed [1:0]  pre_i, pre_q;
  logic [63:0]        det_metric;

  frame_detector dut (.clk(clk), .rst_n(rst_n), .z_valid(z_valid), .z_i(z_i), .z_q(z_q),
                      .timer(timer), .enable(enable), .thr(thr), .pre_we(pre_we), .pre_idx(pre_idx),
                      .pre_i(pre_i), .pre_q(pre_q), .det(det), .det_ts(det_ts), .det_metric(det_metric));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) timer <= 42'd5000;
    else        timer <= timer + 1'b1;

  int          ti [NT], tq [NT];        // taps
  int          si [NS], sq [NS];        // samples
  bit          sen [NS];                // enable while the sample is processed
  logic [41:0] sts [NS];                // timer at acceptance
  int          starts [$];              // first sample of each clean copy
  longint      m_ts [$], h_ts [$];
  longint      m_mag [$], h_mag [$];

  int          n_acc = 0;

  always @(posedge clk)
    if (rst_n && det) begin
      h_ts.push_back(longint'(det_ts));
      h_mag.push_back(longint'(det_metric));
    end

  function automatic int noise(int a);
    return int'($urandom_range(0, 2 * a)) - a;
  endfunction

  // add a preamble copy starting at s0 with amplitude amp and rotation (cr, cs)/1
  task automatic add_pre(int s0, real amp, real ph);
    for (int k = 0; k < NT; k++)
      for (int s = 0; s < SPS; s++) begin
        real re, im;
        re = amp * (ti[k] * $cos(ph) - tq[k] * $sin(ph));
        im = amp * (ti[k] * $sin(ph) + tq[k] * $cos(ph));
        si[s0 + k*SPS + s] += $rtoi(re);
        sq[s0 + k*SPS + s] += $rtoi(im);
      end
  endtask

  task automatic model(input int thr_v);
    bit     trk;
    longint best;
    longint bts;
    int     cnt;
    int     ex;
    trk = 0; best = 0; bts = 0; cnt = 0;
    ex = 0;
    for (int i = 0; i < NT; i++) ex += (ti[i] != 0) + (tq[i] != 0);
    for (int n = 0; n < NS; n++) begin
      longint cr, cq, ez, mag;
      logic [127:0] lhs, rhs;
      bit above;
      cr = 0; cq = 0; ez = 0;
      for (int i = 0; i < NT; i++) begin
        int idx, a, b;
        idx = n - (NT - 1 - i) * SPS;
        a = idx >= 0 ? si[idx] : 0;
        b = idx >= 0 ? sq[idx] : 0;
        cr += a * ti[i] + b * tq[i];
        cq += b * ti[i] - a * tq[i];
        ez += longint'(a) * a + longint'(b) * b;
      end
      mag = cr * cr + cq * cq;
      lhs = 128'(mag) << 32;
      rhs = 128'(longint'(thr_v) * thr_v) * 128'(ez) * 128'(ex);
      above = (lhs >= rhs) && (mag != 0);
      if (!sen[n]) trk = 0;
      else if (!trk) begin
        if (above) begin trk = 1; best = mag; bts = longint'(sts[n]); cnt = 0; end
      end else begin
        if (above && mag > best) begin best = mag; bts = longint'(sts[n]); cnt = 0; end
        else if (cnt == 15) begin
          trk = 0;
          m_ts.push_back(longint'(42'(bts - (NT - 1) * SPS)));
          m_mag.push_back(best);
        end else cnt++;
      end
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    z_valid = 0; z_i = 0; z_q = 0; enable = 1; thr = 16'd39322;  // 0.6
    pre_we = 0; pre_idx = 0; pre_i = 0; pre_q = 0;
    for (int i = 0; i < NT; i++) begin ti[i] = $urandom_range(0, 1) ? 1 : -1; tq[i] = 0; end
    for (int n = 0; n < NS; n++) begin si[n] = noise(150); sq[n] = noise(150); sen[n] = 1; end
    add_pre(1000, 3000.0, 0.0);
    starts.push_back(1000);
    add_pre(2200, 2500.0, 2.1);               // rotated
    starts.push_back(2200);
    add_pre(3400, 3000.0, -0.7);              // with an echo 6 samples later
    add_pre(3406, 1500.0, 0.4);
    starts.push_back(3400);
    add_pre(4600, 3000.0, 1.0);               // accepted with gaps in z_valid
    for (int n = 5800; n < 6500; n++) begin si[n] += noise(2500); sq[n] += noise(2500); end
    add_pre(5850, 60.0, 0.0);                 // weak: below threshold
    add_pre(6800, 3000.0, 0.0);               // enable low
    for (int n = 6700; n < 7450; n++) sen[n] = 0;

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < NT; i++) begin
      pre_we = 1; pre_idx = 7'(i); pre_i = 2'(ti[i]); pre_q = 2'(tq[i]);
      @(posedge clk); #1;
    end
    pre_we = 0;
    for (int n = 0; n < NS; n++) begin
      if (n >= 4500 && n < 5300) while ($urandom_range(0, 2) == 0) begin
        z_valid = 0; @(posedge clk); #1;
      end
      // enable is applied with the sample; it is constant around every change
      enable = sen[n];
      z_valid = 1; z_i = 16'(si[n]); z_q = 16'(sq[n]);
      sts[n] = timer;
      @(posedge clk); #1;
    end
    z_valid = 0;
    repeat (40) @(posedge clk);
    model(39322);
    check(m_ts.size() == 4, $sformatf("model finds %0d preambles, expected 4", m_ts.size()));
    check(h_ts.size() == m_ts.size(), $sformatf("hardware %0d detections, model %0d", h_ts.size(), m_ts.size()));
    for (int k = 0; k < h_ts.size() && k < m_ts.size(); k++) begin
      check(h_ts[k] == m_ts[k] && h_mag[k] == m_mag[k],
            $sformatf("detection %0d: ts %0d mag %0d, model %0d %0d", k, h_ts[k], h_mag[k], m_ts[k], m_mag[k]));
      if (k < starts.size()) begin
        longint d;
        d = h_ts[k] - longint'(sts[starts[k]]);
        check(d >= 0 && d < SPS, $sformatf("detection %0d is %0d samples from the preamble start", k, d));
      end
    end
    // second pass: complex taps (QPSK-like), threshold 0.5
    h_ts.delete(); h_mag.delete(); m_ts.delete(); m_mag.delete();
    thr = 16'd32768;
    for (int i = 0; i < NT; i++) begin
      ti[i] = $urandom_range(0, 2) - 1; tq[i] = $urandom_range(0, 1) ? 1 : -1;
      pre_we = 1; pre_idx = 7'(i); pre_i = 2'(ti[i]); pre_q = 2'(tq[i]);
      @(posedge clk); #1;
    end
    pre_we = 0;
    for (int n = 0; n < NS; n++) begin si[n] = noise(300); sq[n] = noise(300); sen[n] = 1; end
    add_pre(700, 2000.0, 0.3);
    add_pre(3000, 1000.0, -2.5);
    for (int n = 0; n < NS; n++) begin
      z_valid = 1; z_i = 16'(si[n]); z_q = 16'(sq[n]); enable = 1;
      sts[n] = timer;
      @(posedge clk); #1;
    end
    z_valid = 0;
    repeat (40) @(posedge clk);
    model(32768);
    check(m_ts.size() == 2, $sformatf("model finds %0d complex preambles, expected 2", m_ts.size()));
    check(h_ts.size() == m_ts.size(), $sformatf("hardware %0d detections, model %0d", h_ts.size(), m_ts.size()));
    for (int k = 0; k < h_ts.size() && k < m_ts.size(); k++)
      check(h_ts[k] == m_ts[k] && h_mag[k] == m_mag[k], $sformatf("complex detection %0d differs", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
