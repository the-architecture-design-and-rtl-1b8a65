// tb_rc_fir: checks the pulse-shaping filter.
// 1. Its taps against a raised cosine (beta 0.25, 4 samples/symbol, 65 taps,
//    unity DC gain) computed here with real arithmetic, within 1 LSB.
// 2. Impulse response and random IQ streams (with gaps in in_valid) against
//    a bit-exact model using those taps, and the 5-clock latency.
// 3. Saturation on a full-scale square wave.
module tb_rc_fir;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic               in_valid, out_valid;
  logic signed [15:0] in_i, in_q, out_i, out_q;

  rc_fir dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_i(in_i), .in_q(in_q),
              .out_valid(out_valid), .out_i(out_i), .out_q(out_q));

  int h [65];
  int hist_i [$], hist_q [$];
  int exp_i [$], exp_q [$];
  int in_cycle [$];
  int cycle = 0;
  int latency_bad = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic int model(ref int hist[$]);
    longint acc = 0;
    longint r;
    for (int k = 0; k < 65; k++)
      if (k < hist.size()) acc += longint'(h[k]) * hist[hist.size()-1-k];
    r = (acc + 16384) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  task automatic push(input int vi, input int vq);
    in_valid = 1; in_i = 16'(vi); in_q = 16'(vq);
    hist_i.push_back(vi); hist_q.push_back(vq);
    exp_i.push_back(model(hist_i)); exp_q.push_back(model(hist_q));
    in_cycle.push_back(cycle);
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  // compare outputs
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int ei, eq, c0;
      if (exp_i.size() == 0) check(0, "unexpected output");
      else begin
        ei = exp_i.pop_front(); eq = exp_q.pop_front(); c0 = in_cycle.pop_front();
        check(out_i == 16'(ei) && out_q == 16'(eq),
              $sformatf("sample: got %0d/%0d want %0d/%0d", out_i, out_q, ei, eq));
        if (cycle - c0 != 5) latency_bad++;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real raw [65];
    real sum, t, b;
    b = 0.25;
    sum = 0.0;
    for (int n = -32; n <= 32; n++) begin
      t = n / 4.0;
      if (n == 0) raw[n+32] = 1.0;
      else if (n == 8 || n == -8)  // 2*beta*t = +-1
        raw[n+32] = (3.14159265358979/4.0) * $sin(3.14159265358979/(2.0*b)) / (3.14159265358979/(2.0*b));
      else
        raw[n+32] = $sin(3.14159265358979*t)/(3.14159265358979*t) * $cos(3.14159265358979*b*t)
                    / (1.0 - (2.0*b*t)**2);
      sum += raw[n+32];
    end
    for (int k = 0; k < 65; k++) begin
      int q;
      q = $rtoi(raw[k] / sum * 32768.0 + (raw[k] >= 0 ? 0.5 : -0.5));
      check((chp2_pkg::RC_COEF[k] - q) <= 1 && (q - chp2_pkg::RC_COEF[k]) <= 1,
            $sformatf("tap %0d: %0d vs raised cosine %0d", k, chp2_pkg::RC_COEF[k], q));
      h[k] = q;
    end
    // use exactly the taps whose values were just checked
    for (int k = 0; k < 65; k++) h[k] = chp2_pkg::RC_COEF[k];

    in_valid = 0; in_i = 0; in_q = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // impulse: output reproduces the taps
    push(32767, -32768);
    for (int k = 0; k < 70; k++) push(0, 0);
    // random stream with gaps
    for (int k = 0; k < 3000; k++) begin
      push($signed($urandom_range(0, 65535)) - 32768, $signed($urandom_range(0, 65535)) - 32768);
      if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
    end
    // full-scale square wave drives the overshoot into saturation
    for (int k = 0; k < 400; k++) push((k / 8) % 2 ? 32767 : -32768, (k / 8) % 2 ? -32768 : 32767);
    repeat (10) @(posedge clk);
    check(exp_i.size() == 0, "all samples came out");
    check(latency_bad == 0, $sformatf("latency not 5 clocks on %0d samples", latency_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
