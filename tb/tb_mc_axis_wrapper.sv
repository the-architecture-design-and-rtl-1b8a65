// tb_mc_axis_wrapper: checks the correlator's bus wrapper on a reduced size
// (2 correlators, 16-sample dot product, 3 rows, 4 lags). The reference
// bank and both inputs are streamed in with random tvalid gaps, a pass is
// started and polled through STATUS, and the results are streamed out with
// random back-pressure. Every result beat is compared with a correlation
// computed here, tlast must mark only the last beat, PEAK_BIN/PEAK_MAG must
// match the streamed data, CYCLES must equal N_FRAC*(MC_LEN+2*N_LAG+5) and
// the interrupt must follow the done flag.
module tb_mc_axis_wrapper;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  localparam int NC = 2, ML = 16, NF = 3, NL = 4;
  localparam int IL = ML + NL - 1, NB = NL * NF;

  logic [7:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [1:0]  bresp, rresp;
  logic [31:0] s_tdata;
  logic        s_tvalid, s_tready, s_tlast;
  logic [95:0] m_tdata;
  logic        m_tvalid, m_tready, m_tlast, irq;

  mc_axis_wrapper #(.N_CORR(NC), .MC_LEN(ML), .N_FRAC(NF), .N_LAG(NL)) dut (
    .clk(clk), .rst_n(rst_n), .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(4'hF), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready), .s_axil_araddr(araddr),
    .s_axil_arvalid(arvalid), .s_axil_arready(arready), .s_axil_rdata(rdata), .s_axil_rresp(rresp),
    .s_axil_rvalid(rvalid), .s_axil_rready(rready), .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid),
    .s_axis_tready(s_tready), .s_axis_tlast(s_tlast), .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid),
    .m_axis_tready(m_tready), .m_axis_tlast(m_tlast), .irq_done(irq));

  int ri [NF][ML], rq [NF][ML];
  int zi [NC][IL], zq [NC][IL];

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic send(input logic [31:0] d, input bit last);
    while ($urandom_range(0, 3) == 0) begin s_tvalid = 0; @(posedge clk); #1; end
    s_tvalid = 1; s_tdata = d; s_tlast = last;
    #1;
    while (!s_tready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    s_tvalid = 0; s_tlast = 0;
  endtask

  function automatic int rnd();
    return int'($urandom_range(0, 65535)) - 32768;
  endfunction

  initial begin
    logic [31:0] d, st;
    int n_beat, bad, n_last;
    awaddr = 0; awvalid = 0; wdata = 0; wvalid = 0; bready = 0; araddr = 0; arvalid = 0; rready = 0;
    s_tdata = 0; s_tvalid = 0; s_tlast = 0; m_tready = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    check(!s_tready && !m_tvalid && !irq, "idle after reset");
    // reference bank
    wr(0, 32'(1 << 1));
    for (int f = 0; f < NF; f++)
      for (int m = 0; m < ML; m++) begin
        ri[f][m] = rnd(); rq[f][m] = rnd();
        send({16'(rq[f][m]), 16'(ri[f][m])}, f == NF - 1 && m == ML - 1);
      end
    // inputs
    for (int c = 0; c < NC; c++) begin
      wr(2, c);
      wr(0, 32'(2 << 1));
      for (int j = 0; j < IL; j++) begin
        zi[c][j] = rnd(); zq[c][j] = rnd();
        send({16'(zq[c][j]), 16'(zi[c][j])}, j == IL - 1);
      end
    end
    // pass
    wr(0, 32'h1);
    rd(1, st);
    check(st[0] == 1, "busy during the pass");
    check(!s_tready, "load stream closed during the pass");
    while (!st[1]) rd(1, st);
    check(irq, "interrupt with done");
    rd(8, d);
    check(d == NF * (ML + 2*NL + 5), $sformatf("CYCLES %0d, want %0d", d, NF * (ML + 2*NL + 5)));
    // results stream
    wr(0, 32'(3 << 1));
    n_beat = 0; bad = 0; n_last = 0;
    begin
      while (n_beat < NC * NB) begin
        m_tready = ($urandom_range(0, 2) != 0);
        #1;
        if (m_tvalid && m_tready) begin
          int c, b, r, f;
          longint gi, gq;
          c = n_beat / NB; b = n_beat % NB; r = b / NF; f = b % NF;
          gi = 0; gq = 0;
          for (int m = 0; m < ML; m++) begin
            gi += longint'(zi[c][m+r]) * ri[f][m] + longint'(zq[c][m+r]) * rq[f][m];
            gq += longint'(zq[c][m+r]) * ri[f][m] - longint'(zi[c][m+r]) * rq[f][m];
          end
          if (m_tdata != {48'(gq), 48'(gi)}) bad++;
          if (m_tlast) n_last++;
          if (m_tlast != (n_beat == NC * NB - 1)) bad++;
          n_beat++;
        end
        @(posedge clk); #1;
      end
      m_tready = 1;
      repeat (5) begin @(posedge clk); #1; check(!m_tvalid, "no extra beats"); end
      check(bad == 0, $sformatf("%0d result beats wrong", bad));
      check(n_last == 1, "one tlast");
    end
    // peak registers against a direct search
    for (int c = 0; c < NC; c++) begin
      longint gi, gq;
      logic signed [95:0] best, mg;
      int best_b;
      logic [31:0] w0, w1, w2;
      best = -1; best_b = 0;
      for (int f = 0; f < NF; f++)
        for (int r = 0; r < NL; r++) begin
          gi = 0; gq = 0;
          for (int m = 0; m < ML; m++) begin
            gi += longint'(zi[c][m+r]) * ri[f][m] + longint'(zq[c][m+r]) * rq[f][m];
            gq += longint'(zq[c][m+r]) * ri[f][m] - longint'(zi[c][m+r]) * rq[f][m];
          end
          mg = 96'(gi) * 96'(gi) + 96'(gq) * 96'(gq);
          if (mg > best) begin best = mg; best_b = r * NF + f; end
        end
      wr(3, c);
      rd(4, d);
      check(d == 32'(best_b), $sformatf("correlator %0d peak bin %0d want %0d", c, d, best_b));
      rd(5, w0); rd(6, w1); rd(7, w2);
      check({w2, w1, w0} == 96'(best), $sformatf("correlator %0d peak magnitude", c));
    end
    wr(0, 32'h1);
    rd(1, st);
    check(!st[1] && !irq, "start clears the done flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
