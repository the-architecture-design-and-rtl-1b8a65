// tb_massive_correlator: checks the correlator bank on a reduced size
// (3 correlators, 40-sample dot product, 5 fractional rows, 4 lags).
// Random reference rows and inputs are loaded; every one of the
// N_LAG*N_FRAC bins of every correlator is read back and compared with
//     g[r*N_FRAC + f] = sum_m z[m + r] * conj(ref_f[m])
// computed here, as are the peak bin and |g|^2. One input is a copy of
// reference row 3 delayed by 2 samples, so its peak must be bin 2*N_FRAC+3.
// The pass time must be N_FRAC*(MC_LEN + 2*N_LAG + 5) clocks. A second
// pass with new data checks that peaks restart.
module tb_massive_correlator;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  localparam int NC = 3, ML = 40, NF = 5, NL = 4;
  localparam int IL = ML + NL - 1, NB = NL * NF;

  logic [31:0] ld_data;
  logic        ld_ref_we, ld_in_we, start, busy, done, rd_en, rd_valid;
  logic [$clog2(NF*ML)-1:0] ld_ref_addr;
  logic [1:0]  ld_in_corr, rd_corr;
  logic [$clog2(IL)-1:0] ld_in_addr;
  logic [$clog2(NB)-1:0] rd_bin;
  logic [95:0] rd_data;
  logic [$clog2(NB)-1:0] peak_bin [NC];
  logic [95:0] peak_mag [NC];

  massive_correlator #(.N_CORR(NC), .MC_LEN(ML), .N_FRAC(NF), .N_LAG(NL)) dut (
    .clk(clk), .rst_n(rst_n), .ld_data(ld_data), .ld_ref_we(ld_ref_we), .ld_ref_addr(ld_ref_addr),
    .ld_in_we(ld_in_we), .ld_in_corr(ld_in_corr), .ld_in_addr(ld_in_addr), .start(start),
    .busy(busy), .done(done), .rd_en(rd_en), .rd_corr(rd_corr), .rd_bin(rd_bin), .rd_data(rd_data),
    .rd_valid(rd_valid), .peak_bin(peak_bin), .peak_mag(peak_mag));

  int ri [NF][ML], rq [NF][ML];
  int zi [NC][IL], zq [NC][IL];

  function automatic int rnd();
    return int'($urandom_range(0, 65535)) - 32768;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pass();
    int cyc;
    for (int f = 0; f < NF; f++)
      for (int m = 0; m < ML; m++) begin
        ri[f][m] = rnd(); rq[f][m] = rnd();
        ld_ref_we = 1; ld_ref_addr = ($bits(ld_ref_addr))'(f * ML + m);
        ld_data = {16'(rq[f][m]), 16'(ri[f][m])};
        @(posedge clk); #1;
      end
    ld_ref_we = 0;
    for (int c = 0; c < NC; c++)
      for (int j = 0; j < IL; j++) begin
        if (c == 1) begin
          // reference row 3 delayed by two samples, plus a little noise
          zi[c][j] = (j >= 2 && j - 2 < ML) ? ri[3][j-2] / 2 + int'($urandom_range(0, 200)) - 100 : 0;
          zq[c][j] = (j >= 2 && j - 2 < ML) ? rq[3][j-2] / 2 + int'($urandom_range(0, 200)) - 100 : 0;
        end else begin
          zi[c][j] = rnd(); zq[c][j] = rnd();
        end
        ld_in_we = 1; ld_in_corr = 2'(c); ld_in_addr = ($bits(ld_in_addr))'(j);
        ld_data = {16'(zq[c][j]), 16'(zi[c][j])};
        @(posedge clk); #1;
      end
    ld_in_we = 0;
    start = 1; @(posedge clk); #1; start = 0;
    cyc = 0;  // clocks from the edge that takes start to the edge that raises done
    check(busy, "busy after start");
    while (!done) begin @(posedge clk); #1; cyc++; end
    check(cyc == NF * (ML + 2*NL + 5), $sformatf("pass took %0d clocks, want %0d", cyc, NF * (ML + 2*NL + 5)));
    @(posedge clk); #1;
    check(!busy, "idle after done");
    for (int c = 0; c < NC; c++) begin
      logic signed [95:0] best, mg; int best_b; int bad;
      best = -1; best_b = 0; bad = 0;
      for (int f = 0; f < NF; f++)
        for (int r = 0; r < NL; r++) begin
          longint gi, gq; int b;
          gi = 0; gq = 0;
          for (int m = 0; m < ML; m++) begin
            gi += longint'(zi[c][m+r]) * ri[f][m] + longint'(zq[c][m+r]) * rq[f][m];
            gq += longint'(zq[c][m+r]) * ri[f][m] - longint'(zi[c][m+r]) * rq[f][m];
          end
          b = r * NF + f;
          rd_en = 1; rd_corr = 2'(c); rd_bin = ($bits(rd_bin))'(b);
          @(posedge clk); #1;
          rd_en = 0;
          if (!rd_valid || rd_data != {48'(gq), 48'(gi)}) bad++;
          mg = 96'(gi) * 96'(gi) + 96'(gq) * 96'(gq);
          if (mg > best) begin best = mg; best_b = b; end
        end
      check(bad == 0, $sformatf("correlator %0d: %0d bins differ", c, bad));
      check(peak_bin[c] == ($bits(rd_bin))'(best_b),
            $sformatf("correlator %0d: peak bin %0d, want %0d", c, peak_bin[c], best_b));
      if (c == 1) check(peak_bin[c] == ($bits(rd_bin))'(2 * NF + 3), "delayed copy found at lag 2, row 3");
      // read the peak bin again and compare its |g|^2 exactly
      rd_en = 1; rd_corr = 2'(c); rd_bin = peak_bin[c];
      @(posedge clk); #1;
      rd_en = 0;
      begin
        logic signed [47:0] pi, pq;
        logic [95:0] m2;
        pi = rd_data[47:0]; pq = rd_data[95:48];
        m2 = 96'(pi * pi) + 96'(pq * pq);
        check(peak_mag[c] == m2, $sformatf("correlator %0d: peak magnitude", c));
      end
    end
  endtask

  initial begin
    ld_data = 0; ld_ref_we = 0; ld_ref_addr = 0; ld_in_we = 0; ld_in_corr = 0; ld_in_addr = 0;
    start = 0; rd_en = 0; rd_corr = 0; rd_bin = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    pass();
    pass();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
