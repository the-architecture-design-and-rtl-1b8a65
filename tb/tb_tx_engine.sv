// tb_tx_engine: checks timed transmission.
//  - Fills the four channel buffers with random IQ, arms with a timestamp
//    in the future and checks that the first DAC sample appears exactly 6
//    clocks after timer == tx_ts, that frame_len + 64 valid samples follow
//    back to back, and that every sample equals a pulse-shaping model of
//    the buffer contents (history kept across frames, as in the hardware).
//  - Checks busy/armed/done, a second frame of different length, the
//    `late` flag for a timestamp in the past, and the DMA pass-through when
//    chp2_mode is 0.
module tb_tx_engine;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  localparam int AW = 10;
  logic [41:0]   timer, tx_ts;
  logic          buf_we, arm, chp2_mode, dma_valid, dac_valid, armed, busy, done, late;
  logic [1:0]    buf_ch;
  logic [AW-1:0] buf_addr;
  logic [31:0]   buf_wdata;
  logic [AW:0]   frame_len;
  logic [127:0]  dma_data, dac_data;

  tx_engine #(.BUF_AW(AW)) dut (
    .clk(clk), .rst_n(rst_n), .timer(timer), .buf_we(buf_we), .buf_ch(buf_ch), .buf_addr(buf_addr),
    .buf_wdata(buf_wdata), .tx_ts(tx_ts), .frame_len(frame_len), .arm(arm), .chp2_mode(chp2_mode),
    .dma_data(dma_data), .dma_valid(dma_valid), .dac_data(dac_data), .dac_valid(dac_valid),
    .armed(armed), .busy(busy), .done(done), .late(late));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) timer <= 42'd1000;
    else        timer <= timer + 1'b1;

  int bufv [4][2][1 << AW];   // [ch][i/q][addr]
  int hist [4][2][$];         // filter input history per channel and rail

  function automatic int fir_model(int ch, int r);
    longint acc = 0, v;
    int n;
    n = hist[ch][r].size();
    for (int k = 0; k < 65 && k < n; k++)
      acc += longint'(chp2_pkg::RC_COEF[k]) * hist[ch][r][n-1-k];
    v = (acc + 16384) >>> 15;
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return int'(v);
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill(input int len);
    for (int a = 0; a < len; a++)
      for (int ch = 0; ch < 4; ch++) begin
        bufv[ch][0][a] = int'($urandom_range(0, 40000)) - 20000;
        bufv[ch][1][a] = int'($urandom_range(0, 40000)) - 20000;
        buf_we = 1; buf_ch = 2'(ch); buf_addr = AW'(a);
        buf_wdata = {16'(bufv[ch][1][a]), 16'(bufv[ch][0][a])};
        @(posedge clk); #1;
      end
    buf_we = 0;
  endtask

  task automatic send(input int len, input int ahead);
    int n_out, bad;
    logic [41:0] t_first;
    frame_len = (AW+1)'(len);
    tx_ts = timer + 42'(ahead);
    arm = 1; @(posedge clk); #1; arm = 0;
    check(armed && !busy, "armed after arm pulse");
    while (!dac_valid) begin
      @(posedge clk); #1;
      check(!done, "no done before data");
    end
    t_first = timer;
    check(t_first == tx_ts + 42'd6, $sformatf("first sample at tx_ts+%0d, want +6", t_first - tx_ts));
    n_out = 0; bad = 0;
    while (dac_valid) begin
      for (int ch = 0; ch < 4; ch++)
        for (int r = 0; r < 2; r++) begin
          hist[ch][r].push_back(n_out < len ? bufv[ch][r][n_out] : 0);
          if (dac_data[ch*32 + r*16 +: 16] != 16'(fir_model(ch, r))) bad++;
        end
      n_out++;
      @(posedge clk); #1;
    end
    check(n_out == len + 64, $sformatf("%0d samples, want %0d", n_out, len + 64));
    check(bad == 0, $sformatf("%0d sample values differ from the model", bad));
    repeat (3) @(posedge clk); #1;
    check(!busy && !armed, "idle after frame");
  endtask

  int n_done = 0;
  always @(posedge clk) if (rst_n && done) n_done++;

  initial begin
    buf_we = 0; buf_ch = 0; buf_addr = 0; buf_wdata = 0; tx_ts = 0; frame_len = 0;
    arm = 0; chp2_mode = 1; dma_data = 0; dma_valid = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    fill(300);
    send(300, 100);
    check(n_done == 1, "done pulse after first frame");
    fill(17);
    send(17, 2000);
    check(n_done == 2, "done pulse after second frame");
    send(1, 10);
    // timestamp already passed: late, nothing sent
    frame_len = 20; tx_ts = timer - 42'd5;
    arm = 1; @(posedge clk); #1; arm = 0;
    repeat (4) @(posedge clk); #1;
    check(late && !armed && !busy, "late flag for a past timestamp");
    repeat (100) begin @(posedge clk); #1; check(!dac_valid, "nothing sent when late"); end
    // vendor DMA path
    chp2_mode = 0;
    for (int k = 0; k < 50; k++) begin
      dma_data = {$urandom, $urandom, $urandom, $urandom};
      dma_valid = 1'($urandom);
      #1;
      check(dac_data == dma_data && dac_valid == dma_valid, "DMA pass-through");
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
