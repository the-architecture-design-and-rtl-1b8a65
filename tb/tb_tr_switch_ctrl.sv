// tb_tr_switch_ctrl: checks the transmit/receive switching sequence.
// A local timer runs; the test arms a transmission at tx_ts, imitates the
// engine's busy window and checks that
//  - the switches, PAs and tx_mode turn on exactly `lead`-2 cycles before
//    tx_ts (decision 1 clock + registered outputs 1 clock) and stay on for
//    the whole busy window,
//  - they return to receive `tail`+3 cycles after busy falls,
//  - LNA enables follow receive mode and the bypass masks,
//  - a disarm without transmission returns straight to receive.
module tb_tr_switch_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [41:0] timer, tx_ts;
  logic        tx_armed, tx_busy;
  logic [15:0] lead, tail;
  logic [3:0]  pa_bypass, lna_bypass, trs_sw, pa_en, lna_en;
  logic        tx_mode, rx_enable;

  tr_switch_ctrl dut (.clk(clk), .rst_n(rst_n), .timer(timer), .tx_ts(tx_ts), .tx_armed(tx_armed),
                      .tx_busy(tx_busy), .lead(lead), .tail(tail), .pa_bypass(pa_bypass),
                      .lna_bypass(lna_bypass), .tx_mode(tx_mode), .trs_sw(trs_sw), .pa_en(pa_en),
                      .lna_en(lna_en), .rx_enable(rx_enable));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) timer <= 42'h3FF_FFFF_FF00;  // crosses the wrap during the test
    else        timer <= timer + 1'b1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_burst(input int ld, input int tl, input int len, input logic [3:0] pab,
                           input logic [3:0] lnab);
    logic [41:0] t_on, t_busy_end, t_off;
    lead = 16'(ld); tail = 16'(tl); pa_bypass = pab; lna_bypass = lnab;
    @(posedge clk); #1;
    check(!tx_mode && rx_enable && trs_sw == 0 && pa_en == 0 && lna_en == ~lnab,
          "idle receive state");
    tx_ts = timer + 42'(ld) + 42'd30;
    tx_armed = 1;
    t_on = 'x;
    // wait for tx_mode
    while (!tx_mode) begin
      @(posedge clk); #1;
    end
    t_on = timer;
    check(t_on == tx_ts - 42'(ld) + 42'd2, $sformatf("tx on at %0d, want tx_ts-lead+2", $signed(t_on - tx_ts)));
    check(trs_sw == 4'hF && pa_en == ~pab && lna_en == 0 && !rx_enable, "transmit outputs");
    // engine starts at tx_ts and is busy for len cycles
    while (timer != tx_ts) begin @(posedge clk); #1; check(tx_mode, "held before start"); end
    tx_armed = 0; tx_busy = 1;
    repeat (len) begin @(posedge clk); #1; check(tx_mode && pa_en == ~pab, "held while busy"); end
    tx_busy = 0;
    t_busy_end = timer;
    while (tx_mode) begin @(posedge clk); #1; end
    t_off = timer;
    check(t_off - t_busy_end == 42'(tl + 3), $sformatf("tail %0d, want %0d", t_off - t_busy_end, tl + 3));
    check(rx_enable && trs_sw == 0 && pa_en == 0 && lna_en == ~lnab, "back to receive");
  endtask

  initial begin
    tx_ts = '0; tx_armed = 0; tx_busy = 0; lead = 40; tail = 80; pa_bypass = 0; lna_bypass = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk);
    one_burst(40, 80, 200, 4'b0000, 4'b0000);
    one_burst(10, 0, 5, 4'b0101, 4'b1000);
    for (int k = 0; k < 6; k++)
      one_burst($urandom_range(3, 200), $urandom_range(0, 300), $urandom_range(1, 500),
                4'($urandom), 4'($urandom));
    // disarm before the engine starts: back to receive without a tail
    lead = 50; tx_ts = timer + 42'd60; tx_armed = 1;
    while (!tx_mode) begin @(posedge clk); #1; end
    tx_armed = 0;
    repeat (3) @(posedge clk); #1;
    check(!tx_mode && rx_enable, "disarm returns to receive");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
