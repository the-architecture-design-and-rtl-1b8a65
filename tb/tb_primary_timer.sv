// tb_primary_timer: checks that the primary timer counts one per clock from
// reset, loads a value and continues from it, and wraps to zero at 2^TS_W
// (a 6-bit instance is used for the wrap).
module tb_primary_timer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        load;
  logic [41:0] load_val, timer;
  logic [5:0]  small_timer;

  primary_timer dut (.clk(clk), .rst_n(rst_n), .load(load), .load_val(load_val), .timer(timer));
  primary_timer #(.TS_W(6)) dut6 (.clk(clk), .rst_n(rst_n), .load(1'b0), .load_val(6'd0), .timer(small_timer));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; load_val = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(timer == 0, "zero after reset");
    for (int n = 1; n <= 100; n++) begin
      @(posedge clk); #1;
      check(timer == 42'(n), $sformatf("count %0d got %0d", n, timer));
      check(small_timer == 6'(n), "6-bit timer counts and wraps");
    end
    load_val = 42'h3FF_FFFF_FFF0;  // near the top of the 42-bit range
    load = 1;
    @(posedge clk); #1 load = 0;
    check(timer == 42'h3FF_FFFF_FFF0, "loaded value");
    repeat (16) @(posedge clk);
    #1 check(timer == 0, "42-bit wrap to zero");
    @(posedge clk); #1 check(timer == 1, "continues after wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
