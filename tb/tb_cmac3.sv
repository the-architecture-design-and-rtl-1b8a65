// tb_cmac3: checks the three-multiplier complex multiply-accumulate.
// Random operands (including full-scale corners) are fed with random enable
// gaps and periodic clears; a reference accumulator computes
// sum z * conj(x) with ordinary four-multiplier arithmetic and is compared
// with acc_i/acc_q 4 clocks after each operand.
module tb_cmac3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic en, clr;
  logic signed [15:0] z_i, z_q, x_i, x_q;
  logic signed [47:0] acc_i, acc_q;

  cmac3 dut (.clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .z_i(z_i), .z_q(z_q),
             .x_i(x_i), .x_q(x_q), .acc_i(acc_i), .acc_q(acc_q));

  longint ref_i, ref_q;
  longint pipe_i [5], pipe_q [5];
  bit     pipe_v [5];

  function automatic int rnd16();
    case ($urandom_range(0, 9))
      0: return 32767;
      1: return -32768;
      default: return int'($urandom_range(0, 65535)) - 32768;
    endcase
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; clr = 0; z_i = 0; z_q = 0; x_i = 0; x_q = 0;
    ref_i = 0; ref_q = 0;
    for (int k = 0; k < 5; k++) pipe_v[k] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    check(acc_i == 0 && acc_q == 0, "accumulator zero after reset");
    for (int n = 0; n < 20000; n++) begin
      int a, b, c, d;
      a = rnd16(); b = rnd16(); c = rnd16(); d = rnd16();
      en  = ($urandom_range(0, 4) != 0);
      clr = en && ($urandom_range(0, 99) == 0);
      z_i = 16'(a); z_q = 16'(b); x_i = 16'(c); x_q = 16'(d);
      if (en) begin
        if (clr) begin ref_i = 0; ref_q = 0; end
        // z * conj(x) = (a + jb)(c - jd)
        ref_i += longint'(a) * c + longint'(b) * d;
        ref_q += longint'(b) * c - longint'(a) * d;
      end
      // shift the expectation pipeline: value visible 4 clocks later
      for (int k = 4; k > 0; k--) begin
        pipe_i[k] = pipe_i[k-1]; pipe_q[k] = pipe_q[k-1]; pipe_v[k] = pipe_v[k-1];
      end
      pipe_i[0] = ref_i; pipe_q[0] = ref_q; pipe_v[0] = en;
      @(posedge clk); #1;
      if (pipe_v[3])
        check(acc_i == 48'(pipe_i[3]) && acc_q == 48'(pipe_q[3]),
              $sformatf("n=%0d acc %0d/%0d want %0d/%0d", n, acc_i, acc_q, pipe_i[3], pipe_q[3]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
