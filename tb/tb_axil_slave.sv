// tb_axil_slave: checks the AXI4-Lite adapter with a register file modelled
// here behind its strobe interface. Writes present address and data in
// random order with random gaps and random bready delays; reads use random
// rready delays. Every write must produce exactly one reg_we with the right
// word address and data and an OKAY response; every read must return the
// modelled register through a stable R channel.
module tb_axil_slave;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [7:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic        reg_we, reg_re;
  logic [5:0]  reg_waddr, reg_raddr;
  logic [31:0] reg_wdata, reg_rdata;

  axil_slave dut (
    .clk(clk), .rst_n(rst_n), .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready), .s_axil_araddr(araddr),
    .s_axil_arvalid(arvalid), .s_axil_arready(arready), .s_axil_rdata(rdata), .s_axil_rresp(rresp),
    .s_axil_rvalid(rvalid), .s_axil_rready(rready), .reg_we(reg_we), .reg_waddr(reg_waddr),
    .reg_wdata(reg_wdata), .reg_re(reg_re), .reg_raddr(reg_raddr), .reg_rdata(reg_rdata));

  logic [31:0] regs [64];
  logic [31:0] shadow [64];
  int n_we = 0, n_wr = 0;

  assign reg_rdata = regs[reg_raddr];
  always @(posedge clk) if (rst_n && reg_we) begin
    regs[reg_waddr] <= reg_wdata;
    n_we++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic axi_write(input logic [7:0] a, input logic [31:0] d);
    bit aw_done, w_done;
    int aw_wait, w_wait;
    aw_done = 0; w_done = 0;
    aw_wait = $urandom_range(0, 3); w_wait = $urandom_range(0, 3);
    while (!(aw_done && w_done)) begin
      awvalid = !aw_done && aw_wait == 0; awaddr = a;
      wvalid  = !w_done && w_wait == 0;   wdata  = d; wstrb = 4'hF;
      #1;
      if (awvalid && awready) aw_done = 1;
      if (wvalid && wready) w_done = 1;
      if (aw_wait > 0) aw_wait--;
      if (w_wait > 0) w_wait--;
      @(posedge clk); #1;
    end
    awvalid = 0; wvalid = 0;
    repeat ($urandom_range(0, 3)) @(posedge clk);
    #1 bready = 1;
    while (!bvalid) begin @(posedge clk); #1; end
    check(bresp == 2'b00, "write response OKAY");
    @(posedge clk); #1 bready = 0;
  endtask

  task automatic axi_read(input logic [7:0] a, output logic [31:0] d);
    arvalid = 1; araddr = a;
    #1;
    while (!arready) begin @(posedge clk); #1; end
    @(posedge clk); #1 arvalid = 0;
    while (!rvalid) begin @(posedge clk); #1; end
    d = rdata;
    repeat ($urandom_range(0, 3)) begin
      @(posedge clk); #1;
      check(rvalid && rdata == d, "read data held until accepted");
    end
    rready = 1;
    @(posedge clk); #1 rready = 0;
    check(rresp == 2'b00, "read response OKAY");
  endtask

  initial begin
    logic [31:0] d;
    awaddr = 0; awvalid = 0; wdata = 0; wstrb = 0; wvalid = 0; bready = 0;
    araddr = 0; arvalid = 0; rready = 0;
    for (int k = 0; k < 64; k++) begin regs[k] = 32'(k * 3); shadow[k] = 32'(k * 3); end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      logic [5:0] w;
      w = 6'($urandom);
      if ($urandom_range(0, 1)) begin
        d = $urandom;
        axi_write({w, 2'b00}, d);
        shadow[w] = d;
        n_wr++;
      end else begin
        axi_read({w, 2'b00}, d);
        check(d == shadow[w], $sformatf("read reg %0d: %h want %h", w, d, shadow[w]));
      end
    end
    for (int w = 0; w < 64; w++) begin
      axi_read(8'(w * 4), d);
      check(d == shadow[w], $sformatf("final read reg %0d", w));
    end
    check(n_we == n_wr, $sformatf("%0d register strobes for %0d writes", n_we, n_wr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
