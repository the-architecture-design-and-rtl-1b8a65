// axil_slave: AXI4-Lite slave to register-strobe adapter.
//
// The CHP2 IP cores are controlled by memory-mapped registers on the
// processor's low-power-domain AXI bus. This adapter terminates AXI4-Lite
// and presents a plain register interface:
//   write: reg_we pulses for one clock with reg_waddr (word address) and
//          reg_wdata once both the address and the data beat have arrived;
//          the write response (OKAY) follows on the next clock.
//   read:  reg_re pulses with reg_raddr; reg_rdata must be valid in that
//          same clock (combinational decode) and is returned on R next clock.
// One write and one read are handled at a time; byte strobes are ignored
// (all registers are 32-bit). The handshake rules are checked by assertions.
module axil_slave #(
  parameter int ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  input  logic [ADDR_W-1:0] s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  output logic              reg_we,
  output logic [ADDR_W-3:0] reg_waddr,
  output logic [31:0]       reg_wdata,
  output logic              reg_re,
  output logic [ADDR_W-3:0] reg_raddr,
  input  logic [31:0]       reg_rdata
);

  logic              aw_full, w_full;
  logic [ADDR_W-1:0] aw_q;
  logic [31:0]       w_q;
  logic              unused_strb;

  assign unused_strb    = ^s_axil_wstrb;
  assign s_axil_awready = !aw_full && !s_axil_bvalid;
  assign s_axil_wready  = !w_full && !s_axil_bvalid;
  assign s_axil_bresp   = 2'b00;
  assign s_axil_rresp   = 2'b00;

  assign reg_we    = aw_full && w_full && !s_axil_bvalid;
  assign reg_waddr = aw_q[ADDR_W-1:2];
  assign reg_wdata = w_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_full       <= 1'b0;
      w_full        <= 1'b0;
      aw_q          <= '0;
      w_q           <= '0;
      s_axil_bvalid <= 1'b0;
    end else begin
      if (s_axil_awvalid && s_axil_awready) begin
        aw_full <= 1'b1;
        aw_q    <= s_axil_awaddr;
      end
      if (s_axil_wvalid && s_axil_wready) begin
        w_full <= 1'b1;
        w_q    <= s_axil_wdata;
      end
      if (reg_we) begin
        aw_full       <= 1'b0;
        w_full        <= 1'b0;
        s_axil_bvalid <= 1'b1;
      end else if (s_axil_bvalid && s_axil_bready) begin
        s_axil_bvalid <= 1'b0;
      end
    end
  end

  assign s_axil_arready = !s_axil_rvalid;
  assign reg_re         = s_axil_arvalid && s_axil_arready;
  assign reg_raddr      = s_axil_araddr[ADDR_W-1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
    end else if (reg_re) begin
      s_axil_rvalid <= 1'b1;
      s_axil_rdata  <= reg_rdata;
    end else if (s_axil_rvalid && s_axil_rready) begin
      s_axil_rvalid <= 1'b0;
    end
  end

  // a response, once offered, stays until accepted
  assert property (@(posedge clk) disable iff (!rst_n)
    s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid);
  assert property (@(posedge clk) disable iff (!rst_n)
    s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata));

endmodule
