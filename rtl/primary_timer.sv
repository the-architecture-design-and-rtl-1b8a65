// primary_timer: the CHP2 primary timer.
//
// A free-running counter clocked by the 40 MHz primary clock (the OCXO-derived
// sample clock). Every timestamp in the node - transmission time, coarse
// receive time, TR switching - is a value of this counter, so one count is
// 25 ns. With the default 42 bits it runs about 30.5 hours before wrapping to
// zero, which is the integer-timestamp width used in the frame payload.
//
// Interface: `load` (one cycle) writes `load_val`; the counter continues from
// that value on the next cycle. `timer` is registered.
// Following the design: width, clock and role. Own choice: the load port,
// which lets software restart or align the timer.
module primary_timer #(
  parameter int TS_W = 42
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [TS_W-1:0] load_val,
  output logic [TS_W-1:0] timer
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     timer <= '0;
    else if (load)  timer <= load_val;
    else            timer <= timer + 1'b1;
  end

endmodule
