// tr_switch_ctrl: transmit/receive switching controller for the TR board.
//
// The node is time-division duplex: it receives most of the time and
// transmits one frame per cycle at a timestamp chosen by software. This
// controller watches the primary timer and the transmission timestamp
// programmed in the Tx engine and moves the RF front end into transmit mode
// `lead` clock cycles before that timestamp, so the switches and power
// amplifiers settle before the first sample. It stays in transmit while the
// Tx engine is busy, then `tail` more cycles, and returns to receive.
//
// States: RX -> TX (timer reached tx_ts - lead while the Tx engine is armed)
//         TX -> TAIL (Tx engine finished) or RX (engine disarmed without
//               sending, e.g. a late timestamp)
//         TAIL -> RX after `tail` cycles.
// Outputs are registered: trs_sw is the per-antenna switch (1 = transmit),
// pa_en / lna_en enable the amplifiers of the active direction unless
// bypassed, rx_enable lets the Rx engine search for frames.
// Following the design: switching ahead of the tx time and back after the
// transmission. Own choices: lead/tail in cycles, the tail state, the
// bypass bits and the plain enable pins towards the board.
module tr_switch_ctrl #(
  parameter int TS_W = 42,
  parameter int N_CH = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TS_W-1:0] timer,
  input  logic [TS_W-1:0] tx_ts,
  input  logic            tx_armed,
  input  logic            tx_busy,
  input  logic [15:0]     lead,
  input  logic [15:0]     tail,
  input  logic [N_CH-1:0] pa_bypass,
  input  logic [N_CH-1:0] lna_bypass,
  output logic            tx_mode,
  output logic [N_CH-1:0] trs_sw,
  output logic [N_CH-1:0] pa_en,
  output logic [N_CH-1:0] lna_en,
  output logic            rx_enable
);

  typedef enum logic [1:0] {S_RX, S_TX, S_TAIL} state_t;
  state_t      state;
  logic [15:0] cnt;
  logic        seen_busy;
  logic [TS_W-1:0] diff;

  assign diff = tx_ts - timer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_RX;
      cnt       <= '0;
      seen_busy <= 1'b0;
    end else begin
      unique case (state)
        S_RX: begin
          seen_busy <= 1'b0;
          if (tx_armed && diff <= TS_W'(lead)) state <= S_TX;
        end
        S_TX: begin
          if (tx_busy) seen_busy <= 1'b1;
          if (seen_busy && !tx_busy) begin
            state <= S_TAIL;
            cnt   <= '0;
          end else if (!seen_busy && !tx_busy && !tx_armed) begin
            state <= S_RX;
          end
        end
        S_TAIL: begin
          if (cnt >= tail) state <= S_RX;
          else             cnt <= cnt + 1'b1;
        end
        default: state <= S_RX;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_mode   <= 1'b0;
      trs_sw    <= '0;
      pa_en     <= '0;
      lna_en    <= '0;
      rx_enable <= 1'b0;
    end else begin
      tx_mode   <= (state != S_RX);
      trs_sw    <= {N_CH{state != S_RX}};
      pa_en     <= (state != S_RX) ? ~pa_bypass : '0;
      lna_en    <= (state == S_RX) ? ~lna_bypass : '0;
      rx_enable <= (state == S_RX);
    end
  end

endmodule
