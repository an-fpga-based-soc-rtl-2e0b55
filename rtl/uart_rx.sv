// uart_rx: 8N1 UART receiver sampling on an external baud tick.
//
// Four-state FSM: IDLE, START_BIT, DATA_BITS, STOP_BIT. The rx pin first
// passes a two-flop synchronizer. In IDLE a low level starts a frame; in
// START_BIT the next `baudrate_tick` confirms the start bit (rx still low)
// or drops back to IDLE. In DATA_BITS one bit is shifted in, LSB first, on
// each tick until eight are collected. In STOP_BIT the next tick checks the
// stop level; if it is high, `rx_data` is updated and `rx_done` pulses for
// one clock. The FSM then returns to IDLE.
// The states and the once-per-bit tick sampling follow the described design.
// This implementation's choices: the synchronizer, and that a frame whose
// stop bit is low is dropped silently (no rx_done).
// Because the tick is not oversampled, each bit is sampled at the phase the
// free-running tick happens to have against the start edge; sender and
// receiver must use the same bit period.
module uart_rx (
  input  logic       clk,
  input  logic       rst,            // asynchronous, active high
  input  logic       baudrate_tick,
  input  logic       rx,
  output logic [7:0] rx_data,
  output logic       rx_done
);
  typedef enum logic [1:0] {IDLE, START_BIT, DATA_BITS, STOP_BIT} state_e;

  state_e     state;
  logic [1:0] sync;
  logic [7:0] shreg;
  logic [2:0] bit_cnt;
  logic       rx_s;

  assign rx_s = sync[1];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sync    <= 2'b11;
      state   <= IDLE;
      shreg   <= '0;
      bit_cnt <= '0;
      rx_data <= '0;
      rx_done <= 1'b0;
    end else begin
      sync    <= {sync[0], rx};
      rx_done <= 1'b0;
      unique case (state)
        IDLE: if (!rx_s) state <= START_BIT;
        START_BIT: if (baudrate_tick) begin
          state   <= rx_s ? IDLE : DATA_BITS;
          bit_cnt <= '0;
        end
        DATA_BITS: if (baudrate_tick) begin
          shreg <= {rx_s, shreg[7:1]};
          if (bit_cnt == 3'd7) state <= STOP_BIT;
          else bit_cnt <= bit_cnt + 1'b1;
        end
        STOP_BIT: if (baudrate_tick) begin
          state <= IDLE;
          if (rx_s) begin
            rx_data <= shreg;
            rx_done <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
