// uart_tx: 8N1 UART transmitter paced by an external baud tick.
//
// Four-state FSM: IDLE, START_BIT, DATA_BITS, STOP_BIT. In IDLE the line
// stays high. A one-cycle `tx_start` loads `tx_data` into a shift register;
// the frame then starts at the next `baudrate_tick` with the low start bit,
// followed by the eight data bits LSB first and the high stop bit, each held
// for one tick period. `tx_done` pulses for one clock when the stop bit has
// been sent, and the FSM is back in IDLE.
// The states, LSB-first order and tick pacing follow the described design.
// This implementation's choices: the start bit is aligned to a tick so that
// every bit lasts a full tick period, a start request is remembered until
// that tick, and tx_start while busy is ignored (`tx_busy` shows it).
module uart_tx (
  input  logic       clk,
  input  logic       rst,            // asynchronous, active high
  input  logic       baudrate_tick,
  input  logic [7:0] tx_data,
  input  logic       tx_start,
  output logic       tx,
  output logic       tx_done,
  output logic       tx_busy
);
  typedef enum logic [1:0] {IDLE, START_BIT, DATA_BITS, STOP_BIT} state_e;

  state_e     state;
  logic [7:0] shreg;
  logic [2:0] bit_cnt;
  logic       pending;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state   <= IDLE;
      shreg   <= '0;
      bit_cnt <= '0;
      pending <= 1'b0;
      tx      <= 1'b1;
      tx_done <= 1'b0;
    end else begin
      tx_done <= 1'b0;
      unique case (state)
        IDLE: begin
          tx <= 1'b1;
          if (tx_start && !pending) begin
            shreg   <= tx_data;
            pending <= 1'b1;
          end
          if (pending && baudrate_tick) begin
            pending <= 1'b0;
            state   <= START_BIT;
            tx      <= 1'b0;
          end
        end
        START_BIT: if (baudrate_tick) begin
          state   <= DATA_BITS;
          bit_cnt <= '0;
          tx      <= shreg[0];
          shreg   <= {1'b0, shreg[7:1]};
        end
        DATA_BITS: if (baudrate_tick) begin
          if (bit_cnt == 3'd7) begin
            state <= STOP_BIT;
            tx    <= 1'b1;
          end else begin
            bit_cnt <= bit_cnt + 1'b1;
            tx      <= shreg[0];
            shreg   <= {1'b0, shreg[7:1]};
          end
        end
        STOP_BIT: if (baudrate_tick) begin
          state   <= IDLE;
          tx_done <= 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign tx_busy = (state != IDLE) || pending;
endmodule
