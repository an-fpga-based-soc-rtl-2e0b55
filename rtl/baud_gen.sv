// baud_gen: UART baud-rate tick generator.
//
// A counter runs on every rising clock edge; when it reaches
// BAUD_PERIOD-1, with BAUD_PERIOD = CLOCK_FREQ / BAUD_RATE, the module
// raises `tick` for exactly one clock and the counter restarts at zero.
// The reset is asynchronous and clears the counter and the tick.
// Defaults (100 MHz clock, 9600 bit/s, so 10416 clocks per bit) and the
// behaviour follow the described design; the integer division that drops
// the fraction is this implementation's reading of "approximately 10,416".
//
// Timing: the first tick comes BAUD_PERIOD clocks after reset is released,
// then one every BAUD_PERIOD clocks.
module baud_gen #(
  parameter int unsigned CLOCK_FREQ = 100_000_000,
  parameter int unsigned BAUD_RATE  = 9600
) (
  input  logic clk,
  input  logic rst,    // asynchronous, active high
  output logic tick
);
  localparam int unsigned BAUD_PERIOD = CLOCK_FREQ / BAUD_RATE;
  localparam int unsigned CW = (BAUD_PERIOD > 1) ? $clog2(BAUD_PERIOD) : 1;

  logic [CW-1:0] count;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      count <= '0;
      tick  <= 1'b0;
    end else if (count == CW'(BAUD_PERIOD - 1)) begin
      count <= '0;
      tick  <= 1'b1;
    end else begin
      count <= count + 1'b1;
      tick  <= 1'b0;
    end
  end
endmodule
