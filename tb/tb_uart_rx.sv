// tb_uart_rx: self-checking testbench of the UART receiver.
//
// The testbench makes its own baud tick (one clock every P = 20 clocks)
// and drives the rx line like a host transmitter whose bit edges fall
// half a period after a tick, so every tick samples mid-bit. It sends
// random bytes back to back and with gaps and checks rx_data and a single
// rx_done pulse per frame. It also sends a frame with a low stop bit (must
// not be reported) and a short low glitch that is gone before the next
// tick (must be rejected at the start-bit check), then a good frame.
module tb_uart_rx;
  localparam int P = 20;

  logic clk = 1'b0, rst = 1'b1, tick, rx;
  logic [7:0] rx_data;
  logic rx_done;
  int checks = 0, failures = 0;
  int tcnt;

  uart_rx dut (.clk, .rst, .baudrate_tick(tick), .rx, .rx_data, .rx_done);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst) tcnt <= 0; else tcnt <= (tcnt == P - 1) ? 0 : tcnt + 1;
  end
  assign tick = !rst && (tcnt == P - 1);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int dones;
  logic [7:0] last;
  always @(posedge clk) if (!rst && rx_done) begin dones++; last = rx_data; end

  task automatic align();
    @(negedge clk);
    while (!tick) @(negedge clk);
    repeat (P/2) @(negedge clk);
  endtask

  task automatic send(input logic [7:0] b, input logic stop);
    logic [9:0] frame;
    frame = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx = frame[i];
      repeat (P) @(negedge clk);
    end
    rx = 1'b1;
  endtask

  initial begin
    int d0;
    rx = 1'b1; dones = 0;
    repeat (3) @(negedge clk);
    check(!rx_done, "no done in reset");
    rst = 1'b0;
    align();
    for (int n = 0; n < 24; n++) begin
      logic [7:0] b;
      b = 8'($urandom);
      d0 = dones;
      send(b, 1'b1);
      repeat (3) @(negedge clk);
      check(dones == d0 + 1, "one rx_done per frame");
      check(last == b, $sformatf("sent %02x received %02x", b, last));
      if (n % 3 == 0) begin repeat (4*P) @(negedge clk); end
      repeat (P - 3) @(negedge clk);      // next frame stays tick-aligned
    end
    // framing error: stop bit low
    d0 = dones;
    send(8'hA5, 1'b0);
    repeat (3*P) @(negedge clk);
    check(dones == d0, "frame with low stop bit is not reported");
    // glitch: low for 3 clocks right after a tick
    align();
    repeat (P/2 - 1) @(negedge clk);
    repeat (2) @(negedge clk);
    rx = 1'b0; repeat (3) @(negedge clk); rx = 1'b1;
    repeat (12*P) @(negedge clk);
    check(dones == d0, "short glitch rejected at the start-bit check");
    align();
    send(8'h3C, 1'b1);
    repeat (3) @(negedge clk);
    check(dones == d0 + 1 && last == 8'h3C, "good frame after errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
