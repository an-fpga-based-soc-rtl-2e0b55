// tb_uart_tx: self-checking testbench of the UART transmitter.
//
// The testbench makes its own baud tick (one clock every P = 20 clocks),
// requests random bytes with one-cycle tx_start pulses at random moments
// and decodes the tx line like a host receiver: it finds the falling edge
// of the start bit and samples the middle of each bit. It checks the idle
// level, the start, data (LSB first) and stop bits, that every bit lasts
// exactly P clocks, and that tx_done pulses once, 10*P clocks after the
// start edge.
module tb_uart_tx;
  localparam int P = 20;

  logic clk = 1'b0, rst = 1'b1, tick;
  logic [7:0] tx_data;
  logic tx_start, tx, tx_done, tx_busy;
  int checks = 0, failures = 0;
  int tcnt;

  uart_tx dut (.clk, .rst, .baudrate_tick(tick), .tx_data, .tx_start, .tx, .tx_done, .tx_busy);

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

  int done_pulses;
  always @(posedge clk) if (!rst && tx_done) done_pulses++;

  initial begin
    tx_data = 0; tx_start = 0; done_pulses = 0;
    repeat (3) @(negedge clk);
    check(tx == 1'b1 && !tx_done, "line idles high in reset");
    rst = 1'b0;
    for (int n = 0; n < 20; n++) begin
      logic [7:0] b, got;
      int t, d0;
      b = 8'($urandom);
      repeat ($urandom % (2*P)) @(negedge clk);
      check(tx == 1'b1, "line high between frames");
      d0 = done_pulses;
      tx_data = b; tx_start = 1'b1;
      @(negedge clk);
      tx_start = 1'b0; tx_data = 8'($urandom);   // data is latched on start
      // wait for the start edge
      t = 0;
      while (tx == 1'b1 && t < 2*P) begin @(negedge clk); t++; end
      check(t <= P, "start bit begins within one tick period");
      // sample the middle of start, data and stop bits; check bit edges
      for (int bit_i = 0; bit_i < 10; bit_i++) begin
        logic level;
        repeat (P/2) @(negedge clk);
        level = tx;
        if (bit_i == 0) check(level == 1'b0, "start bit low");
        else if (bit_i == 9) check(level == 1'b1, "stop bit high");
        else got[bit_i-1] = level;
        repeat (P/2 - 1) @(negedge clk);
        check(tx == level, "bit holds for a full period");
        @(negedge clk);
        if (bit_i == 9) check(done_pulses == d0 && tx_done,
                              "tx_done pulses 10 periods after the start edge");
      end
      check(got == b, $sformatf("byte sent %02x, decoded %02x", b, got));
      @(negedge clk);
      check(!tx_done && !tx_busy && done_pulses == d0 + 1, "done is one clock; idle again");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
