// tb_baud_gen: self-checking testbench of the baud tick generator at its
// default setting (100 MHz clock, 9600 bit/s: a tick every 10416 clocks).
//
// Checks that the tick is low in reset, that the first tick comes
// BAUD_PERIOD clocks after reset is released, that ticks are exactly one
// clock wide and BAUD_PERIOD clocks apart, and that an asynchronous reset in
// the middle of a period clears the count.
module tb_baud_gen;
  localparam int PERIOD = 100_000_000 / 9600;

  logic clk = 1'b0, rst = 1'b1, tick;
  int checks = 0, failures = 0;

  baud_gen dut (.clk, .rst, .tick);

  always #5 clk = ~clk;

  initial begin
    repeat (20 * PERIOD) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // clocks from the previous tick (or from reset release) to the next
  task automatic measure(output int n);
    n = 0;
    do begin @(negedge clk); n++; end while (!tick);
  endtask

  initial begin
    int n;
    repeat (3) @(negedge clk);
    check(!tick, "tick low during reset");
    rst = 1'b0;
    measure(n);
    check(n == PERIOD, $sformatf("first tick after %0d clocks, want %0d", n, PERIOD));
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      check(!tick, "tick lasts one clock");
      n = 1;
      while (!tick) begin @(negedge clk); n++; end
      check(n == PERIOD, $sformatf("tick period %0d, want %0d", n, PERIOD));
    end
    // asynchronous reset in mid-period
    repeat (PERIOD / 3) @(negedge clk);
    #2 rst = 1'b1;
    #1 check(!tick && dut.count == 0, "asynchronous reset clears count and tick");
    @(negedge clk); rst = 1'b0;
    measure(n);
    check(n == PERIOD, $sformatf("tick after reset %0d, want %0d", n, PERIOD));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
