// tb_dilithium_soc_full: one complete ExpandA operation on the SoC with
// every parameter at its default: 100 MHz clock, 9600 bit/s serial link
// (10416 clocks per bit), level-5 matrix of 8 x 7 polynomials.
//
// Over the UART pins only, the host model writes a random seed rho, starts
// ExpandA through CTRL, polls STATUS until the done flag is set, and reads
// back the first four coefficients of A[0][0] and the last four of A[7][6],
// which are compared with the reference sampler of keccak_ref_pkg.
// About 19 million clocks.
module tb_dilithium_soc_full;
  import keccak_ref_pkg::*;
  localparam int P = 100_000_000 / 9600;

  logic clk = 1'b0, rst = 1'b1;
  logic uart_rxd, uart_txd;
  int checks = 0, failures = 0;

  dilithium_soc dut (.clk, .rst, .uart_rxd, .uart_txd);

  soc_host #(.P(P)) host (.clk, .tick(dut.tick), .txd(uart_rxd), .rxd(uart_txd));

  always #5 clk = ~clk;

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] w[$], r[$];
    bytes_q      rho;
    int unsigned coef[256];
    int          busy_polls;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 32; i++) begin
      rho.push_back(8'($urandom));
      w.push_back({24'd0, rho[i]});
    end
    host.write_words(24'h000100, w);
    host.write_word(24'h000000, 32'h1);
    host.wait_done(4, busy_polls);
    expand_poly(rho, 0, 0, coef);
    host.read_words(24'h010000, 4, r);
    for (int k = 0; k < 4; k++)
      check(r[k] == coef[k], $sformatf("A[0][0][%0d]: got %0d want %0d", k, r[k], coef[k]));
    expand_poly(rho, 7, 6, coef);
    host.read_words(24'h010000 + 24'(56*256 - 4), 4, r);
    for (int k = 0; k < 4; k++)
      check(r[k] == coef[252 + k], $sformatf("A[7][6][%0d]: got %0d want %0d", 252 + k, r[k], coef[252 + k]));
    check(host.errors == 0, "serial protocol errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
