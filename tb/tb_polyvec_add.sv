// tb_polyvec_add: self-checking testbench of the polynomial-vector adder at
// its default size (8 polynomials of 256 coefficients).
//
// Models the u, v and w memories with one-clock read latency, fills u and
// v with random values (coefficients mod q in the first run, arbitrary
// 32-bit words in the second to check the plain wrap-around sum), starts
// the block with a one-cycle ap_ctrl_0_start and checks every w word, that
// each is written once, the reset and run values of idle/ready/done, the
// single-cycle done pulse and the latency of NPOLY*N + 3 clocks from the
// start edge to the done pulse (one coefficient per clock).
module tb_polyvec_add;
  localparam int NPOLY = 8, N = 256, TOTAL = NPOLY * N;
  localparam int AW = $clog2(TOTAL);

  logic clk = 1'b0, rst = 1'b1;
  logic start, done, idle, ready;
  logic [AW-1:0] u_addr, v_addr, w_addr;
  logic u_ce, v_ce, w_ce, w_we;
  logic [31:0] u_q, v_q, w_d;
  int checks = 0, failures = 0;

  polyvec_add dut (
    .ap_clk_0(clk), .ap_rst_0(rst),
    .ap_ctrl_0_start(start), .ap_ctrl_0_done(done),
    .ap_ctrl_0_idle(idle), .ap_ctrl_0_ready(ready),
    .u_address0_0(u_addr), .u_ce0_0(u_ce), .u_q0_0(u_q),
    .v_address0_0(v_addr), .v_ce0_0(v_ce), .v_q0_0(v_q),
    .w_address0_0(w_addr), .w_ce0_0(w_ce), .w_we0_0(w_we), .w_d0_0(w_d));

  always #5 clk = ~clk;

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

  logic [31:0] u_mem[TOTAL], v_mem[TOTAL], w_mem[TOTAL];
  int writes[TOTAL];
  int cycle, done_cycle, done_pulses;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (u_ce) u_q <= u_mem[u_addr];
    if (v_ce) v_q <= v_mem[v_addr];
    if (w_ce && w_we) begin w_mem[w_addr] <= w_d; writes[w_addr]++; end
    if (!rst && done) begin done_pulses++; done_cycle <= cycle; end
  end

  initial begin
    int start_cycle;
    start = 0; cycle = 0; done_pulses = 0;
    repeat (3) @(negedge clk);
    check(idle && ready && !done, "reset: idle = ready = 1, done = 0");
    rst = 1'b0;
    for (int run = 0; run < 2; run++) begin
      for (int i = 0; i < TOTAL; i++) begin
        u_mem[i] = (run == 0) ? $urandom % 8380417 : $urandom;
        v_mem[i] = (run == 0) ? $urandom % 8380417 : $urandom;
        w_mem[i] = 32'hDEAD_BEEF;
        writes[i] = 0;
      end
      done_pulses = 0;
      repeat (2) @(negedge clk);
      start = 1'b1;
      start_cycle = cycle;         // the edge that samples start
      @(negedge clk);
      start = 1'b0;
      check(!idle && !ready, "idle/ready low while running");
      while (done_pulses == 0) @(negedge clk);
      @(negedge clk);
      check(done_pulses == 1, "one done pulse");
      check(idle && ready, "ready again after done");
      check(done_cycle - start_cycle == TOTAL + 3,
            $sformatf("latency %0d clocks, expected %0d", done_cycle - start_cycle, TOTAL + 3));
      for (int i = 0; i < TOTAL; i++) begin
        check(writes[i] == 1, $sformatf("w[%0d] written %0d times", i, writes[i]));
        check(w_mem[i] == u_mem[i] + v_mem[i],
              $sformatf("w[%0d]: got %08x want %08x", i, w_mem[i], u_mem[i] + v_mem[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
