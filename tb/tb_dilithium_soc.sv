// tb_dilithium_soc: end-to-end testbench of the whole SoC, driven only
// through its UART pins by the soc_host model.
//
// Runs at level-5 sizes (K = 8, L = 7) with a fast serial link (16 clocks
// per bit instead of 10416) so the whole sequence simulates in seconds:
//   1. an unknown command byte is answered with '?';
//   2. rho is written and read back; ExpandA is started through CTRL and
//      STATUS is polled until its done flag; polynomials A[0][0], A[3][4]
//      and A[7][6] are read and compared with the reference sampler;
//   3. u and v (8 x 256 coefficients mod q) are written, the adder is run
//      and all of w is read and compared;
//   4. a 300-byte message is hashed with SHAKE-256 into 300 output bytes
//      (three absorb and three squeeze blocks), and compared;
//   5. the INLEN/OUTLEN registers and an unmapped address are read back.
// It counts how often each mechanism occurred (command rejection,
// rejection sampling, multi-block absorb and squeeze, SHAKE input stalls
// while the permutation runs, busy STATUS polls) and fails if any never did.
module tb_dilithium_soc;
  import keccak_ref_pkg::*;
  localparam int CLOCK_FREQ = 100_000_000;
  localparam int BAUD_RATE  = 6_250_000;       // 16 clocks per bit
  localparam int P = CLOCK_FREQ / BAUD_RATE;
  localparam int K = 8, L = 7, N = 256;

  logic clk = 1'b0, rst = 1'b1;
  logic uart_rxd, uart_txd;
  int checks = 0, failures = 0;

  dilithium_soc #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) dut (
    .clk, .rst, .uart_rxd, .uart_txd);

  soc_host #(.P(P)) host (.clk, .tick(dut.tick), .txd(uart_rxd), .rxd(uart_txd));

  always #5 clk = ~clk;

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- mechanism monitors ----
  int n_reject, n_abs_perm, n_sq_perm, n_in_stall;
  always @(posedge clk) if (!rst) begin
    // the third byte of a candidate is read only in the sampling state
    if (dut.u_expand.bsel == 2'd2 && dut.u_expand.cand >= 23'd8380417) n_reject++;
    // permutations started while input bytes are still expected / after
    if (dut.u_shake.kc_perm && dut.u_shake.in_left != 0) n_abs_perm++;
    if (dut.u_shake.kc_perm && dut.u_shake.in_left == 0) n_sq_perm++;
    if (dut.sh_in_vld && !dut.sh_in_ack) n_in_stall++;
  end

  initial begin
    logic [31:0] w[$], r[$];
    logic [7:0]  b;
    bytes_q      rho, msg, want;
    int unsigned coef[256];
    int          busy_exp, busy_add, busy_sh, n_nak;
    logic [31:0] u_ref[K*N], v_ref[K*N];
    n_reject = 0; n_abs_perm = 0; n_sq_perm = 0; n_in_stall = 0; n_nak = 0;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    repeat (3*P) @(negedge clk);

    // 1. unknown command
    host.send_byte(8'h00);
    host.recv_byte(b);
    check(b == 8'h3F, $sformatf("unknown command answered %02x", b));
    if (b == 8'h3F) n_nak++;

    // 2. ExpandA
    w.delete();
    for (int i = 0; i < 32; i++) begin
      rho.push_back(8'($urandom));
      w.push_back({24'd0, rho[i]});
    end
    host.write_words(24'h000100, w);
    host.read_words(24'h000100, 32, r);
    for (int i = 0; i < 32; i++) check(r[i] == w[i], $sformatf("rho[%0d] read back", i));
    host.write_word(24'h000000, 32'h1);
    host.wait_done(4, busy_exp);
    foreach (coef[i]) coef[i] = 0;
    for (int e = 0; e < 3; e++) begin
      int i, j;
      i = (e == 0) ? 0 : (e == 1) ? 3 : 7;
      j = (e == 0) ? 0 : (e == 1) ? 4 : 6;
      expand_poly(rho, i, j, coef);
      host.read_words(24'h010000 + 24'((i*L + j) * N), 256, r);
      for (int k = 0; k < N; k++)
        check(r[k] == coef[k], $sformatf("A[%0d][%0d][%0d]: got %0d want %0d", i, j, k, r[k], coef[k]));
    end

    // 3. polynomial vector addition
    for (int i = 0; i < K*N; i++) begin
      u_ref[i] = $urandom % 8380417;
      v_ref[i] = $urandom % 8380417;
    end
    for (int c = 0; c < K; c++) begin
      w.delete();
      for (int k = 0; k < N; k++) w.push_back(u_ref[c*N + k]);
      host.write_words(24'h004000 + 24'(c*N), w);
      w.delete();
      for (int k = 0; k < N; k++) w.push_back(v_ref[c*N + k]);
      host.write_words(24'h005000 + 24'(c*N), w);
    end
    host.write_word(24'h000000, 32'h4);
    host.wait_done(6, busy_add);
    for (int c = 0; c < K; c++) begin
      host.read_words(24'h006000 + 24'(c*N), 256, r);
      for (int k = 0; k < N; k++)
        check(r[k] == u_ref[c*N + k] + v_ref[c*N + k], $sformatf("w[%0d]", c*N + k));
    end

    // 4. SHAKE-256, 300 bytes in, 300 bytes out
    w.delete();
    for (int i = 0; i < 300; i++) begin
      msg.push_back(8'($urandom));
      w.push_back({24'd0, msg[i]});
    end
    for (int h = 0; h < 2; h++) begin
      r.delete();
      for (int i = 0; i < 150; i++) r.push_back(w[150*h + i]);
      host.write_words(24'h001000 + 24'(150*h), r);
    end
    host.write_word(24'h000002, 32'd300);
    host.write_word(24'h000003, 32'd300);
    host.write_word(24'h000000, 32'h2);
    host.wait_done(5, busy_sh);
    want = shake(136, msg, 300);
    host.read_words(24'h002000, 150, r);
    for (int i = 0; i < 150; i++) check(r[i] == {24'd0, want[i]}, $sformatf("SHAKE byte %0d", i));
    host.read_words(24'h002000 + 24'd150, 150, r);
    for (int i = 0; i < 150; i++) check(r[i] == {24'd0, want[150+i]}, $sformatf("SHAKE byte %0d", 150+i));

    // 5. registers and an unmapped address
    host.read_words(24'h000002, 2, r);
    check(r[0] == 300 && r[1] == 300, "INLEN/OUTLEN read back");
    host.read_words(24'h00F000, 1, r);
    check(r[0] == 0, "unmapped address reads zero");
    host.read_words(24'h000001, 1, r);
    check(r[0][2:0] == 3'b111 && r[0][6:4] == 3'b111, "all blocks idle, all done flags set");

    check(host.errors == 0, $sformatf("%0d serial protocol errors", host.errors));
    $display("mechanisms: nak=%0d reject=%0d absorb_perm=%0d squeeze_perm=%0d in_stall=%0d busy_polls exp=%0d add=%0d sh=%0d",
             n_nak, n_reject, n_abs_perm, n_sq_perm, n_in_stall, busy_exp, busy_add, busy_sh);
    check(n_nak > 0, "command rejection happened");
    check(n_reject > 0, "rejection sampling discarded a candidate");
    check(n_abs_perm >= 2, "multi-block absorb happened");
    check(n_sq_perm >= 3, "multi-block squeeze happened");
    check(n_in_stall > 0, "SHAKE input stalled during a permutation");
    check(busy_exp > 0, "ExpandA seen busy through STATUS");
    $display("bytes sent %0d received %0d", host.bytes_sent, host.bytes_rcvd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
