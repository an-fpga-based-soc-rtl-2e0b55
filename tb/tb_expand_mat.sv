// tb_expand_mat: self-checking testbench of the ExpandA core at its
// default size (K = 8, L = 7, N = 256: the 56 polynomials of level 5).
//
// The testbench models the rho memory and the matrix memory (one-clock
// read latency, as a block RAM) and runs ExpandA for two random seeds.
// Every one of the K*L*N matrix words is compared with the reference
// sampler of keccak_ref_pkg (SHAKE-128 of rho || j || i, 23-bit candidates
// kept below q). It also checks the reference SHAKE-128("") prefix, that
// every word is written exactly once, that no value reaches q, that the
// handshake behaves (idle/ready after reset, low while busy, one done
// pulse), that a run takes 45k to 70k clocks (about 52.4k expected), and
// counts the rejected candidates seen on the datapath.
module tb_expand_mat;
  import keccak_ref_pkg::*;
  localparam int K = 8, L = 7, N = 256;
  localparam int AW = $clog2(K*L*N);

  logic clk = 1'b0, rst = 1'b1;
  logic ap_start, ap_done, ap_idle, ap_ready;
  logic [4:0]  rho_address0;
  logic        rho_ce0;
  logic [7:0]  rho_q0;
  logic [AW-1:0] mat_address0;
  logic        mat_ce0, mat_we0;
  logic [31:0] mat_d0;
  int checks = 0, failures = 0;

  expand_mat dut (.ap_clk(clk), .ap_rst(rst), .*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0]  rho_mem [32];
  logic [31:0] mat_mem [K*L*N];
  int          writes  [K*L*N];
  int          done_pulses, rejects;

  always @(posedge clk) begin
    if (rho_ce0) rho_q0 <= rho_mem[rho_address0];
    if (mat_ce0 && mat_we0) begin
      mat_mem[mat_address0] <= mat_d0;
      writes[mat_address0]++;
    end
    if (!rst && ap_done) done_pulses++;
    if (!rst && dut.state == dut.S_SAMPLE && dut.bsel == 2'd2 && dut.cand >= 23'd8380417)
      rejects++;
  end

  initial begin
    bytes_q empty, kat, rho;
    int unsigned coef[256];
    ap_start = 0;
    rejects = 0;
    repeat (3) @(negedge clk);
    check(ap_idle && ap_ready && !ap_done, "reset state");
    rst = 1'b0;
    kat = shake(168, empty, 4);
    check({kat[0], kat[1], kat[2], kat[3]} == 32'h7f9c2ba4, "reference SHAKE-128(\"\") prefix");
    for (int run = 0; run < 2; run++) begin
      rho.delete();
      for (int i = 0; i < 32; i++) begin
        rho_mem[i] = 8'($urandom);
        rho.push_back(rho_mem[i]);
      end
      foreach (writes[i]) writes[i] = 0;
      done_pulses = 0;
      @(negedge clk); ap_start = 1'b1;
      @(negedge clk); ap_start = 1'b0;
      check(!ap_idle && !ap_ready, "busy after start");
      begin
        int cyc;
        cyc = 0;
        while (done_pulses == 0) begin @(negedge clk); cyc++; end
        $display("ExpandA took %0d clocks", cyc);
        check(cyc > 45000 && cyc < 70000, "ExpandA run time in the expected range");
      end
      @(negedge clk);
      check(done_pulses == 1 && ap_idle && ap_ready, "single done, idle again");
      for (int i = 0; i < K; i++)
        for (int j = 0; j < L; j++) begin
          int base;
          expand_poly(rho, i, j, coef);
          base = (i*L + j) * N;
          for (int k = 0; k < N; k++) begin
            check(writes[base+k] == 1, $sformatf("A[%0d][%0d][%0d] written %0d times",
                                                  i, j, k, writes[base+k]));
            check(mat_mem[base+k] == coef[k] && mat_mem[base+k] < 8380417,
                  $sformatf("A[%0d][%0d][%0d]: got %0d want %0d", i, j, k,
                            mat_mem[base+k], coef[k]));
          end
        end
    end
    $display("rejected candidates: %0d", rejects);
    check(rejects > 0, "rejection sampling discarded at least one candidate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
