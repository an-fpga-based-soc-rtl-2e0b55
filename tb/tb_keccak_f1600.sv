// tb_keccak_f1600: self-checking testbench of the Keccak-f[1600] engine.
//
// Loads states through the byte XOR port, runs the permutation and reads
// all 200 bytes back, comparing with the reference model of
// keccak_ref_pkg. Also checks the published first lane of Keccak-f applied
// to the all-zero state (0xF1258F7940E1DDE7), that `clear` zeroes the
// state, and that perm_done comes 25 clocks after the start is sampled
// (one start clock and 24 round clocks).
module tb_keccak_f1600;
  import keccak_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic clear, perm_start, xor_en, busy, perm_done;
  logic [7:0] xor_idx, xor_byte, rd_idx, rd_byte;
  int checks = 0, failures = 0;

  keccak_f1600 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic permute(output int cycles);
    @(negedge clk); perm_start = 1'b1;
    @(negedge clk); perm_start = 1'b0;
    cycles = 1;
    while (!perm_done) begin @(negedge clk); cycles++; end
  endtask

  task automatic compare(const ref lane_t s[25], input string what);
    for (int i = 0; i < 200; i++) begin
      rd_idx = 8'(i);
      #1;
      check(rd_byte == get_byte(s, i), $sformatf("%s byte %0d: got %02x want %02x",
            what, i, rd_byte, get_byte(s, i)));
    end
  endtask

  lane_t model[25];
  int cyc;

  initial begin
    clear = 0; perm_start = 0; xor_en = 0; xor_idx = 0; xor_byte = 0; rd_idx = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    foreach (model[i]) model[i] = '0;
    // all-zero state
    permute(cyc);
    check(cyc == 25, $sformatf("permutation took %0d clocks", cyc));
    keccak_f(model);
    check(model[0] == 64'hF1258F7940E1DDE7, "reference model zero-state lane 0");
    compare(model, "zero state");
    // random states loaded through the XOR port, permuted twice
    for (int t = 0; t < 6; t++) begin
      @(negedge clk); clear = 1'b1;
      @(negedge clk); clear = 1'b0;
      foreach (model[i]) model[i] = '0;
      compare(model, "after clear");
      for (int i = 0; i < 200; i++) begin
        byte unsigned b;
        b = 8'($urandom);
        xor_en = 1'b1; xor_idx = 8'(i); xor_byte = b;
        @(negedge clk);
        keccak_ref_pkg::xor_byte(model, i, b);
      end
      xor_en = 1'b0;
      compare(model, "loaded");
      permute(cyc);
      check(cyc == 25, "permutation length");
      keccak_f(model);
      compare(model, "permuted once");
      permute(cyc);
      keccak_f(model);
      compare(model, "permuted twice");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
