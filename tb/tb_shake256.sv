// tb_shake256: self-checking testbench of the SHAKE-256 core.
//
// For a set of input and output lengths around the 136-byte rate (empty
// input, one byte, exactly one and two blocks, one byte over, long
// messages up to a 2592-byte level-5 public key, outputs shorter and
// longer than a block) it streams random
// message bytes with random gaps on the valid line, collects every
// output_r byte marked by output_r_ap_vld and compares the stream with the
// keccak_ref_pkg model. It also checks the model itself against the
// published SHAKE-256("") prefix, the ap_idle/ap_ready/ap_done behaviour
// (idle after reset, low while running, one done pulse), that no byte is
// acknowledged beyond inlen, and the squeeze rate of one byte per clock.
module tb_shake256;
  import keccak_ref_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  logic        ap_start, ap_done, ap_idle, ap_ready;
  logic [7:0]  input_r, output_r;
  logic        input_r_ap_vld, input_r_ap_ack, output_r_ap_vld;
  logic [63:0] inlen, outlen;
  int checks = 0, failures = 0;

  shake256 dut (.ap_clk(clk), .ap_rst(rst), .*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bytes_q got;
  int     acked, done_pulses, max_gap;
  bit     running;

  // output collector and handshake monitor
  always @(posedge clk) if (!rst) begin
    if (output_r_ap_vld) got.push_back(output_r);
    if (input_r_ap_ack) acked++;
    if (ap_done) done_pulses++;
  end

  task automatic run_case(input int ilen, input int olen);
    bytes_q msg, want;
    int idx, cyc;
    for (int i = 0; i < ilen; i++) msg.push_back(8'($urandom));
    want = shake(136, msg, olen);
    got.delete(); acked = 0; done_pulses = 0;
    @(negedge clk);
    check(ap_idle && ap_ready, "idle and ready before start");
    inlen = 64'(ilen); outlen = 64'(olen);
    ap_start = 1'b1;
    @(negedge clk);
    ap_start = 1'b0;
    check(!ap_idle && !ap_ready, "idle/ready drop after start");
    idx = 0; cyc = 0;
    while (done_pulses == 0 && cyc < 100000) begin
      // present the next byte, sometimes after a random gap
      if (idx < ilen && ($urandom % 4 != 0)) begin
        input_r_ap_vld = 1'b1; input_r = msg[idx];
      end else begin
        input_r_ap_vld = (idx >= ilen) ? ($urandom % 2 == 0) : 1'b0;  // idle chatter after the end
        input_r = 8'($urandom);
      end
      #1;
      if (input_r_ap_ack) begin
        check(idx < ilen, "byte acknowledged beyond inlen");
        idx++;
      end
      @(negedge clk);
      cyc++;
    end
    input_r_ap_vld = 1'b0;
    @(negedge clk);
    check(done_pulses == 1, $sformatf("one done pulse (got %0d)", done_pulses));
    check(acked == ilen, $sformatf("acknowledged %0d of %0d bytes", acked, ilen));
    check(got.size() == olen, $sformatf("in %0d out %0d: %0d bytes out", ilen, olen, got.size()));
    for (int i = 0; i < olen && i < got.size(); i++)
      check(got[i] == want[i], $sformatf("in %0d out %0d byte %0d: got %02x want %02x",
                                         ilen, olen, i, got[i], want[i]));
    check(ap_idle, "idle after done");
  endtask

  // squeeze rate: bytes within one block leave on consecutive clocks
  int vld_run, max_run;
  always @(posedge clk) begin
    if (output_r_ap_vld) vld_run++; else vld_run = 0;
    if (vld_run > max_run) max_run = vld_run;
  end

  initial begin
    bytes_q empty, kat;
    ap_start = 0; input_r = 0; input_r_ap_vld = 0; inlen = 0; outlen = 0;
    vld_run = 0; max_run = 0;
    repeat (3) @(negedge clk);
    check(ap_idle && ap_ready && !ap_done, "reset state: idle, ready, no done");
    rst = 1'b0;
    kat = shake(136, empty, 8);
    check({kat[0], kat[1], kat[2], kat[3], kat[4], kat[5], kat[6], kat[7]} ==
          64'h46b9dd2b0ba88d13, "reference model SHAKE-256(\"\") prefix");
    run_case(0, 32);
    run_case(1, 64);
    run_case(32, 136);
    run_case(135, 137);
    run_case(136, 32);
    run_case(137, 300);
    run_case(272, 16);
    run_case(300, 1);
    run_case(600, 500);
    run_case(2592, 64);   // a level-5 public key hashed to 64 bytes
    check(max_run == 136, $sformatf("longest output burst %0d bytes (one per clock, 136 per block)", max_run));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
