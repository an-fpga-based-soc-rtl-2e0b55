// tb_controller: self-checking testbench of the controller at the byte
// level (no serial line): it pulses rx_done with command bytes, answers
// every tx_start with tx_done a few clocks later and collects the bytes,
// sending the next command only after the reply, as a host would.
//
// Port A of every memory is modelled as a one-clock-latency RAM; the three
// accelerators are modelled by their ap_ctrl status (busy for a while after
// start, then one done pulse); the SHAKE-256 core is modelled on its byte
// streams (random acknowledge gaps, a burst of output bytes). Checked:
// '?' for an unknown command; 'K' after writes; write/read of every region
// and of the INLEN/OUTLEN registers; zero for unmapped addresses; one-cycle
// start pulses only for the bits written to CTRL; STATUS idle levels and
// sticky done flags; the SHAKE input bytes streamed in buffer order, exactly
// INLEN of them; output bytes stored at consecutive buffer addresses.
module tb_controller;
  import soc_pkg::*;
  localparam int SHB = 4096, SBW = 12;

  logic clk = 1'b0, rst = 1'b1;
  logic [7:0]  rx_data, tx_data;
  logic        rx_done, tx_start, tx_done;
  ap_ctrl_req_t exp_ctrl, sh_ctrl, add_ctrl;
  ap_ctrl_rsp_t exp_stat, sh_stat, add_stat;
  logic [63:0] sh_inlen, sh_outlen;
  logic [7:0]  sh_in_byte, sh_out_byte;
  logic        sh_in_vld, sh_in_ack, sh_out_vld;
  logic        shin_en, shout_we;
  logic [SBW-1:0] shin_addr, shout_addr;
  logic [7:0]  shin_rdata, shout_wdata;
  bus_req_t    bus;
  logic [NUM_MEMS-1:0] mem_en;
  logic [31:0] mem_rdata [NUM_MEMS];
  int checks = 0, failures = 0;

  controller #(.SHBUF_BYTES(SHB)) dut (.*);

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

  // ---- memories (port A) ----
  logic [31:0] mem [NUM_MEMS][int];
  always @(posedge clk) begin
    for (int m = 0; m < NUM_MEMS; m++) if (mem_en[m]) begin
      mem_rdata[m] <= mem[m].exists(int'(bus.addr)) ? mem[m][int'(bus.addr)] : 32'h0;
      if (bus.we) mem[m][int'(bus.addr)] = bus.wdata;
    end
  end

  // SHAKE input buffer port B: the same contents as region MEM_SHIN
  always @(posedge clk) if (shin_en)
    shin_rdata <= mem[MEM_SHIN].exists(int'(shin_addr)) ? mem[MEM_SHIN][int'(shin_addr)][7:0] : 8'h0;

  logic [7:0] shout_seen [int];
  always @(posedge clk) if (shout_we) shout_seen[int'(shout_addr)] = shout_wdata;

  // ---- accelerator status models ----
  int exp_busy, sh_busy, add_busy;
  int exp_starts, sh_starts, add_starts;
  always @(posedge clk) begin
    exp_stat.done <= 1'b0; sh_stat.done <= 1'b0; add_stat.done <= 1'b0;
    if (exp_ctrl.start) begin exp_busy <= 50; exp_starts++; end
    else if (exp_busy == 1) begin exp_busy <= 0; exp_stat.done <= 1'b1; end
    else if (exp_busy > 0) exp_busy <= exp_busy - 1;
    if (add_ctrl.start) begin add_busy <= 50; add_starts++; end
    else if (add_busy == 1) begin add_busy <= 0; add_stat.done <= 1'b1; end
    else if (add_busy > 0) add_busy <= add_busy - 1;
    if (sh_ctrl.start) begin sh_busy <= 400; sh_starts++; end
    else if (sh_busy == 1) begin sh_busy <= 0; sh_stat.done <= 1'b1; end
    else if (sh_busy > 0) sh_busy <= sh_busy - 1;
  end
  assign exp_stat.idle = (exp_busy == 0), exp_stat.ready = (exp_busy == 0);
  assign add_stat.idle = (add_busy == 0), add_stat.ready = (add_busy == 0);
  assign sh_stat.idle  = (sh_busy == 0),  sh_stat.ready  = (sh_busy == 0);

  // SHAKE byte streams
  logic [7:0] fed[$];
  logic ack_en;
  always @(posedge clk) ack_en <= ($urandom % 3 != 0);
  assign sh_in_ack = sh_in_vld && ack_en && sh_busy > 0;
  always @(posedge clk) if (sh_in_ack) fed.push_back(sh_in_byte);

  // ---- UART byte side ----
  logic [7:0] txq[$];
  always @(posedge clk) begin
    if (tx_start) begin
      automatic logic [7:0] d = tx_data;
      fork begin
        repeat (7) @(posedge clk);
        tx_done <= 1'b1; txq.push_back(d);    // the byte has left the wire
        @(posedge clk); tx_done <= 1'b0;
      end join_none
    end
  end

  task automatic put(input logic [7:0] b);
    @(negedge clk); rx_data = b; rx_done = 1'b1;
    @(negedge clk); rx_done = 1'b0;
    repeat ($urandom % 4) @(negedge clk);
  endtask

  task automatic get(output logic [7:0] b);
    int t = 0;
    while (txq.size() == 0 && t < 2000) begin @(negedge clk); t++; end
    if (txq.size() == 0) begin b = 8'hxx; check(0, "no reply byte"); end
    else b = txq.pop_front();
  endtask

  task automatic wr(input logic [23:0] a, input logic [31:0] v[$]);
    logic [7:0] b;
    put(CMD_WRITE); put(a[23:16]); put(a[15:8]); put(a[7:0]); put(8'(v.size() - 1));
    foreach (v[i]) for (int k = 0; k < 4; k++) put(v[i][8*k +: 8]);
    get(b);
    check(b == RSP_ACK, $sformatf("write %06x acknowledged (%02x)", a, b));
  endtask

  task automatic rd(input logic [23:0] a, input int n, output logic [31:0] v[$]);
    logic [7:0] b;
    v.delete();
    put(CMD_READ); put(a[23:16]); put(a[15:8]); put(a[7:0]); put(8'(n - 1));
    for (int i = 0; i < n; i++) begin
      logic [31:0] x;
      for (int k = 0; k < 4; k++) begin get(b); x[8*k +: 8] = b; end
      v.push_back(x);
    end
  endtask

  function automatic logic [31:0] q1(input logic [31:0] x); return x; endfunction

  initial begin
    logic [31:0] v[$], r[$];
    logic [7:0] b;
    logic [23:0] bases [NUM_MEMS];
    int sizes [NUM_MEMS];
    rx_data = 0; rx_done = 0; tx_done = 0;
    exp_busy = 0; sh_busy = 0; add_busy = 0; exp_starts = 0; sh_starts = 0; add_starts = 0;
    bases = '{BASE_RHO, BASE_SHIN, BASE_SHOUT, BASE_U, BASE_V, BASE_W, BASE_MAT};
    sizes = '{32, SHB, SHB, 2048, 2048, 2048, 14336};
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // unknown command
    put(8'hA7); get(b);
    check(b == RSP_NAK, "unknown command answered '?'");

    // every region: write three words at the end of the region, read them back
    for (int m = 0; m < NUM_MEMS; m++) begin
      logic [23:0] a;
      a = bases[m] + 24'(sizes[m] - 3);
      v.delete();
      for (int i = 0; i < 3; i++) v.push_back($urandom);
      wr(a, v);
      for (int i = 0; i < 3; i++)
        check(mem[m].exists(sizes[m] - 3 + i) && mem[m][sizes[m] - 3 + i] == v[i],
              $sformatf("region %0d word %0d stored", m, i));
      rd(a, 3, r);
      for (int i = 0; i < 3; i++) check(r[i] == v[i], $sformatf("region %0d word %0d read back", m, i));
      // the word after the region is not mapped
      rd(bases[m] + 24'(sizes[m]), 1, r);
      check(r[0] == 0, $sformatf("address after region %0d reads zero", m));
    end

    // registers
    v.delete(); v.push_back(32'd10); v.push_back(32'd5);
    wr(REG_INLEN, v);
    rd(REG_INLEN, 2, r);
    check(r[0] == 10 && r[1] == 5 && sh_inlen == 10 && sh_outlen == 5, "INLEN/OUTLEN");
    rd(REG_STATUS, 1, r);
    check(r[0] == 32'h7, "STATUS: all idle, no done flags");

    // ExpandA start: one pulse, busy seen, done flag
    v.delete(); v.push_back(32'h1);
    wr(REG_CTRL, v);
    check(exp_starts == 1 && sh_starts == 0 && add_starts == 0, "CTRL bit 0 starts only ExpandA");
    rd(REG_STATUS, 1, r);
    check(r[0][0] == 1'b0, "STATUS shows ExpandA busy");
    repeat (60) @(negedge clk);
    rd(REG_STATUS, 1, r);
    check(r[0][0] == 1'b1 && r[0][4] == 1'b1, "ExpandA done flag set");
    // adder
    v.delete(); v.push_back(32'h4);
    wr(REG_CTRL, v);
    check(add_starts == 1 && exp_starts == 1, "CTRL bit 2 starts only the adder");
    repeat (60) @(negedge clk);
    rd(REG_STATUS, 1, r);
    check(r[0][6:4] == 3'b101, "done flags of ExpandA and adder");

    // SHAKE: fill the input buffer, start, check the stream
    v.delete();
    for (int i = 0; i < 12; i++) v.push_back({24'd0, 8'($urandom)});
    wr(BASE_SHIN, v);
    fed.delete();
    v.delete(); v.push_back(32'h2);
    wr(REG_CTRL, v);
    check(sh_starts == 1, "CTRL bit 1 starts SHAKE");
    rd(REG_STATUS, 1, r);
    check(r[0][5] == 1'b0, "SHAKE done flag cleared by start");
    // output bytes from the core
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); sh_out_byte = 8'(8'h30 + i); sh_out_vld = 1'b1;
    end
    @(negedge clk); sh_out_vld = 1'b0;
    repeat (400) @(negedge clk);
    check(fed.size() == 10, $sformatf("%0d input bytes streamed, want 10", fed.size()));
    for (int i = 0; i < 10 && i < fed.size(); i++)
      check(fed[i] == mem[MEM_SHIN][i][7:0], $sformatf("input byte %0d", i));
    for (int i = 0; i < 5; i++)
      check(shout_seen.exists(i) && shout_seen[i] == 8'(8'h30 + i), $sformatf("output byte %0d stored", i));
    rd(REG_STATUS, 1, r);
    check(r[0] == 32'h77, "all done and idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin sh_out_vld = 1'b0; sh_out_byte = 8'h0; end
endmodule
