// tb_dp_ram: self-checking testbench of the dual-port on-chip RAM.
//
// Runs random reads and writes on both ports at once against a reference
// array (port B wins when both write one address) and checks the
// one-clock read latency, read-first data on a write, and that a port
// without enable keeps its last read data. Size: 32-bit words, 2048 deep
// (one polynomial vector at level 5).
module tb_dp_ram;
  localparam int W = 32, D = 2048, AW = 11;

  logic clk = 1'b0;
  logic a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [W-1:0] a_wdata, b_wdata, a_rdata, b_rdata;
  int checks = 0, failures = 0;

  dp_ram #(.WIDTH(W), .DEPTH(D)) dut (.*);

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

  logic [W-1:0] model [D];

  initial begin
    logic [W-1:0] exp_a, exp_b;
    bit ea, eb;
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill through both ports
    for (int i = 0; i < D; i += 2) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(i);   a_wdata = $urandom; model[i]   = a_wdata;
      b_en = 1; b_we = 1; b_addr = AW'(i+1); b_wdata = $urandom; model[i+1] = b_wdata;
    end
    @(negedge clk);
    exp_a = a_rdata; exp_b = b_rdata;
    for (int n = 0; n < 20000; n++) begin
      ea = ($urandom % 4 != 0); eb = ($urandom % 4 != 0);
      a_en = ea; b_en = eb;
      a_we = ea && ($urandom % 2 == 0); b_we = eb && ($urandom % 2 == 0);
      a_addr = AW'($urandom % 64); b_addr = AW'($urandom % 64);  // small range: collisions
      a_wdata = $urandom; b_wdata = $urandom;
      if (ea) exp_a = model[a_addr];
      if (eb) exp_b = model[b_addr];
      if (a_we) model[a_addr] = a_wdata;
      if (b_we) model[b_addr] = b_wdata;
      @(negedge clk);
      check(a_rdata == exp_a, $sformatf("port A read: got %08x want %08x", a_rdata, exp_a));
      check(b_rdata == exp_b, $sformatf("port B read: got %08x want %08x", b_rdata, exp_b));
    end
    // read back the whole array
    a_we = 0; b_we = 0; b_en = 0;
    for (int i = 0; i < D; i++) begin
      a_en = 1; a_addr = AW'(i);
      @(negedge clk);
      check(a_rdata == model[i], $sformatf("final word %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
