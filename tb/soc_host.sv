// soc_host: behavioural model of the host computer's serial port, for the
// system testbenches. Not synthesizable.
//
// It speaks the controller's frame protocol over the UART pins: write_words
// sends 'W', a 24-bit word address, COUNT-1 and the little-endian words and
// expects 'K'; read_words sends 'R', the address and COUNT-1 and collects
// 4*COUNT bytes; send_byte/recv_byte move single 8N1 frames. Bits last
// P clocks. Because the chip's receiver samples once per bit on its own
// baud tick, the model starts every frame half a bit period after a tick
// of the chip (`tick` input), so that the samples fall mid-bit, as they do
// on average for a free-running host. The testbench that instantiates it
// calls its tasks hierarchically.
module soc_host #(
  parameter int P = 16                 // clocks per bit
) (
  input  logic clk,
  input  logic tick,                   // the chip's baud tick, for alignment
  output logic txd,                    // to the chip's uart_rxd
  input  logic rxd                     // from the chip's uart_txd
);
  int errors = 0;                      // protocol errors seen
  int bytes_sent = 0, bytes_rcvd = 0;

  initial txd = 1'b1;

  task automatic send_byte(input logic [7:0] b);
    logic [9:0] frame;
    frame = {1'b1, b, 1'b0};
    @(negedge clk);
    while (!tick) @(negedge clk);
    repeat (P/2) @(negedge clk);
    for (int i = 0; i < 10; i++) begin
      txd = frame[i];
      repeat (P) @(negedge clk);
    end
    bytes_sent++;
  endtask

  task automatic recv_byte(output logic [7:0] b);
    int t;
    t = 0;
    while (rxd == 1'b1) begin
      @(negedge clk);
      t++;
      if (t > 200 * P) begin
        errors++;
        $display("soc_host: no reply");
        b = 8'h00;
        return;
      end
    end
    repeat (P/2) @(negedge clk);
    if (rxd != 1'b0) errors++;
    for (int i = 0; i < 8; i++) begin
      repeat (P) @(negedge clk);
      b[i] = rxd;
    end
    repeat (P) @(negedge clk);
    if (rxd != 1'b1) errors++;         // stop bit
    bytes_rcvd++;
  endtask

  task automatic send_header(input logic [7:0] cmd, input logic [23:0] addr, input int count);
    send_byte(cmd);
    send_byte(addr[23:16]);
    send_byte(addr[15:8]);
    send_byte(addr[7:0]);
    send_byte(8'(count - 1));
  endtask

  // count 1..256 words
  task automatic write_words(input logic [23:0] addr, input logic [31:0] w[$]);
    logic [7:0] r;
    send_header(8'h57, addr, w.size());
    foreach (w[i])
      for (int k = 0; k < 4; k++) send_byte(w[i][8*k +: 8]);
    recv_byte(r);
    if (r != 8'h4B) begin
      errors++;
      $display("soc_host: write to %06x not acknowledged (%02x)", addr, r);
    end
  endtask

  task automatic write_word(input logic [23:0] addr, input logic [31:0] v);
    logic [31:0] w[$];
    w.push_back(v);
    write_words(addr, w);
  endtask

  task automatic read_words(input logic [23:0] addr, input int count, output logic [31:0] w[$]);
    logic [7:0] b;
    w.delete();
    send_header(8'h52, addr, count);
    for (int i = 0; i < count; i++) begin
      logic [31:0] v;
      for (int k = 0; k < 4; k++) begin
        recv_byte(b);
        v[8*k +: 8] = b;
      end
      w.push_back(v);
    end
  endtask

  task automatic read_word(input logic [23:0] addr, output logic [31:0] v);
    logic [31:0] w[$];
    read_words(addr, 1, w);
    v = w[0];
  endtask

  // poll STATUS (word 1) until done flag `bit_i` (4..6) is set; returns
  // the number of polls that still saw the block busy
  task automatic wait_done(input int bit_i, output int busy_polls);
    logic [31:0] st;
    busy_polls = 0;
    for (int n = 0; n < 100000; n++) begin
      read_word(24'h000001, st);
      if (st[bit_i]) return;
      if (!st[bit_i - 4]) busy_polls++;
    end
    errors++;
    $display("soc_host: done flag %0d never set", bit_i);
  endtask
endmodule
