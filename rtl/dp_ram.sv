// dp_ram: on-chip dual-port RAM (block-RAM style) for the SoC's buffers.
//
// Two independent synchronous ports, A and B, each with enable, write
// enable, address, write data and read data. A read returns the word at
// the address on the clock after `*_en` (one-clock latency, read-first on
// a write). If both ports write the same address in one clock, port B
// wins. The memory is not reset; its contents are undefined until written.
// In the SoC, port A belongs to the controller (host access over UART)
// and port B to an accelerator. The dual-port organisation is this
// implementation's choice; the on-chip buffering follows the design.
module dp_ram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end
endmodule
