// polyvec_add: coefficient-wise addition of two polynomial vectors,
// w[k] = u[k] + v[k] for k = 0 .. NPOLY*N-1.
//
// The operands sit in memories u and v and the result goes to memory w, all
// with 32-bit words and one-clock read latency (address and ce in one
// clock, data on *_q0 in the next). After a one-cycle `ap_ctrl_0_start`
// the block drops idle/ready, issues one read address per clock to u and v,
// adds the two words that come back and writes the sum to w one clock
// later, so the stream runs at one coefficient per clock. `ap_ctrl_0_done`
// rises NPOLY*N + 3 clock edges after the edge that samples the start
// (2051 at the defaults), for one clock, together with idle/ready.
// The addition is a plain 32-bit sum without reduction mod q, as the
// described block performs "pure linear addition"; inputs in [0, q) give
// sums below 2q. Port names, the reset state (idle = ready = 1, done = 0)
// and the one-cycle start/done pulses follow the described design; the
// one-lane pipeline and the vector length NPOLY = K = 8 are this
// implementation's choices.
module polyvec_add #(
  parameter int unsigned NPOLY = soc_pkg::DIL_K,
  parameter int unsigned N     = soc_pkg::DIL_N,
  localparam int unsigned AW   = $clog2(NPOLY*N)
) (
  input  logic          ap_clk_0,
  input  logic          ap_rst_0,          // asynchronous, active high
  input  logic          ap_ctrl_0_start,
  output logic          ap_ctrl_0_done,
  output logic          ap_ctrl_0_idle,
  output logic          ap_ctrl_0_ready,
  output logic [AW-1:0] u_address0_0,
  output logic          u_ce0_0,
  input  logic [31:0]   u_q0_0,
  output logic [AW-1:0] v_address0_0,
  output logic          v_ce0_0,
  input  logic [31:0]   v_q0_0,
  output logic [AW-1:0] w_address0_0,
  output logic          w_ce0_0,
  output logic          w_we0_0,
  output logic [31:0]   w_d0_0
);
  localparam int unsigned TOTAL = NPOLY * N;

  logic          busy;
  logic          rd_active;      // a read is issued this clock
  logic [AW:0]   rd_cnt;
  logic          rd_valid;       // *_q0 carry data for rd_addr_q
  logic [AW-1:0] rd_addr_q;

  assign rd_active    = busy && (rd_cnt < (AW+1)'(TOTAL));
  assign u_ce0_0      = rd_active;
  assign v_ce0_0      = rd_active;
  assign u_address0_0 = rd_cnt[AW-1:0];
  assign v_address0_0 = rd_cnt[AW-1:0];

  always_ff @(posedge ap_clk_0 or posedge ap_rst_0) begin
    if (ap_rst_0) begin
      busy           <= 1'b0;
      rd_cnt         <= '0;
      rd_valid       <= 1'b0;
      rd_addr_q      <= '0;
      w_address0_0   <= '0;
      w_ce0_0        <= 1'b0;
      w_we0_0        <= 1'b0;
      w_d0_0         <= '0;
      ap_ctrl_0_done <= 1'b0;
    end else begin
      ap_ctrl_0_done <= 1'b0;
      rd_valid       <= rd_active;
      rd_addr_q      <= rd_cnt[AW-1:0];
      // write stage
      w_ce0_0        <= rd_valid;
      w_we0_0        <= rd_valid;
      w_address0_0   <= rd_addr_q;
      w_d0_0         <= u_q0_0 + v_q0_0;
      if (!busy) begin
        if (ap_ctrl_0_start) begin
          busy   <= 1'b1;
          rd_cnt <= '0;
        end
      end else begin
        if (rd_active) rd_cnt <= rd_cnt + 1'b1;
        // finished once the last write has been issued
        if (!rd_active && !rd_valid && w_we0_0) begin
          busy           <= 1'b0;
          ap_ctrl_0_done <= 1'b1;
        end
      end
    end
  end

  assign ap_ctrl_0_idle  = !busy;
  assign ap_ctrl_0_ready = !busy;

  a_done_single: assert property (@(posedge ap_clk_0) disable iff (ap_rst_0)
                                  ap_ctrl_0_done |=> !ap_ctrl_0_done);
endmodule
