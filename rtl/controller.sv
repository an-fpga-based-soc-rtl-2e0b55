// controller: the SoC's central controller and memory-mapped interconnect.
//
// It turns a byte stream from the UART receiver into word accesses on a
// 24-bit word address space and answers through the UART transmitter.
// Host frame: CMD ('W' 0x57 or 'R' 0x52), address bytes [23:16], [15:8],
// [7:0], COUNT-1, then for a write 4*COUNT data bytes (each word
// little-endian). A write stores COUNT words at consecutive addresses and
// is answered with 'K' (0x4B); a read returns 4*COUNT bytes. Any other
// command byte is answered with '?' (0x3F) and ignored.
//
// Address map (word addresses, see soc_pkg): control registers at 0x0-0x3
// (CTRL: writing bit 0/1/2 starts ExpandA / SHAKE-256 / polyvec_add with a
// one-cycle ap_start; STATUS: bits 2:0 the three ap_idle levels, bits 6:4
// sticky done flags cleared by the matching start; INLEN, OUTLEN: SHAKE
// lengths in bytes), then the memories rho, SHAKE input, SHAKE output,
// u, v, w and the matrix. Byte-wide memories hold one byte per word (the
// low byte). Addresses that map to nothing read as zero and ignore writes.
//
// While SHAKE-256 runs, the controller streams the first INLEN bytes of the
// SHAKE input buffer into the core (valid/acknowledge, two clocks per byte)
// and stores each output byte into the SHAKE output buffer in order.
// Memory port A (this module) reads with one clock of latency.
//
// The presence of a controller that sequences the accelerators through
// memory-mapped registers and relays UART traffic follows the described
// design; the frame format, the register and address map and the SHAKE
// streaming are this implementation's own, as the design does not give them.
module controller
  import soc_pkg::*;
#(
  parameter int unsigned MAT_WORDS   = DIL_K * DIL_L * DIL_N,
  parameter int unsigned VEC_WORDS   = DIL_K * DIL_N,
  parameter int unsigned SHBUF_BYTES = 4096,
  localparam int unsigned SBW        = $clog2(SHBUF_BYTES)
) (
  input  logic        clk,
  input  logic        rst,              // asynchronous, active high
  // UART byte side
  input  logic [7:0]  rx_data,
  input  logic        rx_done,
  output logic [7:0]  tx_data,
  output logic        tx_start,
  input  logic        tx_done,
  // accelerator block-level control
  output ap_ctrl_req_t exp_ctrl,
  input  ap_ctrl_rsp_t exp_stat,
  output ap_ctrl_req_t sh_ctrl,
  input  ap_ctrl_rsp_t sh_stat,
  output ap_ctrl_req_t add_ctrl,
  input  ap_ctrl_rsp_t add_stat,
  output logic [63:0] sh_inlen,
  output logic [63:0] sh_outlen,
  // SHAKE-256 byte streams
  output logic [7:0]  sh_in_byte,
  output logic        sh_in_vld,
  input  logic        sh_in_ack,
  input  logic [7:0]  sh_out_byte,
  input  logic        sh_out_vld,
  // SHAKE buffers, accelerator-side ports
  output logic           shin_en,
  output logic [SBW-1:0] shin_addr,
  input  logic [7:0]     shin_rdata,
  output logic           shout_we,
  output logic [SBW-1:0] shout_addr,
  output logic [7:0]     shout_wdata,
  // memory bus, port A of every memory
  output bus_req_t    bus,
  output logic [NUM_MEMS-1:0] mem_en,
  input  logic [31:0] mem_rdata [NUM_MEMS]
);
  // ---------------- address decode ----------------
  typedef struct packed {
    logic        is_reg;
    logic        is_mem;
    mem_id_e     id;
    logic [23:0] off;
  } decode_t;

  function automatic decode_t decode(input logic [23:0] a);
    decode_t d;
    d = '{is_reg: 1'b0, is_mem: 1'b0, id: MEM_RHO, off: 24'd0};
    if (a <= REG_OUTLEN) begin
      d.is_reg = 1'b1; d.off = a;
    end else if (a >= BASE_RHO && a < BASE_RHO + 24'd32) begin
      d.is_mem = 1'b1; d.id = MEM_RHO; d.off = a - BASE_RHO;
    end else if (a >= BASE_SHIN && a < BASE_SHIN + 24'(SHBUF_BYTES)) begin
      d.is_mem = 1'b1; d.id = MEM_SHIN; d.off = a - BASE_SHIN;
    end else if (a >= BASE_SHOUT && a < BASE_SHOUT + 24'(SHBUF_BYTES)) begin
      d.is_mem = 1'b1; d.id = MEM_SHOUT; d.off = a - BASE_SHOUT;
    end else if (a >= BASE_U && a < BASE_U + 24'(VEC_WORDS)) begin
      d.is_mem = 1'b1; d.id = MEM_U; d.off = a - BASE_U;
    end else if (a >= BASE_V && a < BASE_V + 24'(VEC_WORDS)) begin
      d.is_mem = 1'b1; d.id = MEM_V; d.off = a - BASE_V;
    end else if (a >= BASE_W && a < BASE_W + 24'(VEC_WORDS)) begin
      d.is_mem = 1'b1; d.id = MEM_W; d.off = a - BASE_W;
    end else if (a >= BASE_MAT && a < BASE_MAT + 24'(MAT_WORDS)) begin
      d.is_mem = 1'b1; d.id = MEM_MAT; d.off = a - BASE_MAT;
    end
    return d;
  endfunction

  // ---------------- command FSM ----------------
  typedef enum logic [3:0] {
    C_CMD, C_A2, C_A1, C_A0, C_CNT, C_WDATA, C_WRITE, C_ACK,
    C_RREQ, C_RWAIT, C_RSEND, C_TXWAIT
  } cstate_e;

  cstate_e     cs, cs_after_tx;
  logic        is_write;
  logic [23:0] addr;
  logic [8:0]  count;           // words left
  logic [31:0] word;
  logic [1:0]  bcnt;
  decode_t     dec, dec_q;
  logic [31:0] reg_rdata;

  logic [31:0] inlen_r, outlen_r;
  logic [2:0]  done_sticky;

  assign dec       = decode(addr);
  assign sh_inlen  = {32'd0, inlen_r};
  assign sh_outlen = {32'd0, outlen_r};

  always_comb begin
    unique case (dec.off[1:0])
      2'd0:    reg_rdata = 32'd0;
      2'd1:    reg_rdata = {25'd0, done_sticky,
                            1'b0, add_stat.idle, sh_stat.idle, exp_stat.idle};
      2'd2:    reg_rdata = inlen_r;
      default: reg_rdata = outlen_r;
    endcase
  end

  // bus port A
  always_comb begin
    bus.we    = (cs == C_WRITE);
    bus.addr  = dec.off;
    bus.wdata = word;
    mem_en    = '0;
    if ((cs == C_WRITE || cs == C_RREQ) && dec.is_mem) mem_en[dec.id] = 1'b1;
  end

  logic ctrl_wr;
  assign ctrl_wr = (cs == C_WRITE) && dec.is_reg && (dec.off[1:0] == 2'd0);
  assign exp_ctrl.start = ctrl_wr && word[0] && exp_stat.ready;
  assign sh_ctrl.start  = ctrl_wr && word[1] && sh_stat.ready;
  assign add_ctrl.start = ctrl_wr && word[2] && add_stat.ready;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cs <= C_CMD; cs_after_tx <= C_CMD;
      is_write <= 1'b0; addr <= '0; count <= '0; word <= '0; bcnt <= '0;
      dec_q <= '0;
      tx_data <= '0; tx_start <= 1'b0;
      inlen_r <= '0; outlen_r <= '0; done_sticky <= '0;
    end else begin
      tx_start <= 1'b0;
      // sticky done flags
      if (exp_stat.done) done_sticky[0] <= 1'b1;
      if (sh_stat.done)  done_sticky[1] <= 1'b1;
      if (add_stat.done) done_sticky[2] <= 1'b1;
      if (exp_ctrl.start) done_sticky[0] <= 1'b0;
      if (sh_ctrl.start)  done_sticky[1] <= 1'b0;
      if (add_ctrl.start) done_sticky[2] <= 1'b0;

      unique case (cs)
        C_CMD: if (rx_done) begin
          if (rx_data == CMD_WRITE || rx_data == CMD_READ) begin
            is_write <= (rx_data == CMD_WRITE);
            cs       <= C_A2;
          end else begin
            tx_data     <= RSP_NAK;
            tx_start    <= 1'b1;
            cs          <= C_TXWAIT;
            cs_after_tx <= C_CMD;
          end
        end
        C_A2: if (rx_done) begin addr[23:16] <= rx_data; cs <= C_A1; end
        C_A1: if (rx_done) begin addr[15:8]  <= rx_data; cs <= C_A0; end
        C_A0: if (rx_done) begin addr[7:0]   <= rx_data; cs <= C_CNT; end
        C_CNT: if (rx_done) begin
          count <= {1'b0, rx_data} + 9'd1;
          bcnt  <= '0;
          cs    <= is_write ? C_WDATA : C_RREQ;
        end
        C_WDATA: if (rx_done) begin
          word <= {rx_data, word[31:8]};
          bcnt <= bcnt + 1'b1;
          if (bcnt == 2'd3) cs <= C_WRITE;
        end
        C_WRITE: begin
          if (dec.is_reg) begin
            unique case (dec.off[1:0])
              2'd2:    inlen_r  <= word;
              2'd3:    outlen_r <= word;
              default: ;
            endcase
          end
          addr  <= addr + 1'b1;
          count <= count - 1'b1;
          cs    <= (count == 9'd1) ? C_ACK : C_WDATA;
        end
        C_ACK: begin
          tx_data     <= RSP_ACK;
          tx_start    <= 1'b1;
          cs          <= C_TXWAIT;
          cs_after_tx <= C_CMD;
        end
        C_RREQ: begin
          dec_q <= dec;
          word  <= reg_rdata;
          cs    <= C_RWAIT;
        end
        C_RWAIT: begin
          if (dec_q.is_mem)      word <= mem_rdata[dec_q.id];
          else if (!dec_q.is_reg) word <= 32'd0;
          bcnt <= '0;
          cs   <= C_RSEND;
        end
        C_RSEND: begin
          tx_data  <= word[7:0];
          word     <= {8'd0, word[31:8]};
          tx_start <= 1'b1;
          bcnt     <= bcnt + 1'b1;
          cs       <= C_TXWAIT;
          if (bcnt == 2'd3) begin
            addr        <= addr + 1'b1;
            count       <= count - 1'b1;
            cs_after_tx <= (count == 9'd1) ? C_CMD : C_RREQ;
          end else begin
            cs_after_tx <= C_RSEND;
          end
        end
        C_TXWAIT: if (tx_done) cs <= cs_after_tx;
        default: cs <= C_CMD;
      endcase
    end
  end

  // ---------------- SHAKE-256 input feeder / output collector ----------------
  typedef enum logic [1:0] {F_IDLE, F_READ, F_HOLD} fstate_e;
  fstate_e     fs;
  logic [31:0] fe_left;
  logic [SBW-1:0] fe_addr;

  assign shin_en    = (fs == F_READ);
  assign shin_addr  = fe_addr;
  assign sh_in_byte = shin_rdata;
  assign sh_in_vld  = (fs == F_HOLD);

  assign shout_we    = sh_out_vld;
  assign shout_wdata = sh_out_byte;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      fs         <= F_IDLE;
      fe_left    <= '0;
      fe_addr    <= '0;
      shout_addr <= '0;
    end else begin
      if (sh_ctrl.start) shout_addr <= '0;
      else if (sh_out_vld) shout_addr <= shout_addr + 1'b1;
      unique case (fs)
        F_IDLE: if (sh_ctrl.start && inlen_r != 0) begin
          fe_left <= inlen_r;
          fe_addr <= '0;
          fs      <= F_READ;
        end
        F_READ: fs <= F_HOLD;
        F_HOLD: if (sh_in_ack) begin
          fe_addr <= fe_addr + 1'b1;
          fe_left <= fe_left - 1'b1;
          fs      <= (fe_left == 32'd1) ? F_IDLE : F_READ;
        end
        default: fs <= F_IDLE;
      endcase
    end
  end

  // a new byte is only sent to the transmitter when it is free
  a_tx_one_at_a_time: assert property (@(posedge clk) disable iff (rst)
                                       tx_start |-> cs == C_TXWAIT);
endmodule
