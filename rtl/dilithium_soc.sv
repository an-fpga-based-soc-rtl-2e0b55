// dilithium_soc: FPGA side of a hardware/software co-designed
// CRYSTALS-Dilithium (security level 5) signature system.
//
// A host computer runs the Dilithium protocol in software and offloads
// three kernels to this chip over a UART link: ExpandA (matrix expansion
// from the seed rho with SHAKE-128 and rejection sampling), SHAKE-256
// hashing, and polynomial-vector addition. The chip holds:
//   * the UART: a shared baud-tick generator, receiver and transmitter;
//   * the controller, which turns received command frames into accesses to
//     control registers and on-chip memories and starts the accelerators;
//   * the on-chip memories rho (32 B), SHAKE input and output buffers
//     (SHBUF_BYTES each), polynomial vectors u, v, w (K*N words each) and
//     the matrix A (K*L*N words);
//   * the three accelerators, each with an ap_ctrl style start/done/idle/
//     ready handshake and memory-style data ports.
// Every memory has two ports: port A for the controller, port B for the
// accelerator that reads or fills it. See controller.sv for the command
// frame and soc_pkg.sv for the address map.
//
// The block structure (UART Rx/Tx/baud generator, one controller, three
// accelerators, on-chip memory) follows the described design. The command
// protocol, the address map, the dual-port memories and the buffer sizes
// are this implementation's own choices.
module dilithium_soc
  import soc_pkg::*;
#(
  parameter int unsigned CLOCK_FREQ  = 100_000_000,
  parameter int unsigned BAUD_RATE   = 9600,
  parameter int unsigned K           = DIL_K,
  parameter int unsigned L           = DIL_L,
  parameter int unsigned SHBUF_BYTES = 4096
) (
  input  logic clk,
  input  logic rst,        // asynchronous, active high
  input  logic uart_rxd,   // from the host
  output logic uart_txd    // to the host
);
  localparam int unsigned N         = DIL_N;
  localparam int unsigned MAT_WORDS = K * L * N;
  localparam int unsigned VEC_WORDS = K * N;
  localparam int unsigned MAW       = $clog2(MAT_WORDS);
  localparam int unsigned VAW       = $clog2(VEC_WORDS);
  localparam int unsigned SBW       = $clog2(SHBUF_BYTES);

  // ---------------- UART ----------------
  logic       tick;
  logic [7:0] rx_data, tx_data;
  logic       rx_done, tx_start, tx_done, tx_busy;

  baud_gen #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) u_baud (
    .clk, .rst, .tick);
  uart_rx u_rx (.clk, .rst, .baudrate_tick(tick), .rx(uart_rxd),
                .rx_data, .rx_done);
  uart_tx u_tx (.clk, .rst, .baudrate_tick(tick), .tx_data, .tx_start,
                .tx(uart_txd), .tx_done, .tx_busy);

  // ---------------- controller ----------------
  ap_ctrl_req_t exp_ctrl, sh_ctrl, add_ctrl;
  ap_ctrl_rsp_t exp_stat, sh_stat, add_stat;
  logic [63:0]  sh_inlen, sh_outlen;
  logic [7:0]   sh_in_byte, sh_out_byte;
  logic         sh_in_vld, sh_in_ack, sh_out_vld;
  logic           shin_en, shout_we;
  logic [SBW-1:0] shin_addr, shout_addr;
  logic [7:0]     shin_rdata, shout_wdata;
  bus_req_t       bus;
  logic [NUM_MEMS-1:0] mem_en;
  logic [31:0]    mem_rdata [NUM_MEMS];

  controller #(.MAT_WORDS(MAT_WORDS), .VEC_WORDS(VEC_WORDS),
               .SHBUF_BYTES(SHBUF_BYTES)) u_ctrl (
    .clk, .rst,
    .rx_data, .rx_done, .tx_data, .tx_start, .tx_done,
    .exp_ctrl, .exp_stat, .sh_ctrl, .sh_stat, .add_ctrl, .add_stat,
    .sh_inlen, .sh_outlen,
    .sh_in_byte, .sh_in_vld, .sh_in_ack, .sh_out_byte, .sh_out_vld,
    .shin_en, .shin_addr, .shin_rdata,
    .shout_we, .shout_addr, .shout_wdata,
    .bus, .mem_en, .mem_rdata
  );

  // ---------------- ExpandA and its memories ----------------
  logic [4:0]     rho_address0;
  logic           rho_ce0;
  logic [7:0]     rho_q0, rho_a_rdata;
  logic [MAW-1:0] mat_address0;
  logic           mat_ce0, mat_we0;
  logic [31:0]    mat_d0, mat_b_rdata;

  expand_mat #(.K(K), .L(L), .N(N)) u_expand (
    .ap_clk(clk), .ap_rst(rst),
    .ap_start(exp_ctrl.start), .ap_done(exp_stat.done),
    .ap_idle(exp_stat.idle), .ap_ready(exp_stat.ready),
    .rho_address0, .rho_ce0, .rho_q0,
    .mat_address0, .mat_ce0, .mat_we0, .mat_d0
  );

  dp_ram #(.WIDTH(8), .DEPTH(32)) u_rho_mem (
    .clk,
    .a_en(mem_en[MEM_RHO]), .a_we(bus.we), .a_addr(bus.addr[4:0]),
    .a_wdata(bus.wdata[7:0]), .a_rdata(rho_a_rdata),
    .b_en(rho_ce0), .b_we(1'b0), .b_addr(rho_address0), .b_wdata(8'd0),
    .b_rdata(rho_q0));
  assign mem_rdata[MEM_RHO] = {24'd0, rho_a_rdata};

  dp_ram #(.WIDTH(32), .DEPTH(MAT_WORDS)) u_mat_mem (
    .clk,
    .a_en(mem_en[MEM_MAT]), .a_we(bus.we), .a_addr(bus.addr[MAW-1:0]),
    .a_wdata(bus.wdata), .a_rdata(mem_rdata[MEM_MAT]),
    .b_en(mat_ce0), .b_we(mat_we0), .b_addr(mat_address0), .b_wdata(mat_d0),
    .b_rdata(mat_b_rdata));

  // ---------------- SHAKE-256 and its buffers ----------------
  logic [7:0] shin_a_rdata, shout_a_rdata, shout_b_rdata;

  shake256 u_shake (
    .ap_clk(clk), .ap_rst(rst),
    .ap_start(sh_ctrl.start), .ap_done(sh_stat.done),
    .ap_idle(sh_stat.idle), .ap_ready(sh_stat.ready),
    .input_r(sh_in_byte), .input_r_ap_vld(sh_in_vld), .input_r_ap_ack(sh_in_ack),
    .inlen(sh_inlen), .outlen(sh_outlen),
    .output_r(sh_out_byte), .output_r_ap_vld(sh_out_vld)
  );

  dp_ram #(.WIDTH(8), .DEPTH(SHBUF_BYTES)) u_shin_mem (
    .clk,
    .a_en(mem_en[MEM_SHIN]), .a_we(bus.we), .a_addr(bus.addr[SBW-1:0]),
    .a_wdata(bus.wdata[7:0]), .a_rdata(shin_a_rdata),
    .b_en(shin_en), .b_we(1'b0), .b_addr(shin_addr), .b_wdata(8'd0),
    .b_rdata(shin_rdata));
  assign mem_rdata[MEM_SHIN] = {24'd0, shin_a_rdata};

  dp_ram #(.WIDTH(8), .DEPTH(SHBUF_BYTES)) u_shout_mem (
    .clk,
    .a_en(mem_en[MEM_SHOUT]), .a_we(bus.we), .a_addr(bus.addr[SBW-1:0]),
    .a_wdata(bus.wdata[7:0]), .a_rdata(shout_a_rdata),
    .b_en(shout_we), .b_we(shout_we), .b_addr(shout_addr), .b_wdata(shout_wdata),
    .b_rdata(shout_b_rdata));
  assign mem_rdata[MEM_SHOUT] = {24'd0, shout_a_rdata};

  // ---------------- polynomial vector addition and its memories ----------------
  logic [VAW-1:0] u_address0, v_address0, w_address0;
  logic           u_ce0, v_ce0, w_ce0, w_we0;
  logic [31:0]    u_q0, v_q0, w_d0, w_b_rdata;

  polyvec_add #(.NPOLY(K), .N(N)) u_add (
    .ap_clk_0(clk), .ap_rst_0(rst),
    .ap_ctrl_0_start(add_ctrl.start), .ap_ctrl_0_done(add_stat.done),
    .ap_ctrl_0_idle(add_stat.idle), .ap_ctrl_0_ready(add_stat.ready),
    .u_address0_0(u_address0), .u_ce0_0(u_ce0), .u_q0_0(u_q0),
    .v_address0_0(v_address0), .v_ce0_0(v_ce0), .v_q0_0(v_q0),
    .w_address0_0(w_address0), .w_ce0_0(w_ce0), .w_we0_0(w_we0), .w_d0_0(w_d0)
  );

  dp_ram #(.WIDTH(32), .DEPTH(VEC_WORDS)) u_u_mem (
    .clk,
    .a_en(mem_en[MEM_U]), .a_we(bus.we), .a_addr(bus.addr[VAW-1:0]),
    .a_wdata(bus.wdata), .a_rdata(mem_rdata[MEM_U]),
    .b_en(u_ce0), .b_we(1'b0), .b_addr(u_address0), .b_wdata(32'd0),
    .b_rdata(u_q0));

  dp_ram #(.WIDTH(32), .DEPTH(VEC_WORDS)) u_v_mem (
    .clk,
    .a_en(mem_en[MEM_V]), .a_we(bus.we), .a_addr(bus.addr[VAW-1:0]),
    .a_wdata(bus.wdata), .a_rdata(mem_rdata[MEM_V]),
    .b_en(v_ce0), .b_we(1'b0), .b_addr(v_address0), .b_wdata(32'd0),
    .b_rdata(v_q0));

  dp_ram #(.WIDTH(32), .DEPTH(VEC_WORDS)) u_w_mem (
    .clk,
    .a_en(mem_en[MEM_W]), .a_we(bus.we), .a_addr(bus.addr[VAW-1:0]),
    .a_wdata(bus.wdata), .a_rdata(mem_rdata[MEM_W]),
    .b_en(w_ce0), .b_we(w_we0), .b_addr(w_address0), .b_wdata(w_d0),
    .b_rdata(w_b_rdata));
endmodule
