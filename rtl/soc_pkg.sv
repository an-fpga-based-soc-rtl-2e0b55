// soc_pkg: constants and types shared by the Dilithium accelerator SoC.
//
// Holds the CRYSTALS-Dilithium security-level-5 sizes (n = 256, q = 8380417,
// K = 8, L = 7), the Keccak rates used by the two XOF cores, the UART
// command codes understood by the controller and its word address map.
// The Dilithium numbers are those of the scheme; the command protocol and
// the address map are this design's own choices.
package soc_pkg;

  // ---- Dilithium parameters (NIST security level 5) ----
  localparam int unsigned DIL_N = 256;
  localparam logic [22:0] DIL_Q = 23'd8380417;
  localparam int unsigned DIL_K = 8;
  localparam int unsigned DIL_L = 7;

  // ---- Keccak sponge rates in bytes ----
  localparam int unsigned SHAKE128_RATE = 168;
  localparam int unsigned SHAKE256_RATE = 136;

  // ---- ap_ctrl style block-level handshake seen by the controller ----
  typedef struct packed {
    logic start;   // one-cycle start pulse
  } ap_ctrl_req_t;

  typedef struct packed {
    logic done;    // one-cycle completion pulse
    logic idle;    // block is waiting for start
    logic ready;   // block can accept a new start
  } ap_ctrl_rsp_t;

  // ---- UART command protocol (host -> controller) ----
  // Frame: CMD, ADDR[23:16], ADDR[15:8], ADDR[7:0], COUNT-1, then for a
  // write 4*COUNT data bytes (little-endian words). A write is answered by
  // ACK, a read by 4*COUNT data bytes.
  localparam logic [7:0] CMD_WRITE = 8'h57;  // 'W'
  localparam logic [7:0] CMD_READ  = 8'h52;  // 'R'
  localparam logic [7:0] RSP_ACK   = 8'h4B;  // 'K'
  localparam logic [7:0] RSP_NAK   = 8'h3F;  // '?' unknown command

  // ---- word address map (24-bit word addresses) ----
  localparam logic [23:0] REG_CTRL    = 24'h000000; // W: bit0 ExpandA, bit1 SHAKE, bit2 add
  localparam logic [23:0] REG_STATUS  = 24'h000001; // R: idle[2:0], done[6:4] (sticky)
  localparam logic [23:0] REG_INLEN   = 24'h000002; // RW: SHAKE-256 input length, bytes
  localparam logic [23:0] REG_OUTLEN  = 24'h000003; // RW: SHAKE-256 output length, bytes

  // memory regions: base address, one bus word per memory word
  typedef enum logic [2:0] {
    MEM_RHO   = 3'd0,  // 32 x 8 bit, seed rho
    MEM_SHIN  = 3'd1,  // SHAKE-256 input buffer, bytes
    MEM_SHOUT = 3'd2,  // SHAKE-256 output buffer, bytes
    MEM_U     = 3'd3,  // polynomial vector u, 32-bit coefficients
    MEM_V     = 3'd4,  // polynomial vector v
    MEM_W     = 3'd5,  // polynomial vector w = u + v
    MEM_MAT   = 3'd6   // matrix A, K*L*256 coefficients
  } mem_id_e;
  localparam int unsigned NUM_MEMS = 7;

  localparam logic [23:0] BASE_RHO   = 24'h000100;
  localparam logic [23:0] BASE_SHIN  = 24'h001000;
  localparam logic [23:0] BASE_SHOUT = 24'h002000;
  localparam logic [23:0] BASE_U     = 24'h004000;
  localparam logic [23:0] BASE_V     = 24'h005000;
  localparam logic [23:0] BASE_W     = 24'h006000;
  localparam logic [23:0] BASE_MAT   = 24'h010000;

  // request from the controller to one memory's bus port
  typedef struct packed {
    logic        we;
    logic [23:0] addr;   // offset inside the region
    logic [31:0] wdata;
  } bus_req_t;

endpackage
