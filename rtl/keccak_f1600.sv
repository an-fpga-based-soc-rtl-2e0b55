// keccak_f1600: 1600-bit Keccak state with an iterative Keccak-f[1600]
// permutation and a byte-wide access port, the engine under both XOF cores.
//
// The state is 25 lanes of 64 bits; lane (x,y) sits at bits
// [64*(x+5y) +: 64] and state byte i at bits [8*i +: 8], which is the byte
// order of the Keccak sponge. The permutation runs one full round per clock
// (Theta, Rho, Pi, Chi, Iota): the clock edge that samples `perm_start`
// starts it, the next 24 edges apply rounds 0..23, and `perm_done` is high
// for the one clock after the last round, when the state holds the result.
// Round constants and rotation offsets are computed at elaboration from
// their defining LFSR and triangular-number rules instead of being listed.
//
// Byte port: `clear` zeroes the state; `xor_en` XORs `xor_byte` into state
// byte `xor_idx`; `rd_byte` is state byte `rd_idx`, combinationally. These
// are ignored while `busy`. Priority: clear, then perm_start, then xor_en.
// The iterative one-round-per-clock structure follows the described SHAKE
// core; the byte port is this implementation's choice.
module keccak_f1600 (
  input  logic       clk,
  input  logic       rst,          // asynchronous, active high
  input  logic       clear,
  input  logic       perm_start,
  input  logic       xor_en,
  input  logic [7:0] xor_idx,      // 0..199
  input  logic [7:0] xor_byte,
  input  logic [7:0] rd_idx,       // 0..199
  output logic [7:0] rd_byte,
  output logic       busy,
  output logic       perm_done
);
  typedef logic [63:0] lane_t;

  // rotation offsets of all lanes, 6 bits each, lane x+5y at [6*(x+5y) +: 6]:
  // walk (x,y) from (1,0) by (x,y) <- (y, 2x+3y mod 5), offset (t+1)(t+2)/2
  function automatic logic [25*6-1:0] gen_rho_offsets();
    logic [25*6-1:0] r;
    int x, y, nx;
    r = '0;
    x = 1; y = 0;
    for (int t = 0; t < 24; t++) begin
      r[6*(x + 5*y) +: 6] = 6'(((t+1)*(t+2)/2) % 64);
      nx = y;
      y  = (2*x + 3*y) % 5;
      x  = nx;
    end
    return r;
  endfunction

  // round constants of all 24 rounds: bit 2^j-1 of round ir is output
  // j+7*ir of the LFSR x^8+x^6+x^5+x^4+1, started at 1
  function automatic logic [24*64-1:0] gen_round_consts();
    logic [24*64-1:0] c;
    logic [8:0] r;
    c = '0;
    r = 9'h001;
    for (int t = 0; t < 7*24; t++) begin
      c[64*(t/7) + (1 << (t%7)) - 1] = r[0];
      r = r << 1;
      if (r[8]) r = r ^ 9'h171;
    end
    return c;
  endfunction

  localparam logic [25*6-1:0]  RHO_OFFS = gen_rho_offsets();
  localparam logic [24*64-1:0] RCONSTS  = gen_round_consts();

  function automatic lane_t rotl(input lane_t v, input int n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  logic [1599:0] st;
  logic [1599:0] st_next_round;
  logic [4:0]    round;

  // ---- one Keccak-f round on st, round index `round` ----
  always_comb begin
    lane_t a [25];
    lane_t b [25];
    lane_t c [5];
    lane_t d [5];
      for (int i = 0; i < 25; i++) a[i] = st[64*i +: 64];
    // Theta
    for (int x = 0; x < 5; x++)
      c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++)
      d[x] = c[(x+4)%5] ^ rotl(c[(x+1)%5], 1);
    for (int i = 0; i < 25; i++) a[i] = a[i] ^ d[i%5];
    // Rho and Pi: B[y, 2x+3y] = rot(A[x,y], r[x,y])
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = rotl(a[x + 5*y], int'(RHO_OFFS[6*(x + 5*y) +: 6]));
    // Chi
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        a[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    // Iota
    a[0] = a[0] ^ RCONSTS[64*round +: 64];
    for (int i = 0; i < 25; i++) st_next_round[64*i +: 64] = a[i];
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      st        <= '0;
      round     <= '0;
      busy      <= 1'b0;
      perm_done <= 1'b0;
    end else begin
      perm_done <= 1'b0;
      if (busy) begin
        st <= st_next_round;
        if (round == 5'd23) begin
          busy      <= 1'b0;
          round     <= '0;
          perm_done <= 1'b1;
        end else begin
          round <= round + 1'b1;
        end
      end else if (clear) begin
        st <= '0;
      end else if (perm_start) begin
        busy  <= 1'b1;
        round <= '0;
      end else if (xor_en) begin
        st[8*xor_idx +: 8] <= st[8*xor_idx +: 8] ^ xor_byte;
      end
    end
  end

  assign rd_byte = st[8*rd_idx +: 8];
endmodule
