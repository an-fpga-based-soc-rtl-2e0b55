// expand_mat: ExpandA of CRYSTALS-Dilithium, generating the public matrix
// A (K x L polynomials of N coefficients mod q) from the 32-byte seed rho.
//
// On a one-cycle `ap_start` the seed is read from the rho memory (32 reads
// over rho_address0/rho_ce0, data on rho_q0 one clock later) into an
// internal buffer. Then, for every entry (i, j), i < K, j < L, the core
// absorbs rho || (j) || (i) (a 16-bit little-endian nonce 256*i + j) into a
// fresh SHAKE-128 state (rate 168 bytes, domain byte 0x1F), permutes, and
// reads the output stream three bytes at a time. Each 23-bit candidate
// b0 | b1<<8 | (b2 & 0x7F)<<16 is kept only if it is below q = 8380417 and
// is then written to matrix word (i*L + j)*N + k through mat_address0,
// mat_d0, mat_ce0 and mat_we0; otherwise it is discarded. After 168 bytes
// the state is permuted again to squeeze more. `ap_done` pulses once when
// all K*L*N coefficients are written; `ap_idle`/`ap_ready` are high while
// waiting for a start.
// Timing: about 40 clocks to absorb, 24 per permutation, 3 per candidate.
// Port names, the SHAKE-128 source, the rejection rule and the FSM control
// follow the described design. The matrix address width is derived from
// K, L and N (14 bits at level 5); the byte-serial absorb and read-out are
// this implementation's choices.
module expand_mat #(
  parameter int unsigned K = soc_pkg::DIL_K,
  parameter int unsigned L = soc_pkg::DIL_L,
  parameter int unsigned N = soc_pkg::DIL_N,
  localparam int unsigned AW = $clog2(K*L*N)
) (
  input  logic          ap_clk,
  input  logic          ap_rst,         // asynchronous, active high
  input  logic          ap_start,
  output logic          ap_done,
  output logic          ap_idle,
  output logic          ap_ready,
  output logic [4:0]    rho_address0,
  output logic          rho_ce0,
  input  logic [7:0]    rho_q0,
  output logic [AW-1:0] mat_address0,
  output logic          mat_ce0,
  output logic          mat_we0,
  output logic [31:0]   mat_d0
);
  import soc_pkg::*;
  localparam logic [7:0] RATE = 8'(SHAKE128_RATE);
  localparam int unsigned PW  = $clog2(K*L);      // polynomial index width
  localparam int unsigned CW  = $clog2(N) + 1;    // coefficient counter width

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD_RHO, S_ABSORB, S_NONCE_LO, S_NONCE_HI, S_PAD1, S_PAD2,
    S_PERM, S_WAIT, S_SAMPLE, S_NEXT, S_DONE
  } state_e;

  state_e        state;
  logic [7:0]    rho_buf [32];
  logic [5:0]    ld_cnt;           // rho load counter, 0..32
  logic          ld_valid;         // rho_q0 holds the byte read last clock
  logic [4:0]    ld_addr_q;
  logic [7:0]    pos;              // absorb index / squeeze read pointer
  logic [PW-1:0] poly;             // i*L + j
  logic [$clog2(K+1)-1:0] row_i;
  logic [$clog2(L+1)-1:0] col_j;
  logic [CW-1:0] ctr;              // accepted coefficients of this poly
  logic [1:0]    bsel;             // which byte of the candidate is read
  logic [7:0]    b0, b1;

  logic       kc_clear, kc_perm, kc_xor, kc_busy, kc_done;
  logic [7:0] kc_xidx, kc_xbyte, kc_rbyte;

  keccak_f1600 u_keccak (
    .clk(ap_clk), .rst(ap_rst),
    .clear(kc_clear), .perm_start(kc_perm),
    .xor_en(kc_xor), .xor_idx(kc_xidx), .xor_byte(kc_xbyte),
    .rd_idx(pos), .rd_byte(kc_rbyte),
    .busy(kc_busy), .perm_done(kc_done)
  );

  logic [22:0] cand;
  assign cand = {kc_rbyte[6:0], b1, b0};

  always_comb begin
    kc_clear = (state == S_NEXT);
    kc_perm  = (state == S_PERM);
    kc_xor   = (state == S_ABSORB) || (state == S_NONCE_LO) || (state == S_NONCE_HI) ||
               (state == S_PAD1) || (state == S_PAD2);
    kc_xidx  = (state == S_PAD2) ? RATE - 8'd1 : pos;
    unique case (state)
      S_ABSORB:   kc_xbyte = rho_buf[pos[4:0]];
      S_NONCE_LO: kc_xbyte = 8'(col_j);
      S_NONCE_HI: kc_xbyte = 8'(row_i);
      S_PAD1:     kc_xbyte = 8'h1F;
      S_PAD2:     kc_xbyte = 8'h80;
      default:    kc_xbyte = 8'h00;
    endcase
  end

  assign rho_ce0      = (state == S_LOAD_RHO) && (ld_cnt < 6'd32);
  assign rho_address0 = ld_cnt[4:0];

  // matrix write port: registered
  always_ff @(posedge ap_clk or posedge ap_rst) begin
    if (ap_rst) begin
      state <= S_IDLE;
      ld_cnt <= '0; ld_valid <= 1'b0; ld_addr_q <= '0;
      pos <= '0; poly <= '0; row_i <= '0; col_j <= '0; ctr <= '0;
      bsel <= '0; b0 <= '0; b1 <= '0;
      mat_address0 <= '0; mat_ce0 <= 1'b0; mat_we0 <= 1'b0; mat_d0 <= '0;
      ap_done <= 1'b0;
      for (int i = 0; i < 32; i++) rho_buf[i] <= '0;
    end else begin
      ap_done  <= 1'b0;
      mat_ce0  <= 1'b0;
      mat_we0  <= 1'b0;
      ld_valid <= rho_ce0;
      ld_addr_q <= rho_address0;
      if (ld_valid) rho_buf[ld_addr_q] <= rho_q0;
      unique case (state)
        S_IDLE: if (ap_start) begin
          ld_cnt <= '0;
          poly   <= '0;
          row_i  <= '0;
          col_j  <= '0;
          state  <= S_LOAD_RHO;
        end
        S_LOAD_RHO: begin
          if (ld_cnt < 6'd32) ld_cnt <= ld_cnt + 1'b1;
          else if (!ld_valid) state <= S_NEXT;   // last byte captured
        end
        S_NEXT: begin                // state cleared this cycle
          pos   <= '0;
          ctr   <= '0;
          bsel  <= '0;
          state <= S_ABSORB;
        end
        S_ABSORB: begin
          if (pos == 8'd31) state <= S_NONCE_LO;
          pos <= pos + 1'b1;
        end
        S_NONCE_LO: begin pos <= pos + 1'b1; state <= S_NONCE_HI; end
        S_NONCE_HI: begin pos <= pos + 1'b1; state <= S_PAD1; end
        S_PAD1:     state <= S_PAD2;
        S_PAD2:     state <= S_PERM;
        S_PERM:     state <= S_WAIT;
        S_WAIT: if (kc_done) begin
          pos   <= '0;
          bsel  <= '0;
          state <= S_SAMPLE;
        end
        S_SAMPLE: begin
          unique case (bsel)
            2'd0: begin b0 <= kc_rbyte; bsel <= 2'd1; end
            2'd1: begin b1 <= kc_rbyte; bsel <= 2'd2; end
            default: begin
              bsel <= 2'd0;
              if (cand < DIL_Q) begin
                mat_ce0      <= 1'b1;
                mat_we0      <= 1'b1;
                mat_d0       <= {9'd0, cand};
                mat_address0 <= AW'(poly) * AW'(N) + AW'(ctr);
                ctr          <= ctr + 1'b1;
              end
            end
          endcase
          if (bsel == 2'd2 && cand < DIL_Q && ctr == CW'(N - 1)) begin
            // last coefficient of this polynomial
            if (poly == PW'(K*L - 1)) begin
              state <= S_DONE;
            end else begin
              poly <= poly + 1'b1;
              if (col_j == $bits(col_j)'(L - 1)) begin
                col_j <= '0;
                row_i <= row_i + 1'b1;
              end else begin
                col_j <= col_j + 1'b1;
              end
              state <= S_NEXT;
            end
          end else if (pos == RATE - 8'd1) begin
            state <= S_PERM;         // block used up: squeeze another
          end else begin
            pos <= pos + 1'b1;
          end
        end
        S_DONE: begin
          ap_done <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ap_idle  = (state == S_IDLE);
  assign ap_ready = ap_idle;

  property p_perm_when_free;
    @(posedge ap_clk) disable iff (ap_rst) kc_perm |-> !kc_busy;
  endproperty
  a_perm_when_free: assert property (p_perm_when_free);
endmodule
