// shake256: SHAKE-256 extendable-output function core (Keccak sponge,
// rate 136 bytes, capacity 512 bits) with byte-stream input and output.
//
// A one-cycle `ap_start` latches `inlen` and `outlen` and clears the state.
// Absorb: `inlen` bytes arrive on `input_r` with a valid/acknowledge
// handshake (`input_r_ap_vld` from the source, `input_r_ap_ack` back in the
// same cycle when the byte is taken); each is XORed into the next rate
// byte, and after every 136 bytes the Keccak-f[1600] permutation runs
// (24 clocks, one round per clock). Then the domain/padding bits 0x1F and
// 0x80 close the last block and the state is permuted once more.
// Squeeze: `outlen` bytes leave on `output_r`, one per clock, each marked
// by a one-cycle `output_r_ap_vld`; every 136 bytes another permutation
// runs. `ap_done` pulses once after the last output byte; `ap_idle` and
// `ap_ready` are high while the core waits for a start.
// The port names, the 136-byte multi-block absorb/squeeze and the iterative
// permutation follow the described design; the input handshake pair
// (`input_r_ap_vld`, `input_r_ap_ack`) and the byte-serial absorb are this
// implementation's choices. The output has no back-pressure.
module shake256 (
  input  logic        ap_clk,
  input  logic        ap_rst,          // asynchronous, active high
  input  logic        ap_start,
  output logic        ap_done,
  output logic        ap_idle,
  output logic        ap_ready,
  input  logic [7:0]  input_r,
  input  logic        input_r_ap_vld,
  output logic        input_r_ap_ack,
  input  logic [63:0] inlen,
  input  logic [63:0] outlen,
  output logic [7:0]  output_r,
  output logic        output_r_ap_vld
);
  import soc_pkg::*;
  localparam logic [7:0] RATE = 8'(SHAKE256_RATE);

  typedef enum logic [3:0] {
    S_IDLE, S_ABSORB, S_ABS_PERM, S_ABS_WAIT, S_PAD1, S_PAD2,
    S_SQ_PERM, S_SQ_WAIT, S_SQUEEZE, S_DONE
  } state_e;

  state_e      state;
  logic [63:0] in_left, out_left;
  logic [7:0]  pos;

  // Keccak engine control
  logic       kc_clear, kc_perm, kc_xor, kc_busy, kc_done;
  logic [7:0] kc_xidx, kc_xbyte, kc_rbyte;

  keccak_f1600 u_keccak (
    .clk(ap_clk), .rst(ap_rst),
    .clear(kc_clear), .perm_start(kc_perm),
    .xor_en(kc_xor), .xor_idx(kc_xidx), .xor_byte(kc_xbyte),
    .rd_idx(pos), .rd_byte(kc_rbyte),
    .busy(kc_busy), .perm_done(kc_done)
  );

  assign input_r_ap_ack = (state == S_ABSORB) && (in_left != 0) && input_r_ap_vld;

  always_comb begin
    kc_clear = (state == S_IDLE) && ap_start;
    kc_perm  = (state == S_ABS_PERM) || (state == S_SQ_PERM);
    kc_xor   = input_r_ap_ack || (state == S_PAD1) || (state == S_PAD2);
    kc_xidx  = (state == S_PAD2) ? RATE - 8'd1 : pos;
    unique case (state)
      S_PAD1:  kc_xbyte = 8'h1F;
      S_PAD2:  kc_xbyte = 8'h80;
      default: kc_xbyte = input_r;
    endcase
  end

  always_ff @(posedge ap_clk or posedge ap_rst) begin
    if (ap_rst) begin
      state           <= S_IDLE;
      in_left         <= '0;
      out_left        <= '0;
      pos             <= '0;
      output_r        <= '0;
      output_r_ap_vld <= 1'b0;
      ap_done         <= 1'b0;
    end else begin
      output_r_ap_vld <= 1'b0;
      ap_done         <= 1'b0;
      unique case (state)
        S_IDLE: if (ap_start) begin
          in_left  <= inlen;
          out_left <= outlen;
          pos      <= '0;
          state    <= S_ABSORB;
        end
        S_ABSORB: begin
          if (in_left == 0) begin
            state <= S_PAD1;
          end else if (input_r_ap_vld) begin
            in_left <= in_left - 1'b1;
            if (pos == RATE - 8'd1) begin
              pos   <= '0;
              state <= S_ABS_PERM;
            end else begin
              pos <= pos + 1'b1;
            end
          end
        end
        S_ABS_PERM: state <= S_ABS_WAIT;
        S_ABS_WAIT: if (kc_done) state <= S_ABSORB;
        S_PAD1:     state <= S_PAD2;
        S_PAD2:     state <= S_SQ_PERM;
        S_SQ_PERM:  state <= S_SQ_WAIT;
        S_SQ_WAIT: if (kc_done) begin
          pos   <= '0;
          state <= S_SQUEEZE;
        end
        S_SQUEEZE: begin
          if (out_left == 0) begin
            state <= S_DONE;
          end else begin
            output_r        <= kc_rbyte;
            output_r_ap_vld <= 1'b1;
            out_left        <= out_left - 1'b1;
            if (pos == RATE - 8'd1) begin
              state <= (out_left == 1) ? S_DONE : S_SQ_PERM;
            end else begin
              pos <= pos + 1'b1;
            end
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

  // the engine is only started when it is idle
  property p_perm_when_free;
    @(posedge ap_clk) disable iff (ap_rst) kc_perm |-> !kc_busy;
  endproperty
  a_perm_when_free: assert property (p_perm_when_free);
endmodule
