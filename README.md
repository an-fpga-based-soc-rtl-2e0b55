# CRYSTALS-Dilithium accelerator SoC (security level 5)

CRYSTALS-Dilithium is the lattice-based post-quantum signature scheme
standardised by NIST. Three of its kernels dominate the work on a small
processor: expanding the 32-byte seed rho into the public matrix A
(ExpandA), SHAKE-256 hashing, and adding polynomial vectors. This RTL puts
those three kernels in hardware on a low-cost FPGA (the target is an
Artix-7 board at 100 MHz). Everything else stays in software on a host
computer: key generation, signing and verification, parameter handling and
sequencing. The host reaches the chip over a 9600 bit/s UART. It writes
operands into on-chip memories, starts an accelerator through a control
register, polls a status register and reads the results back.

The scheme parameters are those of NIST level 5: n = 256 coefficients per
polynomial, q = 8380417, and a matrix of K x L = 8 x 7 polynomials.

```
  host software                    FPGA (dilithium_soc)
 +-------------+  uart_rxd  +---------+   +------------+   +------------+
 |  Dilithium  |----------->| uart_rx |-->|            |<->| expand_mat |<-> rho, A memories
 |  protocol   |            +---------+   |            |   +------------+
 |  (keygen,   |  uart_txd  +---------+   | controller |   +------------+
 |  sign,      |<-----------| uart_tx |<--|            |<->| shake256   |<-> SHAKE in/out buffers
 |  verify)    |            +---------+   |            |   +------------+
 +-------------+            +---------+   |            |   +------------+
                            |baud_gen |   |            |<->| polyvec_add|<-> u, v, w memories
                            +---------+   +------------+   +------------+
                            (one tick shared by rx and tx)
```

Each memory is a dual-port RAM (`dp_ram`). Port A belongs to the
controller, so the host can read and write it. Port B belongs to the
accelerator that reads or fills it.

## Using the chip: the serial command protocol

The controller understands two commands. All multi-byte values are sent
most significant byte first, except data words, which are little-endian.

| Host sends | Chip answers |
|---|---|
| `'W'` (0x57), addr[23:16], addr[15:8], addr[7:0], COUNT-1, then 4*COUNT data bytes | `'K'` (0x4B) when all words are stored |
| `'R'` (0x52), addr[23:16], addr[15:8], addr[7:0], COUNT-1 | 4*COUNT data bytes |
| any other byte | `'?'` (0x3F) |

Addresses are word addresses, and a burst covers 1 to 256 consecutive words.
The link is half-duplex: bytes that arrive while the chip is still sending a
reply are lost, so the host must read the whole reply before it sends the
next command.

Address map (word addresses):

| Address | Contents | Size |
|---|---|---|
| 0x000000 | CTRL (write): bit 0 starts ExpandA, bit 1 SHAKE-256, bit 2 the adder | |
| 0x000001 | STATUS (read): bits 2:0 idle of ExpandA/SHAKE/adder; bits 6:4 their done flags | |
| 0x000002 | INLEN: SHAKE-256 input length in bytes | 32 bit |
| 0x000003 | OUTLEN: SHAKE-256 output length in bytes | 32 bit |
| 0x000100 | rho, one byte per word (low byte) | 32 |
| 0x001000 | SHAKE-256 input buffer, one byte per word | 4096 |
| 0x002000 | SHAKE-256 output buffer, one byte per word | 4096 |
| 0x004000 | u, 32-bit coefficients | 2048 |
| 0x005000 | v | 2048 |
| 0x006000 | w = u + v | 2048 |
| 0x010000 | matrix A, word (i*L + j)*256 + k holds A[i][j] coefficient k | 14336 |

Unmapped addresses read as zero and ignore writes. A done flag stays set
until the next start of the same block. A start written while that block is
busy is ignored. A typical ExpandA call:

1. `W 000100 1F` with the 32 seed bytes, each as one word;
2. `W 000000 00` with the word 1, which starts ExpandA;
3. `R 000001 00` repeatedly, until bit 4 is set;
4. `R 010000 FF`, and so on, to fetch the matrix.

For SHAKE-256, fill the input buffer, set INLEN and OUTLEN, and write 2 to
CTRL. The controller then streams the first INLEN bytes of the buffer into
the core. The core's output lands at the start of the output buffer.

## The Keccak engine (`keccak_f1600`)

Both XOF cores use the same engine. Each core has its own instance. The
engine holds the 1600-bit state as 25 lanes of 64 bits. Lane (x, y) sits at
bits [64(x+5y) +: 64], so state byte i is at bits [8i +: 8], which is the
sponge's byte order. The engine applies one full round (theta, rho, pi, chi,
iota) per clock. It is iterative rather than unrolled, which costs little
area. The clock edge that samples `perm_start` begins the permutation, the
next 24 edges apply rounds 0 to 23, and `perm_done` is high for the clock
after the last round.

The cores reach the state through a byte port:
* `clear` zeroes the state;
* `xor_en` XORs one byte into state byte `xor_idx`;
* `rd_byte` shows state byte `rd_idx` combinationally.

Absorbing and squeezing therefore take one clock per byte. The round
constants and rotation offsets are not typed in as tables. Constant
functions compute them at elaboration from their definitions: the
x^8+x^6+x^5+x^4+1 LFSR, and the triangular numbers along the
(x, y) -> (y, 2x+3y) walk.

## ExpandA (`expand_mat`)

After a one-cycle `ap_start`, the core does the following:

1. It reads the 32 seed bytes from the rho memory into registers. The
   memory has one clock of read latency.
2. For each matrix entry (i, j), in row-major order, it clears the state and
   XORs in rho, then j and i as the two nonce bytes. It then adds the
   SHAKE-128 padding: 0x1F at byte 34 and 0x80 at byte 167, since the rate
   is 168 bytes. Finally it permutes.
3. It reads the state three bytes at a time. The 23-bit candidate is
   `b0 | b1<<8 | (b2 & 0x7F)<<16`. A candidate below q is written to the
   matrix memory (`mat_address0`, `mat_d0`, `mat_ce0`, `mat_we0`). Any
   other candidate is dropped. When all 168 bytes of a block have been used,
   the core permutes again to squeeze more.
4. After 256 accepted coefficients it moves to the next entry. `ap_done`
   pulses once after the last of the 14336 coefficients.

Because 168 is a multiple of 3, treating the output as a single stream
gives exactly the reference ExpandA of Dilithium. One entry costs about 40
clocks of absorbing, then 25 clocks per permutation and 3 clocks per
candidate. In simulation this comes to about 940 clocks per polynomial,
or about 52,400 clocks (0.52 ms at 100 MHz) for the whole matrix. A
candidate is rejected with probability about 0.1 %.

The matrix address is `clog2(K*L*N)` = 14 bits wide. A 13-bit address,
which would suit an 8192-word matrix, is too small for level 5.

## SHAKE-256 (`shake256`)

The ports follow the ap_ctrl convention: `ap_start`, `ap_done`, `ap_idle`,
`ap_ready`, `input_r`, `inlen`, `outlen`, `output_r` and `output_r_ap_vld`.
A start latches `inlen` and `outlen` (64 bits each) and clears the state.
Input bytes come with `input_r_ap_vld`, and the core answers
`input_r_ap_ack` in the same clock when it takes one. It takes none while a
permutation runs, and none beyond `inlen`. After every 136 absorbed bytes
the core permutes. Then it XORs 0x1F at the current position and 0x80 at
byte 135, and permutes once more. It squeezes `outlen` bytes, one per clock
with a one-cycle `output_r_ap_vld`, and permutes again after every 136
bytes. The output has no back-pressure: the receiver must take a byte every
clock. `ap_done` pulses once after the last byte.

Inside the SoC, the controller's feeder offers one buffer byte every two
clocks, and a collector writes each output byte to the next address of the
output buffer. A 2592-byte level-5 public key fits the 4096-byte buffer.
Longer messages must be hashed by the host.

## Polynomial-vector adder (`polyvec_add`)

The adder computes w[k] = u[k] + v[k] for all 8 x 256 coefficients, one per
clock. It is a three-stage pipeline:
* it issues a read address to u and v;
* the data come back a clock later and are added;
* the sum is written to w.

The sum is a plain 32-bit addition with no reduction mod q, the same as
`poly_add` in the Dilithium reference code. Inputs in [0, q) give results
below 2q. After reset, idle and ready are 1 and done is 0. A one-cycle
`ap_ctrl_0_start` drops idle and ready. `ap_ctrl_0_done` pulses NPOLY*N + 3
clocks after the start edge (2051 clocks), and idle and ready rise again
with it. Port names carry the `_0` suffix (`u_address0_0`, `w_we0_0`, ...).
The vector length is the parameter `NPOLY`, 8 by default (a length-K
vector). For a length-L vector, instantiate with 7.

## UART (`baud_gen`, `uart_tx`, `uart_rx`)

`baud_gen` counts clocks and pulses `tick` for one clock every
`CLOCK_FREQ / BAUD_RATE` clocks, which is 10416 at the defaults. Its reset
is asynchronous. The transmitter and receiver are four-state machines
(IDLE, START_BIT, DATA_BITS, STOP_BIT) that move only on this shared tick.
Frames are 8N1, LSB first.

* The transmitter waits for a tick before it drives the start bit, so every
  bit lasts exactly one tick period. `tx_done` pulses when the stop bit
  ends. A frame takes 10 tick periods. An added `tx_busy` output shows that
  a frame is pending or in progress.
* The receiver passes `rx` through a two-flop synchronizer. It leaves IDLE
  on a low level. It checks the start bit at the next tick and gives up if
  the line is high again. It then samples one data bit per tick, and at the
  following tick it checks the stop bit. `rx_done` pulses only for a high
  stop bit.

**Caveat.** The receiver samples once per bit, at whatever phase the
free-running tick has against the incoming start edge. It does not
oversample. This works when the host's bit period matches the chip's and
the phase is not within a few clocks of a bit edge, which holds for most
phases at 10416 clocks per bit. It is the least robust part of the design.
A 16x-oversampling receiver would be the usual fix. The testbenches align
the host's frames so that the ticks fall mid-bit.

## Memories (`dp_ram`)

`dp_ram` is a simple dual-port RAM with a synchronous read and one clock of
latency. A read returns the old data when the same port writes the same
address. If both ports write one address in the same clock, port B wins.
The memories are not reset. Sizes at the defaults:

| Memory | Words x bits | Bits |
|---|---|---|
| matrix A | 14336 x 32 | 458,752 |
| u, v, w | 3 x 2048 x 32 | 196,608 |
| SHAKE in/out | 2 x 4096 x 8 | 65,536 |
| rho | 32 x 8 | 256 |

Together this is about 720 kbit, or 20 block RAMs of 36 kbit. That is more
than the 10 block RAMs reported for the original prototype. The largest
item is the full level-5 matrix, which this RTL keeps on chip.

## What follows the original design and what is this RTL's own

Taken from the published description of this SoC:
* the partitioning (three accelerators, a controller, on-chip memory, and a
  UART with a shared baud generator);
* the port names of all six blocks;
* the ap_ctrl start/done/idle/ready behaviour of the adder;
* the SHAKE-128-plus-rejection structure of ExpandA and its `a < q` rule;
* the 136-byte multi-block SHAKE-256 with an iterative Keccak-f[1600];
* the baud-period rule and the four-state UART machines;
* 100 MHz, 9600 bit/s, n = 256 and q = 8380417.

Chosen here, because the description does not give them:
* the serial command protocol, register map and address map;
* the dual-port memories and the buffer sizes;
* the SHAKE input handshake (`input_r_ap_vld` / `input_r_ap_ack`);
* one round per clock and the byte-wide state port;
* the nonce and candidate encoding of ExpandA, taken from the Dilithium
  specification;
* K = 8 and L = 7;
* the adder's single lane and its vector length;
* the UART's start-bit alignment, `tx_done` timing, synchronizer and
  framing-error handling;
* an active-high asynchronous reset everywhere.

Deliberate departures:
* The matrix address is 14 bits rather than 13, so that a level-5 matrix
  fits.
* The adder does not reduce mod q ("pure linear addition").
* The description mentions an embedded processor in one place and host-side
  software in another. Here the processor is the host computer, off chip,
  and there is no soft-core CPU.

## Verifying and simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. `tb/keccak_ref_pkg.sv` is an independent
behavioural model of Keccak-f[1600], SHAKE-128/256 and ExpandA, with tabled
constants. The testbenches check it against the published SHAKE-128("")
and SHAKE-256("") prefixes and the zero-state Keccak-f output.
`tb/soc_host.sv` models the host's serial port and protocol.

| Testbench | What it shows |
|---|---|
| `tb_keccak_f1600` | random states match the model; 25-clock start-to-done |
| `tb_shake256` | input/output lengths 0 to 600 around the 136-byte boundaries and a 2592-byte public key, random input gaps |
| `tb_expand_mat` | all 14336 coefficients of two full level-5 matrices, each word written once, rejections occur, run time |
| `tb_polyvec_add` | all 2048 sums, wrap-around sums, latency 2051 clocks |
| `tb_baud_gen`, `tb_uart_tx`, `tb_uart_rx` | tick period, frame timing and bits, framing error, start-bit glitch |
| `tb_dp_ram` | random dual-port traffic with collisions |
| `tb_controller` | every region and register, start pulses, status flags, SHAKE streaming |
| `tb_dilithium_soc` | the whole chip over its pins at 16 clocks per bit: ExpandA, adder, 300-byte SHAKE-256 |
| `tb_dilithium_soc_full` | default parameters (9600 bit/s): seed, ExpandA, poll, read back; about 19 M clocks |

To run one testbench with Verilator 5, from the folder that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/soc_pkg.sv tb/keccak_ref_pkg.sv tb/tb_dilithium_soc.sv \
    --top-module tb_dilithium_soc
./obj_dir/Vtb_dilithium_soc
```

Leave out `tb/keccak_ref_pkg.sv` for testbenches that do not import it.
Every testbench finishes in seconds. The full-size one takes about 15 s.

## Limits

* The tick-rate UART receiver (see above).
* No back-pressure on the SHAKE-256 output.
* Lengths above the 4096-byte buffers are not checked: the feeder wraps
  around inside the buffer.
* A host may read a memory while an accelerator writes it, and then gets a
  mixture of old and new data.
* The memory budget is larger than that of the original prototype.
* End-to-end key generation, signing and verification are not reproduced
  here, because they run in host software. Only the three accelerated
  kernels are implemented and tested.
