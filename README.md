# Rate-compatible LDPC codec with zero-filling decoder

This is a rate-compatible LDPC (low-density parity-check) encoder/decoder pair in
synthesizable SystemVerilog. One rate-1/2 *mother* code serves every code rate
from 1/2 up to 24/25. The transmitter always sends the message and one parity
vector. If the channel needs more redundancy, it sends further parity vectors,
up front (a lower fixed rate) or one at a time when the receiver asks for them
(incremental-redundancy ARQ). The receiver runs a single decoder for every rate.
It treats each parity vector it has not received as an erasure, with LLR 0
("zero filling"). The decoder therefore always works on the mother code's
graph; only the channel values change with the rate.

The design follows the architecture of the paper "A High-Throughput
Reconfigurable LDPC Codec for Wide Band Digital Communications" (J. Européen
des Systèmes Automatisés, 2023): the code structure, the 32-parallel XOR-tree
encoder, the parity-vector transmission order, the degree-8 row-column
processor with its sign and magnitude processors, the 36-parallel layered
decoder and the zero-filling rule. The paper leaves a lot unspecified, most
importantly the shift values of its parity-check matrix. Those gaps are filled
here, and [Where this design departs from the paper](#where-this-design-departs-from-the-paper)
lists them.

## The code

The parity-check matrix `M` is a 24 x 48 array of 72 x 72 sub-matrices
(a = 72, I = 24 block rows, J = 24 systematic block columns). The codeword is
`[p_1 .. p_24, q_1 .. q_24]`, where each `p_j` and `q_i` is a 72-bit vector, so a
frame carries 1728 message bits.

* **Systematic part** (block columns 0..23). Each block row holds six circularly
  shifted identities `K(S)`. Block row `i` (0-based) uses block columns
  `(i + {0, 1, 3, 7, 12, 20}) mod 24` and shift `S = ((i^2 + 3)(c + 2) + 5t) mod a`
  for slot `t` in column `c`. Every systematic column then has weight 6, and at
  a = 72 only one pair of block rows closes length-4 cycles. These values are this design's
  own (`rtl/ldpc_pkg.sv`, functions `base_col` and `base_shift`); the paper does
  not print its values.
* **Parity part** (block columns 24..47) is dual diagonal. Block row `i` has
  identities at parity columns `i-1` and `i`. Each row of `M` therefore has at
  most 8 ones, which fixes the processor degree at 8.

Encoding follows from `M x^T = 0`:

    q_1 = sum_j K(S_1j) p_j
    q_i = sum_j K(S_ij) p_j + q_(i-1)          (mod 2)

so `q_i` is the running sum of the first `i` block rows. The last vector, `q_24`,
checks the whole systematic part in one vector. Sending `p` with `q_24` alone
gives the highest rate, 24/25 = 0.96. `q_24` is sent first because it covers
every block row. Any other single vector `q_i` checks only the first `i`
block rows and would leave the rest of the message unprotected.

Multiplying `K(S)` by a vector `p` is a rotation: bit `k` of `K(S) p` is bit
`(k + S) mod a` of `p`.

## Rates and the transmission order

A frame always starts with `p_1..p_24` and then `q_24`. The remaining parity
vectors follow in a fixed order, either up front or one per ARQ request:

    q12, q6, q18, q2, q4, q8, q10, q14, q16, q20, q22, q1, q3, q5, ..., q23

That is `q_(J/2)`, `q_(J/4)`, `q_(3J/4)`, then the other even indices, then the
odd ones. The order spreads the known parity vectors evenly along the
dual-diagonal chain, so each erased vector lies between two known ones.

| parity vectors sent (`n_par`) | 1 | 2 | 3 | 4 | 7 | 11 | 22 | 24 |
|---|---|---|---|---|---|---|---|---|
| code rate 24/(24+n_par) | 0.960 | 0.923 | 0.889 | 0.857 | 0.774 | 0.686 | 0.522 | 0.500 |

## Encoder (`ldpc_encoder`)

The encoder has 32 `xor_processor` lanes. Each lane computes one parity bit,
`q_i(k) = XOR_t p_c((k + S) mod a) XOR q_(i-1)(k)`, with a balanced XOR tree of
7 inputs. The 1728 parity bits are produced 32 per clock in the order
`n = i*a + k`, 54 clocks per codeword. Bit `k` of `q_(i-1)` lies `a = 72`
positions earlier, so it was produced at least two clocks before it is needed.
This holds whenever the lane count is at most `a`.

The message arrives as 32-bit words on a valid/ready handshake into an input
buffer, so the next message loads while the current one encodes. The codeword
is held on `cw_sys`/`cw_par` until `cw_ready`.

* Latency: the codeword is valid 55 clocks after the last message word is
  accepted (1 transfer clock plus 54 encoding clocks).
* Throughput: one codeword every 55 clocks, about 31.4 message bits per clock
  (5.65 Gbit/s at 180 MHz).

## Transmitter (`arq_tx_scheduler`)

The transmitter takes a codeword and sends `24 + n_par` segments, one per clock
while `tx_ready` is high. Each segment is 72 bits, tagged with its block-column
index (`0..23` for the systematic vectors `p_j`, `23+i` for `q_i`); `tx_first`
marks the first segment of a frame. It then holds the frame (`frame_held`):

* Each `arq_req` pulse sends the next parity vector in the order above,
  flagged with `tx_retx`.
* `arq_exhausted` rises once all 24 parity vectors have been sent.
* `ack` releases the frame, and the next codeword is taken.

`n_par` is sampled when a codeword is taken, so the rate can change from frame
to frame.

## Decoder (`ldpc_decoder`)

### Data held

| memory | contents | width |
|---|---|---|
| `chan[48][72]` | received channel LLRs; `frame_start` clears all to 0 | 8 bit |
| `post[48][72]` | posterior LLRs `Z_n`, loaded from `chan` at `dec_start` | 10 bit |
| `msg[24][8][72]` | check messages `Y_mn` per block row and slot | 8 bit |

Zero filling is simply this: `chan` is cleared at the start of a frame, and
only received segments are written into it. An unsent parity bit starts with
`Z = 0` and learns its value through its checks. Keeping `chan` separate from
`post` means a decode after an ARQ retransmission restarts from the channel
values plus the new vector, not from a failed decoder state.

LLR format: 8-bit two's complement, positive for bit 0. One LSB is 1/16,
matching the 4 fractional bits of the magnitude path.

**Scale the channel LLRs.** Channel values and check messages share the same
+-127 (7.94) limit, so the receiver must not feed LLRs that all sit at the
limit. At high SNR the exact LLR `2y/sigma^2` clips at 127 for nearly every
bit. A check that disagrees then cancels a posterior to exactly 0
(`x + Y' = -127 + 127`). A zero posterior looks like an erased bit, and it
zeroes the other messages of its rows, so the zeros spread until the frame
fails, often with the message already correct. Too small a gain does the
opposite damage at high rates: along a long run of punctured parity vectors
each link's message shrinks until it rounds to 0. A gain of
`min(2/sigma^2, 5)` (BPSK symbols +-1) decoded every rate in the test below.

### Schedule

The decoder is layered (turbo-decoding message passing). Each iteration walks
the block rows from the bottom (row 24) to the top (row 1). A block row has
72 check rows with no code bit in common, so its 72 rows can be updated at once
without conflict. The 36 row-column processors take half a block row per clock:
2 clocks per block row, 48 clocks per iteration.

In one clock, for each of the 8 slots of the current block row:

1. The slot's block column of `post` is rotated by its shift `S`
   (`cyclic_shifter`), so that element `k` belongs to check row `k`.
2. Processor `l` takes element `half*36 + l` of all 8 rotated vectors, with the
   matching 8 check messages.
3. The updated elements replace the old ones in the rotated vector. The vector
   is rotated back by `a - S` and written to `post`, and the new messages are
   written to `msg`.

The bottom-to-top order matters for the punctured codes. Row 24 holds the
received `q_24` and the erased `q_23`, so processing it first gives `q_23` a
value, which row 23 then passes on to `q_22`, and so on. One sweep carries
information down the whole parity chain.

### Row-column processor (`row_column_processor`)

This processor merges the check-node and bit-node updates for one row of
degree 8. For each of the 8 positions `n`:

    x_n   = Z_n - Y_mn                                   input subtractors
    Y'_mn = (prod_{i!=n} sign x_i) * phi( sum_{i!=n} phi(|x_i|) )
    Z'_n  = x_n + Y'_mn                                  output adders

* `s_to_u` splits `x_n` into a sign and a 7-bit magnitude, saturating at 127
  (7.94).
* `sign_processor` forms `P` = the XOR of the 8 signs (7 XOR gates) and the
  output signs `P XOR s_n` (8 more).
* `magnitude_processor` maps each magnitude through `phi_lut`, adds the 8
  terms, subtracts each position's own term, saturates the result to 7 bits,
  and maps it back through `phi_lut`. `phi` is its own inverse, so one table
  serves both sides.
* `u_to_s` rebuilds the 8-bit signed message.
* `Z'` saturates at +-511.

`phi(x) = -ln(tanh(x/2))` is computed at elaboration from the formula on a
7-bit grid with 4 fractional bits; `phi(0)` maps to 127. Rows with only 7 ones
(block row 1 has a single parity identity) disable the eighth slot. A disabled
slot enters as sign 0 with magnitude 127, which has `phi = 0` and leaves the
other outputs untouched.

The processor has two parity outputs:

* `sign_parity` is `P` from the sign processor.
* `parity_ok` is the parity of the hard decisions of the updated `Z'`.

### Stopping

Decoding stops with `dec_ok = 1` after an iteration in which every row's
`parity_ok` held and no hard decision changed. Every row was checked right
after its own update, and nothing changed afterwards, so the final hard
decisions satisfy all checks. Otherwise decoding stops after `max_iter`
iterations (1..50; 0 selects 50) with `dec_ok = 0`.

Timing: 1 load clock, then 48 clocks per iteration. `dec_done` pulses with
`dec_sys` (the 1728 message hard decisions), `dec_ok` and `dec_iters`.

## Top level (`rcrc_ldpc_codec`)

The top instantiates the encoder feeding the transmitter, and the decoder next
to them. Modulation, channel and demodulation are not part of the RTL. They sit
between the `tx_*` outputs and the `llr_*` inputs:

* A receiver turns each received 72-bit segment into 72 LLRs.
* It writes them with the segment's block-column index, after a `frame_start`
  pulse.
* It pulses `dec_start`, and on failure asks for more parity with `arq_req`.

The two halves share only clock and reset, so one top serves as a
transmitter, a receiver or a loop-back codec.

All parameters default to the sizes above: `A = 72`, `NI = NJ = 24`,
`P_ENC = 32`, `P_DEC = 36`, `ITER_MX = 50`. Constraints: `P_ENC <= A`,
`J*A` a multiple of `P_ENC`, and `A` a multiple of `P_DEC`. The ARQ order
assumes I = J = 24 gives the listed sequence; other sizes follow the same rule.
All registers use an asynchronous active-low reset `rst_n`.

## Performance at the defaults

| | this RTL | figure quoted in the paper |
|---|---|---|
| encoder | 1728 bits / 55 clocks = 31.4 bit/clk (5.65 Gbit/s at 180 MHz) | 7.2 Gbit/s at 180 MHz |
| decoder, 6 iterations | 1728 bits / 289 clocks = 6.0 bit/clk (1.08 Gbit/s at 180 MHz) | 1.9 Gbit/s at 180 MHz |
| highest rate | 24/25 = 0.96 | quoted as 0.98 |

No timing closure was attempted. The decoder processes a block-row half in one
combinational clock (rotation, processor, inverse rotation). A high-frequency
implementation would pipeline this path and replace the register memories with
RAMs.

## Where this design departs from the paper

* **Matrix values.** The shift coefficients and positions of the sub-matrices
  are this design's own. The paper shows its matrix only as a picture. Error
  rates will therefore not match the paper's curves.
* **Array size.** One passage of the paper speaks of a 32 x 48 sub-matrix
  array and 32 parity vectors. Its encoder section, equations, ARQ list and
  rate-1/2 mother code all use I = J = 24, and that is what is built.
* **Highest rate.** With J = 24, a single parity vector gives rate 24/25 = 0.96.
  The paper's figures of 0.98 (and its curves at 0.97 and 0.99) are not
  reachable with this matrix. Its other curve rates (0.93, 0.89, 0.86, 0.78,
  0.68, 0.52) correspond to `n_par` = 2, 3, 4, 7, 11, 22. Its curves use 1896
  message bits, which is not a multiple of the 24 x 72 block built here.
* **Magnitude rule.** The paper prints the magnitude update with a single
  `phi`. The standard sum-product form `phi(sum phi(.))` is used.
* **Termination.** The paper's row-column processor shows a parity-check output
  from its sign processor. The decoder's stopping test uses the parity of the
  updated posteriors instead. The sign-processor output is still available as
  `sign_parity`.
* **Iterations.** The default limit is 50, from the paper's stopping rule. Its
  error-rate figures use 60 iterations and its throughput figure 6. `max_iter`
  selects any limit up to 50.
* **Parallelism.** The 36 decoder processors and 32 encoder lanes follow the
  paper, but the schedules (half a block row per clock; 32 consecutive parity
  bits per clock) are this design's own, so the throughput figures differ.
* **Code iteration.** The paper also sketches a decoding mode that steps
  from one punctured code to the next during a single decode. It gives no
  schedule for it, so it is not built. Each decode here uses all parity
  vectors received so far, and an ARQ retransmission starts a new decode.
* **This design's own choices.** All interfaces, handshakes, widths beyond the
  7-bit magnitude, saturation, and the ARQ request/acknowledge protocol.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_ldpc_ref_pkg.sv`: a bit-level reference encoder and syndrome counter,
  written directly from the matrix definition.
* The arithmetic blocks (`s_to_u`, `u_to_s`, `sign_processor`, `xor_processor`,
  `phi_lut`) are checked exhaustively. `magnitude_processor` and
  `row_column_processor` are checked against integer models with
  thousands of random vectors.
* `tb_ldpc_encoder` runs at full size. It checks codewords against the
  reference encoder and the parity checks, plus the 55-clock latency and
  interval.
* `tb_arq_tx_scheduler` checks the segment order for several rates, ARQ and
  back-pressure.
* `tb_ldpc_decoder` runs at full size. It decodes the mother code and rates
  24/28 and 24/25 with bit errors, checks iteration counts and clock counts,
  and checks the iteration limit.
* `tb_rate_sweep` runs at full size. It sends 3 frames through a BPSK/AWGN
  channel at each rate 0.50, 0.52, 0.69, 0.77, 0.86, 0.89, 0.92 and 0.96, at
  Eb/N0 from 4 dB (rate 1/2) to 8 dB (rate 24/25), and requires every frame to
  decode. These are single points to show that each rate works. They are not
  error-rate curves.
* `tb_rcrc_ldpc_codec` runs end to end at full size. It pushes 6 frames with
  rate switches through the codec. One frame starts at rate 24/25 with 2.5%
  weak wrong-sign bits and an 8-iteration limit, so it needs several ARQ
  retransmissions and decodes stopped by the iteration limit. It counts each mechanism: punctured frames, rate
  switches, ARQ, early stop, iteration limit, back-pressure, and encoding
  overlapped with a held frame.

Simulate with Verilator 5 from the repository root. For example:

    verilator --binary --timing --assert --top-module tb_rcrc_ldpc_codec \
        rtl/ldpc_pkg.sv rtl/cyclic_shifter.sv rtl/xor_processor.sv rtl/s_to_u.sv \
        rtl/u_to_s.sv rtl/phi_lut.sv rtl/sign_processor.sv rtl/magnitude_processor.sv \
        rtl/row_column_processor.sv rtl/ldpc_encoder.sv rtl/arq_tx_scheduler.sv \
        rtl/ldpc_decoder.sv rtl/rcrc_ldpc_codec.sv tb/tb_ldpc_ref_pkg.sv tb/tb_rcrc_ldpc_codec.sv
    ./obj_dir/Vtb_rcrc_ldpc_codec

Each full-size testbench builds in well under a minute and runs in under a
second. For another block, replace the top module and the last file.

## Files

| file | block |
|---|---|
| `rtl/ldpc_pkg.sv` | sizes, fixed-point formats, matrix definition, ARQ order, `phi` |
| `rtl/cyclic_shifter.sv` | barrel rotator, multiplication by `K(S)` |
| `rtl/xor_processor.sv` | XOR tree for one parity bit |
| `rtl/ldpc_encoder.sv` | 32-lane encoder |
| `rtl/arq_tx_scheduler.sv` | rate-compatible transmitter with ARQ |
| `rtl/s_to_u.sv`, `rtl/u_to_s.sv` | signed / sign-magnitude converters |
| `rtl/phi_lut.sv` | `phi` table |
| `rtl/sign_processor.sv`, `rtl/magnitude_processor.sv` | check-node sign and magnitude paths |
| `rtl/row_column_processor.sv` | degree-8 merged row/column update |
| `rtl/ldpc_decoder.sv` | 36-parallel layered decoder with zero filling |
| `rtl/rcrc_ldpc_codec.sv` | top level |
