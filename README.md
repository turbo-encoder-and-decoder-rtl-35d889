# Turbo encoder and parallel max-log-MAP turbo decoder for 32-bit messages

This is a complete turbo codec in synthesizable SystemVerilog. A 32-bit message
is encoded at rate 1/3 by two 8-state recursive systematic convolutional (RSC)
encoders. The first encoder reads the message in natural order and the second
reads it through an interleaver. On the receive side an iterative decoder
rebuilds the message. The decoder has two component decoders that exchange
extrinsic information over six iterations. Both component decoders are
time-shared on four soft-in soft-out (SISO) units. Each SISO unit runs the
max-log-MAP algorithm on one quarter of the frame, and all four run in
parallel.

The chip-level block, `turbo_enc_dec`, places the encoder and the decoder on
one die. The systematic word leaves through an output port and passes through
an external channel. It then comes back through an input port to be decoded.
`error` reports whether the received word had to be corrected.

The four 32-bit reference frames of the original design all decode correctly:

| message    | word after the channel | decoded    | `error` |
|------------|------------------------|------------|---------|
| `0000CC00` | `0000CC00`             | `0000CC00` | 0       |
| `0000AF00` | `0000AF00`             | `0000AF00` | 0       |
| `0000F200` | `0000F100` (2 bits)    | `0000F200` | 1       |
| `00003F00` | `00002F00` (1 bit)     | `00003F00` | 1       |

## The code

**Constituent encoder (`rsc_encoder`).** Three memory cells m1 → m2 → m3.
- The feedback sum is `a = d ^ m2 ^ m3`. This is the feedback polynomial 1 + D² + D³.
- `a` is shifted into m1.
- The parity bit is `p = a ^ m1 ^ m3`. This is the feedforward polynomial 1 + D + D³.

A state is written `{m1,m2,m3}`, so input 1 from S0 = 000 leads to S4 = 100.
Every frame starts in S0. No tail bits are sent, so the decoder treats the
final state as unknown.

**Interleaver (`qpp_interleaver`).** The interleaver is a quadratic
permutation polynomial:

    pi(i) = (7*i + 12*i^2) mod N        (N = 32)

Encoder 2 takes message bit `pi(i)` at step `i`. The law was chosen because
it is *contention free*, and the parallel decoder depends on that (see below).
For N a power of two, any odd F1 and even F2 give a valid permutation.

**Codeword.** The codeword is the systematic word, parity word 1 (natural
order) and parity word 2 (interleaved order): 3N = 96 bits. Bits are handled
LSB first. There is no puncturing.

## Chip interface and timing (`turbo_enc_dec`)

| port                           | dir | width | meaning |
|--------------------------------|-----|-------|---------|
| `clk`                          | in  | 1     | rising-edge clock |
| `reset`                        | in  | 1     | synchronous, active high; all registers return to 0 |
| `tx_start`                     | in  | 1     | latch `turbo_tx_data_in_encoder` and start a frame (ignored while `busy`) |
| `turbo_tx_data_in_encoder`     | in  | 32    | message |
| `turbo_enc_data_out`           | out | 32    | transmitted systematic word, towards the channel |
| `turbo_enc_data_in`            | in  | 32    | word returned by the channel |
| `turbo_rx_data_out_decoder`    | out | 32    | decoded message |
| `error`                        | out | 1     | 1 if the received word differed from the decoded one |
| `rx_done`                      | out | 1     | pulse when the decoded word and `error` are valid |
| `busy`                         | out | 1     | a frame is in flight |

One frame goes through these steps, counted from the `tx_start` edge:

1. The encoder takes N+1 = 33 cycles. It processes one bit per clock and feeds
   both RSCs in parallel. `turbo_enc_data_out` is then valid and holds until
   the next frame.
2. One cycle later the decoder samples `turbo_enc_data_in`. The channel is
   given this one cycle.
3. The decoder finishes after another W + 2·ITERS·(2W+1) + 2 = 214 cycles.

**Total: 248 cycles from `tx_start` to `rx_done` at the defaults.**
The outputs hold until the next frame completes. Only one frame is in flight
at a time.

Each received bit becomes an LLR of ±8. The parity words do not leave the
chip. They go straight from the encoder to the decoder, so only the
systematic word can be corrupted. This follows the reference test setup,
where the channel pin is 32 bits wide.

To decode real soft channel values, use `turbo_decoder` directly. It takes
three vectors of 6-bit LLRs.

## How the decoder works

### The algorithm (`siso_decoder`)

LLRs are positive for bit 1. For one trellis step with systematic LLR Ls,
parity LLR Lp and a-priori LLR La:

    gamma(d,p) = d*(Ls + La) + p*Lp
    alpha_{k+1}(s') = max over branches s -> s' of alpha_k(s) + gamma
    beta_k(s)       = max over d of gamma(d, p(s,d)) + beta_{k+1}(next(s,d))
    L   = max_{d=1}(alpha + gamma + beta) - max_{d=0}(alpha + gamma + beta)
    Le  = sat8( (3 * (L - Ls - La)) >>> 2 )

About these equations:
- The usual symmetric branch metric is ±½(La+Ls) ±½Lp. This `gamma` differs
  from it by a constant that is the same for every branch of a step, so L does
  not change.
- The factor 3/4 scales the extrinsic output. Max-log decoders usually
  over-estimate their output, and this compensates.
- Each new alpha or beta vector is shifted so that state 0 holds 0. This keeps
  the 14-bit metrics bounded. Shifting does not change any LLR.

A SISO unit does one trellis step per clock, in two passes:
- **Forward pass** (W = 8 clocks). It pushes alpha_k and the step's
  (Ls, Lp, La) into two stack buffers (`siso_buffer`), then updates alpha.
- **Backward pass** (8 clocks). It pops the buffers in reverse order. In that
  same cycle it produces L, Le and the hard decision for step k, combinationally,
  then updates beta.

### The half-iteration schedule (`agu_ctrl`)

One iteration has two half-iterations:

| half | component decoder | sequence order | parity | a-priori input |
|------|-------------------|----------------|--------|----------------|
| 0    | decoder 1         | natural        | 1      | de-interleaved extrinsic of decoder 2 |
| 1    | decoder 2         | interleaved    | 2      | interleaved extrinsic of decoder 1 |

SISO unit p works on window p, which is positions `p*W .. p*W+W-1` of the
current sequence. The control unit runs these phases:

    LOAD  8 cycles   systematic LLRs into the banks, extrinsic cleared
    repeat 12 times (6 iterations x 2 halves):
      INIT 1 cycle   start/end metrics into the SISO units
      FWD  8 cycles  t = 0..7
      BWD  8 cycles  t = 7..0, extrinsic written back
    FIN   1 cycle    decoded word published; done one cycle later

### Memory banking and why the interleaver must be contention free

The systematic LLRs and the extrinsic LLRs are each stored in four banks
(`llr_bank_ram`, eight RAMs in all). Bank b holds bit positions
`b*8 .. b*8+7`.

At step t, SISO unit p needs bit position `j = p*W + t` in half 0, and
`pi(p*W + t)` in half 1.
- **Half 0:** unit p simply uses bank p.
- **Half 1:** the four interleaved positions must fall in four *different*
  banks, or two units would need the same single-port bank in one cycle.

The quadratic permutation guarantees this for every window length that
divides N. It also makes the word address `pi(j) mod W` identical for all
four units.

The address generator computes the addresses:
- It has one `qpp_interleaver` per unit.
- A multiplexer picks natural or interleaved addressing.
- The position is split into bank and word address.

The `switch_matrix` crossbar connects unit p to bank `sel[p]`. An assertion
checks that the selects form a permutation.

**Extrinsic values are updated in place.** A unit reads the a-priori value of
a bit in its forward pass. In the backward pass it overwrites that value with
its own extrinsic output, at the same address. This works because within one
half-iteration every bit is read and written by the same unit only. So one
extrinsic memory serves both directions: interleaving and de-interleaving
happen in the addressing, and no data is moved.

### Window boundaries (`boundary_metric_store`)

Window p cannot wait for the alpha of window p-1 or the beta of window p+1.
Instead, it starts from the values its neighbours reached at that boundary in
the previous iteration of the *same* component decoder. The store keeps, for
each component decoder and each unit:
- the end-of-window alpha;
- the start-of-window beta.

Fixed starting values:
- Window 0 always starts in the known state S0.
- The last window always ends with equal metrics, because the trellis is not
  terminated.
- In the first iteration every inner boundary starts with equal metrics.

Errors near the inner boundaries are therefore corrected only after a few
iterations. This is one reason for using six.

### Output and error flag (`output_packer`)

In the final half-iteration, every backward step gives four hard decisions. A
decision from unit p belongs to message bit `pi(p*W + t)`, and the packer
writes it there. This is the de-interleaving of the output. On FIN the packed
word is copied to the output register. `error` is set if that word differs
from the received systematic bits.

`input_buffer` holds the frame's channel LLRs. It serves each unit the parity
LLR of its window, and serves the systematic LLRs during LOAD.

### Fixed point and parameters

All shared constants are in `turbo_pkg`:

| constant | default | meaning |
|----------|---------|---------|
| `N_BITS` | 32 | frame length (power of two) |
| `N_SISO` | 4 | SISO units (must divide N) |
| `N_ITER` | 6 | iterations |
| `QPP_F1`, `QPP_F2` | 7, 12 | interleaver (F1 odd, F2 even) |
| `LLR_W` | 6 | channel LLR bits |
| `EXT_W` | 8 | extrinsic bits |
| `MET_W` | 14 | metric bits |
| `HARD_LLR_MAG` | 8 | LLR magnitude of a hard received bit |

The modules take N, P and ITERS as parameters with these defaults. The
checked-in testbenches run the default sizes. The decoder testbench also
passed at (N, P) = (64, 8), (32, 2) and (128, 4), with its parameters changed
to match.

Synthesis with yosys, at the defaults:
- about 2300 word-level cells;
- 1800 flip-flop bits;
- 6500 memory bits.

The stack buffers are the largest part: 4 units × 8 words × 8 states × 14
bits.

## Module map

| file | role |
|------|------|
| `rtl/turbo_pkg.sv` | constants, metric types, trellis functions, phase enum |
| `rtl/turbo_enc_dec.sv` | chip top: encoder, channel ports, hard-bit → LLR mapping, decoder |
| `rtl/turbo_encoder.sv` | two RSC encoders plus the interleaver, bit-serial |
| `rtl/rsc_encoder.sv` | one RSC encoder |
| `rtl/qpp_interleaver.sv` | interleaver address generator with bank/offset split |
| `rtl/turbo_decoder.sv` | decoder datapath: wires the blocks below |
| `rtl/agu_ctrl.sv` | schedule FSM, per-unit interleaver address generators, natural/interleaved multiplexer |
| `rtl/siso_decoder.sv` | max-log-MAP SISO unit |
| `rtl/siso_buffer.sv` | stack buffer beside each SISO unit (two per unit) |
| `rtl/llr_bank_ram.sv` | one memory bank (8 instances) |
| `rtl/switch_matrix.sv` | SISO ↔ bank crossbar |
| `rtl/boundary_metric_store.sv` | window-boundary alpha/beta between iterations |
| `rtl/input_buffer.sv` | received LLRs of the frame |
| `rtl/output_packer.sv` | output buffer, bit packing, error flag |

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each one compares the module against a reference written independently inside
the testbench. Each prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_rsc_encoder` | parity against the sequence form a_k = d_k ^ a_{k-2} ^ a_{k-3}, p_k = a_k ^ a_{k-1} ^ a_{k-3} |
| `tb_siso_decoder` | every LLR, extrinsic value and boundary metric, exactly, against an unnormalised integer max-log-MAP |
| `tb_agu_ctrl` | phase sequence, strobes and every address, cycle by cycle |
| `tb_turbo_decoder` | the four reference frames; 30 random frames with one flipped bit; 20 frames with bounded soft noise on every LLR (plus one flipped bit in most); latency of exactly 214 cycles |
| `tb_awgn_workload` | decoder on a BPSK channel with Gaussian noise at Eb/N0 = 3 dB, 400 frames: the decoded BER must be at most a third of the raw BER |
| `tb_turbo_enc_dec` | full chip at default parameters, with a bit-flipping channel model: the four reference frames and 24 random frames, latency of 248 cycles, reset, start ignored while busy |

`tb_turbo_enc_dec` also counts the mechanisms it exercised: clean and
corrected frames, interleaved half-iterations, cycles with permuted banks, and
boundary hand-overs.

To run one testbench with plain Verilator:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_turbo_enc_dec \
        -y rtl -y tb +libext+.sv rtl/turbo_pkg.sv tb/tb_turbo_enc_dec.sv
    ./obj_dir/Vtb_turbo_enc_dec

Every testbench finishes within seconds.

In the AWGN run, the raw hard-decision BER is 0.128. The decoded BER is
0.0041, and 3% of frames still contain an error. This is the expected
behaviour of a short, unterminated 32-bit turbo code.

**How far the results can be trusted:**
- The checks that demand exact correction use frames with at most one flipped
  systematic bit (two in one reference frame) and bounded noise that never
  flips an LLR's sign. The AWGN run is statistical only.
- A bit-error-rate curve was not measured; there is only the single 3 dB point above.
- With hard ±8 inputs, the decoder corrects any single flipped systematic bit.
  Heavier corruption, or errors in the parity words, is not guaranteed to be
  corrected at N = 32.

## Design choices and what is not included

The following are this implementation's own choices; the original design does
not specify them:
- the interleaver law;
- the iteration count;
- all word widths;
- the extrinsic scale factor 3/4 (the original design only requires a factor
  below 1);
- metric normalisation;
- the bit order;
- the start/done handshake;
- the one-cycle channel slot;
- the window-parallel schedule, including in-place extrinsic memory and
  boundary-metric exchange;
- the ±8 hard-bit LLR mapping.

**Interleaver count.** The reference block diagram shows eight interleaver
blocks and eight RAMs around four SISO units. This design has eight RAMs (four
systematic and four extrinsic banks) but only four interleaver address
generators in the decoder. The two memories share an address, so four are
enough.

**Size.** The reference FPGA build reports about 80 to 100 flip-flops for its
decoder. This RTL is much larger, because it stores a whole frame of LLRs, the
extrinsic values and per-window state metrics. No FPGA mapping or timing
analysis was done, so the reference clock rates (above 300 MHz on a Virtex-5)
are not confirmed.

**Channel pin.** The reference chip has one bidirectional 32-bit channel pin.
Here it is split into `turbo_enc_data_out` and `turbo_enc_data_in`.

**No CRC.** The output stage is labelled "CRC bit packing" in the reference
architecture, but no CRC polynomial, length or placement is defined. Only the
packing and the output buffer are built. `error` is the comparison described
above.

**Not built:**
- Trellis termination (tail bits). The encoder diagram suggests a termination
  switch, but no tail procedure is given.
- Puncturing. It is mentioned only as a general technique; the code rate is
  1/3.
- The AWGN channel. It is outside the chip, and the testbenches model it.
