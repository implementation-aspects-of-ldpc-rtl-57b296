# Rate 1/2 LDPC convolutional codec with a pipeline decoder

An LDPC convolutional code is a low-density parity-check code whose
parity-check matrix is an endless band instead of a finite block. Every
check equation spans at most `m_s + 1` consecutive code blocks, where `m_s`
is the syndrome former memory. Because of that banded structure the code can
be encoded and decoded as a stream:

* The encoder is a shift register of `m_s` partial parity sums.
* The decoder is a pipeline of `I` identical processors. Each processor
  performs one message-passing iteration on its own window of `m_s + 1`
  blocks and hands the oldest block to the next processor.

This repository is the RTL for such a link at rate 1/2: one information bit
and two code bits per time unit. Its parts are:

* a systematic encoder built around the partial syndrome register;
* termination logic, which ends a frame by returning the encoder to the
  all-zero state;
* a serialiser and an input buffer at the channel side;
* the pipeline decoder. Its check node updates use the freshest messages
  available (an "on-demand" schedule). A per-processor stopping rule puts a
  processor to sleep once its window has converged.

The default size is the one shown at the largest scale:

* memory `m_s = 2048`;
* `I = 50` iterations (50 processors), each processor holding a window of
  2049 blocks;
* an initial decoding delay of `50 * 2049 = 102,450` blocks.

## The code

The design uses a regular `(m_s, 3, 6)` code. Each code symbol is in three
check equations and each check equation has six symbols. The code is time
invariant, so every time unit `t` has one check node. That check node
combines these symbols:

| symbol | blocks used by the check of time t | at m_s = 2048 | at m_s = 32 |
|---|---|---|---|
| information bit `v(0)` | `t`, `t - (m_s/3 + 1)`, `t - m_s` | 0, 683, 2048 | 0, 11, 32 |
| parity bit `v(1)` | `t`, `t - (m_s/5 + 1)`, `t - (3 m_s/4 + 1)` | 0, 410, 1537 | 0, 7, 25 |

All offsets use integer division. `ldpccc_pkg::sym_delay(MS, j, k)` is the
single place that defines them. Every RTL block, and the testbench reference
models, derive the code from this function. To use another code, change
this function.

The six pairwise differences between a symbol's offsets are all distinct.
As a result, the Tanner graph has no cycles of length four. The parity bit
is the only symbol of its check at offset 0, which makes the code
systematic: `v(1)_t` is chosen to satisfy check `t`.

A published family of such codes uses randomly constructed, periodically
time-varying syndrome formers. Those matrices cannot be reproduced, so this
formula-defined code takes their place. All hardware structures are the same
for any `(m_s, 3, 6)` code. Bit-error-rate figures measured elsewhere for the
random codes will differ somewhat from this code's.

## Encoder (`psf_encoder`, `ps_multiplier`)

The encoder keeps the partial syndrome `p_t = (p_t,1 … p_t,m_s)`: the
contributions that earlier blocks have already made to the next `m_s`
checks. For each information bit `u_t`, three things happen in one clock:

* The parity bit is `v(1)_t = u_t XOR p_t,1`. This closes check `t`.
* The partial syndrome multiplier XORs the new block into the register
  stages that its later checks will need. These are two taps per symbol,
  whose positions are constants of the code.
* The register shifts by one stage.

So the encoder needs only `m_s` flip-flops and a handful of XOR gates, and
it emits one block per clock. `state_zero` shows when the register is all
zero. The serialiser sends each block as two channel bits, the information
bit first.

## Termination (`tail_generator`)

To end a frame of `L` blocks, the encoder has to be driven back to zero.
It takes a tail of `TAU = 2(m_s + 1)` further blocks. The right tail
information bits are a linear function of the state `p_L`:

    u_{L+n} = XOR_i ( p_{L,i} AND g_{i,n} ),   n = 0 … TAU-1

The coefficients `g` depend only on the code. Because this code is time
invariant, they do not depend on `L`, so one table serves every frame
length.

The table has `TAU` words of `m_s` bits and is loaded through the `coef_*`
port before use. Compute it as follows:

1. Let `B` be the map from tail bits to the encoder state after the tail,
   starting from zero.
2. Let `A` be the map from the starting state to the state after a zero
   tail.
3. For every state bit `i`, solve `B g_i = A e_i` over GF(2).

`B` has full rank `m_s` for tails this long. `tb_tail_generator` contains a
short Gaussian elimination that computes the table this way.

A `terminate` pulse at the top level does the following:

* it makes the tail generator capture `p_L`;
* it blocks user input (`u_ready` low);
* it feeds the tail bits to the encoder as ordinary information bits, so
  the encoder still adds the parity bits itself.

`term_done` marks the end of the tail. After that the encoder is back in
the zero state and `enc_state_zero` is high.

At the default size the table is 4098 × 2048 bits, about 8.4 Mbit. It is
written as a plain array, so in a real device it belongs in a RAM.

## Pipeline decoder

### Regions and time units

The decoder moves in time units. In each time unit one received block
enters and one decided block leaves. Processor `i` holds the `m_s + 1` most
recent blocks of its region in a circular buffer. The buffer stores, per
symbol:

* an 8-bit a-posteriori value (APP);
* the three 6-bit check-to-variable messages of its edges;
* a valid bit per block.

A region therefore has `(J + 1) · c = 8` words per block, the usual count
for this architecture. Here the APP word takes the place of the stored
channel value.

A time unit takes four clocks. A controller shared by all processors drives
them through these phases:

| phase | what every processor does |
|---|---|
| `PH_WRITE` | store the block handed over by the previous processor (or the channel) at the newest address |
| `PH_READ` | read the six edges of the newest check node, one synchronous read per memory |
| `PH_UPDATE` | evaluate the stopping rule; unless asleep, form the six variable-to-check messages, run the check node and write back messages and APP values |
| `PH_OUT` | read the oldest block, which has now seen all its checks in this region, into `out_slot` |

The decoder advances only when a received block is available, so it never
runs ahead of the channel. The first decided block leaves `ITER · (m_s + 1)`
time units after the first received one. After that, one block leaves per
block that enters, and the peak rate is one block per four clocks.

### On-demand update in APP form

The classic pipeline decoder activates the check nodes of the newest time
unit and the variable nodes of the oldest one. With the on-demand schedule,
a variable node is activated whenever a check needs it. So every check sees
the messages produced earlier in the same iteration.

This design keeps a running APP sum per symbol: channel value plus all
current messages. Each update then becomes

    v2c     = APP - c2v_old      (vnu)
    c2v_new = minsum(v2c …)      (cnu, extrinsic sign and minimum)
    APP     = v2c + c2v_new      (vnu)

In this form a separate variable-node pass is unnecessary, and decisions are
simply the APP signs of the block leaving the last processor. Values are
two's complement with a positive value meaning bit 0. Messages are clipped
to ±31, APP values saturate at ±127, and channel values are 6-bit.

The three edges of one symbol position in a check lie at three different
addresses. So the three write-backs into an APP memory never collide.

### Stopping rule

Each processor counts consecutive time units in which the hard decisions of
its newest check satisfy the check (the XOR of the six APP signs is zero).
An unsatisfied check clears the counter. When the counter exceeds `P`
(default `P = m_s`), the processor sleeps:

* it still reads and evaluates the check every time unit;
* it skips the write-back, so blocks pass through it unchanged;
* the first unsatisfied check wakes it, and that check is processed in the
  same time unit.

`proc_asleep`, `proc_activated` and `proc_skipped` show what each processor
does. They let you measure the average number of iterations actually
performed.

### Compact decoder: overlapping regions

Regions that do not overlap keep successive iterations independent. Once
checks use the freshest messages anyway, neighbouring regions may overlap,
which shrinks both the memory and the delay. The parameter `S` (processor
separation, default `m_s + 1`) selects this:

* With `m_s/2 < S <= m_s`, each processor owns a segment of only `S`
  blocks. The last processor owns `m_s + 1` blocks.
* The window is then `(I - 1) S + m_s + 1` blocks long. The initial delay
  and the memory shrink in proportion. With `S` just above `m_s/2`, both
  almost halve.
* A check edge at offset `d >= S` lies in the next processor's segment at
  offset `d - S`. The processor reaches it over the `rem_req` / `rem_rsp`
  ports, which carry a read enable, a write enable and the new APP and
  message. The owner of the segment derives the address from the edge's
  fixed offset.
* Each message array of a segment serves either its own processor's edge
  or the previous processor's edge, never both. The only exception is the
  last segment, where the two use it at different clocks.
* Two neighbouring processors must not update the shared blocks in the
  same clock. So when regions overlap, the odd-numbered processors read and
  update in two extra steps (`PH_READ2`, `PH_UPDATE2`). The time unit then
  takes six clocks.

Separations of `m_s/2` or less are rejected at elaboration. In that range a
region would reach two segments ahead, and the error rate starts to suffer.

### Start-up

After reset the controller sweeps all buffers once (`m_s + 1` clocks) and
fills them with the all-zero starting state: APP = +127, messages 0, valid
= 0. `dec_ready` rises when the sweep is done. Blocks that are not valid
are never reported on `dec_valid`.

## Top level (`ldpccc_codec`)

The transmit and receive paths sit side by side and share only the clock
and the asynchronous active-low reset. The channel between them is outside
the design.

| port | dir | meaning |
|---|---|---|
| `u_valid/u/u_ready` | in/in/out | information bits |
| `tx_valid/tx_bit/tx_ready` | out/out/in | serial code bits, information bit first |
| `enc_state_zero` | out | encoder state is zero |
| `coef_we/coef_addr/coef_data` | in | tail coefficient table write |
| `terminate` | in | end the frame: run the tail |
| `term_busy/term_done` | out | tail running / finished |
| `rx_valid/rx_llr/rx_ready` | in/in/out | one 6-bit channel value per code bit, same order |
| `dec_valid/dec_bits` | out | decided code block (`dec_bits[0]` is the information bit) |
| `dec_ready` | out | decoder start-up sweep finished |
| `proc_asleep/proc_activated/proc_skipped` | out | per-processor stopping-rule status |

Parameters: `MS` (2048), `ITER` (50), `S` (`MS + 1`), `P` (`MS`), `STOP_EN`
(1) and `TAU` (`2(MS+1)`). `ldpccc_pkg` fixes `J = 3`, `K = 6`, `c = 2` and the word
widths.

## Files

| file | content |
|---|---|
| `rtl/ldpccc_pkg.sv` | widths, slot type, phase enum, code offsets |
| `rtl/ps_multiplier.sv`, `rtl/psf_encoder.sv` | encoder |
| `rtl/tail_generator.sv` | termination |
| `rtl/serialiser.sv`, `rtl/input_buffer.sv` | channel side |
| `rtl/cnu.sv`, `rtl/vnu.sv`, `rtl/stop_rule.sv` | node units and stopping rule |
| `rtl/ldpccc_processor.sv` | one iteration processor |
| `rtl/pipeline_decoder.sv` | processor chain and time-unit controller (also the compact decoder) |
| `rtl/ldpccc_codec.sv` | top level |
| `tb/*.sv` | one self-checking testbench per module, plus `tb/ldpccc_tb_pkg.sv` (encoder and tail model) |

## Verification

Every testbench computes its expected values independently and ends with a
`TB_RESULT checks=… failures=…` line. What the larger ones check:

* `tb_ldpccc_processor` runs one processor at `m_s = 16` against an
  integer model of the same schedule, edge by edge.
* `tb_pipeline_decoder` runs the decoder at `m_s = 32` with six
  iterations. It checks the latency `ITER(m_s+1)`, the four-clock time unit
  and stalls, and decodes an AWGN-corrupted section. It also requires that
  sleeping and waking both happen.
* `tb_compact_decoder` runs the same test as a compact decoder with
  `S = 20`. It checks the shorter delay of 133 blocks and the six-clock time
  unit, and confirms that the next segment is actually accessed.
* `tb_tail_generator` checks that the encoder returns to zero, and that
  every check of the frame holds, for three frame lengths.
* `tb_ldpccc_codec` (`m_s = 32`, 6 iterations) runs the whole link.
  It covers back-pressure on both sides, noise, a terminated frame, sleep
  and wake-up. It fails if any of these never happens.
* `tb_ldpccc_codec_full` runs the same test with every parameter at its
  default (`m_s = 2048`, 50 processors). It takes about half a minute.

To run one testbench with Verilator:

    verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
      rtl/ldpccc_pkg.sv tb/ldpccc_tb_pkg.sv tb/tb_ldpccc_codec.sv --top-module tb_ldpccc_codec
    obj_dir/Vtb_ldpccc_codec

The decoder's gain comes from the decoding algorithm, not from a BER curve
measured here. Without noise the testbenches see no errors. At the noise
levels used, every channel error in the noisy section is corrected. No
BER-versus-SNR curves were simulated.

## Where this design departs from the usual description

* **Code**: a formula-defined time-invariant `(m_s,3,6)` code replaces the
  random time-varying codes (see above).
* **Check node**: min-sum with 6-bit messages replaces floating-point
  sum-product. The structure is the same; the gain at a given SNR is
  slightly lower.
* **Variable node**: the APP form described above, which keeps `(J+1)`
  words per symbol.
* **Tail**: the tail generator stores the tail information bits' dependence
  on `p_L` and lets the encoder add the parity. It does not store the full
  tail blocks. The table is loaded, not built in.
* **Timing**: the four-clock time unit, the valid/ready handshakes and the
  stall-on-empty-input behaviour are this design's choices.

**Not included:**

* Compact-decoder separations `S <= m_s/2`.
* A decoder for terminated frames with a circular memory.
* The classic standard schedule, which is only a point of comparison.
* Codes with `J = 4` or `5`. The package fixes `J = 3`.

## Sizes

At the defaults each processor has nine memories:

* two APP arrays of 2049 × 8 bits;
* six message arrays of 2049 × 6 bits;
* a valid array of 2049 × 1 bit.

That is about 108 kbit per processor, or 5.4 Mbit for the 50 processors,
plus the 8.4 Mbit tail table. Yosys keeps them as memories. The logic
outside the memories is small: each processor has a six-input min-sum
unit, six adder pairs and a counter.
