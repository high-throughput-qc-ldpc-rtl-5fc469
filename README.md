# Pipelined four-block-parallel layered QC-LDPC decoder (672-bit, rate 1/2)

This is a decoder for the 672-bit, rate-1/2 quasi-cyclic LDPC code used by
60 GHz multi-gigabit WPAN systems. It is written in synthesizable SystemVerilog.
It uses layered decoding. Normally a layered decoder handles one block row of
the parity-check matrix per clock, because each layer needs the variable
messages that the previous layer has just updated. This decoder does four
block rows per clock and puts a two-stage pipeline around the check-node
logic. Two properties of the code make that possible:

* **Four block rows at once.** The 16 block rows split into four groups:
  rows {1,5,9,13}, {2,6,10,14}, {3,7,11,15} and {4,8,12,16}. Block rows *t*,
  *t*+1, *t*+2 and *t*+3 never use the same block column, so one row from each
  group can be processed in the same cycle without conflict. An iteration
  over all 16 block rows therefore takes 4 cycles.
* **Fixed wiring instead of switches.** The four block rows of a group use the
  same sequence of circulant shifts. For example, group 1 always uses
  {5,18,3,10,5,4,5,7}. So the network that rotates messages for group *g*,
  slot *j* always applies the same rotation, and it is just wires. Only the
  choice of block column changes from cycle to cycle, and each slot meets
  only four columns (one per layer). That choice is a 4:1 multiplexer.

A codeword takes **4 × iterations + 2** clock cycles: 50 cycles for the
maximum of 12 iterations. At the 290 MHz clock reported for a 90 nm
implementation, that is 290 MHz × 672 / 50 ≈ 3.9 Gb/s. The clock rate has not
been checked here; the cycle count has.

## Terminology

| term | meaning |
|---|---|
| Z | circulant (sub-block) size, 21 |
| block column | 21 consecutive code bits; there are 32 |
| layer | the four block rows processed in one cycle; layer *c* (0..3) of an iteration holds block rows 4*c*+1 … 4*c*+4 |
| group *g* | one of four CNBPs units (21 row processors each); in layer *c* it processes block row 4*c*+*g*+1 |
| slot *j* | one of the 8 positions of a row (the maximum row weight is 8) |
| y | variable (a-posteriori) message of a code bit, kept in the BURA |
| R | check-to-variable (C2V) message of an edge, kept in the C2V memory |
| BURA | bit updating register array: 32 registers of 21 messages, one per block column |
| SN1 / SN2 / SN3 | switch networks (BURA→CNBP, CNBP→BURA, BURA→CNBP stage 3) |

## The update and why the pipeline does not lose information

One layer *l* with p = 2 pipeline stages computes, for each edge (check c,
variable v):

    L_v      = y_v(old)  − R_cv(previous iteration)                    (stage 1)
    R_cv     = 0.875 · min_{n≠v} |L_n| · Π_{n≠v} sign(L_n)             (stage 2, 3)
    y_v(new) = y_v(latest) − R_cv(previous iteration) + R_cv(new)      (stage 3)

`y(old)` is the value read when the layer enters the pipeline. It already
contains every layer up to *l*−3, but not layers *l*−1 and *l*−2, which are
still in flight. `y(latest)` is read again from the BURA two cycles later,
when layers up to *l*−1 have been written. So the final write adds only this
layer's change (R_new − R_old) to the newest value, and no update made by
another layer is overwritten. The only cost is that the check-node minimum of
layer *l* is computed from slightly stale variable messages. The first term
(y_latest − R_old) is computed again in stage 3. The subtraction in stage 1 is
not reused, so the last stage depends only on SN3's fresh read.

Cycle by cycle, for the layer issued in cycle *t*:

| cycle | what happens |
|---|---|
| *t* | BURA read through the 4:1 selection and SN1; C2V memory read; L = y − R_old, saturated; sign/magnitude. **Pipeline register.** |
| *t*+1 | Normalised min-sum: min1, min2, position of min1, sign product. **Pipeline register.** |
| *t*+2 | BURA read again through SN3 (latest y). R_new in two's complement, saturated to 6 bits. y_new = y_latest − R_old + R_new, saturated to 8 bits. y_new goes back through SN2 and is written into the BURA; R_new is written into the C2V memory. |

A new layer enters every cycle, so in steady state three layers are in flight.

## Code tables (`rtl/ldpc_pkg.sv`)

The structure of the code is described by three small tables in the package:

* `SHIFTS` / `shift_of(g, j)`: circulant shift of slot *j* of group *g*.
  Group 1 is {5,18,3,10,5,4,5,7} and group 4 is {18,0,10,16,9,12,4,17}. The
  first five shifts of group 2 are {0,16,6,0,7} and of group 3 are
  {6,7,2,9,20}. **The last three shifts of groups 2 and 3 ({11,2,19} and
  {14,1,8}) are placeholders.**
* `row_weight(c)`: the number of used slots in layer *c*, which is 5, 7, 6, 8.
  Block rows 1–4 have weight 5 and block rows 13–16 have weight 8. The same
  pattern is assumed for the other groups.
* `col_of(c, g, j)`: the block column of slot *j* of group *g* in layer *c*.
  **This table is a placeholder:** `8*((g+c) mod 4) + ((j+3c) mod 8)`. It
  keeps the four block rows of a layer column-disjoint, and every column has
  degree 2 to 4.

Rotation convention: row *r* of a circulant with shift *s* is connected to
bit *r*+*s* mod 21 of its block column. SN1/SN3 output
`dout[r] = din[(r+s) mod 21]`; SN2 is the inverse.

Because of the placeholders, this RTL does not decode codewords of the
standard until `SHIFTS` and `col_of` are replaced with the standard's base
matrix. Nothing else needs to change, provided the replacement keeps the two
properties above: the four block rows of a layer share no column, and a
group keeps its shift sequence. The all-zero word is a codeword of any
matrix, and all the tests use it.

## Blocks

| file | block | notes |
|---|---|---|
| `qc_ldpc_decoder.sv` | top | wires everything; parameter `MAX_IT` (default 12, at most 15) |
| `decoder_control.sv` | controller | IDLE → (load) → DECODE → DRAIN → DONE; delays the layer index and valid bit alongside the CNBP pipeline |
| `input_buffer.sv` | input buffer | 32-beat shift register; collects the next codeword while the current one decodes |
| `bura.sv` | BURA | 32 × 21 × 8-bit registers, 4:1 read selection for SN1 and SN3, write demultiplexer for SN2, parallel load |
| `switch_network.sv`, `sub_switch_network.sv` | SN1/SN2/SN3 | constant rotations, no logic |
| `cnbp_group.sv`, `cnbp.sv` | CNBPs | 21 row processors per group, two pipeline registers |
| `min_sum_unit.sv` | modified min-sum | α = 0.875 as m − (m >> 3) |
| `c2v_memory.sv` | C2V memory | 32 dual-port banks × 4 words × (21 × 6 bits); word *c* of bank *b* = block of layer *c* in column *b* |
| `parity_check.sv` | early termination | 336 flip-flops, XOR, wide OR |
| `output_buffer.sv` | output buffer | 32 beats of 21 hard decisions |

The C2V memory needs no address logic. In each layer a block column is used
by at most one block row, so bank = block column and address = layer index. A
layer reads one word group while the layer two cycles older writes another,
and the two never collide.

## Number formats

* Channel values: 6 bits, 2 fraction bits. A positive value means bit 0.
  They are sign-extended into the 8-bit BURA.
* Variable and L messages: 8 bits, saturated to ±127.
* C2V messages: 6 bits, saturated to ±31 (4 ≙ 1.0 throughout).

The C2V messages are narrower than the variable messages on purpose. With
equal widths, a variable message stuck at +127 keeps losing the difference
between its real value and 127 each time an old C2V message is subtracted.
Over a few iterations the decoder then drifts away from the codeword, and in
simulation it ended with every bit flipped. With 6-bit C2V messages,
L = y − R never drops below 96 for a saturated y, and the loop is stable.

## Early termination

The parity check does not evaluate H·x. It compares the hard decisions of
the 336 information bits (the first 336 code bits) with those stored at the
previous check. If none changed, decoding stops. The check runs one cycle
after the last layer of each iteration has been written back, when the BURA
holds a complete iteration. The stored bits start as the signs of the channel
values, so a stop is possible after the first iteration.

When the check fires, issuing stops in that same cycle. The two layers of the
next iteration that are already in the pipeline are completed. A stop after
iteration *i* (counting from 1) therefore takes 4*i*+4 cycles. The decoder
reports `iters = i` and `early_term = 1`. Early termination is enabled by the
`et_en` input. With it off, or if it never fires, 12 iterations run.

## Interface and timing

```
in_valid, in_ready, in_llr[21]   one block column per beat, column 0 first, 32 beats
et_en                            early termination enable (hold steady during a codeword)
out_valid, out_bits[21], out_last  32 beats, column 0 first, all 672 hard decisions
iters[3:0], early_term           status of the codeword being streamed out
busy                             controller not idle
```

* When the input buffer is full and the controller is idle, the frame is
  copied into the BURA in one cycle. Layer issue starts in the next cycle.
* After 4 × iterations + 2 cycles the result is complete. It is captured
  into the output buffer as soon as that buffer is free, and streamed out
  over 32 cycles. There is no output back-pressure.
* `in_ready` stays low while a complete frame waits for the decoder. The
  controller likewise waits in DONE while the output buffer is still sending
  the previous codeword.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

* `tb_qc_ldpc_decoder`: end-to-end test at the default sizes. Noisy all-zero
  codewords are fed in. The testbench has a cycle-level integer model of the
  pipelined update, with the same two-layer lag, written independently of
  the RTL. All 672 output bits, the iteration count, the early-termination
  flag and the decode time must match the model exactly. A 12-iteration
  decode must take 50 cycles. The testbench also checks that each mechanism
  happened at least once:
  * full-length decodes
  * early stops
  * input back-pressure
  * waits for the output buffer
  * first-iteration zero C2V reads
  * overlapped issue and write-back
  * saturation
* `tb_ber_workload`: BPSK over AWGN at Eb/N0 = 2.0, 2.5 and 3.0 dB, 12
  codewords per point, early termination on. It reports channel and decoded
  BER. It checks the schedule of every decode (50 cycles, or 4*i*+4 cycles for
  a stop after *i* iterations), that decoding removes errors overall, and that
  BER falls as Eb/N0 rises. With the placeholder code tables the decoded BER
  is about 3·10⁻³ at 3 dB, far from what the standard's code achieves. Do not
  read it as the decoder's error performance.
* `tb_iter5_workload`: the top with `MAX_IT = 5`. Each decode must take
  4 × 5 + 2 = 22 cycles and must return the codeword.
* Unit testbenches compare each block with an integer model
  (`tb/tb_ref_pkg.sv` holds the row update) or with direct expectations.

To run a testbench with Verilator, name the package and the testbench. The
library paths find every other module:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/ldpc_pkg.sv tb/tb_qc_ldpc_decoder.sv --top-module tb_qc_ldpc_decoder -o sim
./obj_dir/sim
```

Every simulation finishes in well under a second. To try a different code,
edit the tables in `ldpc_pkg.sv`. The reference model in
`tb_qc_ldpc_decoder.sv` uses the same tables through `col_of`, `shift_of` and
`row_weight`, so it follows the change.

## How far to trust it, and where it is this design's own

Taken from the published architecture:

* the four-block-parallel schedule and the fixed-wire switch networks
* the two pipeline registers inside the CNBP, at the stage boundaries
  described above
* the approximate update with p = 2
* normalised min-sum with α = 0.875 and (6,2) channel quantization
* 8-bit variable messages and 12 iterations
* the BURA with its 32 registers
* the 32-bank C2V memory organised in four groups
* early termination by watching the information-bit decisions
* the cycle count of 4 × iterations + 2

This design's own choices:

* the block-column table and six of the shift values (see above)
* 6-bit C2V messages and symmetric saturation; truncation in α·min
* the selection around the BURA: the 4:1 read multiplexer and the write
  demultiplexer have no data register of their own. A register there would
  make the pipeline three stages deep instead of two.
* C2V memory read as zero during the first iteration, instead of being
  cleared
* early termination checked once per iteration, and started from the
  channel decisions
* the buffers, handshakes and controller state machine
* streaming all 672 decisions rather than only the information bits

Not modelled: the 290 MHz timing and the 794K-gate area of the reference
implementation. After coarse synthesis the decoder has about 23.9 k
flip-flop bits and 21.5 k memory bits (BURA and C2V memory as arrays). The
non-pipelined variant that the architecture is compared against is not
included.
