# SD-PUF: a write-delay PUF built from the scan chain of an all-spin circuit

In a circuit built from spin-transfer-torque magnetic cells (STT-mCells), a gate
does not switch at once. Its output current swings from one sign to the other only
after a domain wall has moved, and how long that takes depends on manufacturing
variation in the cell geometry. This design turns that write delay into a physical
unclonable function (PUF). It adds almost no hardware, because it reuses two things
such a chip already has:

* **the scan chain.** Each scan flip-flop (SFF) already drives a buffer. Those
  buffers are the PUF cells.
* **an LFSR.** It supplies the challenges.

One write period gives all 64 response bits at once. A counter-based mask then
evens out the share of 1s and 0s and makes dies differ more.

The RTL follows the SD-PUF architecture described by Xu, Zhang, Girard, Ren and
Cheng in *"SD-PUF: A Novel Area Efficient and Highly Reliable PUF with Signature
Improvement for Spin-Transfer Torque Magnetic Cell-Based Circuits"*. The digital
parts are synthesizable SystemVerilog. The three analog parts (the mCell buffers,
the absolute value circuit and the sense amplifier) are behavioural models. Each
file's header comment says which parts follow that description and which are
choices made here.

## How one response bit is produced

The mechanism has two clock edges, a fixed time apart:

1. **Challenge edge** (`TE = 1`). Each SFF captures its challenge bit through its
   functional D input. A `1` is a +10 µA write current and a `0` is a −10 µA write
   current. The buffer after the SFF starts switching towards that sign.
2. **Write-back edge** (`TE = 0`, switch `S` open). `t_ref` picoseconds later,
   each SFF captures the *output* of its own buffer through the SI input. This
   path is called the write-back wire. While S is open, the scan links between
   stages are cut, so no stage sees its neighbour.

A buffer whose write delay is shorter than `t_ref` has reached its full output
current by the write-back edge. A slower buffer has not. Writing towards `1` and
writing towards `0` have different delays, so the challenge bit decides which of
the two delays of a cell is tested.

3. **Read-out** (`TE = 0`, S closed). The chain shifts one stage per clock. What
   leaves SFF[N−1] goes through the **absolute value circuit**: a complete write
   of either sign gives a large magnitude. The **sense amplifier** then compares
   that magnitude with `I_ref` = 9.56 µA. Result: 1 means the buffer switched in
   time, 0 means it did not.

Because a write-back captures a partly switched current, the model keeps a
*current* in each scan stage, not one bit. It is a signed 12-bit word in 10 nA
units, so ±10 µA is ±1000 and `I_ref` is 956 (`sd_puf_pkg`). Synchronous RTL
cannot express the interval between the two edges. It is therefore passed as a
number, `t_ref`, to the buffer models. In the cycle schedule the two edges are
simply consecutive cycles.

### The buffer model

`mcell_buffer` gives every cell two write delays: one for writing `1`, one for
writing `0`. Both are fixed per die by the `CHIP` parameter. A hash of (die, cell,
direction) gives a roughly normal delay around 2.5 ns with σ ≈ 125 ps (5 %). The
output current rises linearly from 0 to full scale over that delay. The default
`t_ref` is 2390 ps, the moment a nominal cell reaches exactly 9.56 µA, so about
half of the cells answer 1. The model has no temperature, voltage or noise
dependence.

## Enrollment and authentication

Both operations run the same front end. Each takes **N + 7 = 71 cycles** from the
accepted command to `done`.

| cycle | enroll (mask generation) | auth (signature generation) |
|---|---|---|
| 1 | CLEAR: scan chain, counter and signature register set to zero | same |
| 2 | SEED: seed loaded into the 16-stage LFSR | same |
| 3 | GEN: LFSR emits the 64-bit challenge `Ci` | same |
| 4 | CHAL: challenge edge (TE = 1) | same |
| 5 | WB: write-back edge (TE = 0, S open) | same, and the mask is read from the mCell memory |
| 6 | – | MASK_LD: mask loaded into the shift register |
| 6…69 / 7…70 | SHIFT ×64: bits go to the counter | SHIFT ×64: bits go through the XOR |
| 70 | STORE: the low 6 bits of the count are written to the memory at `addr` | – |
| 71 | DONE: chain wiped to zero, `done` pulse | same |

The chain is cleared on entry and on exit, so no response is left in the scan
chain once the PUF operation ends.

## Signature masking

During **enrollment**, the 64 response bits to seed A ('String A') are steered by
the `Count_en` multiplexer into a counter. The number of 1s, cut to its low M = 6
bits, becomes the die's mask. The mask is stored in a small non-volatile mCell
memory (4 slots here).

During **authentication**, the response to seed B ('String B') leaves the chain
bit by bit. Each bit is XORed with the next bit of the mask, which rotates in
`mask_shift_reg` and so repeats until all N bits are masked. Bit *i* of the
signature belongs to buffer *i*. It leaves the chain at step 63 − *i*, so:

    signature[i] = raw[i] XOR mask[(N-1-i) mod M]

The mask is applied ⌈N/M⌉ times: 11 rounds for 64/6. The same rule is checked
for the other length pairs 8/2, 16/2, 16/3, 32/4, 32/5, 48/5 and 64/4, which give
4, 8, 6, 8, 7, 10 and 16 rounds.

Why this helps: take two dies whose raw signatures differ in k of n bits and whose
masks differ in j of m bits. The differing mask bits flip a fraction (n−k)/n of
formerly equal bits apart, and flip a fraction k/n of formerly different bits
together. The net change in uniqueness is

    Δu = (j/m) · (1 − 2k/n)

This is positive whenever the raw signatures agree on more than half their bits.
One unstable mask bit disturbs 1/m of the final signature, which is why the mask
is kept in non-volatile memory.

## Blocks

| file | role |
|---|---|
| `rtl/sd_puf.sv` | top: wires everything below |
| `rtl/control_unit.sv` | the operation schedule above; drives TE, S, LFSR_en, AVC_en, Count_en, Counter_en, Mask_en, Mem_en, Mem_Addr |
| `rtl/sd_puf_lfsr.sv` | 16-stage LFSR (x¹⁶+x¹⁴+x¹³+x¹¹+1), 64 steps unrolled per clock |
| `rtl/scan_chain.sv`, `rtl/scan_ff.sv` | SFFs with TE multiplexer, switch S and write-back wire |
| `rtl/mcell_buffer.sv` | behavioural model of one buffer under test |
| `rtl/abs_value_circuit.sv` | behavioural model, \|I\| with enable |
| `rtl/sense_amp.sv` | behavioural model, I > I_ref, with an optional noise margin |
| `rtl/signature_improvement.sv` | Count_en multiplexer, XOR and signature registers |
| `rtl/ones_counter.sv` | counts 1s for the mask |
| `rtl/mask_shift_reg.sv` | rotating mask register |
| `rtl/mcell_memory.sv` | mask storage: array without reset, one-cycle read |
| `rtl/sd_puf_pkg.sv` | sizes, current encoding, operation enum, delay hash |

Top interface: to start an operation, pulse `cmd_enroll` or `cmd_auth` for one
cycle while `busy` is low, with `seed`, `addr` and `t_ref` valid in that cycle.
Commands given while busy are ignored. `signature` is valid at `done` after an
auth. `raw_signature` is an extra observation port that holds the unmasked bits of
the last operation.

## Where this design departs from, or fills in, the original description

* **Polarity of TE during write-back.** The description contradicts itself: one
  passage has TE = 0 with S open, another has TE = 1. The multiplexer drawing
  (input 1 = D, input 0 = SI) agrees with TE = 0, and that is what is used here.
* **Switch S.** It is placed on every stage link, all driven together. The
  drawing shows one switch, but the text says it isolates every pair of stages.
* **Reference current.** `I_ref` is a fixed 9.56 µA. The description also
  mentions deriving the reference by averaging all selected buffers; that is not
  modelled.
* **Thresholds off chip.** They are not stored in the memory; the user supplies
  `t_ref` with each command.
* **Bit-serial masking.** The mask is applied one bit per clock (one XOR gate),
  not m bits at a time.
* **Own choices.** These are not given in the original: the mask as the low M
  bits of the count, the LFSR polynomial and bit order, the cycle schedule, the
  command handshake, the memory depth and its separate write enable, the current
  unit and word width, the delay distribution and the linear ramp.
* **Not modelled.** The counter's `Adjust_en` pin (named in the drawing, never
  explained). The functional gates of the host circuit. Supply-voltage and
  temperature effects, so the reliability results (bit error rate against
  voltage and temperature) cannot be reproduced with this model.

## Testbenches and results

Every block has a self-checking testbench in `tb/`. Each one compares the block
against a reference written separately in `tb/tb_ref_pkg.sv` (a bit-serial LFSR,
the delay model, the ones count and the masking rule) and prints
`TB_RESULT checks=N failures=M`.

* `tb_sd_puf`: full default size. It runs four enrollments and fourteen
  authentications and checks raw strings, stored masks, signatures, repeatability
  and the 71-cycle latency. It also checks that a command while busy is ignored,
  that the chain is wiped after each operation, and that `t_ref` = 4 ns gives all
  1s while 1 ns gives all 0s. It counts every mechanism (capture, write-back,
  partial and full switching, shift, mask replay, store, load, wipe) and fails if
  one never happens.
* `tb_sd_puf_dies`: sixteen dies side by side, same seeds. With this delay model
  the result is uniformity 48.5 % raw and 49.9 % masked, and uniqueness 50.3 % raw
  and 50.5 % masked. For 16 one-hot seeds on one die, the mean pairwise distance
  between signatures is 22.6 %. That figure is low because one-hot seeds give LFSR
  sequences that are shifts of each other.
* `tb_sd_puf_sizes`: the eight signature/mask length pairs listed above. It
  checks the signatures, the latency (n + 7) and the number of masking rounds.

Note that these uniformity and uniqueness numbers come from the simple
behavioural delay model. They say nothing about real silicon.

To run any testbench with plain Verilator (5.x):

    verilator --binary --timing --assert --timescale 1ns/1ps \
      -Irtl -Itb -y rtl -y tb +libext+.sv \
      rtl/sd_puf_pkg.sv tb/tb_ref_pkg.sv tb/tb_sd_puf.sv \
      --top-module tb_sd_puf -o sim && ./obj_dir/sim

## Changing it

`sd_puf` parameters:

* `N`: signature length, up to 64 with the testbench reference; longer is fine
  for the RTL, but keep N < 2¹⁶ − 1.
* `M`: mask length.
* `MEM_DEPTH`: number of mask slots.
* `CHIP`: which simulated die the buffer models represent.
* `I_REF`: sense threshold, in 10 nA units.

The delay spread and the nominal delay are in `sd_puf_pkg` (`cell_delay_ps`,
`T_NOM_PS`). A more detailed buffer model, for example one that depends on
temperature, would replace `mcell_buffer` and keep its ports. The
sense-amplifier margin (`MARGIN`, with a `noise_bit` input) is already there for
studying marginal bits.
