# Field-arithmetic accelerator for SIKE

SIKE is a post-quantum key encapsulation scheme built on isogenies between supersingular elliptic
curves. Almost all of its running time goes into arithmetic in GF(p) and GF(p^2), where p is a
special prime of the form p = 2^eA · 3^eB − 1. This RTL implements the datapath of a SIKE
accelerator around that arithmetic:

- a **systolic, dual-interleaved Montgomery multiplier** that uses the shape of p to skip a third
  of the reduction work;
- a modular adder/subtractor;
- an operand memory with a statically scheduled program controller;
- a Keccak (SHAKE256) hash unit;
- secret-key and message buffers;
- a 64-bit data path that joins the memory, the buffers, the hash unit and the host.

The default configuration is SIKEp434 (the NIST level 1 parameter set) with three dual
multipliers, so six products can be in progress at once. All four SIKE primes are supported
through one parameter.

| prime     | eA  | eB  | words s (17 bit) | all-ones low words sA | K = 17·s |
|-----------|-----|-----|------------------|-----------------------|----------|
| SIKEp434  | 216 | 137 | 26               | 12                    | 442      |
| SIKEp503  | 250 | 159 | 30               | 14                    | 510      |
| SIKEp610  | 305 | 192 | 36               | 17                    | 612      |
| SIKEp751  | 372 | 239 | 45               | 21                    | 765      |

## The Montgomery multiplier (`mont_dual_mult`)

### Arithmetic

Operands are split into s words of w = 17 bits. This width matches one DSP48 multiplier input
with a spare bit. The multiplier computes `a·b·2^−K mod p` with word-serial Montgomery
multiplication in FIOS form (finely integrated operand scanning). In each of s iterations i,
one word a[i] is multiplied by all of b and added into the running sum T. A multiple of p then
clears the lowest word.

Three facts about p = 2^eA·3^eB − 1 make this cheap:

1. **p' = −p⁻¹ mod 2^w is 1.** The quotient word m is simply the low word of T[0] + a[i]·b[0].
   No multiplication is needed to form it.
2. **The low sA = floor(eA/w) words of p are all ones.** With p[j] = 2^w − 1, the term
   m·p[j] folds into a shift of m between adjacent columns. The columns j < sA therefore need
   no reduction multiplier at all; the quotient just travels along a delay line.
   Column sA receives the folded-over m in addition to m·p[sA].
3. **p < 2^(K−2)** for every prime with w = 17. The result, taken from inputs below 2p, stays
   below 2p, so no final subtraction is needed, and the top carry fits in one word.

### Array structure

One column per word, left to right:

```
 col 0          cols 1..sA-1         col sA                cols sA+1..s-1        top
 mm_pe_initial  mm_sa_mult           mm_sb_mult            mm_sb_mult            mm_pe_final
   T0+a*b0        T+a*b+C              T+U+a*b+C             T+U+a*b+C             C -> T[s-1]
   m = low word   mm_sa_red (m delay)  mm_sb_red0: U=m*p+m   mm_sb_red: U=m*p
```

- a[i] and the carry C move one column up per cycle.
- Each new sum word S moves one column down, where it becomes T[j−1] of the next iteration.
- The reduction products U (`mm_sb_red0`, `mm_sb_red`) are computed one cycle before their
  column needs them, which keeps the multiplier off the adder's critical path.
- In the columns at and above sA, the carry is w+1 bits wide.
- In column sA, U is 2w bits wide.

Column j performs iteration i of a product at time T0 + 2i + j. Each column is therefore
busy only every second cycle, and a **second, independent product** fills the other cycles:

- Product 1 uses the even cycles of column 0, the odd cycles of column 1, and so on. Product 2
  uses the remaining cycles.
- A single parity bit `ph`, toggling every cycle, picks the slot. Column j serves slot
  `ph xor (j & 1)`.
- Each column holds one word of b per slot. The b words are loaded one column per cycle, just
  before iteration 0 reaches that column. A one-hot token walking up the columns does this.
- Iteration 0 must see T = 0. Instead of clearing registers, each column's adder selects 0 for
  its T operand while the `start` flag passes. This replaces a reset of the result registers.

### Timing

| quantity                                          | value   | SIKEp434 |
|---------------------------------------------------|---------|----------|
| interleave stage (slot busy)                      | 2s      | 52       |
| start to `res_valid`                              | 3s + 2  | 80       |
| products in flight per dual multiplier            | up to 4 | 4        |

Results are collected as the last iteration passes each column. The full K-bit result appears
with `res_valid`, together with the tag given at `start`.

A slot accepts a new product in the cycle its current product is in its last iteration. The
previous result is still being written out at that point. This is how the published design
overlaps its "interleave" and "writing" stages. `ready` reports whether the slot of the current
cycle parity can accept a product.

Products started on alternate cycles land in different slots. The scheduler therefore
alternates start parities per multiplier.

### Departures

- The published SIKEp434 latency is 81 cycles. This design takes 80 cycles: it omits the
  extra pipeline register that the FPGA version puts in front of each DSP multiplier.
- The published adder uses FPGA carry-chain compaction. Here each adder is a plain
  two-stage adder.
- `mm_pe_final` has an `EXTRA` option for primes that would need one more carry bit. None of
  the four SIKE primes needs it.

## Rest of the datapath

### `fp_addsub`

Two-stage pipeline.

| op       | result          |
|----------|-----------------|
| `OP_ADD` | a + b mod 2p    |
| `OP_SUB` | a − b mod 2p    |
| `OP_RED` | a mod p         |

- Stage 1 adds or subtracts.
- Stage 2 makes the conditional correction by 2p or p.
- Inputs are below 2p. A new operation may start every cycle.

### `mult_unit` and `fp_alu`

- `mult_unit` holds `N_DUAL` dual multipliers, with an issue select and a result multiplexer.
- `fp_alu` dispatches each operation to the adder or to one multiplier. Every result carries
  its destination address to a single write-back port.
- The schedule must keep two results from arriving in the same cycle. Assertions check this,
  and also check that no product is issued to a busy slot.

### `memory_unit`

- Holds `DEPTH` field elements of K bits.
- Two read ports serve the two operands of an ALU operation. Reads take 2 cycles.
- One ALU write port. Writes take 1 cycle.
- A 64-bit side port reads and writes one 64-bit chunk of an entry. Bus address = entry·16 +
  chunk.
- If the ALU and the side port write the same entry in the same cycle, the ALU write wins.

### `program_rom` and `program_controller`

The field operations are scheduled statically: operation times are fixed when the program is
written, and no hardware tracks dependencies.

The instruction word `instr_t` has the fields `{op, unit, src_a, src_b, dst, delay}`. For each
word, the controller:

- reads `src_a` and `src_b`;
- issues the operation to the ALU 2 cycles later (the memory read latency);
- then waits `delay` cycles before the next word.

An `OP_END` word ends the subroutine and pulses `done`.

The ROM holds three subroutines:

| entry | subroutine                                | products | add/sub | cycles, go to done |
|-------|-------------------------------------------|----------|---------|--------------------|
| 0     | GF(p²) multiply-add d = a·b + c           | 3        | 7       | 3s + 25 (103)      |
| 16    | GF(p²) squaring e = a²                    | 2        | 3       |                    |
| 24    | reduce d0, d1 mod p                       | 0        | 2       |                    |

- The multiply-add uses Karatsuba: t2 = a0·b0, t3 = a1·b1, t4 = (a0+a1)(b0+b1),
  d0 = t2 − t3 + c0, d1 = t4 − t2 − t3 + c1. Its three products go to three different
  multipliers.
- Squaring computes e0 = (a0+a1)(a0−a1) and e1 = 2a0·a1. It sends both products to the same
  dual multiplier on consecutive cycles, so they run interleaved.
- Memory map: a0, a1, b0, b1, c0, c1 = 0..5; d0, d1 = 6, 7; temporaries at 8..15;
  e0, e1 = 20, 21; reduced copies at 30, 31.

Products are Montgomery products. For example, d0 = (a0·b0 − a1·b1)·2^−K + c0, with every
value below 2p.

### Data movement: `data_bus`, `data_buffer`, `keccak_1088`

Memory, the secret-key buffer, the message buffer, the hash state and the host exchange
64-bit words. One bus command `{src, src_addr, dst, dst_addr, wdata}` moves one word:

| port | unit          | address                               |
|------|---------------|---------------------------------------|
| 0    | host          | data taken from `wdata`               |
| 1    | memory        | entry·16 + chunk                      |
| 2    | secret key    | word index (`data_buffer`, 8 × 64)    |
| 3    | message       | word index (`data_buffer`, 8 × 64)    |
| 4    | hash state    | lane index                            |

- Every source is read with a 2-cycle latency. The destination is written 2 cycles after the
  command.
- Writing to the hash state XORs the word into the lane. This is the sponge absorb step.
- Reading the hash state squeezes a lane.
- A word sent to the host appears on `host_rdata` with `host_rvalid` one cycle after that
  write.

`keccak_1088` is Keccak-f[1600] with rate 1088 bits, as used by SHAKE256:

- one round per cycle, 24 cycles per permutation;
- `clear` zeroes the state;
- `permute` starts a permutation, `busy` is high while it runs, and `done` pulses at the end;
- padding is written by whoever drives the bus.

## Top level (`sike_top`)

`sike_top` connects all of the above. Its parameters are `PRIME` (default `P434`), `N_DUAL`
(default 3), `MEM_DEPTH` (256), `SK_WORDS` (8) and `MSG_WORDS` (8).

The protocol-level control is **not** implemented:

- the main controller that sequences key generation, encapsulation and decapsulation;
- its ROM;
- the isogeny strategy ROM;
- the large isogeny subroutines.

Their contents are not available. Their signals are brought out as ports instead:

- `prog_go` / `prog_entry` / `prog_done`;
- the bus command port;
- `hash_clear` / `hash_permute`.

An external sequencer, or a testbench, plays the role of that controller.

To run a configuration from the published tables, set `PRIME` and `N_DUAL` accordingly:
SIKEp751 used 8 multipliers, which is `N_DUAL = 4`. Also extend the program ROM.

## Other departures from the published architecture

- **Memory ports.** The published scheduling rules allow only one RAM access per cycle: a
  read or a write, not both. The memory here can do a read of two operands and one write in
  the same cycle. Schedules written for the published rules still run; they are just not
  forced to be that tight.
- **Program format.** The published program ROM holds schedules produced offline by an
  optimiser. Those schedules and their instruction format are not available. The format
  here is this design's own.
- **Sizes not given.** Buffer sizes, memory depth and bus addressing are this design's own
  choices.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- **`tb_mont_dual_mult`** runs random products for all four primes through `mdm_harness`,
  in both slots and back to back. It checks results below 2p, the Montgomery relation, and
  the 3s+2 latency.
- **The column modules** are each checked against their arithmetic on random inputs.
- **`tb_keccak_1088`** checks the SHAKE256 and SHA3-256 digests of the empty message.
- **`tb_program_rom`** interprets the ROM and checks both the values and the schedule rules:
  - operands have been written before they are read;
  - start parities alternate per multiplier;
  - no slot is overbooked;
  - there is one write per cycle.
- **`tb_sike_top`** runs the whole design at its default parameters:
  - loads random elements over the bus and runs the multiply-add, reduce and squaring
    subroutines;
  - checks the cycle count and all results;
  - hashes the empty message through the message buffer, hash unit and secret-key buffer;
  - copies a word across every unit.
  - It also counts each mechanism and fails if any never occurred: add, sub, reduce, product,
    interleaved products in one dual multiplier, each bus source and destination, and the
    permutation.

To simulate with Verilator (5.x), use the same pattern for any testbench:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/sike_pkg.sv tb/tb_sike_top.sv \
          --top-module tb_sike_top -Mdir obj_top -o sim
./obj_top/sim
```

For testbenches that use it, add `tb/mdm_harness.sv`.

## Lint notes

Verilator's `-Wall` reports a few warnings that are intentional. Each is explained in the
opening comment of its module:

- the unused carry bit and start input of `mm_pe_final` in its default configuration;
- the ALU handshakes that the static schedule does not need;
- `rst_n` appearing in both asynchronous resets and assertion `disable iff`.
