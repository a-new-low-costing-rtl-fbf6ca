# A small two-edges-per-clock QC-LDPC decoder

This is a decoder for a rate-0.4 (2560,1024) quasi-cyclic LDPC code. It is built to use little
logic, not to be fast. It has one variable-node core and one check-node core. Each core handles
two messages per clock. Each message class has one block RAM, and a single adder plus a modulo-128
counter generates every edge address. The decoder uses the min-sum algorithm with 6-bit messages
and always runs 25 iterations. It computes no syndrome and does not stop early. On a
Virtex-4-class FPGA this architecture is meant to fit in under a thousand slices and about ten
18 Kb block RAMs. The price is a long decoding time: about 212,000 clocks per frame, which is roughly
0.87 Mbit/s of information at 180 MHz. To get more throughput, place several decoders side by
side.

The architecture follows a published low-cost FPGA decoder. Its list of blocks, the
two-input/one-core node units, the ROM-plus-shifter address generator, the use of the RAM output
reset to start the messages at zero, the code size, the 6-bit quantisation and the 25 iterations
all come from that design. The parity-check matrix is not published, so the matrix in `ldpc_pkg` is
this design's own (see *The code*). The same goes for every width, handshake and pipeline detail
that the description leaves open.

## Decoding procedure

A frame goes through three steps. The controller `ldpc_ctrl` runs them:

1. **Load.** 2560 channel LLRs arrive, one per clock, and go into the LLR RAM (`RAM_p`).
2. **Iterate 25 times.** Each iteration has a variable-node phase followed by a check-node phase.
   The phases never overlap, so this is plain flooding: every update in a phase uses messages from
   the phase before it.
   * In the variable phase, variable node *i* forms `L(Q)_i = L(P)_i + sum_j L(r)_ji` and sends
     `L(q)_ij = L(Q)_i - L(r)_ji` on each of its edges. The messages are saturated to ±31.
   * In the check phase, check node *j* sends each edge the product of the other inputs' signs
     times the smallest of the other inputs' magnitudes. This is plain min-sum, with no scaling or
     offset. A zero input counts as positive.
3. **Output.** The last iteration's variable phase also computes `L(Q)` for every bit. The decision
   block keeps the hard decisions of the 1024 information bits: a bit is 0 if `L(Q) > 0`, else 1.
   These bits then leave one per clock.

**How the messages start at zero.** Min-sum starts with every `L(r)` at 0. Nothing ever writes
those zeros. Instead, the L(r) RAM has an output-register reset (`ssr`), which is high during the
first variable phase. All reads in that phase therefore return 0, and the first variable update
simply sends `L(P)`. This saves one pass of clearing or initialising the RAM.

## The code

H is a 12 × 20 array of 128 × 128 blocks. Each block is either all zero or a cyclically shifted
identity. A block with shift `s` has, in its row `j`, a one in column `(j+s) mod 128`. There are 64
non-zero blocks, which gives 8192 edges:

* **Block columns 0–7 (bits 0–1023):** the information bits. Their degrees are 6, 6, 6, 6, 4, 4, 4
  and 5.
* **Block columns 8–19:** the parity bits, in a staircase. Parity block *R* has an identity in block
  row *R* and a shifted block in row *R+1*, so the last parity column has degree 1. An encoder
  computes `p_R = Σ_c P^s(R,c)·u_c + P^s(R,8+R−1)·p_{R−1}` one row at a time. The testbench
  encodes this way.
* **Check rows:** row 0 and rows 1–7 have degree 6; rows 8–11 have degree 4.
* **Shifts:** chosen at random under one constraint, that H has no 4-cycles. For any two rows
  r1, r2 and columns c1, c2 that are all non-zero, `s(r1,c1) − s(r1,c2) + s(r2,c2) − s(r2,c1) ≠ 0
  mod 128`.

Why 64 blocks: with two edges per clock in each phase, an iteration takes as many clocks as there
are edges. The published figure of 208,384 clocks per frame splits exactly as 2560 load clocks +
25 × 8192 + 1024 output clocks, and 8192 edges means 64 blocks. To use a different code, edit
`BASE` in `rtl/ldpc_pkg.sv`. The ROMs and segment tables are computed from it when the design is
elaborated. Keep these limits:
* node degrees no higher than `DMAX`;
* 64 circulants, or change `NCIRC`;
* the information bits in the first `KB` block columns.

## Memory layout and address generation (the part to read carefully)

Both message RAMs use one edge numbering. Number the circulants k = 0…63 in row-major order of
the base matrix. The edge in local check row `j` of circulant `k` is then stored at address
`k·128 + j`.

* **Check-row walk** (check phase, `ldpc_addr_gen` with `COL_ORDER=0`). Check `j` of a block row
  reads `{k, j}` for each circulant `k` in that row, so the address is "start of sub-matrix +
  counter".
* **Column walk** (variable phase, `COL_ORDER=1`). Variable `i` of block column `c` meets
  circulant `k` (shift `s`) in local row `(i − s) mod 128`. The ROM stores `{k, (128−s) mod 128}`
  for each circulant, and the address is `{k, rom_offset + i}`. The add is 7 bits wide and wraps
  inside the sub-matrix. This one adder and the modulo-128 counter are the whole "address
  shifter".

Each generator issues a **slot** every clock: two edge addresses for the current node. A node of
degree d takes ceil(d/2) slots. For an odd degree, the second address of the last slot is marked
unused (`en1 = 0`). One column walk is 33 × 128 = 4224 slots; one row walk is 32 × 128 = 4096
slots.

**Which port does what.** The RAM_r generator reads RAM_r on both ports and also gives the RAM_p
address. The RAM_q generator reads RAM_q on both ports. Writes use no generator. Each node unit
returns every input's edge address (its *tag*) with the matching output, and the write side uses
that tag. So in every phase one RAM is read on both ports and the other is written on both ports,
and a phase writes exactly the edges it read.

## Node units and the stall

`ldpc_vnu` and `ldpc_cnu` have the same two-stage skeleton. Stage A takes in a node's slots and
accumulates them: the sum for a variable node; the sign XOR, smallest magnitude, its position and
second-smallest magnitude for a check node. It also buffers the inputs and tags (at most 3 slots).
When the node is complete, stage B takes it over and emits two outputs per clock, while stage A
already takes in the next node. When neighbouring nodes have equal degrees, both stages spend
ceil(d/2) clocks per node and the unit takes a slot on every clock.

If the next node has fewer slots than the node stage B is still emitting, stage A fills up first
and `in_ready` drops. That single ready signal is the `adv` of the address generator and the
enable of the RAM output registers. A stall therefore freezes the generator, the RAM data and the
aligned metadata together. Nothing is lost, and no skid buffer is needed. In this code, stalls
happen only at a few block-column and block-row boundaries: about 3 clocks per variable phase and 1
per check phase.

## Timing

| part | clocks |
|---|---|
| load | 2560 (one LLR per clock while `llr_ready`) |
| variable phase | 4224 slots + start, fill, drain and stall clocks |
| check phase | 4096 slots + start, fill, drain and stall clocks |
| one iteration | 8337 measured (8320 slots + 17) |
| output | 1024 (+ a few) |
| **frame** | **212,012 measured** without input gaps (2560 + 25 × 8337 + 1024 + 3) |

The published figure for the same structure is 208,384 clocks. The difference comes from this
code's odd-degree columns, which leave half of some slots unused, and from the few clocks of
pipeline fill per phase.

## Interface of `ldpc_decoder`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | pulse while idle to begin a frame |
| `llr_in`, `llr_valid`, `llr_ready` | in/in/out | 6/1/1 | LLRs of bits 0…2559 in order, taken when `llr_valid && llr_ready`. Two's complement; positive means bit 0 is more likely; −32…31 accepted |
| `bit_out`, `bit_valid`, `bit_last` | out | 1 | decoded information bits 0…1023 in order, one per clock |
| `iter` | out | 8 | iteration in progress |
| `busy`, `done` | out | 1 | frame in progress; one-clock pulse at the end of the frame |

The memories are not reset, and they do not need to be. Only control state is reset.

## Files

| file | block |
|---|---|
| `rtl/ldpc_pkg.sv` | sizes, types, base matrix, saturation helper |
| `rtl/ldpc_decoder.sv` | top: wiring of the blocks below |
| `rtl/ldpc_ctrl.sv` | processing control FSM |
| `rtl/ldpc_addr_gen.sv` | ROM + modulo-128 address shifter, column or row walk |
| `rtl/ldpc_llr_ram.sv` | RAM_p, 2560 × 6 |
| `rtl/ldpc_msg_ram.sv` | RAM_r and RAM_q, 8192 × 6, two ports, output reset |
| `rtl/ldpc_vnu.sv` | two-input variable-node unit |
| `rtl/ldpc_cnu.sv` | two-input min-sum check-node unit |
| `rtl/ldpc_decision.sv` | hard decision, bit buffer, output |

Each `tb/tb_<module>.sv` is a self-checking bench for one module. Each prints
`TB_RESULT checks=N failures=M` at the end.

`tb/tb_ldpc_decoder.sv` runs the whole decoder at its default size. It encodes four random frames,
sends them over a BPSK channel with Gaussian noise (σ from 0.3 to 1.3) and checks three things:

* every output bit matches the bench's own flooding min-sum model, bit for bit;
* there are zero bit errors on the low-noise frames;
* the clocks per frame fall within the expected range.

It also checks that each mechanism actually occurred: the zero reads in the first iteration
(exactly 4224 per frame), stalls, half-used slots, saturation, gaps in the input handshake and the
stop after 25 iterations. The whole run takes under a second.

To simulate with Verilator:

```
verilator --binary --timing -Irtl rtl/ldpc_pkg.sv rtl/ldpc_*.sv tb/tb_ldpc_decoder.sv \
          --top-module tb_ldpc_decoder -Mdir obj && ./obj/Vtb_ldpc_decoder
```

## How far to trust it, and where it departs from the reference design

* **Verified in simulation only.** Nothing here has been placed, routed or timed, so the 180 MHz
  figure and the resource counts are the reference design's, not measured for this RTL.
* **Matrix.** The matrix is this design's own, so bit-error-rate results depend on it and are not
  the published ones. Under heavy noise (σ = 1.3) it leaves about 240 errors out of 1024. At σ ≤
  0.85 (about 2.4 dB Eb/N0 at rate 0.4) the bench saw no errors, although four frames say little
  about error rates.
* **When decisions are taken.** Decisions come from the variable phase of iteration 25, that is,
  from the check messages of iteration 24. The check phase of iteration 25 runs but its result is
  not used. Adding one more variable pass would use the latest messages, at the cost of about 4200
  clocks per frame.
* **Iteration count.** The reference quotes both 25 and 30 maximum iterations. 25 is used because
  it matches the published clock count. Change `MAX_ITER` in the package to use another count.
* **Throughput.** The reference's throughput figure of 8.5 Mbit/s does not follow from its own
  clock count: 1024 × 180 MHz / 208,384 ≈ 0.88 Mbit/s. This design gives 0.87 Mbit/s at 180 MHz.
* **Choices of this design.** These are not in the reference:
  * write addresses travel with the data as tags;
  * a single ready signal stalls the whole pipeline;
  * messages saturate symmetrically to ±31;
  * the RAMs read first;
  * output is one bit per clock;
  * a zero `L(Q)` decodes as 1.
