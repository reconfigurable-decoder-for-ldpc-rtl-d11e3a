# Reconfigurable min-sum BP decoder for a polar code and an LDPC code

5G eMBB uses LDPC codes for data and polar codes for control, so a receiver
needs both decoders. Both can be decoded by belief propagation (BP), and in
the min-sum form both reduce to the same two operations: add two LLRs, and
take

    g(x, y) = sgn(x) * sgn(y) * min(|x|, |y|)

This design builds one set of arithmetic, 48 g-function units and 48 adders,
and switches its wiring with a mode bit so that it decodes either

* a polar code of length N = 8 (three stages of four butterfly blocks), or
* the regular (12,6) LDPC code with row weight 4 and column weight 2 given by
  `bp_pkg::H` (six check nodes, twelve variable nodes).

Two separate decoders of the same kind would need 96 comparators, 96 XORs
and 84 adders; the shared datapath needs 48 of each.

The structure (merged blocks, how a check node is spread over a pair of
them, resource counts, the 7-bit number format, the two codes, ten
iterations, and latencies of 10 and 63 clocks) follows the published design
this RTL implements. The memory organisation, the schedule inside a polar
iteration, the exact port sharing inside a merged block and the handshake
are choices made here; they are listed under "Design choices" below.

## The arithmetic: GFU and adder

`gfu` computes g(a, b): an XOR of the two sign bits and a comparator that
picks the smaller magnitude. `sat_adder` adds two LLRs and saturates.
Both are combinational.

LLRs are 7-bit two's complement with two fractional bits (sign, four integer
bits, two fractional bits), so the range is +/-15.75 in steps of 0.25. The
range is kept symmetric (-16.0 never occurs inside the decoder: inputs are
clamped to -15.75), so every magnitude fits in six bits. A positive LLR
means bit 0.

## The merged block (MBCB)

`mbcb` is the building block: four GFUs, four adders, and switches on their
inputs controlled by `s`.

**Polar mode** – one basic computational block (butterfly) of the polar
factor graph. With node (i, j) in node stage i, the block joins (i, j) and
(i, j+N/2) on the left to (i+1, 2j-1) and (i+1, 2j) on the right. L messages
travel right to left, R messages left to right:

| output | equation | form |
|---|---|---|
| `l_out_top` = L(i,j) | g(L(i+1,2j-1), L(i+1,2j) + R(i,j+N/2)) | add, then GFU |
| `r_out_odd` = R(i+1,2j-1) | g(R(i,j), L(i+1,2j) + R(i,j+N/2)) | add, then GFU |
| `l_out_bot` = L(i,j+N/2) | g(R(i,j), L(i+1,2j-1)) + L(i+1,2j) | GFU, then add |
| `r_out_even` = R(i+1,2j) | g(R(i,j), L(i+1,2j-1)) + R(i,j+N/2) | GFU, then add |

Every output has its own GFU and adder; the common sub-terms are not shared.

**LDPC mode** – the same block does two jobs at once.

* Its GFUs form two three-input check units, each two chained GFUs. From the
  four variable-to-check messages q0..q3 of one check node they give
  `r_x = g(q2, g(q3, q1))`, the message back along q0's edge, and
  `r_y = g(g(q0, q2), q3)`, the message back along q1's edge. By the
  associativity of g, each is the min-sum of the other three inputs.
* Three of its adders form one variable node with two edges. The variable
  node's signals use the polar ports:

| port | polar mode | LDPC mode |
|---|---|---|
| `r_in_top` | R(i,j) | channel LLR L(c) |
| `l_in_odd` | L(i+1,2j-1) | r_a, check message on the node's first edge |
| `l_in_even` | L(i+1,2j) | r_b, check message on the second edge |
| `l_out_top` | L(i,j) | q_a = L(c) + r_b |
| `r_out_odd` | R(i+1,2j-1) | q_b = L(c) + r_a |
| `l_out_bot` | L(i,j+N/2) | L(Q) = q_a + r_a, a posteriori LLR |

The fourth adder and `r_in_bot` / `r_out_even` are idle in LDPC mode. The
block therefore has 9 inputs (four polar, four q, `s`) and 6 outputs.

**A false loop.** Because the GFUs are shared, there is a structural path
from an adder input through a GFU (polar wiring) out of `r_x`/`r_y`, and
through the top level back into an adder input of another block (LDPC
wiring). Both ends are switched by the same mode bit, so it is never a real
combinational loop. Verilator reports it as `UNOPTFLAT`, and a timing tool
would report it as a loop to be cut with a false-path constraint.

## Check nodes on a pair of blocks

A degree-4 check node needs four outputs, each made of two GFUs: eight GFUs,
the contents of two MBCBs. `mbcb_pair` joins two blocks into one check node.
The first block gets q0..q3 in order and produces r0 and r1. The second
gets them rotated by two (q2, q3, q0, q1) and produces r2 and r3. The
adders of block m of pair p form variable node 2p+m. So the 12 blocks are
6 check nodes (48 GFUs) and 12 variable nodes (36 adders).

## Polar mode: graph, order and schedule

MBCB 4s + j (s = 0..2, j = 0..3) is the butterfly j of stage s+1. Channel
LLRs enter the rightmost node stage as L(4, j). The leftmost R messages
hold the frozen-bit prior: +15.75 for a frozen bit, 0 for an information
bit. Left node j carries u[bitrev(j)], so the first column reads u1, u5,
u3, u7, u2, u6, u4, u8, and the right column is x1..x8 in order. The code
decoded is therefore x = u · B_N · F^(x3), with B_N the bit-reversal
permutation and F = [[1,0],[1,1]] (Arikan's generator). The frozen set is an
input; with u4, u6, u7, u8 as information bits it is the usual rate-1/2 code.

All twelve blocks compute every cycle from the message memory. The
controller lets one stage write per clock:

    iteration (x10):  L pass, stages 3, 2, 1  (writes L of node stages 3, 2, 1)
                      R pass, stages 1, 2, 3  (writes R of node stages 2, 3, 4)
    closing L pass:   stages 3, 2, 1
    total             10 x 6 + 3 = 63 clocks

The closing L pass gives the decision fresh leftmost L messages. The decision
is 0 for a frozen bit and the sign of L(1, j) for an information bit. This
equals the sign of L + R, because R = 0 there.

## LDPC mode: one flooding iteration per clock

The message memory holds the 24 variable-to-check messages (one per edge of
H) and the 12 channel LLRs. In each clock:

1. every check node (pair of blocks) turns its four stored q into four r;
2. every variable node (adders of one block) turns its two r and L(c) into
   two new q and L(Q);
3. the new q are written back, and sign(L(Q)) is registered as the decision.

Ten iterations therefore take ten clocks, and the decision after the last
one reflects ten check-node updates. At the start of a frame every q of
column i equals L(c_i).

## Frame interface and timing

`reconfig_bp_decoder` ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse, taken when idle or in the `done` cycle |
| `mode_in` | in | 1 | `MODE_POLAR` (0) or `MODE_LDPC` (1), sampled with `start` |
| `llr_in` | in | 12 x 7 | channel LLRs; polar uses entries 0..7 (x1..x8) |
| `frozen` | in | 8 | polar frozen mask, bit k = u(k+1) |
| `bits_out` | out | 12 | LDPC: c1..c12; polar: u1..u8 in bits 0..7 |
| `done` | out | 1 | one-cycle pulse: `bits_out` is valid |
| `busy` | out | 1 | a frame is in progress |

The inputs are sampled only in the `start` cycle. The first step of a
frame already runs in that cycle: while loading, the memory's read ports show
the new frame's initial values. So a frame takes exactly its number of steps:

| mode | clocks from `start` to `done` | frames per clock |
|---|---|---|
| LDPC | 10 | 1/10 (12 bits per 10 clocks) |
| polar | 63 | 1/63 (8 code bits per 63 clocks) |

`start` may be raised again in the `done` cycle, so frames run back to back.
`bits_out` keeps its value until the next frame completes. At a 120.5 MHz
clock, that gives 144.6 Mbit/s (LDPC) and 15.3 Mbit/s (polar, counted in
code bits).

## Message memory

`msg_mem` is two banks (L and R) of 32 seven-bit registers. Each bank has one
word per polar graph node, 4 node stages x 8. Every word is read and written in
parallel. Each word has its own write enable; a word that is not written
takes its initial value while `load` is high. In LDPC mode the L bank's words
0..23 hold the edge messages and the R bank's words 0..11 hold the channel
LLRs; the rest is unused.

## Resources

| item | this RTL | published figure |
|---|---|---|
| GFUs (comparator + XOR) | 48 | 48 (2N log2 N) |
| adders | 48 | 48 |
| flip-flops | 422 after synthesis (message memory, controller, frozen mask, output bits) | 384 registers on an FPGA |

The published design does not say how its memory is organised, so the
register count differs. No timing or FPGA figures were measured for this
RTL.

## Design choices not fixed by the published design

* Saturating adders, and the symmetric clamp at +/-15.75.
* Two's complement storage; the GFU forms magnitudes internally.
* Which q enters which GFU of a check unit, and the port sharing of the
  variable node inside an MBCB.
* The rotation that lets both blocks of a pair use one circuit; which
  variable nodes sit in which pair.
* The memory as parallel registers shared between modes, with a load bypass.
* The polar step order (L pass, then R pass, then a closing L pass). It was
  chosen to match the reported 63-clock latency.
* In LDPC mode, storing variable-to-check rather than check-to-variable
  messages, so that a full iteration and its decision fit one clock.
* Frozen prior of +15.75; a frozen set supplied as an input.
* The start/done handshake and reset behaviour.

The general architecture also allows longer check units (a t-input unit is a
chain of t-1 GFUs) for codes with heavier rows; with row weight 4 only the
three-input unit is needed, so no longer one is built.

Parameters: `W` (LLR width, 7), `ITER_LDPC` and `ITER_POLAR` (10 each). The
code sizes (N = 8, H) are constants of `bp_pkg`; the MBCB-to-node mapping
relies on them. Changing `W` changes the fixed-point range, but the
fractional position only matters to whoever scales the channel LLRs.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. `tb/bp_ref_pkg.sv` holds integer
reference models. They are written directly from the update equations with
1-based node labels, or from (check, column) pairs of H, independently of
the RTL's structure.

| testbench | what it checks |
|---|---|
| `gfu_tb`, `sat_adder_tb` | all 128 x 128 input pairs |
| `mbcb_tb` | 4000 random vectors, all outputs in both modes, including saturation |
| `mbcb_pair_tb` | check-node messages exclude their own edge; polar members independent |
| `msg_mem_tb` | random writes and loads against a model, read bypass, write-over-load priority |
| `bp_ctrl_tb` | exact step sequence, 10/63-clock latency, start in the done cycle, start while busy ignored |
| `reconfig_bp_decoder_tb` | 400 frames at default parameters: bit-exact against the reference decoders, noiseless codewords decode correctly, latency, mode switches, back-to-back frames, channel errors corrected in both modes, clamped inputs, random frozen sets, inputs changed after `start` |
| `ber_tb` | 2000 AWGN frames per code at 1, 3 and 5 dB, every frame bit-exact against the reference; BER must fall with Eb/N0 and beat uncoded hard decisions |

Measured BER (BPSK, AWGN, rate 1/2, channel LLRs quantised to the 7-bit
format; polar counted on the four information bits, LDPC on all twelve code
bits):

| Eb/N0 | polar | LDPC | uncoded |
|---|---|---|---|
| 1 dB | 7.4e-2 | 7.0e-2 | 1.3e-1 |
| 3 dB | 1.8e-2 | 1.8e-2 | 7.6e-2 |
| 5 dB | 1.9e-3 | 2.1e-3 | 3.7e-2 |

These agree in magnitude with the published fixed-point curves for the same
two codes. They were not compared point by point.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing -Wno-fatal -y rtl -y tb \
        rtl/bp_pkg.sv tb/bp_ref_pkg.sv tb/reconfig_bp_decoder_tb.sv \
        --top-module reconfig_bp_decoder_tb --Mdir obj
    ./obj/Vreconfig_bp_decoder_tb

Substitute any other testbench name. `-Wno-fatal` keeps the width
warnings of the testbenches, and the `UNOPTFLAT` report of the false loop
described above, from stopping the build. Every testbench finishes in
seconds.

## Files

| file | content |
|---|---|
| `rtl/bp_pkg.sv` | widths, code sizes, H, mode and pass types, wiring functions derived from H |
| `rtl/gfu.sv` | g-function unit |
| `rtl/sat_adder.sv` | saturating adder |
| `rtl/mbcb.sv` | merged basic computational block |
| `rtl/mbcb_pair.sv` | two MBCBs as one check node and two variable nodes |
| `rtl/msg_mem.sv` | message memory |
| `rtl/bp_ctrl.sv` | schedule controller |
| `rtl/reconfig_bp_decoder.sv` | top level |
| `tb/*.sv` | testbenches and reference models |
