# Pipelined, optimized tree RSA exponentiator (TRSA)

RSA encryption and decryption are one operation, a modular exponentiation
C = m^e mod n, and its cost is a long chain of modular multiplications
("MulMods"). This design cuts the chain into two parts that can work at the
same time on different messages:

* a **coordinator** computes two partial powers of m, A and B, from a shortened
  exponent;
* a **tree of MulMod processor elements (PEs)**, l levels deep, multiplies
  2^l - 1 copies of A and one copy of B together, which gives m^e mod n.

Each tree level is a pipeline stage, so while the root finishes one message,
the levels below it already work on the next ones. In the **optimized** tree,
the PEs that would compute identical values are removed, leaving two PEs per
level (2l - 1 in all) instead of a full binary tree (2^l - 1).

The RTL is SystemVerilog (IEEE 1800-2017), parameterized by key length `K`
(default 1024 bits), tree depth `LEVELS` (default 3) and `OPTIMIZED`
(default 1).

## The arithmetic behind the split

Let n_p = 2^l, the number of tree inputs. The coordinator splits the exponent:

```
e_o = e div 2^l                 A = m^e_o mod n
e_l = e_o + (e mod 2^l)         B = m^e_l mod n
```

The tree multiplies 2^l - 1 copies of A and one B:

```
A^(2^l - 1) * B = m^((2^l - 1) e_o + e_o + (e mod 2^l)) = m^(2^l e_o + e mod 2^l) = m^e
```

The product is all mod n. The coordinator's exponent is l bits shorter than e.
Everything else is l MulMods deep in the tree.

## The tree, level by level

With 3 levels (the default), the full tree has PEs P0-P6:

```
level 1 (root)          P6 = F*G
level 2            P4 = D*D      P5 = D*E
level 3 (leaves)  P0=A*A P1=A*A P2=A*A P3=A*B        (D = A*A, E = A*B)
```

Every PE of a level except the rightmost computes the same value. That value
is A^(2^j) after j levels. The rightmost PE carries B. The optimized tree
keeps only these two PEs per level:

```
X_1 = A*A          Y_1 = A*B                  (leaves)
X_j = X_(j-1)^2    Y_j = X_(j-1) * Y_(j-1)    (inner levels)
C   = X_(l-1) * Y_(l-1)                       (root)
```

For l = 3 that is 5 PEs instead of 7. For l = 4 it is 7 instead of 15.
`OPTIMIZED = 0` builds the full tree. It produces the same C, and is there
for comparison.

## Pipelining and flow control

A tree level is one pipeline stage. All of its PEs start together and finish
together. A level starts its next operation when two things hold:

* its inputs are valid;
* its previous result has been, or is being, taken by the level above.

The level above copies the operands into its own input registers when it
starts. That frees the lower level at once. A level that has finished but
cannot hand its result on holds it, and the stall travels down to the input
(`in_ready` drops). No result is ever overwritten.

With nothing stalled:

* one result leaves every K + 2 cycles;
* the latency through the tree is l·(K + 2) cycles, from the input handshake
  to the output handshake.

The extra 2 cycles per stage are the handshake between levels.

The coordinator is an earlier stage. It takes a new message as soon as the
tree has taken the A and B of the previous one.

**The coordinator is the bottleneck.** The throughput gain from pipelining is
(l + 1)-fold only if the coordinator takes no longer than one MulMod. This
coordinator runs the binary method on a (K - l)-bit exponent. That is about
1.5(K - l) MulMods on average, and up to about 2K. So with the internal
coordinator, pipelining overlaps coordinator work with tree work, and little
more. To get the tree's full rate, use the bypass mode (below). In that mode
a host computes A and B, for example several hosts or a faster unit, and the
tree works as a coprocessor.

## Blocks

| module | what it is |
|---|---|
| `trsa_pkg` | sizing functions: PEs per stage, total PEs, defaults |
| `mulmod_pe` | one processor element: registers n, in1, in2, out, and a bit-serial (in1·in2) mod n |
| `trsa_coordinator` | splits e, computes A and B with one `mulmod_pe` (left-to-right binary method) |
| `trsa_tree` | the pipelined tree, full or optimized, generated for any `LEVELS` ≥ 2 |
| `trsa_top` | coordinator + tree + mode control |

### mulmod_pe

The product and the reduction are merged into interleaved modular
multiplication. It handles one bit of in1 per clock, MSB first:

```
acc = 2*acc + bit*in2
acc = acc - n   (up to twice)
```

After K steps, acc = in1·in2 mod n. This needs only (K+2)-bit adders and
comparators. There is no K×K multiplier and no 2K-bit divider.

* Both operands must be below n, and n must be above 1.
* `start` is taken when not busy. `done` pulses K clock edges later, and then
  `result` holds the product until the next one.
* The n register is passed on (`n_out`). Each message therefore carries its
  own modulus through the tree.

### trsa_coordinator

The coordinator uses a single PE and a small state machine:

* Squares and multiplies over e_o, MSB first. Leading zeros are skipped, and
  the first set bit just loads m.
* Does the same for R = m^(e mod 2^l).
* Computes B = A·R.

It needs (bitlength - 1) squarings plus (ones - 1) multiplies per exponent
part, plus 1 for B. It reports the count on `op_count`.

### trsa_top modes

`pipe_en` and `coord_bypass` are sampled only in a cycle when no message is
inside and none is being accepted. Results therefore always leave in order.

* `pipe_en = 1`: messages overlap. `pipe_en = 0`: a message is admitted only
  after the previous result has left. This is the behaviour of an unpipelined
  TRSA, for comparison.
* `coord_bypass = 0`: the internal coordinator uses `in_m`, `in_e`, `in_n`.
  `coord_bypass = 1`: the host supplies `in_a` = A, `in_b` = B and `in_n`
  directly, and `in_m`/`in_e` are ignored.

`in_flight` counts the messages that are inside. `stage_active` shows which
tree levels are busy or holding a result.

## How far it is verified

Each block has a self-checking testbench in `tb/`. They compare against
plain wide-integer arithmetic (`tb_ref_pkg`: `*` and `%` on 2048-bit
numbers, right-to-left exponentiation).

| testbench | what it covers |
|---|---|
| `tb_mulmod_pe` | 200+ random and corner products at 64 bits, 6 at 1024 bits, exact latency, start-while-busy ignored |
| `tb_trsa_coordinator` | A, B and MulMod count for 64-bit/3-level, 48-bit/4-level and 1024-bit/3-level; e = 0, e < 2^l, all-ones e; output held under backpressure |
| `tb_trsa_tree` | optimized and full trees, 3 and 4 levels, plus 1024-bit/3-level; exact latency l·(K+2), issue interval K+2, long output stalls, random gaps |
| `tb_trsa_top` | 32-bit end to end: RSA round trip with a real key (p = 65521, q = 65519, e = 65537), pipelined and unpipelined, bypass, stalls, mode switches; pipelined tree throughput ≥ l × unpipelined (measured 34 vs 103 cycles) |
| `tb_trsa_full` | default parameters (1024-bit, 3 levels): e = 65537 and a random 1024-bit e, back to back |
| `tb_trsa_table1` | 1024-bit keys with 3 and with 60 levels (119 PEs), best-case (e = 2^1023) and worst-case (all-ones) exponents; prints MulMods on the critical path and cycles |

Run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  tb/tb_ref_pkg.sv rtl/trsa_pkg.sv rtl/mulmod_pe.sv rtl/trsa_tree.sv \
  rtl/trsa_coordinator.sv rtl/trsa_top.sv tb/tb_trsa_top.sv \
  --top-module tb_trsa_top -o sim && obj_dir/sim
```

Every testbench ends with `TB_RESULT checks=N failures=M`. `tb_trsa_tree`
also needs `tb/tree_harness.sv`. At the default size, one message takes about
2 million cycles, which is a few seconds of simulation. `tb_trsa_table1`
takes about 1.5 minutes.

## Where this design makes its own choices

The published scheme gives the arithmetic, the tree and its optimization, and
the pipelining principle. These parts are choices of this design:

* **MulMod circuit.** The published PE is a multiplier followed by a mod unit.
  Here the two are merged into a bit-serial interleaved multiplier, K+1
  cycles per MulMod.
* **Coordinator.** The scheme leaves it open, and suggests it may be a host
  CPU that is faster than the PEs. Here it is one PE and a binary-method
  controller, and it computes B as A·m^(e mod 2^l). That costs 2(l-1)+1 more
  MulMods than the published count of 2(k-l-1). Worst case at k = 1024: 2045
  coordinator MulMods for l = 3 or l = 60, plus l in the tree.
* **Handshakes and stalls.** All valid/ready handshakes, the stall behaviour,
  the run-time modes, and the per-message modulus are this design's own.
* **Reset.** An active-low asynchronous reset clears all state.
* **Full tree kept.** The full tree stays available (`OPTIMIZED = 0`). The
  default is the optimized, pipelined form, which is the one proposed.
* **n_p.** The split uses n_p = 2^l in both tree forms.

Not built:

* key generation (p, q, φ, d);
* CRT or Montgomery variants, which the scheme only compares against;
* the software efficiency study.

## Changing it

* `K`: any width ≥ `LEVELS` + 1. The area grows linearly, and so do the
  cycles per MulMod.
* `LEVELS`: any depth ≥ 2. The optimized tree grows by 2 PEs per level. The
  full tree doubles per level, so keep `LEVELS` small when `OPTIMIZED = 0`.
* Faster MulMods: replace the datapath of `mulmod_pe`, for example with a
  higher radix. Keep the `start`/`busy`/`done` contract: all PEs of a level
  must take the same number of cycles, because a level is controlled as one
  unit that starts all its PEs together and waits for all of them.
