# Layered min-max decoder for nonbinary LDPC codes, simplified variable node

This is synthesizable SystemVerilog for a decoder of nonbinary LDPC codes,
which are codes over GF(q). By default it decodes the (837,726) code over
GF(32). It runs the layered trellis min-max algorithm and handles one
parity-check row per clock cycle.

The main idea is to shrink what the check node sends back. A check node with
27 neighbours would normally return 31 candidate LLRs per neighbour, one per
nonzero field element. Here it returns a *basic set* instead: the p = 5
linearly independent field elements with the smallest LLRs, with their values
and the columns they come from. It also returns one complement value per
element and one symbol per neighbour. The variable node side rebuilds the
full check-to-variable (C2V) messages from this.

The variable node is where the design saves logic. Every element that is not
in the basic set is a sum of basic-set elements. The exact algorithm would
give such an element the largest LLR among the elements it is made of. Here
it always gets the largest LLR of the whole basic set, m1_p*. That removes the
whole "extra column" constructor from the variable node. The price is a small
loss in error-correcting performance.

## The code and its parity-check matrix

| quantity | value |
|---|---|
| field | GF(32), p = 5 bits per symbol, primitive polynomial x^5+x^2+1 |
| code | N = 837 symbols, K = 726 |
| row / column weight | dc = 27, dv = 4 |
| H | a 4 x 27 array of 31 x 31 alpha-multiplied circulant permutation matrices |
| layers | M = 4 x 31 = 124 rows, one layer = one row |
| LLR width | W = 5 bits, unsigned, 0 = most likely symbol |
| iterations | 8 (parameter `IMAX`) |

Variable node `n = 31*j + s` belongs to block column j at circulant position s.
Row r of block row b has one nonzero entry in each block column j:

- its position is s = (r + e(b,j)) mod 31;
- its coefficient is h = alpha^s.

The published architecture does not list the base exponents e(b,j).
`nb_pkg::base_exp` uses e(b,j) = b*j mod 31, which is an array-code layout.
To decode a different code with the same shape, replace that function. The
all-zero word is a codeword whatever the exponents are, and the testbenches
rely on that.

Field elements are held in vector form, so addition is XOR. An LLR vector has
32 entries, and entry `a` is the LLR of the symbol whose bit pattern is `a`.

## One layer per clock cycle

The whole update of a row is combinational. It sits between memories with
asynchronous reads, and the results are written on the clock edge that ends
the cycle. Read and write addresses are the same, so no hazard logic is
needed. For each of the 27 columns j of row l the data flows like this:

```
VNMEM[j][addr_j] --P(h)--> Qp --(-) R_old--> N --> Qmn, z ----------> CNP
                               ^                 |                      |
                 DN <- CN MEM[l]                  +--(+) R_new <-- DN <--+
                                                        |              |
VNMEM[j][addr_j] <--------------- P^-1(h) <--------------+     CN MEM[l] <-+
OUT MEM[j][addr_j] <- argmin of the written vector
```

1. **P** (`gf_perm`) reindexes the stored vector Q_n: Qp[a] = Q_n[h*a].
   Multiplying by alpha^e rotates the 31 nonzero entries when they are listed
   in power order. The module rewires to power order, barrel-rotates, and
   rewires back.
2. **Subtract** (`v2c_sub`) removes what this row added in the previous
   iteration: R_old is rebuilt by a decompression network from the word saved
   in the check node memory.
3. **N** (`llr_norm`) finds the minimum and its index z_n (the hard decision)
   and subtracts the minimum, so the best symbol has LLR 0.
4. **CNP** (`cnp`) compresses the 27 normalized vectors (next section).
5. **DN** (`dn`) expands the fresh check node output into 27 C2V vectors
   R_new. The same word is stored in **CN MEM** for the next iteration.
6. **Add** (`app_add`) and **P^-1** give the new Q_n, which is written back.
   Its hard decision goes to **OUT MEM**.

During loading, an input multiplexer feeds channel LLRs into VNMEM instead.
The first time a row is processed, the check node memory holds nothing for
it. Each row has a valid bit, cleared at the start of a frame, and an unwritten
row reads as all zeros. The decompression network turns an all-zero word into
all-zero messages, which is the required R = 0 start.

## The check node: basic set and complement set

`cnp` works on one row:

- **Delta domain.** dq_j[eta] = Qmn_j[eta ^ z_j]. Every column then has its best
  symbol at index 0, and row `a` of the resulting 32 x 27 trellis means
  "deviate from the hard decision by a".
- **Syndrome.** beta = XOR of all z_j. For column n, z_n* = z_n ^ beta is the
  value the other columns vote for.
- **Psi** (`cnp_psi`). For every trellis row, the smallest value m1(a), its
  column I(a), and the second smallest m2(a). Ties go to the lowest column.
- **Phi** (`cnp_phi`). The basic set: the 5 linearly independent elements with
  the smallest m1, found greedily. Each round takes the cheapest element
  outside the span of the elements already chosen. The span is a 32-bit mask,
  and each pick doubles it by XOR. The set comes out in ascending m1 order,
  so entry 5 holds m1_p*, the largest LLR in the set.
- **Complement set E(a).** m2(a) for the 5 basic-set elements, m1(a) for the
  other 26. The complement is used when the cheapest way to form `a` runs
  through the column the message is for. For a basic-set element that way is
  its own column, so the answer is the second minimum. (The pseudo-code
  listing of the source reverses this rule. The prose rule is the one that
  fits the variable node, and it is the one implemented.)

One check node word is 27 symbols, 32 complement values and 5 x (LLR, column,
element): 370 bits.

## Rebuilding C2V messages (decompression network)

This is the part that differs from earlier decoders. There are two instances,
one for R_old and one for R_new. Each has three stages.

**Path information** (`dn_path`, one per instance). The 5 basic-set elements
form a basis of GF(32), so every nonzero element `a` is the XOR of exactly one
subset of them. The path d(a) lists the columns of that subset, and those are
the columns the cheapest way to form `a` deviates in. The hardware enumerates
all 31 subsets and XORs their elements. It then writes the subset's column
numbers into the slot of the element they produce. d(a) is 5 slots of column
numbers, and an unused slot holds all ones. That value matches no real column
because the column field is wide enough for 28 values.

**C2V generator** (`c2v_gen`, one per column n). For each element a != 0:

```
dQ(a) = m1_l*   if a == a_l* for some l   (one-deviation element)
        m1_p*   otherwise                 (the simplification)
dR(a) = E(a)    if some d_l(a) == n       (the path uses column n)
        dQ(a)   otherwise
dR(0) = 0
```

A GF(8) example with basis {a1, a2, a3} and m1_1 <= m1_2 <= m1_3. The exact
rule would give a1^a2 the value max(m1_1, m1_2) = m1_2. The other three
combinations all come out as m1_3 anyway. The simplified rule gives all four
the value m1_3, so only one in four values changes. In GF(32), 26 elements
share the single value m1_5*, and no maximum has to be computed.

**Delta to normal** (`delta2normal`, one per column). R_n[a] = dR[a ^ z_n*],
so the LLR 0 lands on the symbol the check favours.

## Number formats and saturation

All stored LLRs are 5 bits and unsigned. The subtraction yields 6-bit signed
values. Normalization and addition clip at 31.

One rule is this design's own, and it matters. A stored entry equal to 31
only means "at least 31". Subtracting an old C2V value from it would make an
unlikely symbol look likely. So `v2c_sub` passes such entries through
unchanged. Without this rule, the 5-bit decoder falls apart in the third
iteration: every symbol ends up wrong. With it, frames at 5.2 dB Eb/N0 decode
cleanly.

## Interface and timing (`nbldpc_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset (control state only) |
| `start` | in | 1 | pulse while idle or done: clear CN MEM valid bits, begin loading |
| `in_valid` / `in_ready` | in / out | 1 | load handshake, 31 beats |
| `in_llr` | in | 27 x 32 x 5 | beat t: LLR vectors of nodes 31*j + t, j = 0..26 |
| `busy` | out | 1 | loading or decoding |
| `done` | out | 1 | decoding finished, results stable |
| `out_addr` | in | 5 | row of the output memory |
| `out_sym` | out | 27 x 5 | hard decisions of nodes 31*j + out_addr (combinational read) |

A frame takes 31 load beats (more if `in_valid` drops), then exactly
IMAX x 124 = 992 decoding cycles with no stalls, and then `done` rises. There
is no early stop on a zero syndrome. The output memory always holds the hard
decision of the latest a-posteriori vector of each node, so it can be read as
soon as `done` is high.

Parameters on the top are `P`, `W`, `DC`, `DV` and `IMAX`. The field size, the
circulant size (2^P - 1) and the memory depths all follow from them.

## Files

| file | block |
|---|---|
| `rtl/nb_pkg.sv` | default sizes, GF(2^p) constant functions, base exponents of H |
| `rtl/nbldpc_decoder.sv` | top: controller + variable node processor + check node processor |
| `rtl/dec_ctrl.sv` | frame FSM, layer/iteration counters, addresses and coefficients |
| `rtl/vnp.sv` | variable node processor (memories, P, subtract, N, 2 x DN, add, P^-1) |
| `rtl/vnmem.sv`, `rtl/cnmem.sv`, `rtl/outmem.sv` | the three memories |
| `rtl/gf_perm.sv`, `rtl/v2c_sub.sv`, `rtl/llr_norm.sv`, `rtl/app_add.sv`, `rtl/hard_dec.sv` | vector datapath |
| `rtl/dn.sv`, `rtl/dn_path.sv`, `rtl/c2v_gen.sv`, `rtl/delta2normal.sv` | decompression network |
| `rtl/cnp.sv`, `rtl/cnp_psi.sv`, `rtl/cnp_phi.sv` | check node processor |
| `tb/tb_ref_pkg.sv` | reference arithmetic for the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per block |
| `tb/tb_fer_sweep.sv` | frame-error-rate sweep at 15 iterations |
| `tb/tb_decoder_ref.sv`, `tb/ref_harness.sv` | bit-exact comparison with an algorithm model |

## Verification

Every block has a self-checking testbench. Each compares the block with a
reference written independently of the RTL: GF multiplication by
shift-and-reduce instead of log tables, a subset-enumeration span test, and a
sort-based greedy basic set. Each testbench ends with a `TB_RESULT` line.

- `tb_vnp` plays controller and check node around the variable node
  processor. It checks every V2C vector and hard decision sent to the check
  node against a model of both memories, over 40 layers with reused rows.
- `tb_nbldpc_decoder` runs the top at its default size. It decodes three
  noisy frames of the all-zero codeword at about 5.2 dB Eb/N0, with about 30
  wrong channel symbols per frame. It checks that each frame decodes to zero
  in exactly 992 cycles. It also requires each mechanism to occur at least
  once: load stalls, rows starting from an empty check node memory, rows
  reusing stored messages, complement-set C2V messages, and saturating
  additions.
- `tb_decoder_ref` (with `ref_harness`) compares the whole decoder with a
  behavioural model of the algorithm, bit for bit. It runs at two sizes: a
  GF(8) configuration with a 3 x 5 array of circulants, and the default
  GF(32) code at 8 iterations. The input frames are random LLR vectors, not
  codewords. Every final hard decision must match the model.
- `tb_fer_sweep` runs 20 frames at 15 iterations at each of 3.8, 4.2 and
  4.6 dB. One run gave frame error rates of 1.0, 0.8 and 0.05. The published
  curve for this algorithm is near 0.5, 5e-3 and 1e-6 at those points, so this
  build is a few tenths of a dB worse. Likely causes are the assumed
  base-matrix exponents, the 5-bit channel LLR scaling (the bit LLR is
  multiplied by 0.55 before truncation) and the saturation rule. None of them
  has been tuned. 20 frames per point only show the trend.

Concurrent assertions cover the control rules. Loading and decoding never
share a cycle, a frame clear never meets a check-memory write, the iteration
counter stays below `IMAX`, load writes happen only while `in_ready` is high,
and `start` is ignored while busy. Simulate with `--assert` to enable them.

To simulate a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/nb_pkg.sv tb/tb_ref_pkg.sv \
    tb/tb_nbldpc_decoder.sv --top-module tb_nbldpc_decoder
./obj_dir/Vtb_nbldpc_decoder
```

Any other `tb_*` module works the same way. The end-to-end test runs in about
a second and the FER sweep in about 20 seconds.

## Where this RTL departs from, or goes beyond, the published architecture

- **Timing.** The published decoder is pipelined to reach about 400 MHz in
  90 nm. Its pipeline is not described, so it is not reproduced here. This
  RTL keeps the stated rate of one row per cycle by making the row update
  single-cycle, which gives a very long combinational path. A pipelined
  version would need forwarding between consecutive block rows, because they
  share variable nodes.
- **Hard decision tap.** The output memory is fed with the argmin of the
  updated a-posteriori vector, as the algorithm's output line defines it. The
  block diagram draws the tap after the normalizer instead.
- **De-permutation.** P^-1 is the exact inverse of P (index times h^-1).
- **Choices where the source is silent:** H base exponents, primitive
  polynomial, tie rules (lowest index or column wins), saturation (including
  the subtractor rule above), the load/readout interface, the valid bits of
  the check node memory, asynchronous-read memories, and the reset (control
  state only).
- **Check node.** The check node comes from earlier work by the same line of
  research, and only its function is given. `cnp` is a direct, fully
  parallel implementation of that function. It is large (roughly 80k
  word-level cells for the whole decoder before technology mapping) and is
  not the published circuit.
- **Not covered.** The FER curves of other algorithms and the gate counts and
  clock rates of the comparison table are results about silicon and other
  decoders. They are not reproduced.
