# Layered min-sum LDPC decoder with out-of-order block scheduling

This is a hardware decoder for quasi-cyclic LDPC codes. It processes one 96x96 circulant of
the parity-check matrix per clock. Decoding is *layered*: each block row (a "layer") of the
matrix updates the bit posteriors before the next layer reads them. Each check node keeps only a
compressed *final state*: the two smallest magnitudes, the position of the smallest, and the XOR
of the signs.

A layered decoder normally has a hazard. A block column touched by layer *l* cannot be read by
layer *l+1* until the pipeline has finished writing it. Without care, the pipeline therefore
stalls at every layer boundary. This decoder removes those stalls by reordering the blocks
inside each layer:

- blocks whose data was produced longest ago go first;
- blocks that depend on the immediately preceding layer go last.

The R messages a block needs are not produced layer by layer either. They are rebuilt on demand,
at the moment the consuming block is processed.

The decoder is built for the rate-2/3 irregular code in `rtl/ldpc_pkg.sv`. The code has
8 layers and 24 block columns, with column weights from 2 to 6 and row weight 10. That gives
80 non-zero circulants and 2304-bit frames.

Three more units stand beside it in the top level, each with its own ports. They come from other
decoder organisations:

- a complete block-serial non-layered (flooding) decoder for an array LDPC code with 4 block
  rows, 36 block columns and 128x128 circulants (4608-bit frames);
- a stand-alone copy of that decoder's variable node unit;
- a fully parallel check node unit built on a bitonic Min1/Min2 sorting network.

## The algorithm

The decoder uses one posterior per bit, P. Start with P = channel LLR L and every R = 0. Then,
for every layer *l* and every non-zero block (*l*, *n*) with shift *s*:

    Q = rot(P_n, s) - R_old          (Q subtractor)
    R_new = minsum(all Q of the layer) (check node units)
    P_n = Q + R_new                  (P sum adder)

Here rot(x, s)[r] = x[(r + s) mod 96], because a block with shift *s* connects row *r* to column
*r + s*. The min-sum rule gives every edge the smallest magnitude among the *other* edges of its
row, and the product of their signs. Each row stores only Min1, Min2, the block number of Min1
and the sign XOR, so any R can be rebuilt later from that final state plus the edge's own
stored Q sign.

## How the datapath stores things

**Only Q is stored.** The LPQ memory holds one word per block column: 96 lanes of 8 bits. It
starts out holding the channel LLRs and later holds Q. P is never stored. When block (*l*, *n*)
needs P_n, it is rebuilt as Q_n + R_new, where R_new comes from the *dependent* block. The
dependent block is the previous block, cyclically through the layers, in the same column.

**Shift domains.** Q_n is stored in the rotation of the dependent block. Moving it into the
current block's rotation therefore takes only a *delta* shift, dsm = s − s_dep (mod 96). The
result is that one cyclic shifter suffices.

In the first iteration, the first block of each column has the *use channel value* flag set
(ucvf). It takes L, rotates it by the full *s*, and uses R_new = 0. After decoding, an output
pass rotates each column back to natural order and writes the hard decisions.

**What each block needs.** The schedule compiler (constant functions in `ldpc_pkg`) derives the
following for every block, all at elaboration:

| Quantity | Meaning |
|---|---|
| ci | circulant index |
| bn | block number within its layer |
| dl | dependent layer |
| dci | dependent circulant index |
| dsm | delta shift |
| ucvf | use channel value in the first iteration |
| issue order | position of the block in the layer's schedule |

Changing the code therefore means editing only the `HB` table.

## Pipeline and schedule (`layered_decoder`)

The pipeline has five stages, and one block enters per clock:

| Stage | Work |
|---|---|
| S0 | Pick the block; read Q memory (column *n*) and both copies of the Q sign memory (own block for R_old, dependent block for R_new) |
| S1 | Rebuild R_new from the dependent layer's final state; P = Q + R_new; rotate by dsm; rebuild R_old from this layer's final state of the last iteration |
| S2 | Q = sat8(P − R_old); scale 3/4 and saturate to a 4-bit magnitude |
| S3 | Write Q and the Q signs back; feed the serial CNU array; accumulate the layer syndrome |
| S4 | At the layer's last block, write the CNU final state into the FS register file |

A block may issue only when its dependent layer's final state is in the register file. The
controller checks this with a counter of completed layers, and an assertion re-checks it.

The last block of a layer issues at clock *t*. Its final state is readable at *t+5*. So four
independent blocks must fill the gap.

With the reordered schedule, every layer of this code has 5 to 7 blocks that do not depend on
the previous layer, so the decoder **never stalls**: it issues one block per clock. With
`OOO = 0` (natural block order) the same code loses 23 clocks per iteration.

At the end of each iteration the pipeline drains for 5 clocks. This makes the stopping decision
exact. An iteration counts as converged when every layer's syndrome was zero, computed from the
signs of the P values entering that layer. Decoding stops on convergence or after `MAX_ITER`
iterations.

A frame therefore takes 85 clocks per iteration + 30 clocks. At 2304 bits per frame and
10 iterations, that is about 2.6 bits per clock.

### Interface

1. While `busy` is low, load the 24 block columns: `llr_we`, `llr_addr`, and `llr_data` (96 × 5-bit
   LLRs; lane *r* of column *n* is bit 96·*n* + *r*; positive means 0).
2. Pulse `start`.
3. `done` pulses when decoding is finished. `converged` and `iterations` are then valid.
4. Read the hard decisions one column at a time: `hd_rdata` arrives one clock after `hd_raddr`,
   and 1 means P < 0.

Three counters expose the schedule's behaviour: `dep_stall_cycles`, `drain_cycles` and
`reorder_issues`.

## Non-layered decoder (`nonlayered_decoder`)

This decoder updates all check nodes from the same set of Q messages in each iteration (flooding
schedule). Block (*i*, *j*) of its parity-check matrix is σ^(*i*·*j*), where σ is the one-step
cyclic permutation. So row 0 has no shifts at all, and its shifters reduce to wires.

Each iteration is one pass over the 36 block columns, one column per clock:

| Stage | Work |
|---|---|
| S0 | Read the column's channel LLRs and its stored Q signs (4 × 128 bits) |
| S1 | For each block row, rebuild R from that row's CNU final state and rotate it back to column order; 128 VNUs form P = L + ¾ΣR, Q_i = sat(P − ¾R_i) and the hard decision |
| S2 | Rotate each Q_i into its row order and feed the four 128-wide serial CNU arrays; store the Q signs and the hard decisions; accumulate the row syndromes |

The CNU arrays therefore build the next iteration's partial state while R is selected from the
final state of this one. At the end of a pass, all four arrays latch their new final states
together. In the first pass R is zero. Decoding stops after a pass whose hard decisions satisfy
every check, or after `MAX_ITER` check updates; `iterations` reports how many were used. A pass
takes 36 + 3 clocks.

The L memory (2 × 36 words of 128 × 5 bits) and the HD memory (2 × 36 words of 128 bits) are
ping-pong:

- the next frame can be loaded while one decodes;
- the last frame's decisions can be read during the next decode.

`start` takes the bank loaded last. The `ext_*` outputs stream each column's saturated
extrinsic values on every pass.

## Building blocks

| Module | Role |
|---|---|
| `ldpc_pkg` | Code table, widths, FS struct, schedule compiler |
| `cnu_serial` | 96 serial min-sum check nodes: partial state (Min1, Min2, index, sign), restarted by `first`; final state latched by `last` |
| `r_select` | Rebuilds R from a final state and a Q sign (Min2 at the Min1 position, Min1 elsewhere) |
| `cyclic_shifter` | Logarithmic barrel rotator, any lane count |
| `scale_offset` | 8-bit Q to 4-bit magnitude + sign, with scale/offset |
| `sdp_ram` | One-write, one-read synchronous memory (Q, Q sign, HD) |
| `vnu` | Flooding-decoder variable node, degree 4: P = L + ¾ΣR, Q_i = sat(P − ¾R_i), E, HD |
| `bm2`, `pbm4`, `min1min2_par` | Bitonic Min1/Min2 finder: BM2+/BM2− pair sorters feeding PBM4+ merge cells, in a tree (PBM8+ for 8 inputs) |
| `cnu_parallel` | Degree-8 parallel check node: ABS, Min1/Min2 finder, sign XOR, R selection |
| `nonlayered_decoder` | Block-serial flooding decoder for array codes, built from `cnu_serial`, `r_select`, `cyclic_shifter`, `vnu` and `sdp_ram` |
| `ldpc_top` | The layered decoder plus the non-layered decoder, a stand-alone VNU and the parallel CNU, side by side |

The fixed-point widths are:

- 5-bit channel LLR;
- 8-bit Q in memory;
- 9-bit P;
- 5-bit R (sign + 4-bit magnitude);
- 15 bits of final state per row: 4 + 4 + 6-bit index + sign.

## Where this design makes its own choices

These points are not fixed by the architecture it follows:

- **Scaling.** The scaling factor 3/4 and offset 0 are applied to |Q| before the minimum search.
- **Stopping rule.** The maximum iteration count is 10. The drain at every iteration boundary is
  needed only to make the convergence decision exact.
- **Hard decisions.** They are produced by a separate output pass of 24 clocks.
- **Q sign memory.** It is duplicated to give two reads per clock.
- **FS storage.** The final states sit in flip-flops, cleared at the start of each frame.
- **Loading.** The layered decoder takes LLRs only while it is idle; it has no ping-pong buffering.
- **Non-layered decoder.** Its Q sign memory is separate (36 × 512 bits). The 3-clock gap
  between passes, the first-pass R = 0 and the stopping rule are this design's choices.
- **Unit parameters.** The widths and the 3/4 scaling of the VNU, and the degree 8 of the
  parallel CNU, are chosen here.

Not built:

- the block-parallel layered decoder, beyond its parallel CNU;
- the two-circulant variant with three-bank memories;
- multi-code support, such as the 802.11n rates and lifting sizes.

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`.

`tb_ldpc_top` runs the full-size decoder (96x96 circulants, 2304-bit frames). It decodes three
frames of the all-zero codeword with 3 %, 6 % and 30 % of bits received in error. The results
must match a behavioural layered min-sum model bit for bit. It also checks:

- that early termination, the iteration limit, out-of-order issue and the drain each occur;
- that there are no stalls;
- the exact clock count.

Then it decodes three 4608-bit frames on the non-layered decoder at full size. Each next frame is
loaded while the current one decodes. The results are compared bit for bit with a behavioural
flooding min-sum model. The test checks that early termination, the iteration limit and the
overlapped load each occur.

`tb_layered_decoder` runs the layered checks at 16x16 circulants, for both schedules. There it checks
that natural order does stall. `tb_nonlayered_decoder` runs five frames on the smaller array
code with 3 × 32 blocks of 61x61 (1952-bit frames). It also reads back the previous frame's
decisions while the next frame decodes.

To build and run one with Verilator:

    verilator --binary -Irtl -Itb --top-module tb_ldpc_top rtl/ldpc_pkg.sv tb/tb_ldpc_top.sv
    ./obj_dir/Vtb_ldpc_top

The full-size build takes about a minute and a half, and the run is under a second.

To try another code, edit `HB`, `MB` and `NB` in `ldpc_pkg.sv`. Circulant sizes below 96 reduce
every shift modulo `SC`.
