# Relaxed half-stochastic decoder for non-binary LDPC codes over GF(4)

A non-binary LDPC code works on symbols of a Galois field GF(q), here GF(4). Each
symbol is two bits. A sum-product (SPA) decoder sends whole probability mass
functions (PMFs, q probabilities each) along every edge of the code graph.
Check nodes are the expensive part: they combine PMFs by convolution. A
*stochastic* decoder sends a single random symbol per edge instead, so the check
node becomes a plain GF adder. Over GF(2^p) a GF adder is a bitwise XOR. The cost
is many more iterations, because the information travels as random samples.

The **relaxed half-stochastic (RHS)** scheme implemented here keeps the good
half of each approach:

* **Variable nodes** are SPA nodes. They keep PMFs and multiply them exactly.
* **Check nodes** are stochastic. On each edge they receive and send one GF(4)
  symbol per iteration, and they compute with XOR gates and a register.
* Two converters sit between the halves:
  * A **PMF sampler** draws the symbol a variable node sends (SPA to stochastic).
  * A **relaxation unit** turns the stream of symbols a check node sends back
    into a PMF again (stochastic to SPA).

The code is a (648, 324) code over GF(4). Its parity check matrix has the
structured form H = [R | I]. The right half is an identity matrix, so encoding is
systematic and needs no matrix inversion. Two forms of R are provided:

* **LDM** (lower diagonal): the diagonal of the lower half of R is 1.
* **DDM** (doubly diagonal): the diagonal and the sub-diagonal of R are 1.

LDM is the default.

The design also contains a small stand-alone **stochastic multiplier**. It
computes in the plain binary stochastic style: numbers become random bit
streams, an AND gate multiplies two streams, and a counter turns the result
back into a number.

## Top level

`nbldpc_top` contains two independent units that share only clock and reset:

| unit | ports | what it does |
|---|---|---|
| `rhs_decoder` | `dec_*` | takes channel PMFs, returns decoded GF(4) symbols |
| `sc_multiplier` | `mul_*` | computes a·b/256 from two 8-bit numbers, stochastically |

### Decoder interface and timing

* **Input.** One channel PMF is accepted per `dec_in_valid && dec_in_ready`
  beat, in variable-node order 0..N-1. A PMF is four 6-bit probabilities
  `dec_in_pmf[a]`, one per symbol a, in units of 1/64. The PMF does not have to
  sum to exactly 64: the variable node normalises it.
* **Decoding.** After the N-th beat the decoder runs for exactly
  `MAX_ITER * (N + 1)` cycles. That is 20 768 cycles at the default size.
  `dec_busy` is high while it runs.
* **Output.** The decoder then presents N decoded symbols on
  `dec_out_valid/dec_out_ready`, with `dec_out_idx`, and `dec_out_last` on the
  last one. The symbol is held while `dec_out_ready` is low.
* After the last symbol the decoder accepts the next frame.

A full frame at the default size therefore takes 648 + 20 768 + 648 cycles when
neither side stalls.

### Multiplier interface and timing

* A `mul_start` pulse while the multiplier is idle latches `mul_a` and `mul_b`.
* The multiplier then counts for 256 cycles.
* `mul_done` pulses on the following cycle. `mul_product` then holds the result
  until the next start.

## How the decoder works

### Storage

Storage is kept per variable node n, with one slot per edge k (up to `DV = 3`):

| array | contents | initial value |
|---|---|---|
| `prior_mem[n]` | the channel PMF | loaded with the frame |
| `vmem[n][k]` | PMF V of the check-to-variable message (4 × 6 bit) | equiprobable, 16/64 each |
| `umem[n][k]` | the last symbol U this edge sent to its check node, already multiplied by the edge coefficient | 0 |

Each of the M check nodes (`cnu`) holds two 2-bit registers:

* an accumulator for the current iteration,
* `total`, the XOR of all symbols it received in the previous iteration.

### One cycle = one variable node

An iteration visits variable nodes 0..N-1, one per clock cycle, and handles all
edges of a node in parallel. The edge list of a node (check index and GF
coefficient h) comes from the constant table `edge_rom`. For every edge k of
node n:

1. **Check message.** The check sends back the sum of all its other inputs:
   `total(check) XOR U_old[k]`. XORing out U_old removes the edge's own
   contribution. The permutation node (`perm_node`) then divides the result by h.
   This undoes the coefficient of the check equation Σ h_j·c_j = 0.
2. **Relaxation** (`relax_update`). The stored PMF moves towards the received
   symbol s: V'(a) = V(a) − ⌊V(a)/8⌋ + 8·[a = s]. The result saturates at 63.
   Because the subtracted term rounds down, a probability never falls below
   7/64. A symbol the checks have voted against can therefore still come back.
   There is no relaxation in the first iteration, because no check message
   exists yet.
3. **Variable node** (`vnu`). It computes the extrinsic PMF of the edge: the
   channel PMF times the relaxed PMFs of the *other* edges, normalised. The VNU
   has four stages:
   * a multiplier forms the full-width products,
   * an adder sums them over a,
   * a reciprocal unit computes ⌊2^K / sum⌋,
   * a second multiplier scales every product by the reciprocal, back to 6 bits.
4. **Sampling** (`pmf_sampler`). One symbol is drawn from the extrinsic PMF:
   * the cumulative sums of the PMF serve as thresholds,
   * a 16-bit LFSR number is scaled to the PMF total,
   * the symbol is the first threshold above that number.

   The drawn symbol is multiplied by h and XORed into the check node's
   accumulator. It is also stored as the new U.
5. **Posterior.** A further VNU multiplies the channel PMF by the relaxed PMFs
   of *all* the node's edges. The most likely symbol of this posterior is the
   node's current decision.

After variable node N−1 comes one extra cycle. In it every check node copies its
accumulator to `total` and clears the accumulator. This is a flooding schedule:
every variable node of iteration i sees the check messages of iteration i−1.

Only one random draw is taken from each extrinsic PMF per iteration, so exactly
one symbol per edge crosses the graph per iteration. This is the reason the check nodes need nothing but XOR.

### Decision

Each variable node has one saturating counter per GF symbol (`stoch2nb`). During
the last `DEC_ITERS = 8` iterations, the counter of the node's current decision
counts up. At the end, the symbol with the largest count is output; on a tie the
lowest symbol wins. The result is a majority vote over the last eight
iterations.

### The parity check matrix

`edge_rom` builds its table at elaboration time from `nbldpc_pkg::code_edge`:

* **Right half.** Column M + i has a single 1 in row i.
* **Left half, LDM.** Columns j ≥ M/2 hold a 1 on the diagonal (row j) and one
  pseudo-random entry. Columns j < M/2 hold two pseudo-random entries. Every
  left column has weight 2.
* **Left half, DDM.** Column j holds 1 in rows j and j+1 plus one pseudo-random
  entry. The last column has no row j+1.

The pseudo-random rows are (37·j + 11) mod M and (101·j + 53) mod M. Their GF
values are 1 + (7·j + 5·k) mod 3. If an entry would land on a row the column
already uses, it moves down one row (repeatedly, if needed). Because 37 and 101
are coprime with 324, each pseudo-random layer on its own would put exactly one
entry in every row; the rare moved entries make the row weights slightly
irregular.

To encode, choose information symbols s_0..s_{M−1} and set parity symbol i to
p_i = Σ_j R(i,j)·s_j over GF(4). GF(4) uses the polynomial x² + x + 1.

## Files

| file | contents |
|---|---|
| `rtl/nbldpc_pkg.sv` | GF(4) size and arithmetic, probability width, edge type, matrix construction |
| `rtl/nbldpc_top.sv` | top level: decoder and stochastic multiplier |
| `rtl/rhs_decoder.sv` | the decoder: memories, schedule, check nodes, decision counters |
| `rtl/edge_rom.sv` | parity check matrix as a constant per-column table |
| `rtl/vnu.sv` | SPA variable node (multiply, add, reciprocal, multiply) |
| `rtl/cnu.sv` | stochastic check node (XOR accumulator and output register) |
| `rtl/perm_node.sv` | multiplication or division by the edge coefficient |
| `rtl/pmf_sampler.sv` | draws a GF symbol from a PMF (LFSR and comparators) |
| `rtl/relax_update.sv` | successive relaxation of a PMF towards a symbol |
| `rtl/lfsr.sv` | 16-bit Galois LFSR |
| `rtl/nb2stoch.sv` | number to stochastic bit stream (LFSR and comparator x > y) |
| `rtl/stoch_mult.sv` | AND of two stochastic streams |
| `rtl/stoch2nb.sv` | counter that turns a stochastic stream back into a number |
| `rtl/sc_multiplier.sv` | converter → AND → counter chain |

Every module has a testbench `tb/tb_<module>.sv`. Two more testbenches run the
whole design:

* **`tb/tb_nbldpc_top.sv`** runs the top at its default size. It decodes an
  all-zero frame and a random codeword with 12 symbols whose channel PMF favours
  a wrong value (30/64 against 18/64), while the multiplier works alongside. It
  counts how often each mechanism of the decoder occurs.
* **`tb/tb_ber_sweep.sv`** sends random codewords through a BPSK/AWGN channel at
  2, 5 and 8 dB, with both matrix forms at full size. It prints the bit error
  rate before and after decoding.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=F` and exits. To build and
run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_nbldpc_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/nbldpc_pkg.sv tb/tb_nbldpc_top.sv
./obj_dir/Vtb_nbldpc_top
```

Replace the module name to run another testbench. Run times:

* block testbenches: a few seconds each,
* full-size tests: about a minute of build time plus under a minute of
  simulation.

Reset is asynchronous and active low. Verilator has only two signal states, so
every register that is read is reset or loaded before use.

## Measured behaviour

With one random frame per point, `tb_ber_sweep` gave:

| SNR (dB) | channel BER | LDM decoded BER | DDM decoded BER |
|---|---|---|---|
| 2 | 0.110 / 0.112 | 0.056 | 0.037 |
| 5 | 0.034 / 0.043 | 0.012 | 0.011 |
| 8 | 0.005 / 0.007 | 0 | 0.002 |

The two channel values in each row are for the LDM frame and the DDM frame.

Keep in mind when reading this table:

* One frame of 1296 bits is far too few for a real BER curve. The numbers only
  show that decoding gains at every point.
* The SNR here is 1/σ² per BPSK bit. Other SNR conventions shift the curves.
* The code itself is weak. Half of the variable nodes (the identity part) have
  a single edge and so get only one check's opinion.

## Where this design makes its own choices

The overall structure follows the RHS scheme:

* SPA variable nodes and stochastic XOR check nodes,
* permutation nodes on every edge,
* one stochastic symbol per edge and iteration,
* PMFs relaxed from the check symbols, starting equiprobable,
* the VNU stages multiply, add, reciprocal and multiply, with 6-bit messages,
* LFSR-and-comparator converters and counter-based output,
* the (648, 324) GF(4) size and the [R | I] matrix forms.

The following are this design's own choices:

* **Random part of R.** Its positions and values are fixed by the formula above.
  Any other choice of random entries gives a different code.
* **Column weights.** LDM uses 2 and DDM uses 3 in the left half, which agrees
  with the variable-node operation counts of the two forms (q·n·w_c·(w_c−1)
  multiplications: 5184 for LDM, 15552 for DDM). Row weights follow from the
  formula.
* **Relaxation factor.** It is 1/8, with the rounding described above.
* **Iterations.** The decoder always runs 32 iterations, with no early stop
  when all checks are satisfied.
* **What the counters count.** They count the posterior's hard decision, not
  random draws from the posterior. Draws added enough noise to leave wrong
  symbols in full-size frames.
* **Schedule.** One variable node per clock cycle, flooding. This trades speed
  for size. A node-parallel version would reuse `vnu`, `pmf_sampler`,
  `relax_update` and `cnu` unchanged.
* **Single-cycle datapath.** The whole per-node datapath (two VNUs with dividers,
  samplers, relaxation) is combinational within one cycle. A fast
  implementation would pipeline it.
* **Multiplier window.** `sc_multiplier` uses a 256-cycle window and two
  different LFSR polynomials to decorrelate the two streams. With both streams
  from the same LFSR the AND gate computes min(a, b) instead of a·b.
* **Not built.**
  * a decoder for an unstructured random parity check matrix, which serves
    only as a reference point for the two structured forms,
  * separate edge memories for re-randomising streams, which purely
    stochastic decoders need but RHS does not.

## Changing it

* **Size and matrix form.** `N`, `M` (with N = 2M), `KIND` (`H_LDM` / `H_DDM`),
  `MAX_ITER`, `DEC_ITERS` and `BETA_SHIFT` are parameters of `nbldpc_top` and
  `rhs_decoder`. `tb_rhs_decoder` runs a 24 × 12 code.
* **Field size.** This is set in `nbldpc_pkg`: `GF_P` and `GF_POLY`.
  `code_edge` then needs GF values for the larger field; its formula already
  uses `GF_Q`.
* **Message width.** This is `PROB_W`. The VNU widens its internal products to
  match.
* **Other matrices.** Replace `code_edge`. The decoder needs only, for each
  column, up to `DV` distinct rows with non-zero coefficients.
