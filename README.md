# Monomial-parallel interpolation processor for soft-decision Reed-Solomon decoding

Koetter-Vardy soft-decision decoding of a Reed-Solomon code has three steps:

1. turn channel reliabilities into integer multiplicities for points (x, y);
2. interpolate: find a bivariate polynomial Q(x, y) of least (1, k-1)-weighted
   degree that passes through every point with its multiplicity;
3. factor Q to find the candidate codewords.

Interpolation costs the most, and this RTL implements it. The design's main idea
is to treat each candidate polynomial as a polynomial in y whose coefficients are
polynomials in x, and to give every monomial x^a y^b its own processing element
(PE). An update then touches all coefficients of one polynomial in a single
clock cycle. Two networks join the PEs:

* a **linear array**, which multiplies a polynomial by (x + alpha) by passing
  each coefficient one PE along;
* a **binary tree**, which evaluates a polynomial at a point in a logarithmic
  number of steps.

The defaults target RS(255, 239) over GF(2^8) with maximum multiplicity m = 4.

## Data layout

The processor keeps NPOLY = dy + 1 candidate polynomials Q_0 .. Q_dy. dy is
the largest y-degree.

```
            x^0    x^1    x^2   ...   x^(NX-1)
  y^0   [ PE ]-[ PE ]-[ PE ]- ... -[ PE ]   x_processor B=0  --tree--> R_0
  y^1   [ PE ]-[ PE ]-[ PE ]- ... -[ PE ]   x_processor B=1  --tree--> R_1
  ...                                                                   ...
  y^dy  [ PE ]-[ PE ]-[ PE ]- ... -[ PE ]   x_processor B=dy --tree--> R_dy
                                                  |
                        y_processor: y-weights, discrepancies, control
```

* `interp_pe`: PE (a, b) stores the coefficient of x^a y^b in every Q_j, so
  it has NPOLY bytes of storage. It also holds one GF multiplier and one GF
  adder. Muxes in front of them select the operands. The path from register
  to register is one multiplier, one adder and one mux.
* `x_processor`: one row of NX = 2^LOGNX PEs for a single power of y. The
  row has the linear array (PE a-1 feeds PE a) and its own pipelined
  evaluation tree (`eval_tree`).
* `y_processor`: combines the NPOLY row values into discrepancies. It keeps
  the weighted degrees, chooses which polynomial to update and broadcasts one
  command word (`pe_ctrl_t`) per cycle to every PE.
* `interp_top`: wires these together and adds a port that reads back any
  coefficient.
* `interp_pkg`: the shared package. It holds the field (GF(2^8), polynomial
  x^8+x^4+x^3+x^2+1), the command encoding and the GF functions.

## One interpolation step

A point (alpha, beta) with multiplicity m imposes m(m+1)/2 constraints:

    D_(r,s) Q(alpha, beta) = 0   for r + s < m

D_(r,s) is the Hasse derivative, r times in x and s times in y. In closed form:

    D_(r,s) Q(alpha,beta) = sum_(a,b) C(a,r) C(b,s) q_(a,b) alpha^(a-r) beta^(b-s)

The binomials C(a,r) and C(b,s) are taken mod 2. By Lucas' theorem, C(n,k) is
odd exactly when `(n & k) == k`. The constraints are taken in the order r
outer, s inner. Every prefix of that order is closed downwards, which the
update rule below needs. Each constraint is one iteration.

1. **SETUP** (NPOLY cycles). The y-processor forms the y-weights
   `ywt[b] = C(b,s) * beta^(b-s)`, using one multiplication per cycle.
2. **EVAL** (NPOLY cycles). The y-processor issues one polynomial per cycle.
   Each PE puts its coefficient of Q_j on its tree leaf, zeroed when C(a,r) is
   even. A tree node at height k computes `left + alpha^(2^k) * right`, so
   LOG2(NX) cycles later row b returns:

       R_b = sum_a C(a,r) q_(j,a,b) alpha^a = alpha^r * sum_a C(a,r) q_(j,a,b) alpha^(a-r)

   The y-processor forms `Delta'_j = sum_b ywt[b] R_b`, which equals
   `alpha^r * D_(r,s) Q_j(alpha, beta)`.
3. **DECIDE** (1 cycle). Among the polynomials with a nonzero discrepancy,
   pick jstar, the one with the least weighted degree. Ties go to the lower
   index, which keeps every Q_j's leading monomial at y-degree j. Then invert
   Delta'_jstar. If every discrepancy is zero, the constraint already holds and
   the iteration ends.
4. **UPD** (NPOLY cycles). For every other j with a nonzero discrepancy, apply
   `Q_j <- Q_j + (Delta'_j / Delta'_jstar) Q_jstar`. The factor alpha^r
   cancels in the ratio. This is why the x-coordinate of every point must be
   nonzero, which the 255 evaluation positions of RS(255, k) are. An assertion
   checks it.
5. **STAR** (1 cycle). Apply `Q_jstar <- (x + alpha) Q_jstar` over the linear
   array, and add 1 to jstar's weighted degree. In GF(2^m), x - alpha and
   x + alpha are the same.

After the last point, `best_j` names the polynomial of least weighted degree.
That polynomial is the interpolation result.

**Cycle count.** An iteration takes `3*NPOLY + LOG2(NX) + 4` cycles with an
update and `2*NPOLY + LOG2(NX) + 3` without one. Each point adds 1 cycle for
its handshake. At the defaults that is 29 cycles per constraint. The worst case
for m = 4 is 255 * 10 = 2550 constraints, or 74,205 cycles.

**Overflow.** A row holds NX coefficients. If `(x + alpha)` would push a
nonzero coefficient out of the last PE, `overflow` is raised. It stays set
until the next `start`, and the result is then not valid.

## Interface (`interp_top`)

| port | dir | meaning |
|---|---|---|
| `start` | in | one-cycle pulse in idle or done: resets every Q_j to y^j and clears `overflow` |
| `pt_valid` / `pt_ready` | in / out | point handshake; a point is taken when both are 1 |
| `pt_alpha`, `pt_beta` | in | point coordinates (alpha nonzero) |
| `pt_mult` | in | multiplicity (0 = ignore the point; at most MMAX) |
| `pt_last` | in | marks the final point |
| `busy`, `done` | out | working / result ready |
| `best_j`, `best_wdeg` | out | index and (1, K-1)-weighted degree of the result |
| `ev_update`, `ev_skip` | out | one-cycle pulse per iteration with / without an update |
| `rd_j`, `rd_b`, `rd_a` → `rd_data` | in → out | combinational read of the coefficient of x^a y^b in Q_j |
| `overflow` | out | sticky: a row ran out of coefficients |

Reset is asynchronous and active low. All state changes on the rising edge of
`clk`.

## Sizing

| parameter | default | meaning |
|---|---|---|
| `K` | 239 | code dimension; sets the weighted degree (1, K-1) |
| `NPOLY` | 5 | dy + 1 candidate polynomials = PE rows |
| `LOGNX` | 10 | PEs per row = 1024 |
| `MMAX` | 4 | largest multiplicity accepted |
| `WDW` | 16 | width of the weighted-degree counters |

The defaults come from counting monomials for RS(255, 239). m = 4 gives 2550
constraints, and Q needs enough monomials of (1, 238)-weighted degree ≤ D to
exceed that. The smallest such D is 986. It gives dy = 4 and a longest row,
y^0, of 987 coefficients, so rows are padded to 1024. The same count gives the
sizes for higher multiplicities:

| m | constraints (worst case) | D | NPOLY | longest row | LOGNX |
|---|---|---|---|---|---|
| 4 | 2550 | 986 | 5 | 987 | 10 |
| 6 | 5355 | 1479 | 7 | 1480 | 11 |
| 8 | 9180 | 1972 | 9 | 1973 | 11 |

For m = 6 or 8, set NPOLY, LOGNX and MMAX to match. The 4-bit indices in
`interp_pkg` (`JW`, `RW`) allow up to 16 polynomials and derivative orders up
to 15.

The default array has 5 × 1024 PEs, each with 5 bytes of storage: 25.6 KB of
coefficient registers, 5120 PE multipliers and 5 × 1023 tree multipliers.

## How this design relates to the published architecture

The published architecture fixes the following, and this RTL follows it:

* the x-processor / y-processor split;
* one PE per monomial, holding the coefficient for every polynomial, with one
  GF adder and one GF multiplier;
* polynomials updated one at a time, in parallel over their monomials;
* the linear array together with a binary tree for evaluation;
* a critical path of one multiplier, one adder and one mux inside the PE
  array.

The rest is this design's own choice:

* **Algorithm detail.** The update equations, the constraint order, the
  normalisation that needs only one multiplier per PE, and the tie-break.
* **Tree form.** The tree multiplies by powers of alpha at each node and has
  one register stage per level.
* **Physical layout not modelled.** The published design places the tree and
  the linear array into one two-dimensional PE grid, with shared, mostly local
  wiring. This RTL keeps the logical topology (one tree per row plus a y-sum)
  and leaves placement to the implementation tools.
* **Much slower schedule.** The published figures imply about 1.5 cycles per
  constraint: 3947 cycles at most for m = 4. This design needs 29 cycles per
  constraint. It does not overlap the evaluation, decision and update phases.
* **Much larger array.** The published m = 4 design is far smaller, with 188
  multipliers and 1.8 KB of memory. No mechanism for that reduction is given,
  so this design stores every monomial the worst case can reach.
* **y-processor paths.** The discrepancy sum (NPOLY multipliers and an XOR
  tree) and the GF inverter (a chain of squarings and multiplications) are
  single-cycle combinational blocks. They are longer than the PE path.
* **Not covered.** The split across several FPGAs, the soft-decision front
  end and the factorisation step are not part of this RTL.

## Verification

Every testbench checks its results against a software model in
`tb/interp_ref_pkg.sv`. The model computes GF arithmetic from exponent and log
tables. It works out discrepancies directly from the Hasse-derivative formula
above and applies the same normalised updates, so the coefficients can be
compared one for one.

| testbench | what it shows |
|---|---|
| `tb_gf_mult` | all 65,536 products |
| `tb_interp_pe` | 3000 random commands; star, leaf (Hasse mask) and read outputs each cycle |
| `tb_eval_tree` | 120 evaluations at several points; result and 3-cycle latency |
| `tb_x_processor` | random updates, shifts with overflow, and tree evaluations of one row; read-back of every coefficient |
| `tb_y_processor` | the controller driving a behavioural PE array; the final polynomials match the reference; a zero-multiplicity point, a point with y = 0 and a repeated point; sticky overflow |
| `tb_interp_top` | whole processor at K = 4, dy = 2, NX = 16. Every coefficient matches the model, the result meets every constraint and is nonzero, and the cycle count per point is checked. Updates, skipped iterations, overflow and restart each happen at least once |
| `tb_interp_mid` | the same as `tb_interp_top` at K = 16, dy = 4, NX = 64, m up to 4, with 24 points. This is the largest configuration simulated |

To run a testbench with Verilator 5 (here the reduced-size end-to-end test):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/interp_pkg.sv tb/interp_ref_pkg.sv rtl/gf_mult.sv rtl/interp_pe.sv \
  rtl/eval_tree.sv rtl/x_processor.sv rtl/y_processor.sv rtl/interp_top.sv \
  tb/tb_interp_top.sv --top-module tb_interp_top -o sim
./obj_dir/sim
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<n>`.

The default configuration (5 × 1024 PEs and about ten thousand GF multipliers)
passes lint and elaboration but has not been simulated. Its Verilator model
runs to hundreds of megabytes of C++ and is impractical to build. The
end-to-end tests therefore run at reduced sizes, whose algorithm and control
are the same as at the defaults.
