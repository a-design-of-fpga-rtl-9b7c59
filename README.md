# Statically scheduled sparse LU solver for real-time network simulation

An electromagnetic-transient simulator of a distribution network solves the
nodal equations

    i = G u

once per time step: `G` is the sparse nodal conductance matrix, `i` the
injected node currents and `u` the node voltages. Time steps are a few
microseconds long, so the solver has to finish in a few hundred clock cycles.
`G` changes rarely, so all the expensive work is done once, off-line, on a
host computer. It reorders `G`, factors it, and computes a schedule that
tells every piece of hardware in which clock cycle to start each piece of
work. The online hardware in this repository then only counts cycles, reads
coefficients and does multiply-subtracts. It has no dependency tracking, no
handshakes between units, and no divider.

This RTL implements the online part of such a solver, following a published
design for active distribution networks that is built on block triangular form
(BTF). The structure, the unit counts, the memories, the processing element
with its subtraction timers, and the default sizes come from that design.
Widths, timing, number format, memory organisation and the load interface are
choices made here. The section "What comes from the source design" separates
the two.

## The reordered system

The host applies two permutations to `G`:

* A BTF permutation brings it to block upper triangular form. Diagonal blocks
  are independent of each other, and nothing lies below them.
* A fill-reducing column ordering (COLAMD) is applied inside every diagonal
  block.

Combined, the result is `G'' = P'' G Q''`, and the system to solve becomes

    i'' = G'' u''      with   i'' = P'' i,   u = Q'' u''.

`G''` is split into `NU` consecutive column ranges of `NK` columns, one per
**solving unit**. With the defaults (120 unknowns, 3 units of 40), each range
holds one 38-node BTF block plus two of the six 1x1 blocks. The host factors
each unit's diagonal part as `L U`:

* `L` is unit lower triangular.
* `U` is upper triangular; the reciprocal of each of its diagonal entries is
  stored.

Non-zeros of `G''` outside the diagonal parts all lie above them. They belong
to the single **updating unit**.

Solving is then block back-substitution:

1. A unit's forward and backward substitution give its slice of `u''`.
2. The updating unit subtracts `G''[r][j] * u''[j]` from the currents `i''[r]`
   of earlier units.
3. Once all such updates to a row have landed, that row's forward step may
   run.

No unit waits for another unit to finish. All units run at the same time, and
the schedule interleaves them at the level of single columns.

## Subtasks, startup times and the processing element

Work is cut into **subtasks**, one per matrix column:

| element            | subtask K does                                   | memories |
|--------------------|--------------------------------------------------|----------|
| forward (per unit) | `y[K] = i''[K]`; `i''[r] -= L[r][K]*y[K]` for r > K | L values/rows, column pointers, startup times |
| backward (per unit)| `u''[K] = y[K] * (1/U[K][K])`; `y[r] -= U[r][K]*u''[K]` for r < K | U values/rows, pointers, reciprocal diagonal, startup times |
| updating           | read `u''[j]`; `i''[r] -= G''[r][j]*u''[j]` for the off-diagonal r | G values/rows, pointers, startup times |

All three are instances of one processing element, `pe`:

* `sub_timer` is a bank of down-counters, one per subtask. The start pulse
  `sta` loads each counter with the subtask's startup time `T[K]`. Subtask K
  is enabled (`ena[K]`) in the cycle its counter reaches 1, which is exactly
  `T[K]` cycles after `sta`. `T = 0` disables a subtask.
* The **solve** stage reads `i''[K]`, scales it by the reciprocal diagonal (in
  the backward element only) and writes the result back in place.
* The **floating-point** stage streams the column's non-zeros, stored in
  compressed sparse column (CSC) form, one per cycle. Each one becomes a
  subtract request `{row, value*y}`.

### Timing rules

These rules are what the off-line schedule must obey. They are the key to
using the design. Let `c0` be the cycle in which subtask K is enabled, and let
its column have `n` stored non-zeros:

| cycle     | event |
|-----------|-------|
| `c0`      | `i''[K]` is read; the solved value is written at the end of the cycle |
| `c0+1+j`  | non-zero j is read and multiplied |
| `c0+2+j`  | its subtract is applied to the owning vector at the end of the cycle |

From this follow three rules:

* **Same element:** the next subtask on the same element may start at
  `c0+n+1` at the earliest.
* **Dependent subtask:** a subtask that reads a row updated by K may start at
  `c0+n+2` at the earliest. It must also wait until every update to its row
  has landed.
* **Solved value:** a value solved in cycle `c0` can be read from `c0+1` on.

Assertions flag two schedule errors: two subtasks enabled at once in one
element, and a subtask enabled while its element is still busy. The vector
storage asserts that a solved value and an update never hit the same row in
the same cycle.

### Concurrent updates

Each solving unit keeps its slice of the vector in `vec_file`, as registers.
The vector goes through three stages in place: currents `i''`, then forward
results `y`, then voltages `u''`. Three sources update it:

* the unit's forward element,
* its backward element,
* the updating unit.

Every subtract is a read-modify-write completed in one cycle, so no update can
overwrite another. If two requests in the same cycle target the same row, they
are chained through two adders, so both take effect. The schedule therefore
only has to respect the ordering rules above, and never has to keep updates
apart in time.

## One time step at the top level

`solver_top` contains `global_control`, `NU` × `solving_unit` and one
`updating_unit`.

1. The host writes every memory once through the load bus `ld`
   (`solver_pkg::load_t`: `unit`, `rom`, `addr`, `data`).
2. For each time step, the host drives `i_in` and pulses `start`. The global
   control then runs four phases:
   * **LOAD:** writes `i''[m] = i_in[p[m]]` into the owning unit, one entry
     per cycle (N cycles).
   * **STA:** pulses `sta` to every processing element.
   * **RUN:** waits until every element reports done: all timers expired and
     all pipelines empty. It counts these cycles in `run_cycles`.
   * **STORE:** writes `u_out[q[m]] = u''[m]`, one per cycle (N cycles).
3. `done` pulses once `u_out` is valid. `ena_l`, `ena_u` and `ena_g` expose
   the subtask enables.

Load-bus memories (`rom` field, `solver_pkg::rom_sel_e`):

| code | memory | words | content |
|------|--------|-------|---------|
| R_LT / R_UT | forward / backward startup times | NK per unit | cycles after `sta`, 16 bit, 0 = disabled |
| R_LPTR / R_UPTR | column pointers | NK+1 per unit | CSC start of each column, last word = count |
| R_LROW / R_UROW | row of each non-zero | ≤ LNZ / UNZ | row local to the unit |
| R_LVAL / R_UVAL | value of each non-zero | ≤ LNZ / UNZ | single precision |
| R_UDIAG | 1 / U[K][K] | NK per unit | single precision |
| R_GT, R_GPTR, R_GROW, R_GVAL | updating unit | N, N+1, ≤ GNZ | rows are global (0..N-1) |
| R_P, R_Q | reorderings | N | `i''[m] = i[p[m]]`, `u[q[m]] = u''[m]` |

The `unit` field selects the solving unit for the R_L* and R_U* memories.

Parameters of `solver_top`:

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 120 | number of unknowns |
| `NU` | 3 | number of solving units |
| `NK` | 40 | columns per solving unit |
| `LNZ`, `UNZ` | 780 | non-zeros of L and U per unit; 780 = 40·39/2 holds fully filled factors |
| `GNZ` | 342 | off-diagonal non-zeros; 342 is the non-zero count of the whole reference matrix |

`N` must equal `NU*NK`. Indices and startup times are 16 bits wide.

## Arithmetic

`fp_add` and `fp_mul` are combinational IEEE-754 single-precision units. They
round to nearest, ties to even. Subnormal inputs and results are flushed to
zero. Infinities and NaNs are handled. Division is avoided: the host stores
reciprocals of the `U` diagonal. Both units are bit-exact against correctly
rounded references for normal numbers.

The whole datapath is combinational between registers: a multiply in one
stage, then a subtract. At 125 MHz a real FPGA implementation would need
pipelined floating-point cores. The latencies in the timing rules would grow,
and the schedule would have to use the new values.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`. The testbench-side model of the host
(`tb/offline_pkg.sv`) builds test systems directly in reordered form. It then:

* factors them in double precision,
* packs the factors in CSC form,
* computes the startup times by simulating the elements cycle by cycle under
  the timing rules above.

BTF and COLAMD themselves are not modelled: the test matrices are generated
already block triangular, with random permutations standing in for `P''` and
`Q''`.

* `tb_solver_top`: the whole solver at the default size. The test system is
  three coupled 38-node blocks plus two independent elements per unit, with 24
  couplings between units. It runs three time steps and checks:
  * every voltage against the exact solution (error about 2e-7),
  * `run_cycles` against the schedule length, to the cycle,
  * that every forward, backward and updating subtask, every cross-unit
    update and the reorderings happened.

  The cycle count depends on the random system. In one run it needed 1059
  solve cycles, or 1300 cycles per step with reordering.
* `tb_feeder_case`: the default-size solver on a stand-in for the reference
  network. Each unit holds one 38-node radial tree: the IEEE 33-bus feeder
  plus five added nodes. The two extra elements per unit bring the totals to
  120 unknowns and exactly 342 non-zeros. A leaves-first ordering gives
  factors without fill. The solve takes 167 cycles; with reordering a step
  takes 408 cycles, 3.26 µs at 125 MHz.
* `tb_solving_unit`, `tb_updating_unit`, `tb_global_control`, `tb_pe`,
  `tb_sub_timer`, `tb_vec_file`, `tb_rom`, `tb_fp_add`, `tb_fp_mul`: unit
  tests. They check cycle-exact enables and update timing, same-row chaining,
  loads addressed to another unit, and bit-exact rounding.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/solver_pkg.sv tb/fp_ref_pkg.sv tb/offline_pkg.sv tb/tb_solver_top.sv \
        --top-module tb_solver_top -o sim
    ./obj_dir/sim

Replace `tb_solver_top` with any other testbench. To lint the RTL:

    verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/solver_pkg.sv rtl/solver_top.sv

## What comes from the source design, and what does not

**Taken from the source design:**

* the split into off-line host processing and online FPGA calculation;
* the reorderings `P''` and `Q''`, held in memories;
* CSC storage of the factors and of the off-diagonal part;
* one startup time per subtask, one subtask per column, and `N` updating
  subtasks;
* three solving units, one updating unit and a global control;
* a processing element of identical structure everywhere, made of a
  subtraction timer (`sta` → `ena[K]`, enabled when the timer counts to 1), a
  solve stage (`K`, `i[K]` → `y[K]`) and a floating-point stage (`L[K]`,
  `L_row[K]` → `i_temp[K]`);
* 120 unknowns and a 125 MHz clock.

**Choices made here** (the source leaves these open):

* single-precision format with flushed subnormals;
* a unit-diagonal `L` and stored reciprocals of the `U` diagonal;
* one element for the forward pass and one for the backward pass in each
  unit;
* the two-stage element timing and the schedule rules that follow from it;
* in-place register vectors with chained same-cycle updates;
* writable coefficient memories loaded over a single bus;
* one-entry-per-cycle reordering in the global control;
* completion detection by done flags;
* the assignment of 40 consecutive columns to each unit;
* all memory depths and index widths.

**Not included:**

* the host algorithms: BTF, COLAMD, LU decomposition and the topology
  analysis that yields the startup times. Only the test model above exists.
* the network component models that produce the currents.
* any split of the solver over several FPGAs.
* any resource or timing figures for a specific FPGA.

## Limits

* The hardware trusts the schedule. A wrong startup time gives wrong results
  silently; the assertions catch only some cases in simulation.
* The single updating unit handles the off-diagonal columns one at a time.
  Systems with heavy coupling between blocks may be limited by it.
* The solve time depends entirely on the factor structure. For the stand-in
  radial network it fits inside a 4 µs step at 125 MHz. For strongly meshed
  blocks with heavy fill (the random test system) it does not.
* `i_in` and `u_out` are full-width arrays with reordering done one entry per
  cycle. This adds 2N cycles per step. A design that streams currents in from
  the component models would remove most of that.
