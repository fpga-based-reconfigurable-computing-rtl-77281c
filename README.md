# Multi-asset barrier option pricer: a Monte Carlo engine for the Heston model

This RTL prices a *worst-of-N down-and-out call*. The option is written on N
assets whose prices follow the Heston stochastic-volatility model. It pays
`(min_i S_i(T) - K)^+` at maturity T. It is worth nothing if any asset
falls to its barrier B at any monitoring date before maturity. No closed form
exists for this option, so the engine estimates its value by Monte Carlo
simulation: it simulates many independent price paths, computes each path's
payoff and averages them.

The architecture rests on two ideas:

* **Time-multiplexed model pipeline.** One deeply pipelined Heston core
  advances one asset by one time step per clock cycle. The N assets of one
  path (a *thread*) go through the pipeline in consecutive cycles. An
  M-stage pipeline therefore holds M/N threads at once. Each result comes
  back to the input exactly when its slot's turn comes again.
* **Early termination.** A knocked-out path needs no further simulation. A
  scheduler next to each core frees the slots of a thread as soon as it is
  knocked out or matures, and starts a new path in them in the next round.
  No slot waits for the slowest path.

K such cores run side by side. At the default sizes, K = 36 cores × 16
slots / 4 assets gives 144 paths in flight. An adder tree and an
accumulate-and-divide unit turn the finished payoffs into the mean.

## The arithmetic of one time step

Each asset i has a price S and a variance v. They are advanced with the
full-truncation Euler scheme. With `v+ = max(v, 0)`:

```
eps_s = sum_j A[i][j] * Z_j                      (correlated asset noise)
eps_v = rho * eps_s + sqrt(1 - rho^2) * Z_v      (variance noise)
S'    = S + S * (mu*dt + sqrt(v+) * sqrt(dt) * eps_s)
v'    = v + kappa*dt * (theta - v+) + xi*sqrt(dt) * sqrt(v+) * eps_v
```

* `Z_1..Z_N` and `Z_v` are independent standard normal samples.
* A is the Cholesky factor of the assets' correlation matrix. The
  variances of different assets are not correlated with each other.
* The truncated `v+` is used inside the step. The untruncated v is carried
  to the next step ("full truncation").

The host supplies every coefficient already multiplied by `dt` or
`sqrt(dt)`. The datapath then needs only multiplies, adds, one square root
and one max per step.

All model values are signed 32-bit fixed point with 20 fraction bits
(`heston_pkg::fx_t`, range ±2048, resolution about 1e-6). Products are
truncated toward minus infinity. The square root is exact-truncated
(digit-by-digit). The word format is this design's choice: the original
architecture does not state one.

## Threads, slots and the pipeline (`heston_core`)

The pipeline has M register stages and M *slots*. Slot s holds asset
`s mod N` of thread `s div N`, so N must divide M. A slot counter advances
every cycle. The core also gives the correlation unit the asset of the next
cycle (`next_asset`) and says whether that cycle starts a thread
(`next_load_vec`).

Stages 1-4 compute:

1. truncation;
2. square root, variance-noise mix, `sqrt(dt)*eps_s`, mean-reversion term;
3. relative asset move and variance increment;
4. state update and step count.

Stages 5..M only delay the data. A slot issued in cycle c leaves the last
stage in cycle c+M. That is the cycle in which the same slot issues again,
so the result feeds straight back into the input multiplexer. These
multiplexers choose between the new-path values S(0), v(0) and the fed-back
S(t-1), v(t-1).

Each issue cycle, the scheduler's command for the slot picks the input:

| command     | issued                                   | result leaving now            |
|-------------|------------------------------------------|-------------------------------|
| `SLOT_INIT` | S(0), v(0), step 0 from the parameter row | discarded                     |
| `SLOT_RUN`  | the result leaving now                    | shown on `out_*`, `out_valid` |
| `SLOT_IDLE` | a bubble (valid = 0)                      | discarded                     |

Timing contract of one issue cycle:

* the parameter row of `issue_asset` arrives in that cycle (asynchronous
  table read);
* `eps_s` arrives in that cycle. The correlation unit computes it from
  `next_asset` one cycle earlier;
* `z_v` comes straight from the second Gaussian generator.

A thread of `nsteps` steps occupies its N slots for `nsteps + 1` rounds of M
cycles:

* the thread's end is seen at its last asset, after its other assets have
  already issued one more step;
* that extra step is discarded when the new thread's `SLOT_INIT` replaces it
  one round later.

A run of P threads per core therefore lasts about
`ceil(P / (M/N)) * (nsteps + 1) * M` cycles when no path is knocked out.
Knocked-out paths shorten this.

## Early termination and the thread scheduler (`thread_scheduler`)

Each core has one scheduler. It holds the following state:

* an *active* bit per thread (the thread table);
* an M-bit "initialize new thread" vector, one bit per slot (`init_pend`);
* the *path counter*, the number of threads started so far.

Its behaviour:

* `start` launches the first `min(M/N, target)` threads.
* A termination event from the barrier monitor frees a thread. The event is
  either a barrier hit or maturity. While fewer than `target` threads have
  been started, the scheduler sets the freed thread's N bits and counts a new
  path. Otherwise it marks the thread idle.
* A pending thread starts only at its asset-0 slot, so all its assets start
  in the same round. A pending slot reached mid-thread issues a bubble. This
  matters right after `start`, which can fall anywhere in the slot rotation.
* A termination acts in the cycle it arrives. This keeps the one-thread case
  (M = N) correct: there, the thread's first slot issues in that very cycle.
* `done` rises when the counter has reached `target` and no thread is
  active. It holds until the next `start`.

## Gaussian random numbers (`grng`, `urng_taus`, `icdf_normal`)

Every core has two generators, each producing one N(0,1) sample per cycle
by inversion:

* one feeds the correlation unit;
* the other supplies `Z_v`.

The uniform source is a combined Tausworthe generator (taus88). Seeds are
derived from the core number so that the cores draw different streams.

`icdf_normal` evaluates the inverse normal CDF on a two-level segmentation:

* Bit 31 of the uniform word is the sign. The other 31 bits give
  `p = (u[30:0] + 0.5) / 2^32` in (0, 0.5).
* Level 1 is the octave of p: the count k of leading zeros of `u[30:0]`.
  This gives fine segments in the tails, where the function bends sharply.
* Level 2 splits every octave into 8 equal parts.
* Each of the 31 × 8 = 248 segments has a quadratic `z = c0 + t*(c1 + t*c2)`
  in the position t ∈ [0, 1) within the segment.

The coefficients are the least-squares quadratic fit of `Phi^-1(p(t))` over
the segment, with `p(t) = (2^(30-k) * (1 + (part + t)/8) + 0.5) / 2^32`.
They are stored as three 32-bit words with 20 fraction bits per segment in
`rtl/icdf_normal_coef.hex`, in row order `8k + part` and column order
`{c2, c1, c0}`. The absolute error is below 1e-4 for every input except
`u[30:0] = 0`. That input has probability 2^-31 and returns about -6.23
instead of -6.40. The unit is pipelined with a latency of 3 cycles.

## Correlating the noise (`correlation_unit`)

Gaussian samples stream into an N-deep shift buffer. At the start of every
thread's turn, the buffer is frozen as that time step's vector Z. Each
thread step therefore uses N fresh samples, and all its assets share one
vector. Each cycle the unit evaluates one row, `eps_i = sum_j A[i][j] Z_j`,
with N parallel multipliers. The N multipliers per core, together with the
Heston datapath's own multipliers, are what limit how many cores fit as N
grows. The result is registered: one cycle latency.

## Barrier monitor and payoff calculator (`barrier_monitor`)

The results of a thread leave the core in asset order. The asset index that
travels with each result tells the monitor where a thread's group starts and
ends. Over the group the monitor forms three values:

* `hit = OR_i (S_i <= B_i)`. This only counts when `barrier_en` is set,
  which gates the barrier monitor on or off.
* `min_i (S_i - K_i)`.
* `sum_i max(S_i - K_i, 0)`.

At the last asset, the thread ends if it was hit or if its step count has
reached `nsteps`. The termination event carries the thread, the payoff and a
path count:

* knocked out: payoff 0;
* worst-of-N mode: `max(min_i (S_i - K_i), 0)` as 1 path. With equal
  strikes this is `(min_i S_i(T) - K)^+`;
* vanilla mode: the sum above as N paths. With an identity correlation
  matrix, each asset is then an independent single-asset path. This is the
  set-up for validating the model against closed-form single-asset prices.

The barrier is checked at every simulated step (discrete monitoring).

## Collecting the result (`payoff_adder_tree`, `accumulate_divide`)

Several cores may finish a thread in the same cycle. The adder tree sums
their payoffs and path counts into one record per cycle (latency 1). The
accumulator keeps a 64-bit payoff sum and a 40-bit path count.

Two cycles after every core reports done, the top starts a restoring
divider. It produces one quotient bit per cycle, and 65 cycles later `mean`
holds `sum / paths`. This value is undiscounted and has 20 fraction bits.
Discounting, and combining the results of several FPGAs, is left to the
host, which can also read `sum` and `paths`.

## Host interface (`barrier_pricer_top`)

The top-level ports are all plain signals:

* `clk`, `rst` (synchronous, active high);
* `wr_en`, `wr_addr[15:0]`, `wr_data[31:0]`: a write-only control bus,
  broadcast to every core;
* `start`;
* outputs: `done`, `result_valid`, `mean[63:0]`, `sum[63:0]`,
  `paths[39:0]`.

Register map. Region = `wr_addr[15:12]`:

| region | address bits                  | contents |
|--------|-------------------------------|----------|
| 0      | `[3:0]` = 0                   | `nsteps`, time steps to maturity (16 bits) |
| 0      | `[3:0]` = 1                   | threads (paths) per core |
| 0      | `[3:0]` = 2                   | bit 0 barrier enable, bit 1 payoff mode (0 worst-of-N, 1 vanilla) |
| 1      | `[11:4]` asset, `[3:0]` field | parameter table |
| 2      | `[11:6]` row, `[5:0]` column  | correlation matrix A (Cholesky factor) |

Parameter table fields, all `fx_t`:

| field | value          | field | value            |
|-------|----------------|-------|------------------|
| 0     | S(0)           | 6     | sqrt(dt)         |
| 1     | v(0)           | 7     | rho              |
| 2     | mu·dt (r·dt)   | 8     | sqrt(1 - rho²)   |
| 3     | kappa·dt       | 9     | barrier B        |
| 4     | theta          | 10    | strike K         |
| 5     | xi·sqrt(dt)    |       |                  |

Every core holds its own copy of the table and the matrix, because each
core reads them every cycle. Bus writes reach all copies at once. A run
gives every core the same number of paths, so the total is K × (paths per
core).

Parameters of the top:

| parameter | default | meaning |
|-----------|---------|---------|
| `K`       | 36      | cores |
| `M`       | 16      | pipeline depth (slots) |
| `N`       | 4       | assets per thread (N ≥ 2, N divides M) |
| `STEP_W`  | 16      | step-counter width |
| `PATH_W`  | 32      | per-core path-counter width |

The matrix address field limits N to 64.

## Module map

```
barrier_pricer_top
├── mc_core × K
│   ├── grng × 2            (urng_taus + icdf_normal)
│   ├── correlation_unit
│   ├── param_table
│   ├── heston_core
│   ├── barrier_monitor
│   └── thread_scheduler
├── payoff_adder_tree
└── accumulate_divide
heston_pkg: fx_t, param_row_t, ctrl_wr_t, slot/payoff enums, fx_mul, fx_sqrt
```

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. Run them from the directory that holds `rtl/` and `tb/`: the ICDF
table is read as `rtl/icdf_normal_coef.hex`. For example:

```
verilator --binary --timing --assert -Wno-fatal -j 4 --top-module tb_barrier_pricer_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/heston_pkg.sv tb/tb_barrier_pricer_top.sv
./obj_dir/Vtb_barrier_pricer_top
```

| testbench | what it establishes |
|-----------|---------------------|
| `tb_heston_pkg` | fixed-point multiply and square root against exact integer references; field numbering |
| `tb_urng_taus` | bit-exact against a model of the three recurrences; hold; mean |
| `tb_icdf_normal` | every octave edge and 3000 random inputs within 2e-4 of a double-precision inverse CDF; 3-stage latency |
| `tb_grng` | 20000 samples against the reference; mean and variance |
| `tb_param_table` | all fields of all rows; writes to other regions ignored |
| `tb_correlation_unit` | every eps bit-exact against 64-bit integer sums; vector capture timing |
| `tb_heston_core` | 60 rounds of 16 slots bit-exact against an integer model of the step (also proves the M-cycle feedback), INIT/RUN/IDLE |
| `tb_barrier_monitor` | 3000 thread steps: knock-out, maturity, gating, both payoff modes |
| `tb_thread_scheduler` | cycle-by-cycle against a reference model, at 16/4 and at the one-thread size 4/4 |
| `tb_payoff_adder_tree`, `tb_accumulate_divide` | sums, quotient, 65-cycle divide |
| `tb_mc_core` | exact payoffs of noise-free paths; early-termination speed-up; common versus independent noise through the matrix |
| `tb_barrier_pricer_top` | full default size (36 cores): a Black-Scholes-limit vanilla run within 4 standard errors of the closed form 7.9656; a correlated Heston worst-of-4 barrier run. Checks that totals and mean match the payoffs leaving every core, that every mechanism occurs, and the run length |
| `tb_workload_assets` | the worst-of-N barrier run rebuilt for 8, 16 and 32 assets (32 with M = 32) |

The full-size run of `tb_barrier_pricer_top` simulates 4608 + 576 paths in
about 10,000 cycles and takes well under a minute with Verilator.

## What follows the original architecture and what is this design's own

Taken from the architecture:

* K parallel Monte Carlo cores, each with a scheduler, two inversion-based
  Gaussian generators, a correlation-matrix product, a per-asset parameter
  table, a pipelined Heston core and a gated barrier monitor / payoff
  calculator;
* threads of N assets time-multiplexed over an M-deep pipeline (M/N threads
  per core, K = 36, M = 16, N = 4);
* early termination with immediate restart;
* the path counter with `done`;
* in-stream asset tagging;
* the adder tree with accumulate and divide;
* the full-truncation Euler step;
* the worst-of-N down-and-out payoff;
* the vanilla validation mode with an identity matrix.

This design's own choices:

* **Number format and register map:** the fixed-point format, the bus and
  its register map, the parameter-row fields (coefficients pre-multiplied by
  dt).
* **Random-number details:** taus88 as uniform source, and the ICDF segment
  layout and polynomial degree.
* **Pipeline split:** 4 compute stages plus delay.
* **Correlation unit:** its vector buffering.
* **Payoff details:**
  * a breach counts at `S <= B`;
  * per-asset strikes, with the worst-of payoff taken as
    `min_i (S_i - K_i)`;
  * the vanilla mode reports its sum as N paths.
* **Scheduler details:** the thread-start rule (asset-0 slot) and the
  one-round cost of a termination.
* **Result path:** the restoring divider and the end-of-run sequencing.

* **Parameter-table addressing:** the table is read with the asset index of
  the core's slot counter. That counter runs in lock step with the
  scheduler's slot pointer, so the scheduler still decides what each slot
  does, but it does not drive the table address itself.

The asset update multiplies the increment by S(t). This follows the Heston
SDE `dS = r S dt + sqrt(v) S dW` and the original core's data flow.

## Limits

* Only one FPGA is modelled. Distributing paths over several FPGAs,
  gathering their sums and discounting belong to the host.
* The Euler scheme's discretisation bias is that of the method. Nothing
  such as the quadratic-exponential scheme is included.
* The square root sits in a single pipeline stage. This stage, and the
  chained multiplies in stage 3, are the critical paths. For a high clock
  rate they would be spread over the delay stages, which exist to hold
  exactly such extra pipelining; the latency M would not change.
* The single-asset validation cases that the architecture was checked
  against (at-the-money calls of 1 to 10 years) depend on calibrated model
  parameters that are not known here. The end-to-end test therefore
  validates against the Black-Scholes limit of the model, which has a
  closed form for any parameters.
* The variance and price words wrap silently if a path leaves ±2048. With
  ordinary option parameters this does not happen.
