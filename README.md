# Over-clocked KLT datapath and embedded-multiplier characterisation circuit

The Karhunen-Loeve Transform (KLT, also called PCA or linear projection)
maps each P-dimensional data vector x onto K < P factors, f = Λᵀx. On an FPGA
the maximum clock of such a datapath is set by its embedded hard multipliers,
and the frequency that the vendor timing model reports is conservative. It
has to cover the slowest device, the worst voltage and temperature, and
aging. A particular chip, at a particular operating point, can run a good
deal faster. Past that point the multipliers start to produce wrong results,
and how wrong depends strongly on the constant operand.

The method behind this RTL uses that dependence. It works in three steps:

1. **Characterise.** A test circuit streams data through one embedded
   multiplier at the target clock. One operand is held at a constant m. The
   circuit records every product, and host software works out the mean and
   variance of the error for each m. This is repeated for every frequency,
   core voltage, temperature and multiplier location of interest.
2. **Optimise offline.** The projection matrix Λ is estimated with a
   Bayesian (Gibbs-sampling) procedure. Its prior gives a low probability to
   coefficients whose measured error variance is high:
   p(λ) ∝ (1 + Err(λ))^−β. The result is a coefficient set that represents
   the data well *and* makes the over-clocked multipliers err little. The
   mean error is removed by subtracting a constant from each factor.
3. **Deploy.** The ordinary KLT datapath runs over-clocked with those
   coefficients. It has no extra detection or correction logic and no extra
   latency. Results degrade gracefully instead of failing.

Steps 1 and 3 are hardware, and this repository holds RTL for both:

| circuit | top module | purpose |
|---|---|---|
| KLT datapath | `klt_core` | Z^6 → Z^3 projection, 9-bit sign-magnitude data, one multiplier per factor |
| characterisation circuit | `char_circuit` | measures what one embedded multiplier outputs at a given clock |

`klt_overclock_top` places the two side by side, each with its own clocks
and ports. On a real device they are separate FPGA configurations, used one
after the other. Step 2 is software and is not part of the RTL.

## What simulation can and cannot show

Timing errors come from real gate delays. A cycle-based RTL simulation has
none, so in simulation every product is exact: the characterisation circuit
always reports zero error, and the KLT always produces exact factors. The
RTL is the circuit to place on the device. The error behaviour that the
method relies on only appears in silicon, above the tool-reported clock.
For this reason the datapath keeps the multiplier the only deep logic
between two registers (see the pipeline below). That way the over-clocked
path is exactly the characterised path.

## KLT datapath (`klt_core`)

### Number formats

* Samples x_p and coefficients λ_pk are 9-bit **sign-magnitude** words:
  bit 8 is the sign (1 = negative), bits 7..0 the magnitude. Sign-magnitude
  is used because an over-clocked multiplier errs more on two's-complement
  negative operands than on positive ones. With it, the hard multiplier only
  ever sees two 8-bit unsigned magnitudes, which is exactly the 8x8 unsigned
  case that gets characterised.
* A product is {sign, 16-bit magnitude}. A zero product always has sign 0.
* The accumulator and the factors f_k are **two's complement**,
  `ACC_W = 2·8 + 1 + ceil(log2 P) = 20` bits. This width cannot overflow for
  any input.
* The default coefficients (`klt_pkg::DEFAULT_LAMBDA`) are three orthonormal
  columns of ±1/√6, scaled by 256 (magnitude 104). They are only a
  placeholder that makes the circuit do a meaningful transform out of reset.
  A real deployment loads the optimised set.

### Rolled dot product (`klt_dot_product`)

Each factor has its own multiply-accumulate unit, and all K units see the
same sample stream. Over the P samples of a vector, unit k computes
f_k = Σ_p x_p·λ_pk − offset_k. The coefficient comes from the unit's
`klt_coef_bank`, addressed by the dimension index p from `klt_ctrl`. The
rolled form needs one multiplier per factor instead of P, and since the
hard multipliers cannot be pipelined internally, unrolling would gain
nothing.

Pipeline of one unit (every register is on `clk`):

```
edge e    : x, λ_pk      -> multiplier input registers        (sample accepted)
edge e+1  : |x|·|λ| , sign -> product register                 (the over-clocked path)
edge e+2  : acc <= (first ? -offset : acc) + product
            on the last sample of a vector: f <= that sum, f_valid = 1 for one cycle
```

The accumulator stage is a single adder, kept much shorter than the
multiplier so that over-clocking stresses only the multiplier. The
sign-magnitude product enters the adder as `sign ? ~mag : mag`, with the
sign bit as carry-in, which turns it into two's complement at no extra
cost. The offset is applied by seeding the accumulator with −offset. That
value is held in a register, so it adds no carry chain either.

* Throughput is one sample per clock, so one vector of K factors every P
  clocks, and vectors can follow back to back.
* Latency: f_valid rises at the second edge after the edge that accepted a
  vector's last sample. Counting from the cycle in which that sample is
  presented, this is three cycles.
* `x_valid` may drop between samples. Nothing moves and the index does not
  advance. There is no back-pressure: the datapath always accepts a sample.
* f keeps its value until the next vector completes.

### Coefficients and mean-error offsets (`klt_coef_bank`)

Each unit has P coefficient registers and one offset register. They reset
to the `LAMBDA` and `OFFSETS` parameters of `klt_core`, and the load ports
can overwrite them:

| port | effect (at the rising edge) |
|---|---|
| `coef_wr_en`, `coef_wr_k`, `coef_wr_p`, `coef_wr_data` | λ[k][p] ← data |
| `off_wr_en`, `off_wr_k`, `off_wr_data` | offset[k] ← data (two's complement) |

The offset is the constant that makes the expected timing error of factor k
zero. It is the sum over p of x-weighted mean errors from the
characterisation, and is worked out offline. Reload only between vectors:
a write in the middle of a vector takes effect on the following samples.
The offset that applies to a vector is the value present one cycle before
the vector's first product reaches the accumulator.

`LAMBDA` is packed column by column: element p of column k sits at bit
offset `(k·P + p)·9`.

### Controller (`klt_ctrl`)

This is a modulo-P counter of accepted samples. It gives each sample its
dimension index p and the `first`/`last` flags that start and close the
accumulation. Reset returns it to p = 0, so the stream must start on a
vector boundary after reset.

## Characterisation circuit (`char_circuit`)

```
 host ──> input-stream RAM ──> [A]──┐
          {A,B} per word    ──> [B]──┴─> multiplier under test ──> [R] ──> output-stream RAM ──> host
                                  ^ DATA-PATH clock on A, B and R ^
 ext. trigger ──> FSM (FSM clock): read addresses, write addresses, busy/done
```

* `stream_ram` (two instances) is a simple dual-port block RAM, 2000 × 16
  bits. One port is on the host clock and one on the test clock, and reads
  are registered. The input-stream memory holds operand pairs {A, B}; the
  output-stream memory holds the 16-bit products captured in R. The depth
  of 2000 matches the characterisation run-time model, which grows in steps
  of 2000 test vectors. Longer tests are run as several loads.
* `char_datapath` holds registers A and B, the multiplier (`emb_mult`, 8x8
  unsigned) and register R, all on the data-path clock. Each edge launches a
  new operand pair and captures the previous product. So the multiplier gets
  exactly one data-path period, and that period is what the PLL sweeps.
* `char_fsm` starts a run on a rising edge of the external trigger, after a
  two-flip-flop synchroniser. It then issues read addresses 0…n−1 on
  consecutive cycles. It writes each product to the same address in the
  output memory LAT = 3 cycles later: one cycle for the RAM read, one for
  A/B and one for R. It raises `done` once the last write is made. A trigger
  during a run is ignored. `n_samples` above the depth is clamped.

The FSM clock and the data-path clock are two PLL outputs. They are assumed
to have the **same frequency and phase**. Only then does the multiplier see
a fresh operand pair on every data-path edge, which is what exposes its
dependence on input transitions. The PLL is not part of the RTL, so both
clocks are inputs. The published build of this circuit on a Cyclone III FPGA is reported to run its FSM correctly
up to 910 MHz, well above the multiplier frequencies being swept, so only
the A/B → R path is stressed.

A run, as seen from the host:

1. Write n words {A_i, m} through `stim_we`/`stim_addr`/`stim_data` (host clock).
2. Set `n_samples` = n and pulse `trigger`.
3. Wait until `busy` has risen and `done` is high.
4. Read `res_data` for addresses 0…n−1 through `res_addr`. Data appears one
   host-clock edge after the address.
5. Compute error = R_i − A_i·m, then its mean and variance per m (host software).

Between runs the host changes the PLL frequency, core voltage, temperature
or multiplier placement. None of these are RTL concerns.

## Top level (`klt_overclock_top`)

The top has the ports of `klt_core`, prefixed `klt_`, and those of
`char_circuit`, prefixed `char_`. Parameters: `P` = 6, `K` = 3, `W` = 9
(sign-magnitude width; the characterised multiplier is W−1 = 8 bits) and
`CHAR_DEPTH` = 2000.

## Where this RTL follows the method, and where it chooses

Taken from the method:
* the rolled architecture, with one embedded multiplier feeding an
  accumulator per projection vector;
* sign-magnitude 9-bit data, a Z^6 → Z^3 default size, and one multiplier
  per factor (3 × 9x9);
* a constant subtracted per factor to make the timing error zero-mean;
* the characterisation structure: stimulus and result block RAMs, A/B/R
  registers around the unit under test, an FSM started by an external
  trigger, and separate FSM and data-path clocks from a PLL;
* an 8x8 unsigned multiplier as the unit under test.

Chosen here, because the method leaves it open:
* pipeline registers on the multiplier inputs and output, and a two's
  complement accumulator of 20 bits;
* coefficients and offsets held in registers, with reset values from
  parameters plus a load port (the method only says the optimised set is
  built into the design);
* the default coefficient values;
* the valid-only stream interface with no back-pressure, and the reset
  behaviour;
* memory depth 2000, port arrangement, {A, B} word layout, sample count,
  trigger synchronisation and ignoring retriggers;
* FSM clock and data-path clock of equal frequency and phase.

Not in the RTL:
* the PLL (a vendor block);
* the host software (characterisation script, error statistics, Bayesian
  optimisation of Λ);
* the lab equipment (programmable supply, thermoelectric cooler).

The unrolled dot-product variant (a delay line, P multipliers and an adder
tree) is a known alternative that the method rejects, and it is not
provided.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `emb_mult_tb` | all 65536 operand pairs against shift-and-add |
| `sm_mult_tb` | sign rules, the zero sign, 20000 random pairs |
| `klt_coef_bank_tb` | reset values and random coefficient/offset loads |
| `klt_ctrl_tb` | dimension index and first/last with random input gaps |
| `klt_dot_product_tb` | factors vs integer dot product, exact output cycle, gaps, offsets |
| `klt_core_tb` | Z^6→Z^3 factors, latency, back-to-back throughput, reloads |
| `stream_ram_tb` | full-depth write/read across two clocks, read latency, write enable |
| `char_datapath_tb` | R = A·B of the pair launched one edge earlier |
| `char_fsm_tb` | address order, LAT spacing, gapless reads, clamp, retrigger, busy/done |
| `char_circuit_tb` | host sessions: load, trigger, upload, compare, for several constants |
| `klt_overclock_top_tb` | both circuits at full default size: 5000 KLT vectors with reloads and gaps, plus a 2000-sample run for each of the 256 constants; counts every mechanism |
| `klt_fig3_workload_tb` | `klt_core` with K = 4: 5000 points Z^6→Z^4 back to back in 30000 sample cycles |

Each testbench was also run against a copy of its module with one
deliberate bug, and it caught every one.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/klt_pkg.sv tb/klt_overclock_top_tb.sv \
          --top-module klt_overclock_top_tb
./obj_dir/Vklt_overclock_top_tb
```

Replace the testbench name to run any other. `-Irtl` lets Verilator find
each module in `rtl/<module>.sv`. The full-size top-level test takes a few
seconds.

Lint notes: Verilator reports `SYNCASYNCNET` for the reset of `char_fsm`.
The reset is asynchronous in the flip-flops and is also used as the disable
condition of the range assertion on result writes. This is intended.
