# Multiple scan chains with extra test vectors: low-power scan test

While a full-scan circuit is tested, every shift cycle moves new, essentially
random values through the scan latches. Each latch output feeds the
combinational logic, so every shift ripples through the gates behind it,
although nothing useful is computed at that time. These *spurious
transitions* make test power much higher than functional power.

The scheme in this RTL removes most of them without reordering vectors or
latches:

* The scan latches are split into several scan chains SC0..SC(k-1) and one
  extra scan chain, ESC. The chains shift **one at a time**.
* For every ordinary chain SCj there is an **extra test vector** EVj. It is a
  value for the primary inputs that puts a *controlling* value (0 for AND,
  1 for OR) on a side input of every gate that a latch of SCj feeds. While
  SCj shifts, the tester holds EVj on the primary inputs, so the shifting
  latches cannot reach past those gates.
* Two latches may share a chain only if one input assignment freezes both
  (*compatible* latches). Latches that need opposite values on the same
  input (*incompatible*) go to different chains. Latches whose logic cannot
  be frozen from any primary input (*independent* latches) go to ESC. ESC
  shifts while the vector's own primary-input values are applied.

The hardware cost is small: the common ScanIn pin feeds every chain, a
one-hot shift register with one flip-flop per chain gates the scan clock, and
a multiplexer picks ScanOut from the chain that is shifting. The test data
grows by one extra vector per chain, that is (number of chains) x (number of
primary inputs) bits. The test time does not grow: every latch still shifts
exactly once per vector.

## Test application sequence

For each test vector V (present-state part PS, primary-input part PI):

| phase | cycles | primary inputs | what moves |
|---|---|---|---|
| accept | 1 | unchanged | vector registered, select register set to SC0 |
| shift SC0 .. SC(k-1) | length of each chain | EVj, its don't-cares keep their old value | only SCj; its old contents (the last response) leave on ScanOut |
| shift ESC | length of ESC | PI | only ESC |
| capture | 1 | PI | every latch loads its next state |

So a vector takes `NUM_SL + 2` cycles: 8 for the six-latch example. Within a
chain the latch with the lowest index sits next to ScanIn. The first bit
shifted into a chain is therefore the bit of its highest-index latch, and the
first bit out is that latch's response. The sequencer does this reordering.
Vector and response bit i always belong to latch Si.

Transitions that remain:

* The primary inputs change at the start of each chain's phase (EVj to
  EV(j+1)). That costs one input change per chain per vector, not one per
  shift.
* A gate whose inputs all come from latches cannot be frozen (gate t0 of the
  two-latch example).
* ESC shifts freely.
* The capture cycle is unchanged.

## The three example circuits (`msc_top`)

`msc_top` holds three small full-scan circuits side by side. Each one is a
complete system: the combinational part, an `msc_scan_arch` and an
`msc_test_sequencer`. Each has its own ports, prefixed `f2_`, `f3_` and
`f5_`.

| prefix | logic | partition | extra test vectors (x0 x1 x2) |
|---|---|---|---|
| `f2_` | z0=y0&x0, z1=y1\|x0, z2=y2&x1, z3=y3&x1, z4=y4\|x2, z5=y5\|x2 | SC0={S0,S2,S3}, SC1={S1,S4,S5}, ESC empty | EV0=00X, EV1=1X1 |
| `f3_` | t0=y0&y1, t1=x0&x1, z0=t0&t1 | SC0={S0,S1}, ESC empty | EV0=0X (X0 works as well) |
| `f5_` | t0=G(y0,y1), t1=G(y2,y3), z0=t0, Y4=G(t0,t1) | ESC={S0..S4} | none |

* In `f2_` every spurious transition is removed. S0 needs x0=0 and S1 needs
  x0=1, so the two are incompatible and sit in different chains.
* In `f3_` the output gate is frozen, but t0 still toggles.
* In `f5_` no gate can be reached from a primary input. The circuit therefore
  degenerates to ordinary single-chain scan.
* The gate functions of the `f5_` circuit are parameters of `fig5_comb`. The
  defaults are AND, OR, AND, and they are this design's choice. Its
  sequencer has one primary-input pin, which drives nothing, because the
  sequencer needs `NUM_PI >= 1`.

The combinational parts are defined only by the gates the latches drive.
The logic that computes the latches' next states is not defined, apart from
Y4 of `f5_`. Those next-state lines are therefore top-level inputs
(`f2_next_state`, `f3_next_state`, `f5_next_state`). Whatever drives them is
loaded on the capture cycle.

## Modules

| file | role |
|---|---|
| `rtl/msc_pkg.sv` | `msc_phase_e` (idle / shift SC / shift ESC / capture), `gate_e`, `gate_eval` |
| `rtl/scan_cell.sv` | scan latch: mux-D flip-flop with clock enable `ce` standing for the gated scan clock |
| `rtl/chain_select_sr.sv` | one-hot ring register, one flip-flop per non-empty chain; `restart`, `advance` |
| `rtl/scan_out_mux.sv` | ScanOut = OR(sel & chain_out) |
| `rtl/msc_scan_arch.sv` | the DFT architecture: chains built from `CHAIN_OF`, clock gating, select register, ScanOut mux |
| `rtl/msc_test_sequencer.sv` | runs the sequence above for one vector per valid/ready handshake and returns the previous response |
| `rtl/fig2_comb.sv`, `fig3_comb.sv`, `fig5_comb.sv` | combinational parts of the example circuits |
| `rtl/msc_top.sv` | the three example systems |

The generic modules are configured by parameters:

* `NUM_SL`: number of scan latches.
* `NUM_PI`: number of primary inputs.
* `NUM_SC`: number of ordinary chains k.
* `CHAIN_OF[i]`: chain of latch i. The value `NUM_SC` means ESC.
* `EV_VAL[j]`, `EV_CARE[j]`: the extra test vector of chain j, where a care
  bit of 0 marks X.

Their defaults are the six-latch example. No ordinary chain may be empty.
When ESC is empty, the select register and the multiplexer have only k
positions.

Control of `msc_scan_arch`, one cycle each:

* `shift` clocks the selected chain only.
* `capture` clocks every latch with its next state.
* `restart` and `advance` move the chain select. They take effect at the next
  edge.

`scan_out` is combinational from the selected chain's last latch. It is
sampled in the same cycle in which `shift` is high.

Sequencer handshake:

* The sequencer accepts a vector when `vec_valid && vec_ready`.
* If `vec_capture` is 0, it only shifts. Use this for the final unload.
* `resp_valid` pulses for one cycle after the shift phases if a capture came
  before them. `resp` then holds the response of the previous vector, bit i
  from latch Si.

## Design choices not fixed by the scheme

* The gated scan clocks are written as clock enables. A clock-gating cell can
  replace the enable term in `msc_scan_arch` without changing the behaviour.
* Every flip-flop has an asynchronous active-low reset to 0.
* Within a chain, latches are ordered by index. The scheme itself does not
  depend on the order.
* A don't-care input of an extra test vector keeps its previous value, so
  that filling it costs no input transition.
* The extra test vectors are parameters. In a real flow they are tester data
  that the tester applies on the primary-input pins. `msc_test_sequencer`
  plays the tester's part here.
* Other choices: the valid/ready handshake, one accept cycle per vector, and
  unload-only vectors.
* Finding the partition and the extra test vectors is done at design time by
  software. That software uses ATPG on a reduced circuit whose freezing
  signals are targeted as stuck-at faults. It is not part of this RTL: its
  results enter as `CHAIN_OF`, `EV_VAL` and `EV_CARE`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/msc_pkg.sv tb/tb_msc_top.sv --top-module tb_msc_top
./obj_dir/Vtb_msc_top
```

| testbench | what it shows |
|---|---|
| `tb_scan_cell`, `tb_chain_select_sr`, `tb_scan_out_mux` | the cells against reference models |
| `tb_fig2_comb`, `tb_fig3_comb`, `tb_fig5_comb` | exhaustive logic check, and that the extra test vectors freeze the intended outputs |
| `tb_msc_scan_arch` | random shift/capture/advance traffic on two partitions (one with ESC); only the selected chain moves |
| `tb_msc_test_sequencer` | the input values in each phase, the don't-care hold, the vector landing in the right latches, the responses, and 8 cycles per vector |
| `tb_msc_esc_config` | 14 latches, 3 ordinary chains plus an ESC of 5 (made-up partition and vectors); ESC shifts under the vector's inputs; 16 cycles per vector |
| `tb_msc_top` | the three systems end to end with 60 vectors each; responses checked against independently computed next states |

`tb_msc_top` also watches the circuit nodes between consecutive shift cycles
of the same chain:

* In the six-latch circuit no output changes while shifting. Applying the
  vector's own inputs instead of the extra test vectors to the same latch
  values would have caused on the order of a hundred output transitions over the run.
* In the two-latch circuit z0 stays frozen while t0 still toggles.
* The ESC-only circuit toggles freely.

For the six-latch circuit the testbench also keeps a node transition count,
the usual proxy for dynamic power:

* Each gate output transition is weighted by its fan-out, which is 1 for
  every output here.
* Each clocked scan latch adds 2 if its value stays and 6 if it flips.

The count is kept for the circuit as run and for a reference model that
applies the same vectors through one chain S0..S5, with the vector's inputs
held while shifting. A typical run gives about 12 against 24 per
shift/capture cycle, roughly half. Part of the saving comes from the gated
clocks, because only the shifting chain's latches are counted as clocked.
The testbench requires the multiple-chain count to be the lower one.

## Limits

* The ISCAS89 benchmark netlists are not included. Neither are their
  partitions or extra test vectors, so the published power figures cannot be
  reproduced here. The generic modules accept any such configuration through
  their parameters.
* The power estimate is testbench code, not hardware. Whether latches whose
  clock is gated off should add to the count is a modelling choice; here they
  add nothing.
* Scan clock-tree power and the physical gating cells are outside this RTL.
