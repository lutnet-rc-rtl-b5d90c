# LUTNet-RC: a reservoir computer built from look-up-table neurons

A reservoir computer has a large recurrent network with fixed random weights (the
reservoir), and only a linear readout is trained. Two facts make the reservoir a good fit
for FPGA look-up tables. Its weights never change after training. Each neuron listens to
only a few others. A binary neuron with six inputs is then just a 64-entry truth table
(one LUT6) plus a flip-flop, whatever the precision of its weights. This design uses that
to build a 1500-neuron reservoir that advances one time step per clock. The readout
`o = b + W_ro · s` is computed by time-division. It exploits the fact that only some
neurons change from step to step. A state change of ±1 → ∓1 shifts the output by ±2·w.
The readout therefore starts from the stored result of a recent state and adds only the
changed neurons' weights. It compares the new state with the last four states and starts
from the closest one. This scheme is called multi-state differential multiply-accumulate,
or M-DMACC.

Everything is SystemVerilog-2017. There are no vendor primitives and no external data
files. The random network is computed at elaboration from a seed.

## Structure

```
          s_axis (u[t], b_i bits)                               m_axis (o[t], 32 bits)
                 │                                                     ▲
                 ▼                                                     │
  ┌──────────────────────────────┐  s[t] (N_R bits)  ┌─────────────────┴───────────────────┐
  │ lut_reservoir                │ ────────────────► │ mdmacc_output_layer                 │
  │  N_R × (LUT + flip-flop)     │  one state in     │  rS_t ─► diff_selector ◄─ state_    │
  │  lut6_neuron  (no input)     │  flight           │          (XOR, count,    history    │
  │  lut_in_neuron (with input)  │                   │           min select)   (4 states   │
  │  1 clock per sample          │                   │  dmacc_controller ─tau─► wro_memory │   + outputs)
  └──────────────────────────────┘                   │            dmacc_mac ◄── W_ro[tau]  │
                                                     └─────────────────▲───────────────────┘
                                                       wro_wr_* (valid/address/value)
```

| file | role |
|---|---|
| `rtl/lutnet_rc_pkg.sv` | default sizes and the elaboration-time functions: hash, wiring, weights, truth tables |
| `rtl/lut6_neuron.sv` | reservoir neuron without input: 64-bit truth table and a register |
| `rtl/lut_in_neuron.sv` | reservoir neuron that also sees the input sample: (b_i+6)-input truth table and a register |
| `rtl/lut_reservoir.sv` | the N_R neurons and their fixed random wiring |
| `rtl/state_history.sv` | the last N_DMACC states with their outputs |
| `rtl/diff_selector.sv` | XOR against each past state, population count, choice of the closest |
| `rtl/dmacc_controller.sv` | issues the index tau of each neuron to accumulate, one per clock |
| `rtl/wro_memory.sv` | W_ro of one output neuron (block-RAM style, 1-clock read) |
| `rtl/dmacc_mac.sv` | accumulator adding ±w or ±2w |
| `rtl/mdmacc_output_layer.sv` | the readout: history, selector, controller, memories, accumulators, FSM |
| `rtl/lutnet_rc_top.sv` | reservoir + readout, with stream and weight-write ports |

## The LUT reservoir

Neuron *i* has a binary state `s_i ∈ {-1,+1}`, stored as a bit (1 = +1). At each input
sample it computes

```
x_i[t] = Σ_{k<6} W'rr[i][k] · s_src(i,k)[t-1]  +  W'ir[i] · u[t]
s_i[t] = +1 if x_i[t] >= 0, else -1
```

The weights are multi-bit, not binary. `W'rr` is uniform in `[-r_rr(1-p), r_rr·p]` =
[-1.34, 2.66]. A fraction C_ir = 15 % of the neurons also get the input, with `W'ir`
uniform in [-20, 20]. The others have `W'ir = 0`.

**Truth tables instead of arithmetic.** For a neuron without input, all 64 combinations of
its six source states are evaluated at elaboration (`lutnet_rc_pkg::lut6_table`). The
resulting 64 bits become the `TABLE` parameter of `lut6_neuron`. In hardware the neuron is
a table lookup `TABLE[x]` and a register. Multi-bit weights therefore cost no logic. Only
their effect on the sign survives.

**Neurons with input.** With b_i = 10 input bits, such a neuron is a 16-input function. As
a literal table that is 65,536 bits for each of about 225 neurons. This design stores the
same function in an exact compressed form. Fix the six source states to a pattern p. Then
`x ≥ 0` is monotonic in the input code u, so the table row for p reduces to one threshold
`T[p]`. With a polarity bit `INV = (W'ir < 0)`, the output is
`y = (u >= T[p]) XOR INV`. The 64 thresholds of 11 bits each are computed at elaboration
(`lut_in_table`), using exact floor and ceiling divisions. `tb_lut_in_neuron` compares the
result bit by bit with the weighted sum. A logic optimiser reaches a similar circuit from
the full table, because most input bits hardly matter to the sign.

**Number formats.** The input code u (b_i bits) stands for the fraction `u / 2^b_i` in
[0, 1). A NARMA10 input in [0, 0.5] therefore uses codes 0..511. Weights are rounded to
8 fraction bits before the tables are formed.

**The random network.** Sources, weights and input selection come from a stateless 32-bit
hash of (SEED, neuron, slot). Each neuron's table can therefore be computed on its own.
The six sources of a neuron are distinct and never the neuron itself. Changing `SEED`
draws a new network. Elaborating the full 1500-neuron reservoir takes about half a minute
in verilator and a few minutes in a slang-based flow. The time goes into these constant
functions.

**Timing.** All state registers load on the clock edge where the sample is taken
(`in_valid`). One reservoir step is one clock. Reset sets all states to -1.

## The M-DMACC readout

For each output neuron k the readout computes `o_k = b_k + Σ_j s_j · W_ro[k][j]`, using
32-bit two's-complement arithmetic. One accumulator per output neuron adds one weight per
clock. All output neurons share the address `tau`.

**Differential update.** Suppose the state m samples ago and its outputs are stored. Then

```
o[t] = o[t-m] + Σ_{j: s_j[t] ≠ s_j[t-m]} d_j · W_ro[j],   d_j = +2 (-1→+1), -2 (+1→-1)
```

Only the changed neurons cost a clock. The multiplier is a shift and a conditional
negation (`dmacc_mac`).

**Choosing the starting point.** `state_history` keeps the last N_DMACC = 4 states, each
with the outputs computed for it. `diff_selector` XORs the new state `rS_t` with each of
them and counts the ones. It then picks the valid entry with the fewest changes. On a tie
it picks the newest entry. Its change mask is loaded into `dmacc_controller`. Each clock,
the controller issues the lowest remaining index as `tau` and clears it. The weight is read
from `wro_memory` one clock later and accumulated. When the result is taken, the new state
and its outputs are pushed into the history.

M-DMACC helps when neurons oscillate. A neuron that alternates every step changes against
the previous state but not against the state two steps back. With N_DMACC = 1 the circuit
is the single-state variant (S-DMACC).

**Full pass.** After reset, and after any write to the weights or biases, the history is
emptied, because its stored outputs are stale. The next sample then takes a full pass: the
accumulator starts at the bias, every neuron is visited (tau = 0, 1, 2, …), and each adds
±w.

**Cycle budget.** A sample with n > 0 neurons to accumulate occupies the readout for n + 4
clocks: accept, select, n issues, the last accumulate, and result. The result appears
n + 2 clocks after the state is accepted. A sample with n = 0 takes 4 clocks. A full pass
takes 1504 clocks.

**Writes.** Weights and biases are written through one port: `wr_en`, `wr_addr = {k, j}`,
`wr_data`. Here j < N_R addresses `W_ro[k][j]` and j = N_R addresses the bias `b_k`. Write
only while the readout is idle, between samples. Training, for example ridge regression
`W_ro = d sᵀ (s sᵀ + λI)⁻¹`, happens off-chip.

## Top level and handshakes

`lutnet_rc_top` has the following ports:

* `s_axis_tvalid/tready/tdata[B_I-1:0]`: input samples. The reservoir updates on the edge
  where a sample is taken. One state can wait for the readout, so the reservoir computes
  sample t+1 while the readout still works on sample t. `tready` is low while a state is
  waiting.
* `m_axis_tvalid/tready/tdata[N_O*32-1:0]`: one beat per sample. Output k is in
  `tdata[32k +: 32]`. The result is held until it is taken.
* `wro_wr_en/addr/data`: the weight port described above.
* `calc_n`, `calc_full`, `calc_sel`: statistics of the current or last pass. They give the
  number of neurons accumulated, whether it was a full pass, and the history entry used.

These are plain valid/ready signals, without `tlast` or `tkeep`. The DMA engines, AXI-lite
control and host processor of a complete system connect to them and are not part of this
RTL.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_R` | 1500 | reservoir neurons |
| `B_I` | 10 | input bits b_i |
| `N_O` | 1 | output neurons |
| `W` | 32 | W_ro, bias and accumulator width |
| `N_DMACC` | 4 | past states compared (1 = S-DMACC) |
| `SEED` | 32'h12345678 | draws the random reservoir |
| package: `K_FANIN`, `P_MILLI`, `R_RR`, `R_IR`, `C_IR_MILLI`, `WFRAC` | 6, 665, 4, 20, 150, 8 | fan-in k, p×1000, r_rr, r_ir, C_ir×1000, weight fraction bits |

## How far it can be trusted

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=… failures=…`.

* `tb_lut6_neuron` and `tb_lut_in_neuron` compare the truth tables with the weighted sum.
  The input-neuron test covers all 64 source patterns, including edge input codes, for
  both signs of the input weight.
* `tb_lut_reservoir` runs a 96-neuron reservoir for 400 clocks. It compares the whole
  state vector every clock with a reference model (`tb_rc_ref_pkg`). That model evaluates
  the weighted sums directly from the weights and never uses the truth tables.
* `tb_mdmacc_output_layer` checks every output against `b + Σ s·w`. It also checks the
  chosen history entry, the number of neurons accumulated and the exact latency. All four
  history entries, full passes, zero-change passes, back-pressure and a weight rewrite all
  occur.
* `tb_lutnet_rc_top` runs the whole circuit end to end with N_R = 200. It uses random input
  gaps and output back-pressure, and rewrites the weights halfway. It checks 600 results
  and the pass statistics. It requires full passes, DMACC from the newest state, DMACC from
  an older state, input stalls and back-pressure to occur.
* `tb_lutnet_rc_full` runs the circuit at its default size (1500 neurons). It streams
  1500 NARMA10-style samples (u uniform in [0, 0.5)) back to back and checks every result.
* `tb_lutnet_rc_narma10` runs the NARMA10 benchmark at the default size, training
  included. It uses 200 washout, 1000 training and 500 test samples. The readout is
  trained by ridge regression (λ = 100) on the reference states and rounded to 32-bit
  fixed point with 20 fraction bits. The weights are loaded through the weight port, and
  every circuit output is checked bit-exactly.
* `tb_lutnet_rc_memtasks` runs the short-term-memory and parity-check tasks. It uses a
  300-neuron reservoir with eight output neurons (`N_O = 8`), all trained at once: STM with
  delays 1–5 and parity with delays 1–3. This also exercises the multi-output readout end
  to end.

Measured with `tb_lutnet_rc_full` at the default network (`SEED` default):

| | neurons accumulated per sample (avg) | clocks per sample | rate at 100 MHz |
|---|---|---|---|
| plain time-division | 1500 | ~1504 | 0.066 Msps |
| previous-state DMACC | 615.8 | ~620 (estimated) | ~0.16 Msps |
| M-DMACC (this RTL) | 587.9 | 591.9 | 0.17 Msps |

The readout is exact, and M-DMACC beats the single-state variant. The speed-up, however,
depends on how many neurons change per step, and that depends on the network drawn. The
network drawn here from the published hyperparameters (k = 6, p = 0.665, r_rr = 4,
r_ir = 20, C_ir = 0.15) is strongly chaotic: about 40 % of the neurons change per step,
even with zero input. For the original implementation the reported averages are 83 clocks
(S-DMACC) and 60 clocks (M-DMACC) per sample, that is over 1 Msps. The original random
network and its Python generator are not public, so this RTL cannot reproduce that rate.
With a calmer network (another seed or other hyperparameters), the same RTL speeds up in
proportion to the number of changed neurons.

The same chaotic dynamics limit accuracy. On NARMA10, `tb_lutnet_rc_narma10` measures a
test NMSE of 0.079 (normalised by Σy²) and an NRMSE of 0.30. Always predicting the test
mean scores 0.068 on the same data. For the original implementation the reported NMSE is
0.018. The circuit computes the readout exactly, so the gap lies in the network drawn, not
in the arithmetic. The memory-capacity tasks (short-term memory, parity check) use the
same circuit with a binary input. With 300 neurons, `tb_lutnet_rc_memtasks` measures a
short-term memory sum of 2.84 over delays 1–5 and a parity-check sum of 0.10 over delays
1–3. These are sums of R². For 1500 neurons the original work reports 10.53 and 3.13
over all delays. The FPGA resource figures were not
reproduced; they need a vendor tool flow.

## Simulating

Verilator 5 with `--timing` is needed for the testbenches. For example, from the
repository root:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/lutnet_rc_pkg.sv tb/tb_rc_ref_pkg.sv tb/tb_lutnet_rc_top.sv \
    --top-module tb_lutnet_rc_top -o sim
./obj_dir/sim
```

Replace `tb_lutnet_rc_top` by any other testbench name. The full-size test builds in about
a minute and runs in about 15 s. To change the network, override `SEED` (or the package
constants). The testbenches take the same values, so they follow automatically.

## Choices made in this RTL

These points are not fixed by the design description and were chosen here:

* The hash-based network draw and the 8-bit weight quantisation.
* Input codes read as unsigned fractions. State bit 1 = +1, and sgn(0) = +1.
* The threshold form of the input neurons' truth tables.
* Reset of all neuron states to -1.
* One state in flight between reservoir and readout.
* The readout pipeline timing (n + 4 clocks), the tie rule (newest state wins), and
  history invalidation on any weight write.
* A 32-bit wrapping accumulator. It is exact whenever the true output fits in 32 bits.
* The `{k, j}` write address map with the bias at j = N_R.
* Plain valid/ready stream ports instead of full AXI-stream, and the statistics outputs.
