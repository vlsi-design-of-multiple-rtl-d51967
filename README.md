# Multiple-specification Viterbi decoder

A wireless channel keeps changing. A Viterbi decoder built for the worst channel
works harder than it has to whenever the channel is good. This decoder lets the
receiver choose how strong it is, while it runs. It has two knobs:

* the **constraint length** K of the rate-1/2 convolutional code, from 3 to 9;
* the **decoding depth** D, the number of trellis steps traced back before a bit
  is decided. D is a multiple of K: D = m·K with m = 2, 3 or 4.

That makes 7 × 3 = **21 specifications**. The depth can be changed at any time
without stopping the data stream. A new constraint length means a different
code, so it goes through a handshake. The decoder stops taking input, decodes
everything it holds, switches, and acknowledges.

The blocks are the ones of the original architecture: a branch metric unit, an
add-compare-select (ACS) unit and a systolic traceback array, run by a small
controller. Parts of the block unused at small K are held at constants or in
reset, so they do not switch. Widths, encodings, timing and the code
polynomials were not given and are choices of this implementation. They are
listed in [Departures and choices](#departures-and-choices).

```
            Reconfig_req  Constraint_length  Decoding_depth     Reconfig_ark
                  |              |                 |                  ^
                  v              v                 v                  |
               +---------------------------------------------------------+
               |                    control_block                        |
               +---------------------------------------------------------+
                 | Enable, K        | K               | K, m, Reconfig_req_sig
                 v                  v                 v        ^ Decode_finish_sig
  sym0,sym1 -> [ bmc ] --bm--> [   acs   ] --dec vector, best state--> [ systolic_array ] -> dec_bit,
  (in_ready = Enable)          groups by K                              16 output taps        dec_valid
```

## Specifications and depths

| K | states | depths 2K / 3K / 4K |
|---|--------|---------------------|
| 3 | 4   | 6 / 9 / 12  |
| 4 | 8   | 8 / 12 / 16 |
| 5 | 16  | 10 / 15 / 20 |
| 6 | 32  | 12 / 18 / 24 |
| 7 | 64  | 14 / 21 / 28 |
| 8 | 128 | 16 / 24 / 32 |
| 9 | 256 | 18 / 27 / 36 |

Together the 21 specifications use exactly 16 different depths: 6, 8, 9, 10, 12,
14, 15, 16, 18, 20, 21, 24, 27, 28, 32 and 36. The traceback array has one output
tap (a "type2" component) at each of them. After reset the decoder runs K = 7
with D = 28.

Codes (octal generators, the most significant tap on the current input bit):
7/5, 15/17, 23/35, 53/75, 171/133, 247/371, 561/753 for K = 3 … 9. These are the
usual maximum-free-distance rate-1/2 codes. To use other codes, edit `gen_poly`
in `rtl/vd_pkg.sv`; the codeword tables are computed from it at elaboration.

## Conventions

* **State.** The state at step t holds the last K−1 input bits, bit j = u[t−j].
  The next state is `((s << 1) | u) & (2^(K−1) − 1)`. The two predecessors of s
  are `(s >> 1) | (b << (K−2))`, b = 0 or 1. The decoded bit of a state is its bit 0.
* **Soft symbols.** 4 bits each: 0 means a confident '0' and 15 a confident '1'.
  `sym0` belongs to the first generator and `sym1` to the second. The branch
  metric is `(r0 ^ {4{c0}}) + (r1 ^ {4{c1}})` (0 … 30), where c0, c1 are the
  expected code bits. Smaller is better.
* **Path metrics.** 10 bits. They are renormalised every step, so the best
  state is always 0. When K changes, they restart: state 0 gets 0 and all
  other states 64, since the encoder is assumed to start in state 0.

## Branch metrics and add-compare-select

`bmc` holds the **codeword store** (`codeword_store`). This is one table of
expected codewords per constraint length. A multiplexer driven by K picks the
table. Each branch's codeword is XORed onto the two symbols and the two
distances are added. There is one metric per branch, 512 for K = 9. Branches
into states that do not exist at the current K read a constant codeword.

`acs` splits the 256 states into seven groups that follow K:

| group | states | used for |
|-------|--------|----------|
| 0 | 0 – 3 | every K |
| g ≥ 1 | 2^(g+1) … 2^(g+2)−1 | K ≥ g + 3 |

Each group has its own add-compare-select units (`acs_unit`, ties keep
predecessor 0) and its own minimum-path tree (`min_path`, ties go to the lower
index). When a group is unused, its input stage feeds it zeros, so it does not
toggle. Its decision bits read 0, and it drops out of the final minimum. A
final tree picks the best state among the active groups. `pm_store` then
subtracts that minimum and stores the metrics. Each step produces two
results. The *decision vector* has one survivor bit per state. The *best
state* is the state with the smallest metric. Both are registered.

## The systolic traceback array

This is the part that needs the most care. `systolic_array` chains 37
components (`sa_cell`), numbered 0 … 36. Each component has three registers:

* two registers in series for the decision vector and its valid bit;
* one register for a traceback state.

The best state of a step enters component 0 together with that step's
decision vector. Each clock, the state moves one component forward, but the
vectors move only half a component. So the state held in component j meets
the vector from exactly j steps earlier. The component reads that vector's
survivor bit at the state. From it, it works out the predecessor state and
passes that on. Component j therefore holds the state on the surviving path j
steps back, and its bit 0 is the decoded bit of that step. For depth D, the
output is taken from component D.

Timing follows directly from this structure:

* Component j shows, at clock c, the bit of the step whose vector entered at
  clock c − 1 − 2j.
* The array latency is **2D + 2 clocks** from a vector entering to its bit at
  the output register.
* The whole decoder latency is **2D + 4 clocks** from taking a symbol pair. For
  example, this is 60 clocks at K = 7, D = 28.

**Flushing.** A component whose vector is not valid passes the state through
unchanged. When the input stops, the ACS holds its last best state. Every
traceback that starts after that waits at the invalid vectors and begins
stepping back at the last real step. So the final steps are still decoded,
with a traceback that shortens toward the end. That traceback starts from the
best state of the last step, because the decoder does not assume a known end
state. On a clean channel a terminated trellis (K − 1 zero bits) therefore
comes back exactly. On a noisy channel the last few bits before a
reconfiguration are decoded with less protection than the rest.

Only the 16 type2 components drive the control block. Each sends `Load_out`
(a valid vector sits in its first register) and `Final_output` (bit 0 of its
state). Components deeper than 4K are held in clear, because no depth of the
current K reaches them.

## Changing the depth without breaking the stream

A change of depth moves the output tap. By the timing rule above, a move of Δ
components moves the output stream by **2Δ steps**. A naive switch would
therefore skip 2Δ bits when the depth gets shorter and repeat 2Δ bits when it
gets longer. `sa_ctrl` hides this with an output shift register Q that holds
up to 60 slots. A slot is one clock of output; it may be a bubble with its
valid bit low.

* **Steady.** If Q is empty, the current tap drives the output. Otherwise Q's
  oldest entry (its MSB) drives the output and the tap shifts into Q.
* **Shorter, D → D − Δ.** For n + 2Δ clocks, where n is Q's fill, the output
  comes live from the component at the *effective depth* E = D + n/2. That
  component shows exactly the slots Q held plus the 2Δ slots the new tap
  jumps over. Meanwhile Q is emptied and filled from the new tap. Afterwards Q
  holds n + 2Δ slots. The latency is unchanged, and those bits get an even
  longer traceback.
* **Longer, D → D + Δ.** For 2Δ clocks the new tap only repeats slots already
  delivered, so it is ignored. Q's MSB drives the output while Q has entries.
  Once Q is empty, `dec_valid` is 0 for the rest of the window. That gap is
  the added latency.

A new depth is taken only when no window is running. `depth_switching` (top)
is high during a window. The effective depth never exceeds 4K, so the live
component always exists and is running. Q never holds more than
2·(36 − 6) = 60 slots; an assertion checks this.

## Reconfiguration handshake

`control_block` is a four-state machine: RUN → DRAIN → APPLY → ACK.

1. **RUN.** `in_ready` (Enable) is high. A new `decoding_depth` is taken at any
   time. A rising edge of `reconfig_req` samples `constraint_length` and
   `decoding_depth`.
2. **DRAIN.** `in_ready` is low and `Reconfig_req_sig` goes to the array. After
   two clocks, long enough for steps already in the BMC and ACS registers, the
   controller waits for `Decode_finish_sig`. The array raises it when no valid
   step is left in its input, any component or Q.
3. **APPLY.** The new K and m become current. The array adopts the new depth
   with Q empty, and the ACS restarts its metrics because K changed.
4. **ACK.** `reconfig_ack` is high for one clock, and input resumes.

Out-of-range values (K outside 3 … 9, m outside 2 … 4) keep the old setting.
Every bit entered before the request comes out before `reconfig_ack`. The
encoder must restart from state 0 with the new code.

## Top-level interface (`mspec_viterbi`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; asynchronous reset, active low |
| in_valid, in_ready | in/out | 1 | symbol pair handshake; a pair is taken when both are high |
| sym0, sym1 | in | 4 | soft symbols of the first and second generator |
| reconfig_req | in | 1 | rising edge requests a new constraint length |
| constraint_length | in | 4 | K, 3 … 9 |
| decoding_depth | in | 3 | multiplier m, 2 … 4 (D = m·K) |
| reconfig_ack | out | 1 | one-clock pulse: new specification in force |
| dec_bit, dec_valid | out | 1 | decoded bits, in order |
| spec_k, spec_depth | out | 4, 6 | specification in use |
| depth_switching | out | 1 | a depth change is being absorbed |

## Departures and choices

Where the original architecture says something, this RTL follows it. That
covers: the block split; the seven codeword tables chosen by K; XOR-then-ADD
branch metrics; ACS units grouped by K with constant inputs for unused groups;
the two-register / one-register traceback component; 16 type2 components;
output by tap selection; the shift-register rules for depth changes; the
per-component reset; and the handshake signal names.

These points are the implementation's own:

* The set of multipliers {2, 3, 4}. It is the reading under which 7 constraint
  lengths give 21 specifications and exactly 16 distinct depths.
* The code polynomials, the soft-symbol coding, every width, the tie rules and
  the normalisation scheme.
* Depth-change windows last 2Δ clocks, not Δ, because of the two-register
  component. A shorter change with a non-empty register is served from the
  effective-depth component.
* Only the components deeper than 4K are held in clear. Clearing all
  components deeper than D would leave too little time to refill them when the
  depth grows.
* The `Enable` line reaches the BMC input only. The ACS and the array keep
  running so they can empty themselves during a reconfiguration.
* A type2 component is placed at every possible depth, not only at the end of
  the chain.

Not reproduced: the gate counts and the 20 ns critical path of the original
synthesis (that needs a standard-cell library), and the bit-error-rate
simulations over 5·10⁷ bits per channel condition. The end-to-end test checks
exact decoding under light noise and isolated hard errors, not BER curves.
The long combinational path of a 256-state ACS plus the minimum search in one
clock has not been timed.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| tb_codeword_store | all 7 × 256 × 2 codewords against a bit-serial reference encoder |
| tb_bmc | every branch metric for random symbols and K; Enable gating; 1-clock latency |
| tb_acs_unit, tb_min_path | random operands with forced ties against plain arithmetic |
| tb_pm_store | restart values, normalisation, hold |
| tb_acs | decision vectors and best state against an integer reference ACS at every K |
| tb_sa_cell | vector path, Load_out/Final_output, predecessor step, skip on invalid, clear |
| tb_sa_ctrl | model of the 16 taps: every slot once and in order through all four kinds of depth change, gap only when the register is empty, finish timing, clears |
| tb_systolic_array | vectors built from a known path: exact bits back, latency 2D+2, bubbles, depth changes, drain |
| tb_control_block | handshake order, late finish, one acknowledge, depth while running, out-of-range requests |
| tb_mspec_viterbi | the whole decoder at default sizes (below) |
| tb_table2_specs | Gaussian-noise channel at Eb/N0 = 3 dB, 10,000 bits for each of (K, m) = (7,4), (7,3), (6,4), (6,3), (5,4), (5,3), (4,4), (4,3), (8,4); reports channel and decoded error rates and requires decoding to remove at least 80% of the channel's hard-decision errors |

`tb_mspec_viterbi` encodes about 2,700 random bits with a reference encoder. It
adds soft noise and isolated hard symbol errors, and it demands the exact bit
stream back. Along the way it covers:

* the 60-clock first-output latency;
* input bubbles;
* every kind of depth change;
* six reconfigurations covering all seven constraint lengths;
* a complete flush before each acknowledge.

Each of these mechanisms is counted, and the test fails if one never happened.
It runs in well under a second. In `tb_table2_specs`, the channel's hard-decision
error rate is about 8%, and the decoded error rate is about 1e-4 to 1e-3.
That figure includes the less-protected tail of each run.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -y rtl +libext+.sv rtl/vd_pkg.sv \
          tb/tb_mspec_viterbi.sv --top-module tb_mspec_viterbi
./obj_dir/Vtb_mspec_viterbi
```

Replace the testbench name to run another one. All sizes are set in
`rtl/vd_pkg.sv`. `K_MIN`/`K_MAX`, `M_MIN`/`M_MAX` and `SOFT_W` define the
specification set. `N_TAPS` must equal the number of distinct products m·K,
which is 16 for the defaults.

## Files

* `rtl/vd_pkg.sv`: constants, types, code polynomials, tap depths.
* `rtl/codeword_store.sv`, `rtl/bmc.sv`: branch metrics.
* `rtl/acs_unit.sv`, `rtl/min_path.sv`, `rtl/pm_store.sv`, `rtl/acs.sv`: add-compare-select.
* `rtl/sa_cell.sv`, `rtl/sa_ctrl.sv`, `rtl/systolic_array.sv`: traceback.
* `rtl/control_block.sv`: specification controller.
* `rtl/mspec_viterbi.sv`: top level.
* `tb/tb_*.sv`: one testbench per module.
