# Filling unused FPGA space against hardware Trojans

An FPGA design rarely uses all of the device: often only about 60 % of the
LUTs and flip-flops are taken, and the rest is free room for someone who can
rewrite the bitstream to add a hardware Trojan. This RTL shuts that door in
two ways:

1. **Fill the empty space.** Every unused LUT becomes one gate of a long
   *gate chain*, each gate followed by one unused flip-flop. The flip-flops
   left after that are strung into a plain *shift register*. Nothing is left
   free, and the fillers are not idle padding: driving a known bit stream
   through them gives an output stream (the *signature*) and an input-to-output
   delay (the *response time*). Removing, replacing or rewiring any filler cell
   changes one or both.
2. **Route the weak spots out.** Nets in the middle of long paths of the
   protected design are hard to control and to observe. That makes them good
   places for a Trojan to alter a LUT unnoticed. These *marked points* are
   wired to otherwise unused output ports, or, when ports run out, into gates
   of the gate chain. Either way a change to them becomes visible during a
   test.

The protected design and the fillers are never clocked together. In *normal
mode* only the protected design runs, so its timing and power are those of
the unprotected design. In *test mode* only the fillers run.

The protected design itself is not included. Its clock enable and its marked
nets are ports of the wrapper `trojan_fill_top`.

## Structure

```
                       trojan_fill_top
  test_req ──► mode_ctrl ──► main_en  (to the protected design, clk_main)
                         └─► test_en  (to the fillers, clk_test)

  marked_pts[NUM_PORT_PTS-1:0] ───────────────────────────────► x  (spare ports)
  marked_pts[upper NUM_CHAIN_PTS] ──┐
  chain_in ──► gate_chain (CHAIN_LEN stages, AND taps) ───────► chain_out
  sr_in    ──► fill_shift_reg (SR_LEN flip-flops) ────────────► sr_out
```

| file | contents |
|---|---|
| `rtl/trojan_fill_pkg.sv` | gate and mode enums; elaboration-time functions that fix each chain stage's gate, feedback source and tap |
| `rtl/gate_chain.sv` | the gate chain |
| `rtl/fill_shift_reg.sv` | the filler shift register |
| `rtl/mode_ctrl.sv` | normal/test mode switch across the two clock domains |
| `rtl/trojan_fill_top.sv` | the wrapper |
| `tb/tb_*.sv` | self-checking testbenches, described below |

## The gate chain

Each stage is one gate (one LUT) feeding one flip-flop with a clock enable
and a synchronous reset, like a Xilinx FDRE cell:

```
din ─► gate0 ─► FF0 ─► gate1 ─► FF1 ─► … ─► FF(N-1) ─► dout
```

The first input of each gate is the previous flip-flop (or `din`). The gate
is NOT, AND or OR:

* **NOT** uses only that input.
* **AND/OR** take a second input, which is one of two things:
  * *feedback*: the flip-flop of another stage, chosen by
    `trojan_fill_pkg::stage_fb`;
  * *a tap*: one of the marked points of the protected design. Tap stages are
    always AND gates and are spaced evenly along the chain
    (`tap_stage(k) = (k+1)·N/(NUM_TAPS+1)`).

A marked point stuck at 0 forces everything after its tap to a constant, so
the chain output stops moving.

The gate of every other stage comes from `MIXED`:

* **`MIXED = 0` (default): NOT-only.** Apart from the taps, every stage is a
  NOT. With all points at 1 the output is the input, delayed N cycles and
  inverted once per NOT stage (N − NUM_TAPS of them).
* **`MIXED = 1`: NOT/AND/OR with feedback.** A 32-bit hash of the stage index
  and `SEED` picks the gate: NOT 3/4 of the time, AND 1/8, OR 1/8. The hash
  also picks the feedback stage.

**Why NOT-only is the default.** In a mixed chain, a two-input gate whose
feedback input holds the controlling value (0 for AND, 1 for OR) blocks
whatever arrives on its other input. With random feedback that happens about
half the time, at every such gate. A 4910-stage mixed chain holds about 1200
such gates. So a change made more than a few dozen stages from the output
never reaches it: the tampered tap point in the middle of a full-size mixed
chain left the output stream identical in simulation. The mixed chain does
make a signature that depends on every gate near its end, and it is the right
choice for short chains (see the AND→OR case below). The NOT-only chain keeps
every stage and every tap visible at any length. The price is that it misses
one attack: removing stages in a way that keeps an alternating input pattern
unchanged. The response time still shows that.

The chain moves one stage per `clk_test` edge while `en` is high. A bit takes
exactly N enabled edges from `din` to `dout`.

## The shift register

`fill_shift_reg` is LEN flip-flops in series with a common enable and a
synchronous reset. Its only observable property is its length: a 1 entered
after a reset comes out after exactly LEN enabled edges. Taking flip-flops out
of it shortens that delay one for one.

## Mode switching

`mode_ctrl` works on clock enables, not gated clocks. `main_en` is meant for
the protected design's clock-buffer or flip-flop enables, in `clk_main`.
`test_en` drives the fillers, in `clk_test`. The reference timing is
`clk_main` at 10 ns and `clk_test` at 2 ns; the two clocks are treated as
unrelated.

The switch is break-before-make. The `clk_main` side owns the decision and
steps through four states:

| state | `main_en` | grant | leaves when |
|---|---|---|---|
| `M_NORMAL` | 1 | 0 | the synchronised `test_req` is 1 (drops `main_en`) |
| `M_STOPPING` | 0 | 0 | next edge (raises grant) |
| `M_TEST` | 0 | 1 | `test_req` is 0 **and** `test_en` has been seen at 1 (drops grant) |
| `M_RELEASE` | 0 | 0 | `test_en` is seen at 0 again (raises `main_en`) |

`test_en` is the grant passed through a `SYNC_STAGES`-deep synchroniser in
`clk_test`. It is also synchronised back into `clk_main` as the acknowledge.

* The grant rises only after `main_en` is already low, and `test_en` follows
  the grant later, so the fillers start only after the main design has
  stopped.
* `main_en` rises only after `test_en` has been seen low, and `test_en`
  cannot rise again without a new grant. So the two enables are never high
  together, however `test_req` toggles.

Two assertions in the module check this. With 2-stage synchronisers, entering
test mode takes about 4–5 `clk_main` edges plus 2 `clk_test` edges; leaving
takes about twice that. `rst` is synchronous in both domains and returns to
normal mode. Hold it for at least three edges of the slower clock.

## Running a test

1. Raise `test_req` and wait for `test_en` (or `in_test` on the main side).
2. Start from a known filler state: reset, or keep the state left by the
   last test. Fillers hold while in normal mode.
3. Clock a known bit stream into `chain_in` and `sr_in` on `clk_test`.
   Meanwhile, give the protected design test inputs that set its marked
   points to known values.
4. Compare `chain_out` with the golden signature, and the `chain_out` and
   `sr_out` delays with `CHAIN_LEN` and `SR_LEN`. Check that `x` follows the
   protected design's inputs as expected.
5. Drop `test_req`.

What the attacks look like at full size (`tb_attack_detect`, 2 ns test clock):

| attack | what changes |
|---|---|
| 1000 flip-flops removed from the shift register | delay 15682 → 14682 cycles (31.4 µs → 29.4 µs) |
| one or two NOT stages removed from the chain | delay 4910 → 4909 / 4908 cycles; signature unchanged for an alternating input, changed for a random one |
| one NOT changed to AND (feedback input) | signature |
| one AND changed to OR, near the end of a 64-stage mixed chain | signature |
| a main-design LUT feeding port `x` set to all zeros | `x` stuck at 0 for every input vector |
| a main-design LUT feeding a chain tap set to all zeros | chain output stops toggling |

Power-based detection, the other means the method relies on for large
Trojans, is outside what a logic simulation can show.

## Parameters

| parameter | default | where it comes from |
|---|---|---|
| `CHAIN_LEN` (`N`) | 4910 | the chain built for an SPI controller in the method's evaluation |
| `SR_LEN` (`LEN`) | 15682 | estimate: 20,800 flip-flops of an XA7A15T − 4910 for the chain − about 208 used by the SPI design |
| `NUM_PORT_PTS` | 1 | one marked point to a spare port |
| `NUM_CHAIN_PTS` (`NUM_TAPS`) | 1 | one marked point into the chain |
| `MIXED` | 0 | NOT-only chain (see above) |
| `SEED` | `32'h1F2E_3D4C` | any value; picks the mixed chain's gates and feedback |
| `SYNC_STAGES` | 2 | synchroniser depth, at least 2 |

The right `CHAIN_LEN` and `SR_LEN` for a given design are the numbers of
LUTs and flip-flops the design leaves free on its device. Sizing the fillers
therefore takes a first place-and-route of the protected design. Resizing
them is a parameter change.

## Departures and limits

* **Implementation flow not included.** The method also prescribes an
  implementation flow: find the mid-path nets with timing analysis, freeze the
  placed design in a checkpoint, add the fillers without disturbing it, then
  rewire the marked nets in the netlist. That flow is tool work and is not
  here; the wrapper stands for its result.
* **Gates and taps.** The gate mix, the feedback choice, the AND gate at each
  tap and the tap spacing are this design's choices.
* **Mode switch.** Clock enables with a handshake implement the rule that the
  two clocks never pulse together; how the reference design did this is not
  known.
* **Delays.** The reported SPI response times (milliseconds) cannot be
  reproduced from the stated sizes. Here the shift-register delay is SR_LEN
  test clocks.
* **Signature values.** The signature values depend on the chain's exact gate
  map, so a signature of this RTL is not comparable with numbers measured on
  another chain.

## Simulating

Every testbench prints one line `TB_RESULT checks=N failures=M` and exits.
With Verilator 5, from the folder holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl rtl/trojan_fill_pkg.sv \
          tb/tb_trojan_fill_full.sv --top-module tb_trojan_fill_full
./obj_dir/Vtb_trojan_fill_full
```

| testbench | what it shows |
|---|---|
| `tb_gate_chain` | 8-stage NOT chain against hand-derived delay and inversion, stuck tap; 40-stage mixed chain against a model, enable hold, reset, signature |
| `tb_fill_shift_reg` | delay of exactly LEN, hold, reset, random traffic |
| `tb_mode_ctrl` | enables never overlap under random and glitchy requests; entry and exit times; reset |
| `tb_trojan_fill_top` | the whole test procedure at small sizes, a run with stuck chain points, each mechanism counted |
| `tb_trojan_fill_full` | the same at the default sizes (about 30 s to build, seconds to run) |
| `tb_attack_detect` | the attack table above, at full size (about 90 s to build) |
