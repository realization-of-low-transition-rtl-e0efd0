# Low-transition LFSR test pattern generator and BIST for C17

Test patterns from a plain LFSR are nearly uncorrelated from one clock to the
next. About half of the circuit-under-test (CUT) inputs flip on every vector,
so a circuit under built-in self-test switches much harder than it does in
normal use. This design puts three intermediate vectors between every two
successive LFSR vectors. It builds them so that a bit that differs between
LFSR vectors T1 and T2 toggles exactly once across T1 → Ta → Tb → Tc → T2.
So each applied vector changes the CUT inputs about four times less often
than a plain LFSR would. The intermediate vectors are still pseudo-random and
serve as test patterns too.

The generator (the LP-LFSR) sits in a small test-per-clock BIST that tests the
ISCAS-85 C17 benchmark. It has a stuck-at fault injection port, two signature
registers, a response analyzer and a control unit with an interrupt.

```
            seed_i                       func_in_i
              |                              |
   +----------v---------+   pattern[4:0]  +--v--+      +-----------+   +------+
   | lp_lfsr (8 FF +    |---------------->| mux |--+-->| c17 (test)|-->| misr |--+
   | shaded FF +        |                 +-----+  |   +-----------+   +------+  |   +-----+
   | injectors)         |        test_mode ---^    |         ^ fault_i           +-->| tra |--> pass/error
   +--------------------+                          |   +-----------+   +------+  |   +-----+
          ^ load/en                                +-->| c17 (ref) |-->| misr |--+      |
          |                                            +-----------+   +------+         v
   +------+------------------------------------------------------------------------------+
   | bist_ctrl: IDLE -> LOAD -> RUN (N_VECTORS) -> CHECK -> DONE ; irq_o, interrupt_clear_i |
   +-----------------------------------------------------------------------------------------+
```

## The LP-LFSR (`rtl/lp_lfsr.sv`)

### Structure

There are eight flip-flops, numbered 1 to 8 and held in `q[7:0]` with
flip-flop 1 as the MSB. There is also one extra flip-flop, called *shaded*
here. The eight form two halves:

* **First half, FF1–FF4.** FF1 takes `FF1 xor FF8`. FF2–FF4 shift from the
  flip-flop on their left.
* **Shaded flip-flop.** It is clocked with the first half and stores the old
  FF4. The second half shifts in that stored bit later.
* **Second half, FF5–FF8.** FF5 takes the shaded flop. FF6–FF8 shift.

Each half has a clock enable of its own. Each flip-flop has an **injector**
that compares its current value Q with its next value D:

```
inj = (Q == D) ? Q : R          R = output of FF8
```

A bit that will not change is passed as it is. A bit that is about to change
is replaced by the random bit R. So it flips either now or at the next step,
but never twice.

### The four-step cycle

Each clock with `test_en_i` high moves to the next vector:

| step | clocked                  | `pattern_o`                          |
|------|--------------------------|--------------------------------------|
| T    | first half + shaded flop | flip-flops                           |
| Ta   | nothing                  | first half as is, second half through injectors |
| Tb   | second half              | flip-flops                           |
| Tc   | nothing                  | first half through injectors, second half as is |

Over the four steps the eight flip-flops move exactly as one step of an ordinary
8-bit LFSR, `L' = {L[7]^L[0], L[7:1]}`. With `L_k` as that LFSR's states, the
vectors are:

* T_k = {first half of L_k, second half of L_(k-1)}
* Tb_k = L_k
* Ta and Tc are the injected mixes between those vectors.

Worked sequence from the seed `0100_1011`. The testbench checks it bit for bit.

| vector | FF1..FF8    | note |
|--------|-------------|------|
| seed   | `0100 1011` | shown for one cycle after `load_i` |
| T1     | `1010 1011` | first half shifted, FF1 = 0 xor 1 |
| Ta     | `1010 1111` | second half 1011 → next 0101; three bits change, R = 1 |
| Tb     | `1010 0101` | second half shifted |
| Tc     | `1111 0101` | first half 1010 → next 0101; all four change, R = 1 |
| T2     | `0101 0101` | |

### Timing

* `load_i` has priority over `test_en_i`. It loads `seed_i`, and the seed
  appears on `pattern_o` in the next cycle (`phase_o = PH_SEED`).
* After that, every clock with `test_en_i` high presents the next vector:
  T, Ta, Tb, Tc, T, …
* `pattern_o` is combinational from the registers. `phase_o`
  (`bist_pkg::lp_phase_t`) says which vector is on it.

### Properties worth knowing

* **Toggle count.** Between T_k and T_(k+1) the four steps toggle exactly
  `hamming(T_k, T_(k+1))` bits. Over 400 vectors from seed `4B`, the sequence
  toggles 426 bits. Counting the plain LFSR's step toggles four times, to cover
  the same number of vectors, gives 1700.
* **Feedback.** `FF1 xor FF8`, polynomial x^8 + x^7 + 1, is *not* maximal
  length. The seed `4B` lies on a cycle of 63 states, and other seeds give
  other cycles. An all-zero seed stays at zero.
* **Test length.** The default `N_VECTORS` = 252 is 4 × 63, one full pass
  around the cycle of the default seed.
* **Changing the feedback.** To use different taps, change `first_d` and
  `r_bit`. The testbench model (`lfsr_step`) must follow.
* **`WIDTH`.** Any even width ≥ 4 works. The halves are `WIDTH/2` bits, and the
  feedback stays first xor last flip-flop.

## BIST around the generator

### Control unit (`rtl/bist_ctrl.sv`)

One test runs per `start_i` pulse:

| state | cycles      | what happens |
|-------|-------------|--------------|
| LOAD  | 1           | CUT in test mode, seed loaded, both MISRs and the analyzer cleared |
| RUN   | `N_VECTORS` | one vector applied and one response compacted per clock; the generator steps every clock |
| CHECK | 1           | analyzer compares the signatures |
| DONE  | until next start | `done_o` high, CUT back in normal mode, `pass_o`/`error_o` valid |

* **Timing:** `done_o` rises `N_VECTORS + 2` cycles after the edge that
  accepted `start_i`.
* **Which vectors are applied:** the seed vector is the first of the
  `N_VECTORS`.
* **Interrupt:** on an error, `irq_o` rises the cycle after `done_o`. It stays
  high through later tests until `interrupt_clear_i` is asserted. An error in
  the same cycle as a clear wins.
* **Normal mode:** outside a test the CUT inputs come from `func_in_i`, and
  `func_out_o` shows the tested C17's outputs.

### Circuit under test (`rtl/c17.sv`)

The standard ISCAS-85 C17 netlist: five inputs, six 2-input NANDs, two outputs.

* **Input order:** `in_i = {N1,N2,N3,N6,N7}`, and `out_o = {N22,N23}`.
* **Fault injection:** `fault_i` (`bist_pkg::stuck_fault_t`: enable, net,
  value) forces any one of the 11 nets stuck at 0 or 1. Nets are numbered
  inputs first, then gates, as in `bist_pkg::c17_net_t`.
* **Inputs in test mode:** the CUT takes the low five bits of the pattern
  (FF4–FF8).

### Signatures and analysis (`rtl/misr.sv`, `rtl/tra.sv`)

* **Two MISRs.** Each is a 9-bit internal-XOR MISR with polynomial
  x^9 + x^5 + 1 that takes the two C17 outputs. One compacts the tested C17's
  responses. The other compacts a fault-free reference copy fed with the same
  vectors.
* **Analyzer.** It registers pass = (signatures equal) and error = (they
  differ) one cycle after `check_i`.
* **Aliasing.** A MISR can alias, so a fault could in principle pass. With the
  default seed and length, all 22 single stuck-at faults of C17 are detected.

## Top-level interface (`rtl/bist_top.sv`)

Parameters: `WIDTH` = 8, `SIG_WIDTH` = 9, `N_VECTORS` = 252.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start_i` | in | 1 | start a test |
| `seed_i` | in | WIDTH | generator seed, sampled in the LOAD cycle |
| `interrupt_clear_i` | in | 1 | clear `irq_o` |
| `func_in_i` / `func_out_o` | in / out | 5 / 2 | C17 inputs in normal mode; outputs of the tested C17 |
| `fault_i` | in | 6 | stuck-at fault on the tested C17 |
| `test_mode_o`, `busy_o`, `done_o` | out | 1 | test running / finished |
| `pattern_o`, `phase_o` | out | WIDTH, 3 | current vector and its step |
| `pass_o`, `error_o`, `irq_o` | out | 1 | result and interrupt |
| `sig_ref_o`, `sig_test_o` | out | SIG_WIDTH | the two signatures |

`bist_pkg` holds the shared types and the C17 sizes.

## What follows the published design and what does not

Taken from the published description:

* the split LFSR with its shaded flip-flop
* the feedback taps `FF1 xor FF8`
* R as the output of FF8
* the injector rule
* the T/Ta/Tb/Tc order and the 8-bit width

The worked example above reproduces its vectors exactly.

The description also claims a maximal-length sequence that includes the
all-zero and all-ones states. The stated taps cannot produce that, so the taps
were kept and the claim dropped.

These are this design's own choices:

* **Clocking:** one vector per clock, with a seed-display step after loading.
* **Ports:** a synchronous seed load, and the reset.
* **Signature reference:** a fault-free reference copy of C17 with its own
  MISR. A real BIST would normally store a golden signature instead.
* **MISR:** its polynomial. The 9-bit width matches the signature width used
  in the published simulation.
* **Control unit:** its state sequence and timing, the test length, the
  start/done/busy handshake and the interrupt behaviour.
* **CUT connection:** the pattern-bit-to-CUT-input mapping and the fault
  injection port.

Not included:

* **PRESTO**, the programmable low-power generator (hold latches, toggle
  control register, weighted hold/toggle timing). It is only a point of
  comparison.
* **Column-matching decoders** for mixed-mode BIST. They are background.
* **Adder circuits.** The published simulation also shows adder-like signals
  (`sum9`, `sum5`, `carry9`, …) that are not otherwise described.

The published FPGA figures (81 LUTs, 76 flip-flops for the whole test setup)
cannot be compared one to one. This RTL synthesizes to 47 flip-flop bits,
including both MISRs.

## Verification

Each testbench in `tb/` checks its block against an independent model and
prints `TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `lp_lfsr_tb` | the worked example; 1200 vectors from three seeds against a model built on a plain LFSR; the one-toggle-per-changing-bit property; hold and reload |
| `c17_tb` | all 32 inputs fault-free; all 22 stuck-at faults against a gate model; every fault observable |
| `misr_tb` | 2000 random cycles against polynomial arithmetic; a single-bit response error changes the signature |
| `tra_tb` | random equal and one-bit-different signature pairs, result timing, hold and clear |
| `bist_ctrl_tb` | the control schedule cycle by cycle for `N_VECTORS` = 7 and 252; `done_o` timing; interrupt set, hold and clear |
| `bist_top_tb` | the whole BIST at default parameters (see below) |

`bist_top_tb` runs the whole BIST at default parameters and checks:

* every applied vector and its step
* both signatures, and pass/error
* the interrupt and its clear
* normal-mode operation

It runs a fault-free test, one test for each of the 22 stuck-at faults (all
detected), and tests from random seeds. It counts how often each mechanism
occurred and fails if any never did. It finishes in well under a second.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/bist_pkg.sv tb/bist_top_tb.sv \
          --top-module bist_top_tb
./obj_dir/Vbist_top_tb
```

Replace the testbench file and top module to run another bench. `-y rtl` lets
Verilator find the modules in `rtl/` by name.
