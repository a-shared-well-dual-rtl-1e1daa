# Dual-supply 64-bit ALU with a sparse radix-4 adder: RTL model

This is a logic-level model of a 64-bit integer ALU module built for a six-issue execution
unit. In the circuit it models, the critical path is the single-cycle loop: operand
multiplexer, adder carry tree, sum select, and the long loop-back bus that carries the
result back to the operand multiplexers of all six ALUs. That loop runs from the nominal high
supply (VDDH). Everything that has slack runs from a second, lower supply (VDDL) to save
energy. This covers the sum-precompute gates, the logic unit, the bus driver and the bus
receiver. Both supplies share one n-well, so VDDH and VDDL cells can sit next to each other
in a bit slice.

The logic function of all of this is an ordinary ALU. It executes ADD, SUB, AND, OR and XOR,
one operation per clock, and any ALU can use any result in the next cycle. The supply split,
the domino circuit style and the level converters have no logic function of their own. They
appear in the RTL only as comments that say which domain each block belongs to. The RTL
models these parts:

* the ALU datapath, including its sparse carry-lookahead adder;
* the forwarding network of six ALUs;
* the on-chip test circuitry of the test chip. This is a delay-measurement loop with a data
  generator, two skewed data registers and a comparator, plus a 2^10 frequency divider and a
  hardwired functional self-test.

## The sparse radix-4 adder

The adder is the part that needs explanation. A full radix-4 Kogge-Stone tree computes all 64
carries in three levels of 4-input prefix gates. This adder computes only the carry into every
fourth bit, which is a sparseness of 4. That leaves 16 carries instead of 64, so the tree needs
far fewer gates and wires:

| level   | what each node computes                                              | nodes |
|---------|----------------------------------------------------------------------|-------|
| G/P     | per-bit generate `g = a & b`, propagate `p = a ^ b` (`gp_gen`)         | 64    |
| G4/P4   | generate/propagate of one aligned 4-bit group                        | 16    |
| G16/P16 | group *j* merged with groups *j-1, j-2, j-3*                          | 16    |
| G64     | G16 node *j* merged with nodes *j-4, j-8, j-12*: generate of bits 0..4j+3 | 16    |

Every merge is the radix-4 prefix operator:

    G = G3 | P3&G2 | P3&P2&G1 | P3&P2&P1&G0        P = P3&P2&P1&P0

Node 3 is the most significant input. Inputs below bit 0 are the identity (G = 0, P = 1).
The carry-in is folded into the generate of bit 0. `carry[j]`, the carry into bit 4j, is
`cin` for j = 0 and the G64 output of group j-1 otherwise (`carry_gen`).

The sum logic does the work the tree no longer does. Working ahead of the carries, and from
the low supply, `partial_sum` forms two candidate sums for every 4-bit group: s0 assumes a
carry of 0 into the group and s1 a carry of 1. Inside the group the carry ripples over four
bits. `sum_sel` then picks `sum[i] = carry[i/4] ? s1[i] : s0[i]`. The logic unit (`logic_unit`)
shares the s0/s1 lines. For AND/OR/XOR it drives the same result onto both lines, and the
partial sum is disabled. The sum selector then passes the result through whatever the
carries are. For ADD/SUB it is the other way round. Since the disabled block outputs 0, the
lines are simply the OR of both blocks.

SUB is computed as `a + ~b + 1`. The b operand passes a true/complement 2:1 multiplexer, and
the captured carry-in is 1.

The longest carry path starts at a generate in one group and ends at a sum bit many groups
higher. The data generator's critical-path vector exercises it:
`00FFFFFFFFF80000 + 0000000000080000 = 0100000000000000`. Here the generate at bit 19
propagates through bit 55 and selects sum bit 56.

## Operand selection and the loop-back bus

Each ALU module (`alu_module`) has two operand paths (`operand_selector`):

    a:  9:1 mux (ain0) -> 5:1 mux -> GP generator
    b:  9:1 mux -> 2:1 true/complement mux -> GP generator

Legs 0..5 of both 9:1 multiplexers receive the loop-back buses `sumb` of ALU 0..5, including
the ALU's own bus. Legs 6..8 and legs 1..4 of the 5:1 multiplexer are external register-file
and cache inputs (`ext_a9`, `ext_b9`, `ext_a5`). Leg 0 of the 5:1 multiplexer is ain0.

The bus carries the inverted sum: the output buffer INV1 drives `sumb = ~sum`. An inverter
(INV2) next to the multiplexer receives it, so each forwarded leg sees the true value. In the
circuit the multiplexers are domino gates with one select transistor per leg. For that
reason the selects are one-hot, and a multiplexer with no select asserted outputs 0. An
assertion in `alu_module` checks that at most one leg of each multiplexer is selected.

How the nine and five legs are assigned to sources is this model's choice. The source design
says only that operands come from the register files, the cache or the other ALUs.

## Timing

There is one clock edge per cycle, at the input of the GP generator. The circuit has two hard
edges, at the GP generator and at the sum selector; all other edges are soft. The second hard
edge is a clock phase of the same cycle, so it has no register here. The behaviour is:

* Operands, selects and op presented before rising edge *n* are captured by `gp_gen`.
* The result is on `sum` and `sumb` right after edge *n*, and stays there until edge *n+1*.
* A dependent operation in any ALU selects that bus before edge *n+1*. Back-to-back dependent
  operations therefore run at one per cycle with a latency of one cycle.

The asynchronous active-low reset clears the captured operands and op, so every result reads 0
after reset. This reset is an addition of this model.

`clk_en = 0` stops one ALU's clock. The captured operands are then held, and the result stays
on the bus.

## The test chip (`alu_testchip`)

The top level holds six ALU modules on the shared forwarding network, plus test circuitry
attached to ALU 0. `test_mode` selects one of three modes:

* `TM_NORMAL`: all six ALUs run from the `op`, `sel_*` and `ext_*` ports.
* `TM_DELAY` measures the loop delay. It breaks the loop of ALU 0 at its GP input, where
  `data_gen` now supplies operands and op. The other end of the loop is the a-operand
  multiplexer output `ain_loop`, selected as in normal operation (normally ALU 0's own bus).
  Two registers capture it:
  * Data Reg 1 (`test_ff`) captures it on `clk`.
  * Data Reg 2 captures it on `clk_late`, a slightly delayed copy of `clk`.

  `pass_fail_comparator` raises `delay_fail` when the two registers differ, meaning the early
  register missed the data. `delay_fail_seen` is a sticky version of that flag. On silicon,
  the clock frequency is raised until this output toggles. The patterns are `PAT_CRIT` (the
  critical-path addition) and `PAT_POWER` (all-ones plus all-ones, which evaluates every node).
  Each alternates with 0 + 0 so that the datapath switches every cycle.
* `TM_FUNC` runs the self-test. `data_gen` steps through eight hardwired vectors with
  precomputed results: the two additions above, two SUBs, one ADD, and AND, OR and XOR.
  `func_checker` compares each result one cycle after its vector was presented, counts
  mismatches in `func_errors`, and raises `func_done` and `func_pass`. This test is meant to
  run from a slow clock.

`freq_divider` outputs `clk / 2^10` on `fmax` in every mode.

`alu_clk_en` holds one clock enable per ALU. The power measurement uses it: power is compared
with *n* and with *n+1* ALUs clocked, so the difference is one ALU's power without the test
circuitry's share.

The self-test is meant to run from a slow external clock. Choosing between that clock and the
ring oscillator belongs to the control circuitry, so `clk` may come from either.

The ring oscillator that makes `clk`, the clock driver, the small delay that makes
`clk_late`, the load capacitance and the chip's control circuitry are not logic. Their
signals enter as ports.

A zero-delay simulation has no path delay, so the ALU output changes at the clock edge
itself. If `clk_late` lags `clk`, Data Reg 2 therefore sees the next result, and the
comparator reports a miss. With `clk_late` tied to `clk` it reports pass. The end-to-end
testbench uses both cases to check the comparator path. The comparator does not measure
timing in simulation.

## Files

| file | contents |
|------|----------|
| `rtl/alu_pkg.sv` | widths and counts, `alu_op_e`, `alu_ctrl_t`, test-mode and pattern enums, op decoder |
| `rtl/onehot_mux.sv` | one-hot AND-OR multiplexer (helper) |
| `rtl/operand_selector.sv` | 9:1 / 5:1 / 9:1 + 2:1 operand paths, INV2 receivers, loop break |
| `rtl/gp_gen.sv` | operand and op register, per-bit g/p |
| `rtl/carry_gen.sv` | sparse radix-4 carry tree |
| `rtl/partial_sum.sv` | conditional group sums s0/s1 |
| `rtl/logic_unit.sv` | AND/OR/XOR onto s0/s1 |
| `rtl/sum_sel.sv` | carry-driven sum select |
| `rtl/alu_module.sv` | one ALU module |
| `rtl/data_gen.sv`, `rtl/test_ff.sv`, `rtl/pass_fail_comparator.sv`, `rtl/func_checker.sv`, `rtl/freq_divider.sv` | test circuitry |
| `rtl/alu_testchip.sv` | top: six ALUs plus test circuitry |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Parameters: `W` (64) on every datapath module, and `LOG2_DIV` (10) on the divider and the top.
The package fixes the sparseness (4), the number of ALUs (6) and the multiplexer sizes (9 and
5). `data_gen` holds 64-bit constants and is written for `W = 64`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Each one
stops itself after a fixed number of cycles if something hangs. To build and run one with
Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl \
        rtl/alu_pkg.sv tb/tb_alu_testchip.sv --top-module tb_alu_testchip -o sim
    ./obj_dir/sim

Replace the testbench name to run another one. The testbenches reset everything they read,
so they also pass with random initial values (`+verilator+rand+reset+2`).

`tb_alu_testchip` runs the full-size design (64 bits, six ALUs, 2^10 divider) in under a
second:

* 1500 cycles of random operations on all six ALUs, with random forwarding. About one ALU
  clock in ten is stopped. A reference model built from the SystemVerilog operators checks
  every bus every cycle.
* The functional self-test.
* The delay measurement, once with a matched clock (must pass) and once with a skewed clock
  (must flag).
* 1000 more cycles, so that `fmax` toggles several times; each toggle must come 512 cycles
  after the last.

It counts how often each mechanism happens and fails if one never does. The mechanisms are:
forwarding from another ALU, forwarding from the ALU's own bus, external legs, each of the five
ops, stopped ALU clocks, the critical-path and all-ones vectors, self-test pass, comparator
pass and fail, and divider toggles.

The block testbenches compare against independently computed values:

* carries from plain addition of the masked operands;
* group sums from 4-bit additions;
* logic results from the operators;
* multiplexer outputs from the selected source.

## Where this model departs from the circuit, and how far to trust it

* The circuit is domino logic with precharge and evaluate phases, footless gates and delayed
  precharge clocks. This model is static logic with one register stage. It reproduces the
  cycle-level behaviour, not the phases.
* Level conversion, the complementary-carry generator in the sum select, keepers and the
  VDDH/VDDL assignment are electrical and are left out. So are the shared-well cells, the
  supply rails and the 0.5 pF bus load.
* The carry tree has the three levels and the sparseness of the source design. The node
  wiring within each level follows the regular Kogge-Stone pattern, because the exact wires of
  the sparse tree are only drawn, not specified. Any correct prefix wiring gives the same
  carries.
* The gates inside the sum-precompute block are not given. A 4-bit ripple per group is used.
* The assignment of sources to multiplexer legs is this model's own, and so are the op and
  mode encodings, the reset, and the port layout of the top. The test circuitry
  attaches to ALU 0, its data registers capture all 64 bits, the comparator output is
  registered and has a sticky flag, the functional test uses eight vectors (six of them
  chosen here) and every test pattern alternates with 0 + 0.
* Stopping an ALU's clock is modelled as an enable on its operand register, not as a gated
  clock.
* The ALU has no carry-out or flag outputs, because none are described.
* Timing, energy and leakage (the reason for the dual supply) cannot be judged from RTL.
