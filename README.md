# Scan-chain-disable test infrastructure for low-power scan test

Conventional full scan clocks every scan flip-flop on every shift and on every
capture cycle, and the resulting switching can exceed what the chip is built to
dissipate. This design splits the scan flip-flops of a circuit into `N` scan
chains and clocks **only one chain at a time, in shift and in capture alike**.
Switching is confined to one chain and the logic it feeds, so both the average
and the peak test power fall to roughly `1/N` of conventional full scan. The
extra hardware is small: a clock controller (a decoder plus one clock gate per
chain) and an `N`-to-1 multiplexer in front of Scan-out.

The price is test time and test planning. A fault whose effect reaches only a
disabled chain is not seen, so some vectors must be applied more than once with
different chains active. Vectors are therefore applied in *D-compatible
subsets*: runs of vectors that capture into the same chain and agree on every
bit of the other chains, so that only the active chain needs reloading between
them. Choosing which flip-flop goes into which chain, and which chain captures
each vector, is an offline optimisation done when the test is prepared. It is
not hardware and is not part of this RTL.

## Structure

```
              scan_in ─────────────┬──────────────┬───────────────
              scan_en ─────────────┼──┬───────────┼──┬────────────
                                   v  v           v  v
                              ┌─────────────┐ ┌─────────────┐
                              │ scan_chain 0│…│ scan_chain N-1   ──> chain_out[k]
                              └─────────────┘ └─────────────┘          │
                               ^ gclk[0]  ^ ff_d/ff_q  ^ gclk[N-1]     v
   clk, tc, cs ──> clock_controller ──────┘                      scan_out_mux ──> scan_out
                   (decoder + clock_gate per chain)                 ^ cs
```

| file | role |
|---|---|
| `rtl/scan_pkg.sv` | chain sizes, width of `cs`, test-time formula |
| `rtl/clock_gate.sv` | latch-based glitch-free clock gate |
| `rtl/clock_controller.sv` | decodes `tc`/`cs` into per-chain clock enables and gates `clk` |
| `rtl/scan_chain.sv` | one chain of mux-D scan flip-flops |
| `rtl/scan_out_mux.sv` | selects the active chain's serial output |
| `rtl/scan_disable_top.sv` | the whole scan structure (top) |

The circuit's combinational logic is **outside** `scan_disable_top`. The
flip-flop outputs leave on `ff_q` and the next-state values return on `ff_d`.
Primary inputs and outputs go straight between the tester and the logic and do
not pass through this module.

## Modes

| `tc` | `scan_en` | what happens on a rising `clk` |
|---|---|---|
| 1 | 1 | the chain selected by `cs` shifts one bit from `scan_in`; the other chains hold |
| 1 | 0 | the chain selected by `cs` captures its `ff_d` bits; the other chains hold |
| 0 | 0 | normal operation: every chain captures `ff_d` |
| 0 | 1 | every chain shifts in parallel from the shared `scan_in` |

`scan_out` always shows the last flip-flop of the chain selected by `cs`. A
`cs` value of `NUM_CHAINS` or more (possible when `N` is not a power of two)
clocks no chain in test mode, and `scan_out` is then 0.

`tc` and `cs` must be stable before `clk` rises. The clock gate latches its
enable while `clk` is low. A change during the high phase therefore cannot cut
a pulse short or create one; it takes effect on the next edge.

## Chain layout and how to attach a circuit

With `L = ceil(NUM_FF / NUM_CHAINS)`, chain `k` holds the flat indices
`[k*L +: len_k]` of `ff_q`/`ff_d`. Every chain holds `L` flip-flops except the
last, which holds the remainder. The default, 669 flip-flops in 4 chains, gives
chains of 168, 168, 168 and 165. Within a chain, index `k*L` is next to
`scan_in` and index `k*L + len_k - 1` drives the chain's serial output.

The grouping is fixed by wiring. To put circuit flip-flop *j* into chain *k*,
connect its logic to one of chain *k*'s index positions. Order within a chain
does not matter to the scheme. The configuration check in `scan_disable_top`
stops elaboration when `NUM_FF` cannot be split into `NUM_CHAINS` non-empty
chains of this form (for example 5 flip-flops in 4 chains).

## Applying a test, and what it costs

The tester works subset by subset:

1. **First vector of a subset:** for `cs = 0 … N-1`, shift `L` cycles with
   `tc = 1`, `scan_en = 1`. This loads every chain. At the same time it
   unloads the previous response from the chain that captured it.
2. **Capture:** one cycle with `scan_en = 0` and `cs` set to the subset's
   active chain. Only that chain captures. The other chains keep the vector's
   bits.
3. **Further vectors of the same subset:** shift only the active chain for `L`
   cycles, which unloads the last response and loads the new bits. The
   disabled chains already hold the right values, because the subset agrees on
   them. Then capture again.
4. After the last vector, shift the last active chain `L` more cycles to
   unload its response.

A chain shorter than `L` is still shifted `L` cycles. Its first bits shifted in
simply fall off the end, and its response comes out in the first `len_k`
cycles.

For `n` original vectors, `r` repeated vectors and `M` subsets, the test takes

```
TAT = M*L*(N-1) + (n+r+1)*(L+1) - 1   clock cycles
```

This is `M*N*L` cycles for full loads, `(n+r-M)*L` for single-chain loads,
`n+r` captures and a final `L`-cycle unload. `scan_pkg::test_time` computes it.

**Worked example (4 flip-flops, 2 chains of 2).** Flip-flops 1 and 2 form chain 0;
flip-flops 3 and 4 form chain 1. Four test cubes need five applications. Cubes
1 and 2 (`1100`, `00xx`) capture in chain 0. Cubes 3 and 4 (`x110`, `0101`)
capture in chain 1. Cube 3 is then applied again with chain 0 capturing, for a
fault that only chain 0 observes. The X's in disabled chains are filled to
match the subset partner: cube 2 becomes `0000` and cube 3 becomes `0110`. The
remaining X of the repeated cube is free. That gives `n = 4`, `r = 1`, `M = 3`
and `TAT = 3*2*1 + 6*3 - 1 = 23` cycles. `tb_scan_disable_top` applies exactly
this sequence and measures 23.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_FF` | 669 | scan flip-flops of the circuit (the largest benchmark circuit, s13207) |
| `NUM_CHAINS` | 4 | number of chains `N` |
| `CS_W` | `ceil(log2 N)` | width of `cs` |

The scheme was evaluated on ISCAS89 full-scan circuits with 18 to 669 flip-flops
(s838: 32, s953: 29, s1196: 18, s1238: 18, s1423: 74, s9234: 211, s13207: 669)
and `N = 2, 3, 4`. Every one of these sizes elaborates and passes the random
test in `tb_table2_workloads`. The benchmark logic itself is not included, so
those runs attach a stand-in circuit. Any circuit up to 669 flip-flops can sit
on the default 4-chain instance, but shifts are then 168 cycles long;
set `NUM_FF` to the real count to get the shortest test.

## Design choices beyond the scheme

- Clock gating uses a latch-plus-AND gate per chain rather than a bare AND gate.
  Synthesis therefore reports one latch per chain; this is intentional.
- Scan cells are mux-D flip-flops with an asynchronous active-low reset
  (`rst_n`) that clears all chains. The scheme itself does not specify a reset.
- An out-of-range `cs` clocks nothing and reads 0.
- An assertion in `clock_controller` checks that at most one chain is enabled
  in test mode.
- The scheme is described for a single clock domain. Multiple clock domains
  would need one controller per domain and lock-up latches between domains.
  That variant is not built.

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog if it hangs. Build and run one with plain Verilator, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/scan_pkg.sv tb/tb_scan_disable_top.sv --top-module tb_scan_disable_top
./obj_dir/Vtb_scan_disable_top
```

| testbench | what it checks |
|---|---|
| `tb_clock_controller` | pulse counts per gated clock for random `tc`/`cs`, out-of-range select, changes of `tc`/`cs` while `clk` is high |
| `tb_scan_chain` | shift, capture and withheld clock against a bit-level reference, for lengths 7 and 1; asynchronous reset |
| `tb_scan_out_mux` | exhaustive, 3 chains with a 2-bit select |
| `tb_scan_disable_top` | the 23-cycle worked example, then a random test on 32 flip-flops in 3 chains; counts full reloads, single-chain reloads, one-chain captures, repeated vectors, disabled-chain holds and normal-mode captures, and fails if any never occurs |
| `tb_scan_disable_top_full` | the default 669/4 instance through a 12-subset random test |
| `tb_table2_workloads` | all seven benchmark sizes at `N = 2, 3, 4` |

`tb/scan_tester.sv` is the shared tester and circuit stand-in. It checks every
bit on `scan_out`, using expected values derived from the test set alone. It
checks `ff_q` before and after every capture, so disabled chains must visibly
hold. It also compares the number of clock pulses with the `TAT` formula.
`tb/scan_bench.sv` pairs one top instance with one tester. The stand-in circuit
logic is `d[i] = q[i] ^ q[i+1] ^ (q[i+2] & ~q[i+3]) ^ (i mod 3 == 0)` (indices
modulo `NUM_FF`). It is arbitrary: the scan structure does not depend on it.

Power is not modelled. The power reduction comes from clocking one chain at a
time, and the tester verifies this on every test-mode edge. Any flip-flop that
toggles outside the selected chain is an error. The peak number of toggling
flip-flops per cycle must also stay at or below `L`. The tester prints the
total and peak toggle counts, but these are flip-flop toggles only. They are
not the weighted switching of the circuit logic, which would need the real
netlist.
