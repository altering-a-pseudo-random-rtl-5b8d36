# Bit-fixing sequence generator for test-per-scan BIST

Scan-based built-in self-test usually feeds the scan chain from an LFSR and
compacts the responses in a signature register. A few faults are hard to
reach with pseudo-random patterns ("random-pattern-resistant" faults), so
pure LFSR patterns rarely reach full fault coverage. This design fixes that
without touching the circuit under test and without storing patterns in a ROM.
A small block of logic at the LFSR's serial output forces chosen bits of
chosen patterns to 0 or 1. The altered patterns then contain deterministic
test cubes for the missing faults. Patterns that already detect faults pass
through unchanged, so no coverage is lost.

The hardware needs only a few parts:

* the LFSR;
* the bit counter that every test-per-scan controller has anyway;
* a few AND terms that pick a "bit-fixing sequence" for each pattern from
  the LFSR state;
* a short register that holds the chosen sequence ID;
* a decode of the counter that drives two control lines, fix-to-0 and
  fix-to-1.

The test runs as a single phase of `L` patterns.

## How one pattern is produced

The scan chain has `M` cells, and the counter has `M+1` states:

| counter | what happens |
|---|---|
| 0 (capture state) | The scan chain holds a complete pattern, which is applied to the circuit under test. Its response is captured into the chain (`cut_capture`). The LFSR does not move, so its state is the *starting state* of the next pattern. The selection logic decodes this state, and the Sequence ID Register loads the result at the end of the cycle. |
| 1 .. M ("cnt-j") | The LFSR shifts one bit. The fixing gates can force that bit. It goes into the scan chain while the previous response comes out into the signature register. |

Sequence ID bit `i` is active for a pattern when the LFSR's starting state
matches an implicant: a set of stage values, decoded by one AND gate. While
bit `i` is active, the generation logic raises fix-to-0 in the counter states
listed in `FIX0[i]`, and fix-to-1 in the states listed in `FIX1[i]`. Several
bits can be active for the same pattern; their controls are ORed together.
An `N`-bit register can therefore choose between `2^N` bit-fixing sequences
for each pattern.

The implicants are chosen so that they never cover the starting state of a
pattern that detects faults for the first time. That is why the scheme never
loses coverage. The LFSR does not shift in the capture state, so consecutive
patterns are consecutive `M`-bit slices of the LFSR sequence.

## Bit ordering

This ordering is the easiest thing to get wrong when you fill in the tables
for another circuit.

* **LFSR states** are written leftmost stage first, as a Verilog literal:
  `5'b01011` is the state "01011". The serial output is the rightmost stage
  (bit 0). Each shift moves the stages one place right, and the feedback
  enters the leftmost stage (bit `R-1`).
* **Scan patterns** are written the same way. Bit 0 of a pattern is the
  first bit shifted in, and after `M` shifts it sits in the cell next to
  scan-out (`cut_in[0]`). As a result, the last `R` bits of every unaltered
  pattern equal its LFSR starting state.
* **Fix tables:** bit `j-1` of `FIX0[i]` or `FIX1[i]` refers to counter
  state `cnt-j`, which is the `j`-th bit shifted in. That is pattern bit
  `j-1`.

## The example configuration (defaults)

All parameter defaults come from `rtl/bfsg_pkg.sv`. They describe a small
worked example:

* a 5-stage LFSR;
* a 12-cell scan chain;
* 12 patterns;
* 20 faults, of which the unaltered pseudo-random patterns detect 16.

| Item | Value |
|---|---|
| LFSR feedback | x^5 + x^2 + 1, i.e. `o[k+5] = o[k] ^ o[k+2]` (`TAPS = 5'b00101`) |
| Seed | `01011` |
| Sequence ID bit 0 | starting state `00XXX` (two leftmost stages both 0) |
| Sequence ID bit 1 | starting state `XX11X` (third and fourth stages both 1) |
| bit 0 fixes | cnt-1 → 0, cnt-10 → 1 |
| bit 1 fixes | cnt-2 → 0 |
| Signature register | 16 bits, x^16 + x^12 + x^5 + 1 (this design's own choice) |

The table below lists the twelve patterns. "Altered" is what actually reaches
the circuit.

| start | LFSR pattern | altered | note |
|---|---|---|---|
| 01011 | 010000101011 | = | detects faults |
| 11010 | 111110011010 | = | detects faults |
| 11000 | 010111011000 | = | detects faults |
| 00001 | 110100100001 | 111100100000 | ID bit 0; holds cube `111X00XXXX00` |
| 11100 | 110001111100 | = | detects faults |
| 01110 | 000010101110 | 000010101100 | ID bit 1 |
| 01001 | 111001101001 | = | |
| 00011 | 011101100011 | 011101100010 | ID bit 0; holds cube `01XX01XXXX10` |
| 00101 | 010010000101 | 011010000100 | ID bit 0 |
| 10011 | 000111110011 | = | detects faults |
| 11011 | 001010111011 | = | |
| 00100 | 100110100100 | 101110100100 | ID bit 0; holds cube `101X10XXXX0X` |

Three of the four test cubes reach the circuit. The fourth cube is
`000XX1XXXX00`. Sequence ID bit 1 is meant to embed it, but with these
tables it does not: the only pattern that bit 1 alters (start `01110`) still
has a 0 in the position where the cube needs a 1. The RTL implements the
implicant and fix position as specified, and the testbenches check this
exact behaviour. If you need the fourth cube, choose another implicant or
another fixed bit for ID bit 1. Only the two package constants change.

## Designing the tables for a real circuit

The RTL is generic. What a circuit needs is held entirely in four constants:
`SEL_MASK`/`SEL_VAL` (one implicant per ID bit) and `FIX0`/`FIX1` (fixed
positions per ID bit). These constants come from a design-time procedure
that runs in software:

1. Simulate the LFSR for `L` patterns and fault-simulate the circuit. Note
   the starting state of every pattern that detects a fault for the first
   time. Run ATPG on the faults that remain and keep don't-cares in the
   resulting test cubes.
2. Add Sequence ID bits one at a time. For each new bit:
   - Choose the largest implicant of the complement of the "fault-dropping
     starting states" function. This set of patterns is cheap to decode and
     never disturbs patterns that already detect faults.
   - Choose the bits to fix. Start with all cubes that are still missing,
     and fix every position where no two of them conflict. Count how many
     cubes the altered patterns now contain. Then drop the cube that removes
     the most conflicts, and repeat while the remaining cubes could still
     beat the best result so far. Finally, remove every fixed bit that is not
     needed.
   - Mark the patterns that now embed a cube as fault-dropping, so that
     later bits leave them alone.
3. Stop when enough cubes are embedded.

The generation logic is written here in its two-level form: a decode of one
counter state per fixed bit, ORed over the active ID bits. Synthesis can
then factor it and use the unused counter codes as don't-cares.

A smaller LFSR than the largest test cube needs is allowed. Cubes that the
LFSR cannot produce because of linear dependencies are simply embedded as
well, at the cost of more ID bits.

## Modules

| Module | Role |
|---|---|
| `tps_bist` | Top. Connects the controller, generator, scan chain and signature register. The circuit under test is external: `cut_in` drives it, `cut_resp` returns its response, and `cut_capture` is the cycle in which it is clocked. |
| `bist_ctrl` | Session control: `L+1` rounds of `M+1` cycles, `apply`, signature enable and clear, `done`. |
| `bfsg` | The bit-fixing sequence generator, built from the next six modules. |
| `mod_counter` | Mod-(M+1) bit counter. State 0 is the capture state. |
| `lfsr` | External-XOR LFSR. Holds when not shifting. |
| `seq_select` | One AND term per ID bit over the starting state. |
| `seq_id_reg` | The Sequence ID Register, loaded in the capture state. |
| `seq_gen` | Counter state × ID bits → fix-to-0 and fix-to-1. |
| `bit_fix` | `dout = (din & ~fix0) \| fix1`. |
| `scan_chain` | Mux-D chain. Shift has priority over capture. |
| `sisr` | Serial signature register (an internal-XOR CRC). |
| `bfsg_pkg` | The example constants and the signature polynomial. |

### Session timing

After `start`, the session runs as follows:

* **Round 0** shifts in pattern 1. Nothing is captured in this round.
* **Round k (1..L)** captures the response to pattern k. It then shifts that
  response out while shifting in pattern k+1. The pattern shifted in during
  round L is never applied.

`done` rises `(L+1)·(M+1)` cycles after `start`: 169 cycles at the defaults.
It stays high until reset, and `signature` is valid from then on. Only one
session runs per reset. All flip-flops use an asynchronous active-low reset.
The LFSR resets to `SEED`; every other register resets to zero.

### Assertions

* `bfsg` asserts that fix-to-0 and fix-to-1 are never active together. If
  they were, `bit_fix` would give fix-to-1 priority.
* `bist_ctrl` asserts that the counter stays in range.
* `tps_bist` asserts that the circuit is only clocked in the counter's
  capture state.

## Parameters of `tps_bist`

| Parameter | Default | Meaning |
|---|---|---|
| `R` | 5 | LFSR stages |
| `M` | 12 | scan cells |
| `N` | 2 | Sequence ID bits |
| `L` | 12 | patterns per session |
| `SIG_W`, `SIG_POLY` | 16, `16'h1021` | signature register |
| `TAPS`, `SEED` | `5'b00101`, `5'b01011` | LFSR feedback and seed |
| `SEL_MASK`, `SEL_VAL` | see above | implicant per ID bit, `[N-1:0][R-1:0]` |
| `FIX0`, `FIX1` | see above | fixed positions per ID bit, `[N-1:0][M-1:0]` |

Published results for this scheme, at a test length of 10,000 patterns,
range from 1 ID bit (20-stage LFSR, 34-cell chain) to 13 ID bits (17-stage
LFSR, 207-cell chain). The RTL can be set to any of these sizes.
Their selection and fixing tables are not reproduced here, because they
depend on the circuit and on its test cubes.

## What follows the original scheme and what does not

**Taken from the scheme:**

* the architecture: LFSR, Mod-(M+1) counter, selection logic, Sequence ID
  Register, generation logic, and fixing gates at the serial output;
* the example's sizes, implicants and fixed positions;
* a single-phase test of `L` patterns.

**Derived from the example's pattern table:**

* the LFSR polynomial;
* the shift direction and bit order.

**Own choices:**

* the capture-state encoding;
* not shifting in the capture state, which the example's pattern table
  implies;
* the round structure and the suppressed first capture;
* the reset values;
* the scan cell type;
* gate priority in `bit_fix`;
* the signature register's width and polynomial.

## Simulation

Each testbench in `tb/` prints `TB_RESULT checks=N failures=M` and stops
itself; a watchdog catches hangs. Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/bfsg_pkg.sv tb/bfsg_example_ref.sv tb/tb_tps_bist.sv \
  -y rtl -y tb --top-module tb_tps_bist -o sim
./obj_dir/sim
```

| Testbench | What it checks |
|---|---|
| `tb_tps_bist` | Full session at the default size. Checks every applied pattern against the table above; that fault-detecting patterns are unaltered; the 3 embedded cubes; the 169-cycle session; and the final signature against a CRC of the expected responses. It also counts every mechanism: capture, each ID bit, fix-to-0, fix-to-1 and completion. |
| `tb_tps_bist_scaled` | A published benchmark size: 14-stage LFSR, 3 ID bits, 34-cell chain, 10,000 patterns. It uses placeholder selection and fix tables, because the real ones depend on that circuit's test cubes. It compares each applied pattern with an independent software model of the LFSR and the fixing. |
| `tb_bfsg` | Starting states, ID decode, all 12 serial patterns, and the `M+1`-cycle pattern period. |
| `tb_lfsr` | The twelve slices of the sequence, hold behaviour, and period 31. |
| Other block testbenches | Exhaustive or random checks against a reference model. `tb_sisr` checks the CRC-16/XMODEM value of `"123456789"`, 0x31C3. |

`tb/bfsg_example_ref.sv` holds the reference tables used by the example
testbenches. `tb_tps_bist` uses a stand-in for the circuit under test: a
fixed rotate-XOR-parity function.
