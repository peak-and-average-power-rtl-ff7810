# Low-power scan BIST with a bit-swapping LFSR

During a scan-based built-in self-test, most of the power goes into toggling
scan cells. Each bit a pseudo-random pattern generator shifts into the chain
ripples through every cell behind it, so the number of 0/1 changes in the
serial stream sets the shift power. A plain maximal-length LFSR changes its
output on half of the clocks. This design cuts that to a quarter with two
2x1 multiplexers: the **bit-swapping LFSR (BS-LFSR)**. The same test patterns
stay pseudo-random and balanced. An ordered scan chain, with inverters on
chosen links, also lowers the switching during unload and during the capture
cycle.

The RTL is a complete test-per-scan BIST around an external circuit under test
(CUT):

```
            +-------------------- bist_controller ---------------------+
            | tpg_en/load        scan_en, chain_en        sig_en/clear |
            v                          v                         v
   +----------------+  scan_bit  +------------+  scan_out  +--------------+
   |    bs_lfsr     |----------->| scan_chain |----------->| sig_analyzer |--> signature
   | lfsr + bit_swap|            | M cells,   |            |   (32-bit)   |
   +----------------+            | ORDER, INV |            +--------------+
        | pattern[PI-1:0]        +------------+
        v                        ff_q |   ^ ff_d
     cut_pi                   cut_state   cut_next      (CUT logic is outside)
```

## The bit-swapping trick

Take an external (Fibonacci) LFSR for a trinomial x^n + x + 1, with cells
c1..cn that shift c1 -> c2 -> ... -> cn and feedback c1' = c1 xor cn. Two
multiplexers look at c1 and c2 and swap them whenever cn is 0:

```
o1 = (cn == 0) ? c2 : c1
o2 = (cn == 0) ? c1 : c2
```

Over one period of 2^n - 1 clocks each LFSR cell toggles 2^(n-1) times. With
this arrangement o2 toggles only 2^(n-2) times: it has **half the
transitions**, while o1 keeps all of them. o2 still has as many ones as a
cell. The saving comes from the feedback tying c1, c2 and cn together: the
next c2 is the present c1, and the next c1 depends on cn. So o2 repeats its
last value more often than a free cell would. Feeding o2 into the scan chain
halves the toggles rippling through the chain during shift-in.

The same 50 % saving exists for other placements; `bs_lfsr` takes any of
them through parameters (cell numbers are 1-based):

| polynomial            | LFSR form | swapped cells | select | output |
|-----------------------|-----------|---------------|--------|--------|
| x^n + x + 1           | external  | c1, c2        | cn     | o2 (default) |
| x^n + x + 1           | internal  | c1, cn        | c2     | o2     |
| x^n + x^(n-1) + 1     | external  | c(n-1), cn    | c1     | o1     |
| x^n + x^(n-1) + 1     | internal  | c1, cn        | c(n-1) | o1     |
| x^n + x^2 + 1         | external  | c1, c2        | cn     | o1     |
| x^n + x^(n-2) + 1     | internal  | c(n-1), cn    | c(n-2) | o1     |
| x^n + x^(n-1) + (lower terms) + 1 | internal | c1, cn | c(n-1) | o1 |

Every row is checked over a full period in `tb/bs_lfsr_tb.sv`, on primitive
polynomials of 5, 7 and 8 stages. A further placement for internal
x^n + x^(n-2) + (lower terms) + 1 (c(n-1), cn under c(n-2)) is also
configurable but untested. The swap polarity is
parameter `SWAP_ON`; with the opposite polarity the saving moves to the other
multiplexer output.

If the selection cell is not tied to either swapped cell through the
feedback, the saving is 25 % and is split between the two outputs. That is
how the parallel output `pattern` works. It swaps every pair (c1,c2),
(c3,c4), ... under cn and passes cn through. It is meant for test-per-clock
BIST or for the CUT's primary inputs. Since the swap is a permutation of the
state for a fixed cn, `pattern` runs through exactly the same 2^n - 1 vectors
as the LFSR, in a different order. Each swapped pair has a quarter fewer
transitions. For even n the cell just below cn has no partner and passes
through unswapped; that is this design's choice.

## Scan chain order and inverters

`scan_chain` holds M scan cells. Chain position p (0 next to the scan input)
is CUT flip-flop `ORDER[p]`. Parameter `INV[p]` puts an inverter on the scan
link into position p, so in shift mode that cell loads the complement of its
predecessor. In capture mode every cell loads the CUT next state unchanged.
The CUT sees the cells indexed by flip-flop (`ff_q`), whatever the chain
order.

Choosing `ORDER` and `INV` is an offline step per circuit, not hardware:

1. Order the cells to reduce toggling during unload (any power-driven
   chaining method).
2. Simulate the CUT with the BS-LFSR patterns. Find the patterns whose capture
   cycle exceeds the peak-power budget, and the cells that toggle most in
   them.
3. For such a cell x, find two cells y and z that decide x. With the BS-LFSR,
   neighbouring chain cells are equal on about 75 % of patterns. If x usually
   keeps its value when y = z, chain y and z next to each other. If x usually
   keeps its value when y != z, chain them through an inverter (`INV`).

Step 3 is applied to only a few cells, and only when some pattern breaks the
peak-power limit, so the unload-oriented order of step 1 is largely kept. The
RTL defaults are the identity order and no inverters. Replace them with a
circuit's own result.

## Test-per-scan sequencing

`bist_controller` runs a session of TL patterns (`num_patterns`):

```
start | M x shift | capture | M x shift | capture | ... | capture | M x shift (unload) | done
        load p0              load p1, unload r0                     unload r(TL-1)
```

* Shift cycles advance the BS-LFSR and shift the chain by one. The first load
  is not compacted; every later shift feeds `scan_out` to the signature.
* The capture (test) cycle loads the CUT response. The generator holds, so
  `cut_pi` is stable through it.
* A session takes exactly TL*(M+1) + M cycles after the start cycle. `done`
  then stays high until the next `start`, and `signature` holds the result.
  `start` reseeds the generator and clears the signature. TL = 0 goes straight
  to done.

`sig_analyzer` is a 32-bit internal-feedback serial signature register on
x^32 + x^22 + x^2 + x + 1. Only the scan output is compacted; the CUT's
primary outputs are not observed.

## Files

| file | contents |
|------|----------|
| `rtl/bist_pkg.sv` | LFSR kind enum, controller state enum, default sizes and polynomials |
| `rtl/lfsr.sv` | external or internal LFSR, any polynomial |
| `rtl/bit_swap.sv` | the two swap multiplexers |
| `rtl/bs_lfsr.sv` | bit-swapping LFSR: serial low-transition output plus the parallel pattern |
| `rtl/scan_chain.sv` | ordered full-scan chain with optional link inverters |
| `rtl/sig_analyzer.sv` | serial signature register |
| `rtl/bist_controller.sv` | shift/capture sequencer |
| `rtl/bist_top.sv` | the whole BIST; CUT logic connected through ports |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `bist_top_full_tb.sv` (all defaults) and `bist_s13207_tb.sv` (switching activity at the defaults) |

## Parameters of `bist_top`

| parameter | default | meaning |
|-----------|---------|---------|
| `N`, `POLY`, `KIND` | 60, x^60 + x + 1, external | generator size and polynomial (`POLY` bit k-1 = coefficient of x^k) |
| `SEED` | c1 = 1 | reset and start value of the generator, must be non-zero |
| `SWAP_A`, `SWAP_B`, `SEL`, `OUT_O2`, `SWAP_ON` | 1, 2, N, 1, 0 | swap placement, see the table above |
| `M` | 669 | scan cells |
| `ORDER`, `INV` | identity, none | chain order and link inverters |
| `PI` | 31 | primary inputs driven from `pattern[PI-1:0]` (PI <= N) |
| `SIG_W`, `SIG_POLY` | 32, x^32 + x^22 + x^2 + x + 1 | signature register |

The defaults fit a full-scan circuit of 669 flip-flops and 31 primary inputs
tested with a 60-stage generator (ISCAS'89 s13207 in its full-scan form).
x^60 + x + 1 is primitive, so the default arrangement is the one of the first
table row. For another circuit, set `M`, `PI`, `ORDER` and `INV`. If the
generator size changes, choose a primitive polynomial with a matching row
above. Circuits with more primary inputs than generator stages need `N`
raised, or their own input source.

## Verification

Every testbench compares against a model written independently in the
testbench, and ends with `TB_RESULT checks=<n> failures=<n>`.

* `lfsr_tb`: both LFSR forms on x^7 + x + 1, step by step; a period of 127;
  64 toggles per cell per period; hold and reseed.
* `bit_swap_tb`: all input combinations, both polarities.
* `bs_lfsr_tb`: the seven placements above over a full period, each with
  2^(n-2) toggles on the chosen output against 2^(n-1) for a cell; for the
  7-stage cases also 64 ones per period. The parallel pattern visits all 127
  non-zero vectors and has 3 x 32 fewer transitions.
* `scan_chain_tb`: scrambled order and inverters, random shift, capture and
  hold.
* `sig_analyzer_tb`: random streams with gaps and a clear; one flipped bit
  changes the signature.
* `bist_controller_tb`: cycle counts, M shifts before each capture, the first
  load not compacted, for TL = 3, 1 and 0.
* `bist_top_tb` (N = 7, M = 16, scrambled order, four inverters, made-up CUT
  logic): every scan-in bit, applied vector, primary-input pattern, the
  signature and the cycle count, for TL = 127, 1 and 0. It counts shifts,
  captures, swaps, inverted links and compacted bits, and requires each to
  occur. It also checks that the scan input toggles about half as often as an
  LFSR cell (518 against 1032 over 2048 steps).
* `bist_top_full_tb`: all defaults, 200 patterns (134,669 cycles), the same
  checks.
* `bist_s13207_tb`: all defaults, 5,000 patterns (3.35 million cycles, about
  half a minute). It counts scan-cell toggles against a conventional-LFSR scan
  BIST model with the same schedule and CUT function. With the made-up CUT it
  gives these figures per shift cycle:

  | | conventional LFSR | BS-LFSR |
  |---|---|---|
  | toggles in cells already holding the new pattern | 167.4 | 84.1 |
  | all shift toggles, average | 334.6 | 219.8 |
  | all shift toggles, peak | 385 | 333 |
  | capture-cycle toggles, average | 334 | 251 |

  The first row is the generator's own effect, and it is halved as expected.
  The rest depends on the CUT and on the chain order, which here is the
  identity.

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/bist_pkg.sv tb/bist_top_tb.sv --top-module bist_top_tb
./obj_dir/Vbist_top_tb
```

## Limits and departures

* The CUT is not part of this RTL. The testbenches close the loop with small
  made-up combinational functions, not benchmark netlists. Fault coverage and
  switching-activity figures of real circuits therefore cannot be reproduced
  here.
* The chain-ordering procedure is not implemented. Its result enters as the
  `ORDER` and `INV` parameters.
* Own choices where the method leaves the detail open: the seed and
  asynchronous reset, the internal-LFSR equations, the swap polarity (picked so
  the saving falls on o2), the controller and its start/done handshake, the
  signature register and its polynomial, and primary outputs going
  unobserved. Also own choices: driving the primary inputs from the same
  generator's parallel output (held during capture), and placing the
  inverters on the scan path only.
* The 50 % saving holds only for arrangements in which the selection cell
  feeds one of the swapped cells through the feedback, as in the table. With
  other placements the saving is 25 %, shared between both outputs.
