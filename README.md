# SPI-based built-in self-test with a clock-gated pattern generator

This design is a built-in self-test (BIST) for a small circuit that sits behind
an SPI link. The pattern generator saves power by clock-gating each of its
flip-flops on its own. The generator is an 8-bit LFSR. Before every shift, each
stage compares its input with its output. If the two are equal, the stage would
load the value it already holds, so its clock is switched off for that cycle.
The sequence is the same as an ordinary LFSR's, but stages that do not change
get no clock edge. Over one full 255-pattern cycle the eight stages see 1,024
clock edges in place of 2,040, about half as many.

The circuit under test is a 4-bit adder in an SPI slave. The generator, the
response analyzer and the test controller sit in the SPI master. Every pattern
travels to the slave over MOSI, and the adder's answer comes back over MISO.
One pulse on `test` runs the complete test and returns a good/faulty verdict.

## Block map

```
                         spi_cg_bist_top
 +------------------------ spi_master ------------------------+        +------------ spi_slave ------------+
 |  cg_tpg (8 x clock_gate + 8 FFs)   bist_controller         |  CS    |  spi_slave_phy                    |
 |     pattern ------------------+--> spi_master_phy ---------+------->|     rx word --> test_mux --> cut_adder
 |                               |    (mode 0, MSB first)     |  SCLK  |                 ^ func_in    |  (4-bit)
 |                               v                            |  MOSI  |        mode_select          |
 |  golden_rom --golden--> ora (misr + expected-result cmp)   |<-------|     tx word <-- {carry,sum} -+--> po
 |                               ^ answer, paired pattern     |  MISO  |  fault_inject -> cut_adder        |
 +------------------------------------------------------------+        +-----------------------------------+
```

| module | role |
|---|---|
| `bist_pkg` | sizes, LFSR/MISR polynomials, reference functions (LFSR step, adder, MISR step, golden signature) |
| `clock_gate` | latch + AND clock-gating cell, one per LFSR stage |
| `cg_tpg` | 8-stage LFSR with per-stage gating, seed load, end-of-cycle pulse |
| `bist_controller` | test sequencer: seed load, one pattern per SPI frame, ORA control, verdict request |
| `spi_master_phy` | SPI master shift engine, 8-bit full-duplex frames |
| `golden_rom` | golden signature for every seed, filled at elaboration |
| `misr` | 5-stage multiple-input signature register |
| `ora` | output response analyzer: MISR, expected-result comparison, verdict |
| `spi_master` | the master: the six blocks above |
| `spi_slave_phy` | SPI slave shift engine, sampled on the system clock |
| `test_mux` | selects the adder's operands: SPI word (test) or `func_in` (normal) |
| `cut_adder` | 4-bit ripple adder with a switchable stuck-at fault |
| `spi_slave` | the slave: the three blocks above and the answer register |
| `spi_cg_bist_top` | master and slave joined by CS/SCLK/MOSI/MISO |

## The clock-gated pattern generator

`cg_tpg` is a Fibonacci LFSR. Bits shift from stage 0 towards stage 7. The
feedback is the XOR of stages 7, 5, 4 and 3, which is the primitive polynomial
x^8+x^6+x^5+x^4+1, so the period is 255. Each stage has a multiplexer in front
of it. When `load` is high, the multiplexer takes the seed bit; otherwise it
takes the shift data. The multiplexer output `d[i]` goes to two places: the
flip-flop's D input, and a comparator against the flip-flop's output `q[i]`.
The stage's clock enable is

```
clk_active[i] = (rst | load | shift) & (gate_en ? d[i] != q[i] : 1)
```

`clock_gate` is a standard integrated clock-gating cell. A latch passes the
enable while `clk` is low, and an AND gate combines the latched enable with
`clk`. The enable is therefore frozen during the high phase, so the gated clock
cannot glitch. The one latch per stage is intended. The free-running clock still
drives the seed copy and the end-of-cycle flag. `cycle_done` pulses for one
cycle when a shift brings the LFSR back to its seed, which means all 255
patterns have been produced.

`gate_en` (the top-level `cg_enable` pin) turns the gating off. Every stage is
then clocked on every shift, which gives an ungated LFSR for comparison without
a second design. A seed of 0 is replaced by 1, because the all-zero state would
lock up the LFSR.

Use `tpg_clk_active` to measure activity. At each rising edge of `clk`, it shows
which stages receive a clock edge.

## One self-test, frame by frame

Each SPI frame carries one 8-bit word in each direction. The slave answers a
word in the *next* frame, so the link is a one-frame pipeline:

| frame | MOSI (master to slave) | MISO (slave to master) | analyzer |
|---|---|---|---|
| 0 | pattern P0 = seed | stale | nothing captured |
| k (1..254) | Pk | answer to P(k-1) | capture, paired with P(k-1) |
| 255 | P0 again (only to clock the link) | answer to P254 | capture, then verdict |

`bist_controller` keeps the pattern of the previous frame and passes it to the
analyzer together with the answer. The generator advances once per frame. When
`cycle_done` reports that the cycle has wrapped, one extra frame is sent, and
then the verdict is requested. A test therefore takes 256 frames.

The slave splits the received word into a = bits 3:0 and b = bits 7:4. It
answers with `{000, carry, sum[3:0]}`. Across the 255 non-zero LFSR states the
adder sees every operand pair except 0 + 0.

Timing at the default `CLK_DIV = 2` (SCLK = clk/4) and `GAP = 4`:

- A frame occupies (2·8+1)·2 + 4 + 1 = 39 clock cycles.
- A full test takes 9,983 cycles from the `test` pulse to `test_done`.

The testbenches check both numbers.

## The response analyzer

`ora` checks every answer in two ways:

1. **Compaction.** The 5-bit answer is shifted into a MISR. At the end, the
   signature is compared with the word from `golden_rom` for the seed in use.
   The ROM holds one signature per seed (256 x 5 bits). Its contents come from
   a constant function in `bist_pkg` that models the generator, the adder and
   the MISR bit for bit, so the ROM cannot go out of step with the hardware.
2. **Per-pattern comparison.** An expected-result generator, a reference adder
   fed with the paired pattern, supplies the correct 8-bit answer frame. Any
   difference sets `err_flag` and increments `err_count`, which saturates at
   255. The comparison also covers the unused upper bits of the frame.

`test_pass` is high only if no pattern mismatched *and* the signature matches.
`test_done` and `test_pass` stay valid until the next test.

The MISR feeds its last stage back into stage 0 and stage 2 (polynomial
x^5+x^2+1). With a plain ring, where the last stage feeds only stage 0, the
stuck-at fault described below leaves the signature equal to the fault-free
one. This aliasing is why the extra tap is used. To get the ring, set
`bist_pkg::MISR_FB = 5'b00001`; the ROM follows automatically.

## Modes and fault injection

- `mode_select = 1` (test mode): the adder takes the word received over SPI.
- `mode_select = 0` (normal mode): the adder takes `func_in`, and `po` shows
  its result. The answer register follows `po`.
- `fault_inject = 1`: sum bit 0 of the adder is stuck at 0. The adder then
  gives a wrong answer for the 128 patterns whose sum is odd. A self-test
  reports `test_pass = 0` and `err_count = 128`, and the signature differs from
  the golden one.

## Interface of `spi_cg_bist_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | system clock; synchronous reset, active high |
| `test` | in | 1 | start pulse; ignored while `busy` |
| `seed` | in | 8 | LFSR seed, latched at `test` |
| `cg_enable` | in | 1 | per-stage clock gating of the generator on |
| `mode_select` | in | 1 | 1: test mode, 0: normal mode |
| `fault_inject` | in | 1 | faulty state of the adder |
| `func_in` | in | 8 | normal-mode operands {b, a} |
| `po` | out | 5 | adder output {carry, sum} |
| `busy`, `test_done`, `test_pass` | out | 1 | test running, verdict valid, verdict |
| `signature` | out | 5 | MISR contents |
| `err_count` | out | 8 | per-pattern mismatches |
| `cs`, `sclk`, `mosi`, `miso` | out | 1 | the SPI link (`cs` active low), brought out for observation |
| `tpg_clk_active` | out | 8 | generator stages clocked at the next edge |
| `frames` | out | 9 | SPI frames sent in the current test |

Parameters: `CLK_DIV` (SCLK half-period in clock cycles, at least 2) and `GAP`
(idle cycles between frames, at least 2). The sizes (8-bit generator, 4-bit
adder, 5-bit MISR) are set in `bist_pkg`.

## Where this design departs from or goes beyond its source description

The published description gives the block structure, the sizes and the gating
rule. The following points are this design's own choices:

- **Drawings smaller than the design.** The generator is drawn with 4 stages
  and a 4-bit seed, and the MISR with 4 stages. The design uses 8 generator
  stages (255 patterns, as described) and 5 MISR stages, so that the
  carry-out is compacted too.
- **Adder width.** The description calls the adder both "8-bit" and "4-bit".
  The 4-bit adder is used, and its two operands together make up the 8-bit
  pattern.
- **Polynomials.** Neither polynomial is specified. The generator uses
  x^8+x^6+x^5+x^4+1, and the MISR uses x^5+x^2+1 instead of the drawn single
  feedback path (see above).
- **Location of the test controller.** The controller that drives the
  generator and the analyzer is placed in the master, next to them. The slave's
  "controller" is reduced to the answer register.
- **How clock gating is controlled.** Clock gating can be switched from
  outside, but through the `cg_enable` pin, not through SPI commands.
- **Faulty state.** The stuck-at-0 on sum bit 0 is chosen; the description
  does not say which fault is used.
- **Protocol and reset.** The SPI mode (mode 0, MSB first), the clock divider,
  the one-frame answer pipeline, the golden ROM indexed by seed, the two
  analyzer checks run together, and the synchronous reset are all choices made
  here.
- **No SCLK clock domain.** Master and slave share one clock, and the slave
  samples SCLK as data. A slave on a foreign SCLK would need synchronizers on
  `cs`, `sclk` and `mosi`.
- **Not covered by RTL.** The reported power and area figures (TPG 1.27 mW
  versus 1.68 mW; full design 4.904 mW versus 5.458 mW) come from synthesis and
  power analysis in a cell library. This RTL does not reproduce them. The
  closest RTL measure is the stage-clock count above.

## Simulating

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and includes a watchdog. The end-to-end
test runs four complete self-tests at the default parameters: gated, ungated,
with a faulty adder, and with a random seed. It then checks normal mode, and it
counts every mechanism (gated shifts, ungated shifts, completed cycles, detected
fault, pass verdicts, mode switch). With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -y rtl +libext+.sv \
    rtl/bist_pkg.sv tb/tb_spi_cg_bist_top.sv --top-module tb_spi_cg_bist_top
./obj_dir/Vtb_spi_cg_bist_top
```

Replace the testbench name to run any other block's test. Each run takes a few
seconds. `-Wno-fatal` keeps lint warnings (such as width warnings in the
testbenches) from stopping the build.

## Notes for changing the design

- `bist_pkg` is the single place for sizes and polynomials. `golden_rom` and
  the analyzer's expected-result generator both use its functions. The
  testbenches, however, carry their own copies of the polynomials on purpose,
  so they must be updated by hand.
- `CLK_DIV` must stay at 2 or above. The slave updates MISO one clock cycle
  after the falling SCLK edge, and the master samples MISO `CLK_DIV` cycles
  after that edge.
- The gated stage clocks come straight from `clk` through one latch and one
  AND gate. In an implementation flow, map `clock_gate` to the library's
  clock-gating cell and let clock-tree synthesis balance the eight gated
  clocks.
