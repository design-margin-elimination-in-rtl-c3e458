# Timing error-masking microcontroller system

Near-threshold chips usually carry a large timing margin. The clock period and supply
are set for the worst process, voltage and temperature corner, so a typical die runs
far slower or at a higher voltage than it needs. This design removes the margin. The
flip-flops at the ends of the most critical paths are replaced by **error detection
soft edge flip-flops**. For a short window after each rising clock edge these
flip-flops stay transparent. Data that arrives a little late still reaches the output
(the timing error is *masked*), and the flip-flop raises an error flag. Nothing has to
be replayed or corrected, because the late data was captured correctly. The flags give
software a live measure of how close the chip is to failing. An on-chip **error
processor** averages the flags and interrupts the processor. The interrupt handlers
then lower or raise the supply. The chip settles at its *point of first failure*
(PoFF), the lowest voltage at which the target clock still works.

The system is an AHB microcontroller: an ARM Cortex-M0 class processor, a 64 KB SRAM,
GPIO, a UART and the error processor. 224 critical endpoints have error detection
flip-flops, about 6% of all flip-flops. This repository holds SystemVerilog for
everything except the processor and the supply regulator. The processor's bus port,
interrupt and critical-path signals are ports of the top module, `ted_soc_top`. The
regulator is modelled in the end-to-end testbench.

## The error detection flip-flop (`edff`)

The cell has four parts:

* **Timing/control block** (`edff_timing_ctrl`). Each flip-flop makes its own clocks
  from the system clock, so the chip needs no second clock tree. The slave clock is
  the clock itself. The master latch is enabled by the inverse of the clock after a
  *biased delay line*. After each rising edge the slave is already open while the
  master has not yet closed. This overlap lasts WIN, the delay of the line.
* **Master/slave latches.** During the overlap both latches are transparent, so D
  ripples straight through to Q.
* **Transition detector.** The data is differential. Every change of D therefore
  makes one rail rise. The master latch's internal delay gives a delayed copy, `D_d`.
  For a short time after a change, one of the pairs (D, D_d,bar) or (D_bar, D_d) is
  1-1, and that produces a pulse on `edge`. The detector needs no extra gates in the
  data path.
* **Error latch.** It is set by `edge` only while the overlap window is open. It is
  cleared at every rising clock edge.

```
clk        ____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\________________/‾‾‾‾‾
sclk       ____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\________________/‾‾‾‾‾   slave open while high
mclk       ‾‾‾‾‾‾‾‾‾‾\_______________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾   master open while high
window     ____/‾‾‾‾\_________________________________/‾   overlap = WIN
                |<-->|
phase 1:  D settles before the edge -> passes at the edge, no flag
phase 2:  D changes inside the window -> ripples to Q at once, err set
phase 3:  err cleared at the next rising edge, which also samples it
```

The window width trades two things against each other. A wide window catches late
data more easily and allows coarse voltage steps. It also takes more time from the
next pipeline stage, and every path shorter than the window becomes a hold violation
that needs padding. The delay line can be set from 3% to 25% of the period; the design
uses **5%**. In `edff` this is the parameter `WINDOW_PCT`, applied to the clock period
`TCLK_PS` (default 200 ns, which is 5 MHz). That gives a 10 ns window.

What the flag means: `err` is high for the rest of the cycle in which a transition
came inside the window. It is meant to be sampled at the next rising edge, the same
edge that clears it. The error processor samples it there.

Data that arrives later than the window is not captured. That is a real timing
failure, and the flip-flop cannot flag it. The voltage loop has to stay on the safe
side of it (see below).

`edff` is a **behavioural model with delays**. The real cell is custom differential
transmission gate circuitry, and its behaviour depends on the clock overlap and on
latch delays that logic synthesis cannot express. The master latch delay `TM_PS`
(0.5 ns) is a number chosen for this model. The model keeps one pending update of
that delay, so data glitches shorter than 0.5 ns are not represented.

## From flags to voltage: `error_or_tree` and `error_processor`

`error_or_tree` joins the 224 flags. Input `i` belongs to the endpoint with the i-th
smallest slack, so bit 0 is the most critical path. The inputs feed a balanced binary
OR tree. At each node the tree also carries the index of the lowest-numbered active
input in that subtree. The result is registered once, at the edge that clears the
error latches:

* `err_any`: at least one flip-flop masked an error in the previous cycle;
* `err_idx`: the most critical endpoint that did so.

`error_processor` is an AHB slave. While it is enabled, it counts the cycles in which
`err_any` was high, over a window of `PERIOD` cycles. That count is the error rate
averaged over the window. At the end of each window the count is copied to `COUNT`
and compared with two thresholds:

| offset | register | access | meaning |
|---|---|---|---|
| 0x00 | CTRL   | R/W | [0] enable, [1] interrupt on HI, [2] interrupt on LO |
| 0x04 | PERIOD | R/W | averaging window in clock cycles (reset 1024) |
| 0x08 | THR_HI | R/W | COUNT >= THR_HI sets HI: errors too frequent, raise the supply (reset 1) |
| 0x0C | THR_LO | R/W | COUNT <= THR_LO sets LO: margin left, supply may drop (reset 0) |
| 0x10 | COUNT  | RO  | error cycles in the last completed window |
| 0x14 | STATUS | R/W1C | [0] HI, [1] LO, [2] window done |
| 0x18 | TOTAL  | RO, write clears | error cycles since last cleared (saturating) |
| 0x1C | LASTIX | RO  | [31] valid, [15:0] most critical endpoint flagged last |

`irq` is high while an enabled status bit is set. An error masked in cycle k is
latched by the tree at the end of cycle k and counted at the end of cycle k+1. `irq`
rises one cycle after the window closes. A new event in the same cycle as a
write-1-to-clear wins over the clear.

A voltage scaling handler can be this simple: on HI raise the supply one step, on LO
lower it one step, then clear STATUS. With THR_HI = 1 and THR_LO = 0, the supply
steps down until the first masked error appears, and then stays between that level
and one step above. For this to be safe, one voltage step must slow the critical path
by less than the window. Otherwise data can go from on-time straight to beyond the
window with no error flagged first.

## The system

```
 processor (not included) ── AHB ── ahb_interconnect ─┬─ ahb_sram (64 KB)  0x2000_0000
   ▲ irq            │                                ├─ ahb_gpio          0x4000_0000
   │                │ critical path data             ├─ ahb_uart          0x4000_1000
   │                ▼                                └─ error_processor   0x4000_2000
   │        224 x edff ── err[223:0] ─────────────────────────┘   │
   └──────────────────────────────────────────────────────────────┘
 gpio_* / uart_* ──> external supply regulator (not included)
```

* `ahb_interconnect`: a single-master AHB-Lite bus. It decodes in the address phase,
  registers the slave select and steers HRDATA, HREADY and HRESP in the data phase.
  Unmapped addresses go to a built-in default slave, which returns the two-cycle
  ERROR response; an assertion checks that response.
* `ahb_slave_port`: the address/data phase front end shared by all slaves. All slaves
  have zero wait states.
* `ahb_sram`: a word array with byte, halfword and word writes. A read directly after
  a write to the same word returns the new data.
* `ahb_gpio`: OUT (0x00) and OE (0x04), both R/W with byte lanes, and IN (0x08),
  which passes through a two-flop synchroniser. Width `WIDTH` = 16.
* `ahb_uart`: 8N1 serial port. DATA (0x00): a write sends a byte, a read returns the
  received byte and clears rx valid. STATUS (0x04): [0] tx busy, [1] rx valid.
  BAUD (0x08): clock cycles per bit. A byte written while the transmitter is busy is
  dropped.
* `ted_pkg`: the AHB request/response structs, the address map and register offsets,
  and the byte-lane function.

In the real chip the error detection flip-flops sit inside the processor. Here they
form a bank in the top module. `cp_d[i]` is the data arriving at critical endpoint
`i`, and `cp_q[i]` is what the flip-flop delivers back. The complement rail of each
pair is made inside the top as the inverse of `cp_d`.

### Top-level parameters

| parameter | default | meaning |
|---|---|---|
| `N_EDFF` | 224 | error detection flip-flops and error processor inputs |
| `TCLK_PS` | 200000 | clock period the windows are sized for |
| `WINDOW_PCT` | 5 | window as % of the period (3 to 25 is the delay line's range) |
| `SRAM_BYTES` | 65536 | SRAM size |
| `GPIO_W` | 16 | GPIO width |
| `BAUD_RESET` | 52 | UART cycles per bit after reset |

The `edff` window is an absolute delay, computed from `TCLK_PS`. If you simulate at
another clock frequency, set `TCLK_PS` to match, as the delay line bias would be
retuned on the chip.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `edff_tb` | 5% and 25% windows side by side: data before the edge, inside the window, after it; Q, Q_b, flag, flag clearing, late data captured next cycle |
| `error_or_tree_tb` | all 224 single-bit cases, random sparse and dense patterns: OR and most-critical index after one cycle |
| `error_processor_tb` | reset values; window length (irq exactly PERIOD cycles after enable); averaged COUNT under a periodic error pattern; HI/LO at and beyond the thresholds; TOTAL; LASTIX priority; W1C and irq |
| `ahb_interconnect_tb` | decode to four behavioural slaves with 0 to 3 wait states; HREADY/HRDATA steering; writes reach only their slave; ERROR response |
| `ahb_sram_tb` | random word, halfword and byte writes over the full 64 KB against a reference model; one-cycle data phase |
| `ahb_gpio_tb` | OUT/OE with byte lanes, pins and read-back, IN through the synchroniser |
| `ahb_uart_tb` | transmit decoded by an independent receiver, start latency, receive; at 8, 13 and 4 cycles per bit |
| `ted_soc_top_tb` | whole system at default size, voltage scaling loop closed (below) |
| `ted_dvs_sweep_tb` | the same loop at 7.5 MHz and 20 MHz with 32 endpoints: settles at the delay model's point of first failure for each clock, higher for the faster clock, nothing escapes |
| `edff_pipeline_tb` | two flip-flops in series: borrowing in one stage carries into the next, which masks and flags too; no flags when on time; a path shorter than the window races through in the same cycle (the hold hazard) |

`ahb_master_bfm` is the behavioural bus master that stands in for the processor;
`dvs_point` is one closed-loop experiment used by `ted_dvs_sweep_tb`.

**End-to-end test.** `ted_soc_top_tb` runs the defaults unchanged: 224 flip-flops,
5 MHz, a 5% window and 64 KB SRAM. The testbench acts as the processor software, the
regulator and the critical paths. Path delay follows an alpha-power law in the
supply, calibrated so that the most critical path takes exactly one period at 290 mV.
Endpoint `i` is 0.1%·i faster, with ±0.3% random jitter per cycle. Software starts at
500 mV. It sets 16-cycle windows with THR_HI = 1 and THR_LO = 0. On each interrupt it
moves the supply 2 mV through GPIO and sends the new code over the UART. The test
passes only if all of the following hold:

* every endpoint captures the data launched one cycle earlier, every cycle, so no
  timing error escapes;
* the loop settles within 6 mV of 290 mV;
* the UART bytes decoded on the pin match the codes that were sent;
* each mechanism happened at least once: masked late data, HI and LO interrupts,
  GPIO and UART commands, UART reception, and a bus ERROR response.

A typical run settles at 292 mV after about 110 downward steps. It takes about
20 seconds.

Under the same delay model, `ted_dvs_sweep_tb` settles at 322 mV for 7.5 MHz (model
target 318 mV) and at 432 mV for 20 MHz (target 427 mV). At 20 MHz the window is only
2.5 ns. There the loop stops a little above the target: data arriving up to the
0.5 ns master latch delay *before* the edge already overlaps the window and is
flagged. For short windows the flip-flop therefore acts partly as an early warning.

### Running a testbench

```
verilator --binary --timing --assert -Wno-fatal --top-module ted_soc_top_tb \
    -y rtl -y tb +libext+.sv -Irtl rtl/ted_pkg.sv tb/ted_soc_top_tb.sv
./obj_dir/Vted_soc_top_tb
```

Replace the top module and file name for the other testbenches. The package file
comes first; `-y` finds every other module by file name.

## Where this RTL goes beyond the source design, and its limits

Taken from the design description:

* the flip-flop's structure and its operating phases;
* the 5% window and its 3–25% range;
* 224 error signals joined by an OR tree ordered by slack;
* an error processor on the AHB bus that averages errors and interrupts at thresholds;
* a 64 KB SRAM, GPIO and UART as the voltage scaling command channels.

This design's own choices:

* the clock generation details in the flip-flop model and its latch delay;
* the reporting of the most critical index and the single register stage in the tree;
* the window-count averaging, the two-threshold scheme and the whole register map;
* the AHB address map, the zero-wait-state slaves and the default slave;
* the GPIO width and the UART frame and registers.

Not included:

* the Cortex-M0 processor (licensed IP);
* the supply regulator (analog, off chip);
* the choice of which 224 paths get error detection, which comes from slack analysis
  of the placed design;
* hold-time padding, which is a physical-design step.

Every path that starts or ends at an error detection flip-flop must be longer than
the window (hold padding). `edff_pipeline_tb` shows what happens otherwise: a 3 ns
path lets the next cycle's value race through.

The differential transmission gate cell library the chip was built in is a
technology choice. It has no RTL counterpart.

The voltage/delay model in the end-to-end testbench is illustrative. Its 290 mV
calibration point matches the operating point reported for this chip at 5 MHz, so
settling there shows the loop and the flags working, not the silicon's behaviour.
