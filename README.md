# FIS — a programmable multi-bit fault injection server

FIS emulates radiation-induced single- and multiple-bit upsets (SEUs and MBUs)
in digital logic. It works by changing wires, not storage. Small fault
injection (FI) elements sit on chosen interconnect nets of a target circuit.
Each one holds a fault bit in its own flip-flop. Those flip-flops are chained
into a shift register that is loaded with a fault pattern. When the pattern is
in place, a single signal, **FI Enable**, makes every element with a set bit
corrupt its net. The target's own flip-flops are never written by the
injector, so nothing has to be restored after an experiment. The fault patterns
come from four programmable 8-bit LFSRs. Masking logic shapes each byte into a
burst of 1 to 4 adjacent upset bits, or leaves it as a random multi-bit
value.

One injection takes **18 clocks** from the start of pattern generation until
FI Enable goes high:

| phase  | clocks | what happens |
|--------|--------|--------------|
| INIT   | 10     | 1 clock to load the seed (or keep the LFSR state), 8 LFSR shifts, 1 clock to capture the masked pattern |
| WRITE  | 8      | the 32-bit pattern is shifted into the 8-element chain, 4 bits (one per lane) per clock |
| INJECT | `hold` | FI Enable high; in the first clock the chain contents are latched into the read-back register and classified |
| GAP    | `gap`  | idle; sets the injection rate, then the next injection starts |

At 100 MHz the 18 clocks take 0.18 µs. A campaign makes `num_inj` injections
back to back, so with hold = 1 and gap = 0 one injection starts every 19
clocks.

## Fault word generation

### Programmable LFSR (`fis_lfsr`)

This is an 8-bit Fibonacci LFSR that shifts right. The feedback bit is the XOR
of the tapped stages, `u = XOR_j b_j·S_j`, and enters at the MSB. Stages are
counted from the left. The polynomial term `x^i` taps stage *i*, which is
state bit `8-i`. So in the tap byte, bit `i-1` is the coefficient of `x^i`:

| taps (binary) | polynomial      |
|---------------|-----------------|
| `0110_0000`   | x^7 + x^6 + 1 (reset default) |
| `0011_0000`   | x^6 + x^5 + 1   |
| `0001_0100`   | x^5 + x^3 + 1   |
| `0000_1100`   | x^4 + x^3 + 1   |
| `0000_0110`   | x^3 + x^2 + 1   |
| `0000_0011`   | x^2 + x + 1     |

For a degree-*n* polynomial, stages 1..n run through all 2^n − 1 nonzero
states; the testbench checks this for each row. Bit 7 of the tap byte allows
degree-8 polynomials too. A zero seed keeps the register at zero.

### Masking (`fis_fault_injector8`)

After the 8 shifts of INIT, the lane's LFSR word `r` is turned into a fault
byte:

* `upset_count = 0`: the byte is `r` itself, a random multi-bit value.
* `upset_count = K` with K from 1 to 4: the byte is a burst of K adjacent ones
  that wraps around within the byte, starting at bit `r[2:0]`. Values 5 to 7
  act as 4.

Placing the burst with the LFSR's low bits spreads single-bit faults almost
evenly over the 8 positions. With x^7+x^6+1 and a free-running LFSR,
`tb_mbu_statistics` measures about 12 % per position over 10^6 lane faults.

### Four lanes (`fis_fault_injector32`)

Four injectors run side by side, one per byte of the 32-bit fault word. Each
lane has its own seed and tap byte. All lanes share the upset count. The
seed is loaded at the first injection of a campaign. With `reseed` set it is
loaded again before every injection, so every injection gets the same
pattern. Without `reseed` the LFSRs keep running and every injection gets a
new pattern. With `manual` set, the host's fault word `manual_word` is
injected instead of the LFSR data. This is how a fixed fault list is applied.
Each lane's fault register is sent MSB first.

## The FI chain

`fis_fi_element` is one stage. It has one chain flip-flop per lane (4) and
the multiplexer for the 4 nets that those bits guard:

```
net_o = fi_enable ? faulty(net_i, q) : net_i
faulty = net_i ^ q   (FM_FLIP, bit flip)
       = net_i & ~q  (FM_SA0,  stuck-at-0)
       = net_i | q   (FM_SA1,  stuck-at-1)
```

`fis_fi_chain` links eight elements. After the 8 WRITE shifts, **bit k of
lane j is in element k and controls net `8*j + k`**. The chain's 32 nets are
therefore numbered lane-major, the same way as the fault word. The chain's
parallel `contents` output equals the fault word that was written. Adding
elements (`N_FI`) or lanes (`LANES`) gives more injection points. The write
time is always N_FI clocks.

## Read-back and classification (`fis_readback`)

In the first FI Enable clock, the chain contents are copied into the
read-back data register. The number of ones in each lane is counted. Nine
saturating counters record how many lane injections had 0, 1, …, 8 upset
bits. These are the single, double, triple and quadruple upsets, plus the
wider ones that random words produce. The counters are cleared when a
campaign starts.

## Targets and output monitor (`fis_target`)

The 32 chain nets are wired into four small workload circuits, one per lane:

| lane | workload         | instrumented nets (8 each) |
|------|------------------|-----------------------------|
| 0    | `wl_counter`     | count register → incrementer and output |
| 1    | `wl_bubble_sort` | four registered 2-bit inputs → bubble-sort network (3+2+1 compare-exchange steps) |
| 2    | `wl_adder4`      | registered 4-bit operands → adder |
| 3    | `wl_mult4`       | 8-bit product → output register |

Each workload also has a golden copy that gets the same stimulus and has no
FI elements. The stimulus is a sequence that adds 37 every clock. The monitor
compares the two copies' outputs every clock. For each workload it counts the
clocks in which they differ. This measures how far a fault reaches the
outputs. A fault on the counter is stored at the next clock and stays. A
fault on the adder, multiplier or sorter inputs lasts only while FI Enable is
high, and can be masked: for example, two flipped sort inputs can give the
same sorted result. Starting a campaign resets the workloads and the
stimulus, so the two copies start out equal. The adder's output is 5 bits
wide; `wl_out[2]` pads it to 8 with three constant zeros.

To instrument your own circuit, connect its nets to the chain's
`net_i`/`net_o` in place of `fis_target`. Remove the fault-free net from the
circuit and take the corrupted one from the chain.

## Host register map (`fis_regs`, addresses in `fis_pkg`)

Word addresses on a 5-bit bus. A write takes effect at the clock edge while
`host_wr` is high. `host_rdata` is combinational on `host_addr`.

| addr      | name     | access | contents |
|-----------|----------|--------|----------|
| 0x00      | CTRL     | R/W    | [0] start (write 1; reads 0), [1] reseed, [2] manual, [6:4] upset count, [9:8] mode (0 flip, 1 SA0, 2 SA1, 3 = flip) |
| 0x01      | STATUS   | R      | [0] busy, [1] done, [4:2] phase (0 idle, 1 init, 2 write, 3 inject, 4 gap) |
| 0x02      | SEED     | R/W    | seed byte per lane (reset 0x01010101) |
| 0x03      | TAPS     | R/W    | tap byte per lane (reset 0x60606060) |
| 0x04      | MANUAL   | R/W    | fault word used when manual is set |
| 0x05      | NUM_INJ  | R/W    | injections per campaign (0 acts as 1) |
| 0x06      | HOLD     | R/W    | FI Enable clocks per injection, 16 bits (0 acts as 1) |
| 0x07      | GAP      | R/W    | idle clocks between injections, 16 bits |
| 0x08      | RB_DATA  | R      | read-back data register |
| 0x09      | INJ_DONE | R      | injections done in this campaign |
| 0x0A      | INJ_TIME | R      | clocks from INIT to FI Enable of the last injection (18) |
| 0x0B      | ONES     | R      | ones per lane of the last read-back, 4 bits per lane |
| 0x10–0x18 | CLASS0–8 | R      | lane injections with 0..8 upset bits |
| 0x19–0x1C | MISMATCH | R      | clocks of differing output, per workload |

A campaign starts in the clock after the CTRL write. `start` is ignored while
a campaign is running. `irq_done` (= STATUS.done) stays high from the end of a
campaign until the next start. Every reset is synchronous and active low.

## Sources and design choices

These parts follow the source description:

* the programmable-tap LFSR and its feedback equation;
* four 8-bit LFSR injectors combined into a 32-bit fault word;
* 1- to 4-bit upsets set by masking logic;
* a chain of eight FI elements loaded at the clock edge and applied by FI
  Enable;
* 10 init clocks plus 8 write clocks, 18 in total;
* a read-back data register whose contents are classified by their number of
  ones;
* counter, bubble sort, 4-bit adder and 4-bit multiplier as workloads;
* monitoring of the design's outputs.

These are this design's own choices:

* how the 10 init clocks are split;
* the burst placement of the mask;
* one bit per lane in each FI element, with lane-major net numbering;
* the stuck-at modes of the element (the source names stuck-at and bit-flip
  fault models but does not say how the element applies them);
* hold and gap as the way to set the injection rate;
* the `reseed` and `manual` options;
* the register map and host port;
* the sizes of the workloads and which of their nets are instrumented;
* the golden-copy monitor.

Not included:

* the processor system that drives the host port;
* the OR1200 core used as the main evaluation target;
* addressing of FPGA configuration-memory frames;
* any model of the configuration memory itself.

Size: the source reports about 95 flip-flops of overhead for its server. In
coarse synthesis at the default sizes, this server (without the workloads)
has 717 flip-flop bits. Most of them are the nine 32-bit class counters (288)
and the configuration registers (168). The chain itself is 32 bits, the fault
registers 64 and the LFSRs 32. Set `CNT_W` lower to shrink the counters.

## Files

| file | contents |
|------|----------|
| `rtl/fis_pkg.sv` | sizes, fault-mode and phase enums, configuration struct, register addresses |
| `rtl/fis_lfsr.sv`, `rtl/fis_fault_injector8.sv`, `rtl/fis_fault_injector32.sv` | fault word generation |
| `rtl/fis_fi_element.sv`, `rtl/fis_fi_chain.sv` | FI elements and chain |
| `rtl/fis_readback.sv` | read-back register and classifier |
| `rtl/fis_controller.sv` | injection sequencer (with an assertion on the 18-clock injection time) |
| `rtl/fis_regs.sv` | host registers |
| `rtl/wl_*.sv`, `rtl/fis_target.sv` | workloads, golden copies, output monitor |
| `rtl/fis_top.sv` | the complete server with its targets |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_mbu_statistics.sv` | bit-position statistics of 10^6 generated faults |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, to run the end-to-end test of the top module at its default sizes:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_fis_top \
    -y rtl -Irtl rtl/fis_pkg.sv tb/tb_fis_top.sv -o sim
./obj_dir/sim
```

Replace `tb_fis_top` with any other `tb_*` module to run that test.
`tb_fis_top` runs 17 campaigns through the host port. It covers every upset
count, raw random words, the manual word, all three fault modes, constant and
varied seeds, hold and gap, and a start written while busy. For every
injection it checks the read-back word, the ones per lane, the class
counters, the injection count, the 18-clock injection time and the FI Enable
spacing (18 + hold + gap) against a software model. It also checks that each
of these mechanisms and a detected output mismatch on every workload occurred
at least once. It runs in a few seconds.

The testbenches do not cover:

* timing closure at 100 MHz on a real device;
* interaction with a real target netlist;
* the exact percentages of the source's MBU statistics, whose seeds and taps
  are unknown.
