# Software-defined phase-locked loop

A phase-locked loop whose loop filter is a program. The hardware measures time with a 1 ps
time-to-digital converter (TDC), hands each measurement to a small 32-bit RISC processor
(an OpenRISC 1200, not part of this RTL), and applies whatever control word the program
writes back to a digitally controlled oscillator (DCO). Changing the locking algorithm
means changing the program in a 256 x 32 instruction memory, not the circuit.

The processor does not poll a peripheral. Instead, the PLL hardware feeds the CPU its
instruction stream. The memory controller reads the program, splices the measured error
into two special instructions on the way to the CPU, and executes "block jumps" itself,
choosing between two code blocks according to which clock led. The CPU's only output is
an ordinary store. Its data is the DCO control word, and three bits of its address set the
loop's operating mode.

Target numbers of the design:

| quantity | value |
|---|---|
| reference input | 50 kHz to 6.3 MHz |
| TDC resolution / range | 1 ps, 2.358 ns to 4 ms |
| DCO | 333 MHz with control word 0, otherwise period = control word x 10 fs |
| program memory | 256 words x 32 bits = 16 blocks of 16 instructions |
| CPU clock (SACA) | bursts of up to 31 cycles at 263, 134, 90 or 67 MHz |

## Structure

```
             ref_clk ──┬──────────────────────────────┐
                       v                              v
  load ──> SACA (burst clock) ── embed_clk ──> memory controller <──> 256x32 memory
                                                 │  ^ error_value, lead/lag, error_valid
                               error_set         v  │
                                           error detector <── dco_clk ── DCO
                                  (divider, phase detector, mux,          ^ ctw
                                   one-pulse lock, 1 ps TDC)              │
   CPU instruction bus <── memory controller                       DCO interface
   CPU data bus ──> state controller (modes) ──────────────────────>  (CDC + FSM)
```

`sdpll_top` wires the following together. The CPU's instruction and data buses are
brought out as ports.

* **SACA** (`saca`): the system clock.
* **Memory controller** (`memory_controller`) and **memory** (`sdpll_memory`).
* **Error detector** (`error_detector`): made of `freq_divider`, `phase_detector`,
  `opl_pa` and `tdc`. The TDC is in turn built from `gate_delay_tdc`, `tdc_chain`,
  `tdc_decoder`, `diff_delay_tdc`, `delay_pulse`, `sub_tdc` and `diff_decoder`.
* **State controller** (`state_controller`).
* **DCO interface** (`dco_interface`) and **DCO** (`dco`).

Shared encodings live in `sdpll_pkg`.

## One loop iteration

1. The memory controller sits in its **Transition** state and raises `error_set`
   for two clocks. This clears the TDC and re-arms the one-pulse lock. It then lowers
   `error_set` and waits.
2. The error detector measures one pulse. What it measures depends on `detect_mode`:
   - in frequency detection it measures the high half of `ref_clk`;
   - in phase detection it measures the gap between the rising edges of `ref_clk` and
     the divided DCO clock.

   `error_valid` rises at the falling edge of the pulse.
3. The controller synchronises `error_valid` and captures the value and the lead flag.
   It then enters **Algorithm** and streams words to the CPU, one read every two clocks:
   - `0x198004d2` (`l.movhi r12,...`) goes out with its immediate replaced by `error[31:16]`;
   - `0xa98c162f` (`l.ori r12,r12,...`) goes out with its immediate replaced by `error[15:0]`.

   After these two instructions, r12 holds the measured error.
4. A word with major opcode `0x1c` is a **block jump**. The controller does not send it.
   It moves its read pointer to the start of block `[3:0]` if `ref_clk` came first, or of
   block `[7:4]` otherwise.
5. Ordinary instructions go to the CPU unchanged. The CPU reports a result with `l.sw`:
   - the stored data becomes the DCO control word;
   - address bits `[10:8]` (with `[7:0] = 0x04`) become the modes.

   The mode bits are:

   | bit | name | 0 | 1 |
   |---|---|---|---|
   | 0 | `dco_mode` | frequency-lock word | phase-lock word |
   | 1 | `detect_mode` | measure `ref_clk` high time | measure phase error |
   | 2 | `tracking_mode` | coarse | fine (decoded and output only) |
6. A zero word ends the pass. The controller steps past it and returns to Transition.

Before any of this, a program is loaded by holding `load` high and presenting one word per
clock on `load_instruction`, starting at address 0. While `load` is high the SACA runs
continuously. CPU fetches are answered with `iwb_err` while loading. While the controller
waits for a measurement they are answered with `iwb_rty`.

## The 1 ps TDC

The TDC is the heart of the design and the least obvious part. It combines a coarse
converter with 10 ps resolution and a fine converter that supplies only the last decimal
digit. `tdc_out = 10 x gate + digit`, in picoseconds.

**Gate-delay TDC.** The coarse converter is a ring of 256 stages: an AND-gate switch
followed by 255 inverters of 10 ps each. The measured pulse opens the switch, so an edge
runs round the ring for as long as the pulse is high. Latches follow the ring while the
pulse is high and freeze when it falls. The result has three fields:
- the decoder finds where the front is and returns it as `[7:0]`;
- `[8]` says whether the front is in the ring's first or second half-lap; because the
  stages invert, the pattern left behind flips polarity every lap;
- a counter clocked by the last stage counts full double-laps into `[31:9]`.

Together the fields equal floor(T / 10 ps). The counter only counts while the pulse is
high, so the ring's drain after the pulse ends does not add counts. The ring needs one
ring length (2.56 ns) after a pulse to return to rest. The controller's `error_set` time
covers this.

**Differential TDC.** The fine converter uses two delay sizes, 11 ps and 10 ps, whose
difference is 1 ps.
- A chain of nine 11 ps inverters makes ten copies of the pulse, delayed by 0, 11, ... 99 ps.
- Each copy drives a small sub-TDC: a 21-stage ring of 10 ps stages.
- Each sub-TDC's latches are held open by the *undelayed* pulse, so sub-TDC k measures
  the pulse shortened by 11k ps. Its output is v[k] = floor((T - 11k) / 10) mod 21.
- Write T = 10q + r. Neighbouring v differ by 1 everywhere except between k = r and
  k = r + 1, where they differ by 2, or by -19 when the count wraps round 21.
- Nine comparators look for that step. A priority encoder turns the first hit into the
  digit r. If no comparator fires, r is 9; a tenth comparator confirms this by checking
  that v[0] - v[9] equals 9 modulo 21.

The odd-numbered copies come out of an odd number of inverters and are therefore
inverted. Their sub-TDCs re-invert them with an inverting input on the switch, which is
the only difference between the "even" and "odd" sub-TDCs. The 21-stage ring uses
inverted feedback so that an odd-length ring keeps oscillating.

**Pulse amplifier with one-pulse lock.** `opl_pa` guards the TDC input in two ways:
- It passes only the first complete pulse after `error_set` falls, because the TDC
  would otherwise accumulate every pulse.
- It widens a pulse shorter than 2.358 ns to 2.358 ns, the converter's minimum.

Consequence: a phase error below 2.358 ns is reported as about 2.358 ns. The loop cannot
resolve smaller phase errors, and a program that kept correcting would chase the 2.358 ns
reading. The example program corrects once and then only monitors. The end-to-end test
reaches a final error below 40 ps, because the frequency word is exact to within 10 fs
per period.

## Phase detector and frequency divider

`freq_divider` counts DCO clocks. For `div_value` N ≥ 2 it produces one `div_clk` period
every N DCO periods, high for floor(N/2) of them. For N of 0 or 1 it passes the DCO clock
straight through.

`phase_detector` is a two-flip-flop phase-frequency detector. Its output pulse runs from
the earlier rising edge to the later one. `lead` means the `ref_clk` edge came first.
`error_set` also holds both flip-flops clear, so every measurement pairs edges afresh: the
first rising edge after release opens the pulse, and the other clock's next rising edge
closes it. As a result, the lead/lag answer depends on where in the cycle `error_set` is
released, as well as on the true phase. Either answer gives a correction that lines the
edges up, because the two measured gaps add up to one period.

## Clocks

**SACA** (semi-asynchronous clock access) keeps the digital side quiet between reference
edges:
- Every `ref_clk` rising edge restarts a counter, and `embed_clk` then runs for `m_cycle`
  cycles (5 bits).
- It then stops and idles high.
- `n_mode` picks 263, 134, 90 or 67 MHz.
- `burst_mode` and `initial_signal` keep it running; the top ties `initial_signal` to
  `load`.

The program's work per reference period must fit in the burst. The memory controller
needs two clocks per instruction, and the CPU model needs an extra clock per store.

**DCO interface.** The CPU writes control words in the CPU clock domain.
- Each write toggles a flag, which a three-flop synchroniser carries into the DCO domain
  together with the held word.
- A frequency word (`dco_mode` = 0) becomes the DCO's steady control word.
- A phase word (`dco_mode` = 1) runs the FSM Coarse Frequency → Coarse Phase →
  Coarse Transition → Coarse Frequency:
  - the phase word drives the DCO for exactly one DCO cycle;
  - the frequency word returns for the transition cycle and after it.
- A single shortened or lengthened period therefore shifts the phase without disturbing
  the frequency.

**DCO.** The period is `ctw` x 10 fs, and 333 MHz when `ctw` is 0.

## Example locking program

The processor is external, so the algorithm is software. The end-to-end testbench uses the
following program. It has no divide instruction, so it multiplies with shifts and adds.

* **Block 0: frequency pass** (`detect_mode` = 0).
  - The two input instructions load H, the half period of `ref_clk` in ps, into r12.
  - The frequency word is 2 x H x (1 ps / 10 fs) / Div, which is 200H for Div = 1 or 25H
    for Div = 8.
  - The word is stored with modes `010`, which switches to phase detection.
  - An optional run of `l.nop` and a zero word end the pass.
* **Phase pass.** The input instructions load the phase error E, and a block jump follows.
  - **Block 5, `ref_clk` first:** the divided clock is late. The program stores the
    frequency word minus 100E with modes `111`. One DCO period is then shortened by E ps,
    which moves every later divided edge E ps earlier.
  - **Block 6, divided clock first:** the program stores the frequency word plus 100E,
    lengthening one period.
* **Block 7:** a monitoring loop that re-measures and makes no further correction.

The two input instructions (phase measurement) come right after the frequency pass.
Whether `ref_clk` or the divided clock rises first after `error_set` falls therefore
depends on when the pass ends. The testbench varies this with the `l.nop` padding, so both
jump targets are exercised.

With this program, at 6.3 MHz and Div = 1 the loop locks in about 8 reference cycles.
With Div = 8 it locks in about 6. Other reference periods and paddings took 12 to
18 cycles in simulation. The DCO-domain synchroniser, the two-clock `error_set` window, and
the wait for the first pulse after release all add cycles. So does a correction taken the
long way round: when the divided clock rises first, the gap measured is the period minus
the true phase error.

## What is synthesizable

| synthesizable RTL | behavioural models (need real delays) |
|---|---|
| memory controller, memory, state controller, DCO interface, frequency divider, phase detector, TDC decoders, differential decoder, TDC counter and latches | SACA ring oscillator, pulse amplifier (delay path), TDC delay rings (`tdc_chain`), 11 ps delay chain (`delay_pulse`), DCO |

The behavioural models carry real-valued delay parameters in ps. The latch chain buffers
are deliberate level-sensitive latches. The phase detector's reset path is a deliberate
asynchronous loop, as in any phase-frequency detector.

## Choices made here

These points were not fixed by the design description and are this implementation's own:

* The memory controller holds `error_set` for two clocks on entering Transition. It
  synchronises `error_valid` with two flops. It ends a pass on an all-zero word.
* The instruction acknowledge is combinational. Requests are answered with err while
  loading and rty while waiting.
* Memory reads have one clock of latency.
* `error_set` is held low during reset, so its rising edge at reset release clears the
  TDC and the one-pulse lock.
* The phase detector circuit, including its clear input, is this design's own. Lead/lag
  is sampled at each `ref_clk` rising edge.
* The fine TDC uses modulo-21 rings, and the tenth comparator tests (v0 - v9) mod 21 = 9.
* The DCO interface crosses clock domains with a toggle handshake. Its Coarse Phase state
  lasts one DCO cycle.
* The divider width is 16 bits, and the duty cycle is floor(N/2) high.
* SACA half periods are rounded to 1901, 3731, 5556 and 7463 ps.
* `tracking_mode` is decoded and brought out, but nothing uses fine tracking.

## Limits

* Phase errors below 2.358 ns cannot be measured, only detected; see the pulse amplifier.
* With Div > 1, a phase error larger than one DCO period in the "ref first" direction
  would need a negative phase word. The example program does not handle that case.
* Lock takes longer than six reference cycles in most simulated cases (see above).
* The OpenRISC CPU is not included. The testbench uses a small model (`tb/or_cpu_model.sv`)
  that executes the ORBIS32 instructions the program needs: `l.movhi`, `l.ori`, `l.addi`,
  `l.slli`, `l.srli`, `l.add`, `l.sub`, `l.sw` and `l.nop`.

## Simulation

Every file uses `timescale 1ps/10fs`, because the models need 10 fs resolution. Each
block has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
          rtl/sdpll_pkg.sv tb/tb_sdpll_top.sv --top-module tb_sdpll_top -Mdir obj
./obj/Vtb_sdpll_top
```

`tb_sdpll_top` runs the whole PLL at its default parameters. It loads the program above,
then locks six times with different reference periods, phases, SACA frequencies and
Div = 1 or 8. It checks:
- the frequency word against 200H / Div;
- the mode bits after each pass;
- lock: rising edges within 20 ps, final error below 40 ps, and a bound on the
  reference-cycle count.

It also counts every mechanism and fails if one never occurs: loading, both input
instructions, lead and lag jumps, all three DCO interface states, pulse widening, bus
retries and completed passes. It runs in a few seconds.

The TDC testbenches check the result against floor(T / 1 ps) for pulses of known width.
The widths are whole picoseconds plus 0.5 ps, so no edge lands on a stage boundary.
