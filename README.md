# Bunch-by-bunch transverse feedback processor

A storage ring holds bunches of electrons that pass a beam position monitor (BPM) one after the
other at the RF frequency: 508.58 MHz at SPring-8, with 2436 bunch slots around the ring. A
coherent transverse oscillation of the bunches can be damped if each bunch is measured, its
position history is run through a digital filter that shifts the betatron oscillation by the right
phase, and the result drives a kicker that pushes that bunch one turn later. This RTL is the
digital core of such a processor, the part inside one FPGA between the ADCs and the DACs:

```
             6 ADCs at fRF/6              one-turn-delay FIR         bunch order restored, 2 per fast clock
BPM ──► ADC0..ADC5 ──► async_fifo ──► fir_filter ×6 ──┬─ y_a ─► out_mux ─► delay_fifo ─► ddr_out ─► DAC0, DAC1
 (analog                 (per ADC                     └─ y_b ─► out_mux ─► delay_fifo ─► ddr_out ─► DAC2, DAC3
  front end)              data clock)                                                    
                          └──────────► delay_adj ──────────────► out_mux ─► delay_fifo ─► ddr_out ─► DAC4 (raw)
                          └──────────► history_capture ──► 32M-word sample memory
  host (USB) ◄──► ctrl_regs ──► coef_bank (32 coefficient sets, external set select)
```

The top module is `rtl/bbf_processor.sv`. Every other file in `rtl/` is one of its blocks, and
`rtl/bbf_pkg.sv` holds the shared sizes, enums and the configuration struct.

## Interleaved sampling: one bunch stream, six channels

No single 12-bit ADC runs at 508 MS/s, so six ADCs are clocked at fRF/6 = 84.76 MHz with staggered
phases. ADC *c* sees bunches *c*, *c*+6, *c*+12, … . Since 2436 = 6 × 406, each ADC sees the
**same 406 bunches every turn**, in the same order. This is the central fact of the design. A
delay of 406 samples on one channel therefore takes a bunch to its own position one turn
earlier. Each channel is then filtered on its own, and no data ever has to cross between channels.

In *four ADC mode* (for rings whose harmonic number has 4 as a factor but not 6), only channels
0–3 are used, the ADC clock is fRF/4 (125 MHz for a 500 MHz ring), and the turn length register is
set to h/4.

Each ADC returns its data with its own data clock (`adc_dco[c]`), at an unknown phase relative to
the processing clock `clk`. A small Gray-code FIFO per channel (`async_fifo`, 16 words) moves the
samples into the `clk` domain. The top reads all active FIFOs in the same cycle, and only when
none of them is empty. Each processing cycle then holds one complete "frame": bunches 6m … 6m+5.

## The turn-by-turn FIR filter

`fir_filter` computes, for every bunch,

```
y[n] = att( Σ_{k=0}^{TAPS-1}  c_k · x[n − k·T] )          T = samples per turn per channel (406)
```

It uses a direct form:

* **Delay line.** A cascade of TAPS−1 = 49 one-turn delays (`turn_delay`). Each is a RAM of up
  to `TURN_MAX` = 1024 words read before it is written at the same address. Its length is set at
  run time from the `TURN_LEN` register, so one bitstream serves any ring with up to 1024 × 6
  bunches.
* **Multipliers.** One per tap, 12-bit sample × 16-bit coefficient → 28-bit product, registered.
* **Adders.** Five-port adders (`adder5`) sum five products each into 31 bits, registered. A
  final adder then sums the ten group sums.
* **Attenuation.** The total is shifted right arithmetically by `ATT` (reset 15, so a coefficient
  of 2^15 means unity gain). It is then saturated to the 12-bit DAC code.

From a sample entering the filter to its output is 4 clocks. The filter advances only on valid
frames, so a FIFO gap does not corrupt the turn alignment.

**Two filters instead of one.** Setting CTRL bit 1 splits the filter into two 20-tap filters on the
same input, which share the first 20 delays:

| Output | Coefficient slots | Delays |
|---|---|---|
| A | 0–19 | 0–19 |
| B | 20–39 | 0–19 |

Slots 40–49 are ignored. The two outputs go to different DAC pairs. This serves, for example,
separate horizontal and vertical kicks from one skewed BPM. In single mode, A and B carry the same
50-tap result. A single-loop two-dimensional filter of 24 taps must therefore use single mode.

Six filters of 50 taps take 300 multipliers and 6 × 49 RAMs of 406 × 12 bits.

## Coefficient sets

`coef_bank` stores 32 sets of 50 coefficients. The host writes them one at a time through
`COEF_ADDR`/`COEF_DATA`. The active set comes from one of two places:

* the `COEF_SEL` register;
* with CTRL bit 2 set, the 5-bit `ext_coef_sel` pins.

The pins are synchronised by two flops, so a new set reaches all multipliers 4 clocks after the
pins change (about 47 ns at 84.76 MHz). All six channels switch on the same clock edge. This lets
a machine timing signal change the filter, for example when the tune or the bunch current changes.

## Putting the bunches back in order

Each DAC must produce one sample per bunch at fRF. `out_mux` does the "6:1 (or 4:1) multiplexer"
job on a fast clock `clk_fast`, which the clock manager makes from `clk`:

| Mode | clk_fast |
|---|---|
| Six ADC | 3 × clk = 254.29 MHz |
| Four ADC | 2 × clk |

In both modes `out_mux` emits **two bunches per fast cycle**. The slow side latches the frame and
toggles a flag. The fast side sees the toggle one fast cycle later and sends pairs (0,1), (2,3),
(4,5), or only (0,1), (2,3) in four ADC mode. `ddr_out` then sends the first bunch of a pair on
the rising edge of the 254 MHz clock and the second on the falling edge. This gives 508.58 MS/s
to the DAC. Because the two clocks are phase aligned, the frame register is read across the
boundary as a multicycle path and needs no FIFO.

There are three such chains:

| Chain | Source | DACs |
|---|---|---|
| A | filter output A | DAC0, DAC1 |
| B | filter output B | DAC2, DAC3 |
| Raw | ADC samples | DAC4 |

DAC0 and DAC1 carry the same data. They give two kicker electrodes their own driver; polarity is
handled by the DACs' complementary outputs. The raw chain is for diagnostics and timing set-up.

## Latency and delay

The loop must close after one (or two) revolutions: a bunch must be kicked when it comes back.
The processor is made deliberately slow enough by the **delay FIFOs** (`delay_fifo`). Each is one
per output chain, on the fast clock, and programmable from 1 to 2048 pair slots (`DLY_A`,
`DLY_B`, `DLY_RAW`, in units of 3.93 ns). At SPring-8 the system needs 3.5 µs of extra delay to
reach the 4.8 µs revolution. That is 890 slots, which `tb_spring8_workload` programs and checks
to the bunch.

The raw path also has `delay_adj`: a per-channel delay of 0–7 ADC clocks (`RAW_DLY`). It can
compensate for unequal ADC pipeline or cable delays before the channels are interleaved.

The latency with zero programmed delay was measured in simulation at **333 ns**, counting the
ADC's own 10-clock pipeline. That leaves room within a 400 ns processor budget, as needed for a
ring with a 600 ns revolution. Most of it is clock-domain crossing and the ADC pipeline; the
filter itself takes 4 clocks.

## Sample history

`history_capture` writes every raw sample into an external memory of 32M 16-bit words. At
508.58 MS/s that holds about 66 ms, several radiation damping times (8 ms at SPring-8). Each
processing clock, one beat of six (or four) sign-extended words goes out on `mem_wr_*` to a memory
controller outside this design. The memory is used as a ring.

To capture:

1. The host arms the capture.
2. A trigger starts the post-trigger count. It can be a register write, or the `ext_trig` pin
   when CTRL bit 3 is set.
3. After `CAP_POST` more beats, writing stops and the memory is frozen for read-out.

`CAP_TRIG` records where the trigger fell in the ring.

## Registers

`ctrl_regs` is a simple word-addressed bus (`reg_we`, `reg_re`, `reg_addr`, `reg_wdata`,
`reg_rdata`; read data one clock after `reg_re`). It is meant to sit behind the USB interface.

| Addr | Name | Meaning |
|---|---|---|
| 0x00 | CTRL | [0] four ADC mode, [1] two 20-tap filters, [2] external set select, [3] external trigger |
| 0x01 | TURN_LEN | samples per turn per channel (reset 406) |
| 0x02 | ATT | filter output right shift (reset 15) |
| 0x03 | COEF_SEL | software coefficient set |
| 0x04 | COEF_ADDR | [12:8] set, [5:0] tap for the next COEF_DATA write |
| 0x05 | COEF_DATA | write [15:0] to that coefficient |
| 0x06–0x08 | DLY_A, DLY_B, DLY_RAW | delay FIFO settings (pair slots − 1) |
| 0x09 | RAW_DLY | 3 bits per channel |
| 0x0A | CAP_CMD | pulses: [0] arm, [1] trigger, [2] stop |
| 0x0B | CAP_POST | post-trigger beats |
| 0x0C | STATUS | [1:0] capture state, [2] wrapped, [12:8] active coefficient set |
| 0x0D | CAP_TRIG | first address written after the trigger |
| 0x0E | CAP_ADDR | next capture address |
| 0x0F | ID | 0x0BBF0001 |

Change the mode, the turn length and the delays only while the loop is not in use. They reach the
fast clock domain as static signals.

## What is outside this RTL

The following are the ports of `bbf_processor` and are not modelled:

* the ADCs and their data clocks;
* the DACs;
* the ×6 PLL that makes the DAC clock from the ADC clock, and the clock manager that makes
  `clk_fast`;
* the SDRAM and its controller;
* the USB interface;
* the compact-flash configuration.

Two choices about them are assumptions of this design:

* The DAC code is 12-bit two's complement. A DAC that wants offset binary needs the sign bit
  inverted at the pins.
* The memory controller is assumed to accept a write beat every clock.

## Choices made in this design

The overall structure is as described for the processor on which this design is based:

* ADCs at fRF/6 or fRF/4;
* one-turn delays as 406-word memories;
* 12 × 16-bit multipliers and five-port adders, with attenuation/truncation;
* 50 taps or two 20-tap filters;
* 32 coefficient sets with external switching;
* a 6:1/4:1 multiplexer at 3 × the ADC clock feeding DDR registers;
* five DACs, with one carrying raw data;
* an adjustable output delay;
* a 32M-word history.

The following are this design's own:

* the per-channel FIFOs and the frame alignment across channels;
* saturation after the attenuator;
* how the two 20-tap filters share the delay line and the coefficient slots;
* the fast clock in four ADC mode (2 × clk);
* the depths of the output delay (2048) and of the raw-channel delay (0–7);
* the capture trigger scheme and the ring addressing;
* the whole register map.

The filter is a plain direct form with registered stages. It is not tuned for a particular FPGA's
timing. Its pipeline is multiply, five-port add, final add of the ten group sums, attenuate: one
clock each. On a real device the ten-input final adder may need a second stage, which would add
one clock of latency.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares the block against a
behavioural model written independently in the bench, and prints
`TB_RESULT checks=N failures=M`.

* **`tb_bbf_processor`** runs the top at its default sizes (a short 8-sample turn is programmed at
  run time). It drives six ADC models, each with its own data clock phase, and covers:
  * both ADC modes and both filter arrangements;
  * software and external coefficient switching;
  * output and raw delays, and saturation;
  * a capture with trigger;
  * the latency measurement.

  It counts each of these and fails if any never happened. It checks every DAC sample against a
  bunch-level model.
* **`tb_spring8_workload`** is the SPring-8 case:
  * 406 samples per turn;
  * a 9-tap, a 50-tap and a 24-tap filter over the full 49-turn history, and then two 20-tap
    filters on two DACs, checking all 2436 bunches of a turn in each case;
  * the 3.5 µs delay.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal --top-module tb_bbf_processor \
    -y rtl -y tb +libext+.sv rtl/bbf_pkg.sv tb/tb_bbf_processor.sv
obj_dir/Vtb_bbf_processor
```

The full-size top takes a few minutes to build and under a second to run. The block benches build
in seconds. To try another ring, change `TURN_LEN` at run time (up to 1024 per channel) or the
`TURN_MAX` parameter for larger rings.
