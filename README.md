# Interactive sine-wave generator for a small FPGA

This design turns a low-cost FPGA board into a digital sine-wave generator.
A PC sets the frequency over an RS-232 link. The output is a stream of 16-bit
signed samples at 20 MS/s (one sample every 50 ns). The frequency can be set
from 1 kHz to 1 MHz in 1 kHz steps. There is no DAC: `dataout` is the signal,
in digital form.

The main idea is a fixed sampling clock with a variable address step. One
period of a 1 kHz sine is stored as 20000 samples. Read one sample per 50 ns
clock, the table gives 1 kHz. Reading every s-th sample gives s kHz. The
address step is therefore simply the requested frequency in kHz, and no
multiplier or phase-accumulator fraction is needed.

## How the frequency comes out exact

The table address moves forward by `step` on every sampling clock. When it
passes the end of the table, it wraps modulo 20000 and keeps the remainder:

    addr(n+1) = (addr(n) + step) mod 20000
    dataout   = floor(32767 * sin(2*pi*addr/20000))

After 20000 clocks (1 ms) the address has gone round the table exactly `step`
times, so the average frequency is exactly `step` kHz. Each single period is
a whole number of samples, either floor(20000/step) or ceil(20000/step):

| requested | samples per period | period          |
|-----------|--------------------|-----------------|
| 25 kHz    | 800                | 40 000 ns       |
| 75 kHz    | 266 or 267         | 13 300 / 13 350 ns |
| 150 kHz   | 133 or 134         | 6 650 / 6 700 ns |
| 667 kHz   | 29 or 30           | 1 450 / 1 500 ns |
| 1 MHz     | 20                 | 1 000 ns        |

The period jitters by one sample whenever 20000 is not a multiple of the step.
The effective resolution of the waveform also falls as the frequency rises: at
1 MHz, one period has only 20 samples. Both follow from the fixed 50 ns
sampling clock.

The wrap keeps the remainder, so the phase error never builds up. Restarting
at exactly address 0 would turn 150 kHz into a steady 134-sample period, which
is 149.25 kHz.

## The request: `data_buffer`

The PC sends six bytes at 115200 baud, in 8N1 frames (start bit low, 8 data
bits LSB first, stop bit high). The receiver collects them in the 48-bit
`data_buffer`:

| bits    | field          | value                                  |
|---------|----------------|----------------------------------------|
| 47:40   | update request | 01h = apply this configuration         |
| 39:32   | signal type    | 00h = sine (the only type implemented) |
| 31:24   | thousands      | decimal digit 0..9, as a binary value  |
| 23:16   | hundreds       | digit                                  |
| 15:8    | tens           | digit                                  |
| 7:0     | ones           | digit                                  |

Example: 667 kHz is `01 00 00 06 06 07` (hex), and 25 kHz is
`01 00 00 00 02 05`.

The digits are binary values 0..9, not ASCII characters.

**Byte order on the wire.** The 8-bit receiver shifts each new bit in at its
MSB. The 48-bit buffer continues that right shift one byte at a time: each new
byte enters bits 47:40 and the rest move down. So the first byte sent ends in
bits 7:0. The sender transmits **ones, tens, hundreds, thousands, type, update
flag**, with the update flag last. The end of a request is found by counting
six good bytes. A byte with a low stop bit is dropped and does not count. There
is no timeout that re-aligns a request after a lost byte: the next six good
bytes are taken as a request.

## The update sequence and the two clocks

```
 rxd ──> rs232_controller ──data_buffer, buffer_valid──> controller_fsm
          (uart_rx inside)                                   │ freq_step
 sys_clk (20 ns) ──┬─────────────────────────────────────────┤ pll_areset
                   └──> pll_model ──pll_clk (10 ns)──> clock_divider (/5)
                          │ locked                          │ sampling_clk (50 ns)
                          └──> reset_sync ──table_rst──> sine_table ──> dataout
```

The receiver and the FSM run on the 20 ns board clock `sys_clk`. The sine
table runs on `sampling_clk`, made by a PLL (20 ns to 10 ns) and a divide-by-5
counter.

The controller FSM (`controller_fsm.sv`) has four states:

1. **GENERATE**: the table runs and `update_done` is high. When `buffer_valid`
   comes with an update flag of 01h, the FSM pulses `freq_update_req` and
   moves to IDENTIFY.
2. **IDENTIFY**: the four digits are converted to a frequency in kHz, th·1000 + h·100 + t·10 + o.
   A request is accepted only if:
   - it asks for a sine;
   - every digit is 0..9;
   - the frequency is 1..1000 kHz.

   Anything else pulses `req_rejected`, and the old signal keeps running.
3. **RESET_PLL**: the new step is loaded on entry. `pll_areset` is held high
   for `RESET_CYCLES` clocks.
4. **WAIT_LOCK**: the FSM waits for `locked`, then raises `update_done` and
   returns to GENERATE.

Requests that arrive in the other states are ignored.

At power-up the FSM starts in RESET_PLL with step 1, so the board comes up
producing 1 kHz.

**Why `freq_step` needs no synchroniser.** `freq_step` crosses from `sys_clk`
to `sampling_clk`. It changes only at the start of RESET_PLL. Resetting the
PLL stops `pll_clk`, so `sampling_clk` stops too, and `locked` falls. A 2-flop
reset synchroniser (`reset_sync.sv`) on `sampling_clk` then holds the table at
address 0 until `locked` is back. It powers up asserted and also asserts on
every clock edge while `locked` is low. The PLL clock runs while the PLL is
acquiring lock, so the table is reset with its clock running. It leaves reset
on the second sampling edge after lock. Every new frequency therefore starts
at phase 0 with a step that has been stable for microseconds.

Timing of one update, at the default parameters:
- `buffer_valid` comes in the middle of the last byte's stop bit.
- `pll_areset` rises 2 `sys_clk` cycles later and stays high 4 cycles.
- Lock takes 64 reference cycles (1.28 µs, a model figure).
- `update_done` rises 1 cycle after lock.
- The first new sample follows within a few sampling clocks.

## The lookup table

`sine_rom.sv` holds 20000 × 16 bits (320 000 bits, one period). Entry a is
floor(32767 · sin(2πa/20000)). An initial block computes it when the memory
is initialised, so no data file is needed. FPGA synthesis turns that initial
block into the ROM image. The read is registered: `data` shows the entry for
the address sampled at the previous rising edge.

## Files

| file | role |
|------|------|
| `rtl/sine_gen_pkg.sv` | sizes, byte codes, `data_buffer_t` struct |
| `rtl/sine_gen_top.sv` | top level, all blocks wired together |
| `rtl/uart_rx.sv` | RS-232 byte receiver, 2-flop input synchroniser, mid-bit sampling, framing-error flag |
| `rtl/rs232_controller.sv` | six-byte `data_buffer` assembly |
| `rtl/controller_fsm.sv` | request check, digit decoding, PLL reset/relock sequence |
| `rtl/pll_model.sv` | **behavioural** PLL model (not synthesizable) |
| `rtl/clock_divider.sv` | divide-by-5 clock, output high 2 of 5 cycles |
| `rtl/reset_sync.sv` | reset synchroniser for the sampling domain |
| `rtl/sine_table.sv` | address accumulator with modulo wrap, plus ROM |
| `rtl/sine_rom.sv` | 20000 × 16 sine ROM |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/sine_ref_pkg.sv` | reference sine function and known table entries |

Top-level parameters: `CLK_HZ` (50 MHz), `BAUD` (115200),
`PLL_LOCK_CYCLES` (64) and `CLK_DIV` (5). The table size and widths live in
`sine_gen_pkg`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops, with a
watchdog. Use Verilator 5 with timing support. The PLL model uses delays, and
the testbenches set a timescale, so pass `--timescale 1ns/1ps`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_sine_gen_top -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/sine_gen_pkg.sv tb/sine_ref_pkg.sv tb/tb_sine_gen_top.sv
./obj_dir/Vtb_sine_gen_top
```

`tb_sine_gen_top` runs the whole design at its default parameters. It acts as
the PC and runs these steps:
1. Power-up at 1 kHz.
2. Requests for 25, 75, 150, 667 and 1000 kHz.
3. A refused request, a buffer with no update flag, and a byte with a bad stop bit.
4. A final 150 kHz request.

After each lock it checks 20000 consecutive samples against the formula, the
50 ns sampling period and exactly `step` periods per millisecond. Each
single period must be floor(20000/step) or ceil(20000/step) samples long, and
the period at 25 kHz must be 40 µs. It also counts PLL locks, accepted and refused requests,
framing errors and table wraps. It simulates 12 ms in about a second.

The block testbenches cover:
- every ROM entry;
- the table at six steps over a full table length each;
- the receiver's bit order, framing errors and glitch rejection;
- the FSM's accept and refuse rules and its timing;
- the divider's period and duty cycle;
- the PLL model's lock time.

## What to trust, and where this departs from the source design

- **PLL.** `pll_model.sv` only stands in for the FPGA vendor's PLL, with the
  same ports (`inclk0`, `areset`, `c0`, `locked`). For hardware, replace it
  with the vendor primitive set up for 50 MHz in and 100 MHz out. Its lock time
  is invented. With delays ignored, its output is constant, so a generic
  synthesis run of the top removes the sampling domain.
- **Table contents.** The source design shows a few table entries. The floor
  rule reproduces all of them except two: entry 10001 (shown as −10, here −11)
  and entry 15000 (shown as −32768, here −32767). No single rounding rule
  matches every entry shown.
- **Address arrow.** The source block diagram draws an "address" signal from
  the FSM to the table. Its text says the FSM supplies the step and the table
  advances its own address, and that is what is built.
- **This design's own choices.** The source design leaves these open:
  - the baud rate;
  - the byte order on the wire;
  - the request validity checks;
  - the PLL reset length;
  - the power-up frequency;
  - the clock-crossing scheme;
  - the divider duty cycle;
  - the receiver's synchroniser and glitch filter.
- **Not implemented.** The PC user interface is not part of the RTL; the
  top-level testbench plays its role. Triangle, sawtooth and pulse waveforms
  are not implemented. They have no type codes, and only 00h (sine) is
  accepted. The logic-analyser debug build is not reproduced.
- **Measured behaviour.** In simulation the design gives the periods in the
  table above. These match the periods the source design reports for 25, 75,
  150, 667 and 1000 kHz.

## Changing it

- **Baud rate and clock.** Set `BAUD` and `CLK_HZ` on the top. The receiver
  divides `CLK_HZ/BAUD` by integer division, so choose values with a small
  remainder.
- **Table size.** A finer table means changing `N_SAMPLES`, `ADDR_W` and
  possibly `STEP_W` in `sine_gen_pkg`. The sampling period must then be
  1 ms / `N_SAMPLES` for the step to stay "frequency in kHz".
- **Frequency range.** `F_MIN_KHZ` and `F_MAX_KHZ` in the package bound what
  the FSM accepts. The step must stay below half the table for the output to
  remain a sine.
