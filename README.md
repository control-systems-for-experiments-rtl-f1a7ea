# FPGA control system for quantum optics experiments on optical fibre

Photon-counting experiments on optical fibre need a few electronic functions
again and again:
- counting detector clicks per second;
- telling whether two detectors clicked at the same time (a coincidence);
- recording when each detector changed, for later analysis;
- producing random bits;
- driving electro-optic phase and amplitude modulators with clean periodic
  signals.

This design puts all of these in one FPGA. The FPGA sits on a USB card that gives it a 48 MHz clock, an 8-bit register bus and a 16-bit streaming bus to a host computer. An analog comparator board turns detector pulses into logic levels (`det_in`). An analog output board of RF transistors and resistor ladders turns the FPGA's gate signals into modulator voltages. Both boards and the USB controller are outside this RTL. Their signals are ports of the top module `qctl_top`.

```
            48 MHz ──► dcm (x25/6) ──► 200 MHz ─┬─ coinc_sync ──┐
                    └► dcm (x15/16) ─► 45 MHz,  │               ├─► counter C ─► coinc_out
                                      45 MHz 180°,  coinc_async ┘   (1 s @200 MHz)
                                      96 MHz    │
det_in[0] ─► counter A (1 s @48 MHz)            └─ timestamp_encoder ─► async_fifo ─► stream port
det_in[1] ─► counter B (1 s @48 MHz)                (det_in[4:0], 11-bit stamp)       (48 MHz)
host bus ◄─► host_regs ──► codes ─► periodic_mux ─► io2_out[4:0]
                       └─► levels/codes ─► periodic_mux ─► modulator_drive x4 ─► pm_gate, am_gate
lfsr_galois (48 MHz) ─► rng_bit, LFSR register
```

## Coincidence detection

This is the most delicate part of the design. Two detectors A and B count as coincident when their rising edges are closer than a window Δt. Δt should be as small as the jitter of detectors and electronics allows, about a nanosecond. Two detectors are built. Control register bit 0 selects which one feeds the coincidence counter and `coinc_out`.

### Synchronous detector (`coinc_sync`)

It samples A and B every 5 ns at 200 MHz and compares each 2-bit sample with the one before it:

| previous | now     | action                                              |
|----------|---------|-----------------------------------------------------|
| 00       | 11      | coincidence (both rose in the same sample)          |
| 00       | 01/10   | start a timer                                       |
| 01/10    | 11      | coincidence if the timer is ≤ `t_wait`              |
| any      | 00      | re-arm                                              |

After a coincidence, or after one input rose and the timer ran past `t_wait`, the detector stays disarmed until both inputs are low again. So a long pulse on one input cannot pair with several pulses on the other.

The timer counts clock cycles between the sample that saw the first input high and the sample that saw the second. With `t_wait = 2` (the reset value of register 0x2009), the result depends on the true delay d between the edges:
- d < 10 ns is always a coincidence;
- d > 15 ns is never one;
- from 10 to 15 ns it depends on where the edges fall relative to the clock.

This quantisation is built into the method. It is why the window is 2 to 3 clock periods and not a sharp line.

Inputs go through two synchronising flip-flops. The one-cycle `coinc` pulse appears on the third clock edge after the second input rises: two synchroniser stages, then the output register.

### Asynchronous detector (`coinc_async`)

Each detector signal is used as the clock of its own flip-flop, whose D input is tied high. A rising edge sets the flip-flop. A delayed copy of the output clears it again, so each click makes a pulse of length `WINDOW_NS`. An AND of the two pulses is high only when the two clicks are less than `WINDOW_NS` apart.

The window is set by gate and routing delay, not by a clock, so it can be much shorter than any clock period. The prototype measured about 1.35 ns; a synchronous detector would need a clock near 4 GHz to match it.

In RTL, the delay is a `#` delay, so this block is a behavioural model. On an FPGA the delay must be built from placed logic or routing and measured.

The AND output can be far shorter than a 200 MHz period. To avoid missing pulses, a flip-flop clocked by the AND output toggles once per coincidence. The 200 MHz domain synchronises that toggle and detects its edges, which turns each coincidence into one clean clock pulse. Coincidences one or more fast clock periods apart are each counted. Two within a single 5 ns period would flip the toggle back and be lost. Detector dead times are far longer than that, so a real detector cannot produce them.

The model's reset input is asynchronous. The top drives it from a flip-flop so that no combinational logic feeds it.

## Counting events per second (`event_counter`)

Two counters run side by side:
- a clock counter that defines a one-second gate (48 000 000 cycles at 48 MHz, or 200 000 000 at 200 MHz for the coincidence counter);
- an edge counter for the rising edges of the signal.

At the last gate cycle the edge count is stored and `valid_o` rises. Counting then stops until the host acknowledges the result. Then both counters clear and a new gate starts on the next cycle.

The gate counts exactly `GATE_CYCLES` samples, which are the edges in samples t+1 … t+GATE after the acknowledge. The result is 32 bits, read over the 8-bit bus as four bytes, lowest byte first. Reading the fourth byte is the acknowledge.

The host should poll the valid bit in STATUS, or wait a little longer than one second between reads. A result read too early belongs to the previous gate.

The coincidence counter runs at 200 MHz. Its result is held steady while `valid` is high, so the 48 MHz side reads it through a synchronised copy of `valid`. The acknowledge goes back as a pulse through a toggle synchroniser.

## Time stamping (`timestamp_encoder`, `async_fifo`)

The state of five detector inputs goes to the host as 16-bit words: `{sig[4:0], stamp[10:0]}`. The stamp is a free-running 11-bit count of 200 MHz cycles, that is 5 ns per tick, wrapping every 10.24 µs.

A word is written when either:
- any tracked input changes; the word holds the new state and the stamp of the sample that saw it;
- the stamp reaches 0x7FF; this wrap word lets the host count wraps even when nothing happens.

A change on the wrap tick shares the wrap word.

To rebuild absolute time, the host adds 2048 ticks for every wrap word, and places each change at `wraps * 2048 + stamp`. It can also spot lost data: the stamp should never go backwards without a wrap word between.

Writes come at 200 MHz and reads at 48 MHz. A dual clock FIFO between them has:
- Gray-coded pointers;
- two-flop synchronisers;
- registered full, empty and valid flags;
- 1024 words, one block RAM.

The FIFO absorbs bursts. Steady input can be handled up to about 48 M words per second, which is the read side's limit. A write into a full FIFO is dropped, raises `overflow` for one cycle and sets a sticky bit in STATUS. Writing 1 to STATUS bit 3 clears that bit.

On the streaming port, `stream_rd` takes one word and `stream_valid` marks the word one clock later. Register CTRL bit 1 enables recording; while it is off, the stamp is held at 0.

## Random bits (`lfsr_galois`)

A 16-bit Galois LFSR with feedback polynomial x¹⁶+x¹³+x¹²+x⁷+1 (mask `0x3081`). Each step shifts the word left. When the bit shifted out is 1, the word is XORed with the mask, so the bit re-enters at bit 0 and flips bits 7, 12 and 13. The sequence is maximal: 65 535 states.

The output bit is the MSB. It satisfies `s[n+16] = s[n+13] ^ s[n+12] ^ s[n+7] ^ s[n]`. The LFSR steps every 48 MHz clock. Its word can be read at 0x2014 to 0x2015.

This is a pseudo-random source for tests, not a source of true randomness.

## Periodic signals and modulator drive

A second clock manager makes 45 MHz from 48 MHz (×15/16). Its outputs are:
- that clock;
- its inverse, at 180°;
- the doubled input clock, 96 MHz.

Each of the five `io2_out` pins selects one of them, or a constant, by the code in its register at 0x200A + i:

| code | output              |
|------|---------------------|
| 0x00 | 0                   |
| 0x01 | 1                   |
| 0x02 | 45 MHz              |
| 0x03 | doubled clock (96 MHz) |
| 0x04 | 45 MHz, 180°        |
| other| 0                   |

The doubled-clock code is meant as a 90 MHz signal. From a 48 MHz input it comes out at 96 MHz, which is also what a hardware build of this scheme measures. For a true 90 MHz, a clock manager would have to be set to 90 MHz.

The output board has:
- two phase-modulator connectors, each with six transistor switches on a resistor ladder;
- two amplitude-modulator connectors, each with one switch.

Only one switch per connector may be on at a time. `modulator_drive` enforces this in the logic and checks it with an assertion.

For each connector:
- a level register (0x2016 + k) picks the switch; 0 means off, and k means switch k−1;
- a waveform code register (0x201A + k) picks what gates it, using the same codes as the IO pins.

Connectors 0 and 1 are the phase outputs and 2 and 3 are the amplitude outputs.

On the board, a switch puts the 50 Ω modulator in series with 30 Ω plus a per-switch resistor R_i across a 12 V supply, so the modulator sees V = 50 · 12 / (80 + R_i). The board's resistor set maps the six phase levels to these values (phase steps are for a modulator with a 5 V half-wave voltage):

| level | R_i (Ω) | voltage | phase |
|-------|---------|---------|-------|
| 1 | 0    | 7.5 V | 270° |
| 2 | 40   | 5.0 V | 180° |
| 3 | 91.4 | 3.5 V | 126° |
| 4 | 160  | 2.5 V | 90°  |
| 5 | 520  | 1.0 V | 36°  |
| 6 | 1118 | 0.5 V | 18°  |
| 0 | –    | 0 V   | 0°   |

`tb/output_board_model.sv` is a real-valued model of this network, used by the testbenches only. It also models the amplitude switch with 40 Ω, for 5 V. For an amplitude output, level 1 is the only level that turns on a switch.

## Register map

All registers are 8 bits, at 0x2000 + offset. Read data appears one clock after `re`.

| offset    | name       | access | meaning |
|-----------|------------|--------|---------|
| 0x00–0x03 | CNT_A      | R | counts of det_in[0] per second, LSB first; reading 0x03 restarts |
| 0x04–0x07 | CNT_B      | R | same for det_in[1] |
| 0x08      | STATUS     | R/W1C bit 3 | bit0..2 results A/B/C valid, bit3 FIFO overflow (sticky), bit4 FIFO empty |
| 0x09      | TWAIT      | R/W | synchronous coincidence window in 5 ns cycles, reset 2 |
| 0x0A–0x0E | IO_CODE[i] | R/W | output code of io2_out[i] |
| 0x0F      | CTRL       | R/W | bit0 1 = asynchronous coincidence detector, bit1 time stamping on (reset 0x02) |
| 0x10–0x13 | CNT_C      | R | coincidences per second; reading 0x13 restarts |
| 0x14–0x15 | LFSR       | R | LFSR word |
| 0x16–0x19 | MOD_LVL[k] | R/W | modulator switch level |
| 0x1A–0x1D | MOD_CODE[k]| R/W | modulator waveform code |

Only the output-code registers at 0x0A to 0x0E follow an earlier hardware build. The other offsets are this design's choice.

## Clocks, reset and crossings

There are three clock domains, each with a fixed rule for what crosses it:

- **48 MHz (`clk_48`).** Register bus, counters A and B, the LFSR and the FIFO read side.
- **200 MHz.** The synchronous coincidence detector, the coincidence counter, the time stamp encoder and the FIFO write side. Its reset is `rst` or "clock manager not locked", synchronised into the domain. Settings such as `t_wait` and the control bits cross as quasi-static levels. Change them only while the function they affect is idle, and allow a few cycles before they take effect.
- **45/96 MHz.** Used only as data through the output multiplexers. No flip-flop is clocked by them.

`rst` is synchronous to `clk_48`. Hold it for at least 16 cycles so that the 200 MHz domain sees it after the clock manager locks.

`dcm_model` is a behavioural model of the vendor clock manager. On an FPGA it is replaced by the vendor primitive with the same M and D. In simulation it makes its clocks from `#` delays and holds them low until `LOCKED`.

## Where this design departs from, or adds to, the original system

- The original built each function as a separate FPGA configuration. Here they are one design sharing the host bus.
- The 45 MHz clock uses M = 15, D = 16. The original gives the frequency but not its M and D.
- Counters A and B watch `det_in[0]` and `det_in[1]`. Coincidences use the same two inputs. Time stamping records `det_in[4:0]`. `det_in[7:5]` are unused.
- In the record word, the signals are in the top five bits.
- The comparator board delivers differential pairs. `det_in` is taken after the FPGA's differential input buffers, which are vendor I/O cells and not part of this RTL.
- The synchronous detector and the recorder run at 200 MHz, the acquisition rate of the original's faster configuration. `timestamp_encoder` itself works at any clock: on `clk_48` it would record at 48 MHz in the same format, with 21.3 ns ticks.
- The LFSR feedback follows the Galois scheme described in the text: the shifted-out bit enters bit 0. One printed formula instead XORs the old bit 0 into the new bit 0. That is not a shift register with this polynomial, so it was not followed. The seed is 1.
- Several parts are this design's own and are not taken from the original:
  - the FIFO (1024 words, overflow flag);
  - the coincidence mode select and the async-to-clock toggle;
  - the coincidence counter;
  - the bus protocol;
  - how modulator switches are chosen and gated.

## Simulating

All files are SystemVerilog 2017. Every block has a self-checking testbench in `tb/`; the two small synchronisers `sync_bit` and `pulse_sync` are tested inside the top. Each testbench prints `TB_RESULT checks=N failures=M` and stops, and each has a watchdog. With plain Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/qctl_pkg.sv tb/tb_qctl_top.sv --top-module tb_qctl_top -o sim --Mdir obj
obj/sim
```

Add `-Itb -y tb` for `tb_output_levels`, which also uses the board model in `tb/`.

| testbench | what it runs |
|-----------|--------------|
| `tb_event_counter` | 200-cycle gates, random pulse trains, `valid` exactly one gate after restart, result held and pulses ignored until acknowledge |
| `tb_coinc_sync` | delays 0 to 6 cycles in both orders at `t_wait` = 2, random `t_wait` values, output latency, no pulse without a return to 00 |
| `tb_coinc_async` | delays around the 1.35 ns window in both orders, the toggle output |
| `tb_timestamp_encoder` | 4-bit stamp, random changes; rebuilds absolute time as a host would and checks every change, every wrap record and the enable |
| `tb_async_fifo` | 16 words, 200 MHz write and 48 MHz read: data order, full/empty, dropped writes and overflow |
| `tb_lfsr_galois` | every step against a polynomial reference, full period 65 535, never zero, enable |
| `tb_periodic_mux` | every code, undefined ones too, on every pin, sampled against the clocks |
| `tb_modulator_drive` | every level and waveform, one-switch rule |
| `tb_dcm_model` | output periods for 200 MHz and 45 MHz settings, CLKFX180, CLK2X, lock and reset |
| `tb_host_regs` | every register, byte order, restart strobes, overflow clear |
| `tb_qctl_top` | the whole design with shortened gates (4800 and 20000 cycles) and a 64-word FIFO. It makes every mechanism happen and counts each: gates, hold, sync and async hits and misses, mode switch, overflow and its clear, wraps, output code changes |
| `tb_qctl_full` | the whole design at its real sizes: one full one-second measurement with pulse pairs every 10 µs at delays inside and outside the window, checked against the expected counts, coincidences, time stamps and wraps |
| `tb_workload_coinc` | the detector characterisation sweep: 500 kHz pulse pairs at delays of 0 to 20 ns, 100 pairs per delay at random clock phases; prints the fraction detected per delay and checks the window edges of both detectors (synchronous: all up to 10 ns, none from 15 ns; asynchronous: all up to 1.25 ns, none from 1.5 ns) |
| `tb_workload_freq` | event counting at its real size: one-second gates at 48 MHz with 700 kHz and 20 kHz signals, result within one count of the signal and within 0.0025 % of its frequency |
| `tb_output_levels` | the top at its default size driving the board model: every phase level on both phase outputs gives its voltage from the table above, the amplitude outputs give 5 V, a 45 MHz waveform switches the level, and no connector has two switches on |

`tb_qctl_full` simulates a full second at 200 MHz and takes about five minutes and `tb_workload_freq` about one. The others take seconds.
