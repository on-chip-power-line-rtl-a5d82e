# Power line communication through the switches of a cascaded H-bridge

A cascaded H-bridge inverter is a string of cells in series. Each cell has a
DC source and an H-bridge, and the string makes a staircase AC voltage. This
design sends each cell's telemetry (its ID, DC voltage and DC current) down
the same power cable. It needs no coupling transformer and no extra power
parts. The cell's own H-bridge switches carry the data.

Most of the time a cell's bridge produces its step of the staircase: a
50/60 Hz quasi-square wave. Once per minute, in a time slot set by its ID,
the cell stops doing that. For 28 ms its bridge sends a 40 kHz square wave
that is BPSK-modulated with a 51-bit packet. A current sensor at the far end
digitises the line. A digital receiver back-end then recovers the carrier,
demodulates the packet and sends it to a user interface over a serial link.

The RTL has two independent halves:

* `uplink_module` is the transmitter that sits in every cell. It drives the
  four gate signals S1–S4 of the bridge.
* `rx_backend` is the digital half of the receiver. Its input is the
  digitised line `vs`.

`plc_top` places one of each side by side. Each half has its own clock and
reset. Outside the RTL, the analogue path joins them: bridge, cable, current
sensor and comparator. In a test it is enough to connect S1 to `rx_vs`.

## Transmitter (`uplink_module`)

```
 wake_n, sync_n ─► uplink_ctrl ──en──► power_pulse_gen ─┐
                       │  ▲                              ├─► bridge_mux ─► S1..S4
 id ─► timeslot_counter┘  └── start ─► bpsk_modulator ───┘
 v_prm, c_prm ─► prm_meter ×2 ─► info_packetizer (CRC) ─┘
```

### Control (`uplink_ctrl`)
* `rst_n` is asynchronous and active low. Reset puts the cell into HALT.
* In HALT the bridge is shorted (S2 and S4 on). The current of the other
  cells can then pass through.
* The first falling edge on `wake_n` moves the cell to RUN. Later Wake edges
  only restart the time-slot counter.
* In RUN a packet starts on a falling edge of `sync_n`, or when the cell's
  own time slot comes round. A start request that arrives while a packet is
  being sent is ignored.
* Both asynchronous inputs pass through two-flop synchronisers.

### Packet and CRC (`info_packetizer`, `plc_pkg`)
The packet is `{ID[9:0], V[9:0], C[9:0], CRC[20:0]}`, 51 bits in all. It is
sent LSB first, so the CRC LSB goes out first and the ID MSB goes out last.

The CRC covers the 30 data bits, in the order ID, V, C, MSB first. It is a
plain CRC with:
* generator x²¹ + `101100101011101010001`;
* zero initial value;
* no reflection and no final XOR.

When `sn_fx` = 1, the data field is the fixed word
`001111111101010101010000111101` and the meters are ignored.

### Sensor inputs (`prm_meter`)
V and C arrive as pulse-rate-modulated bits. Each meter counts rising edges
over a window of 2000 clocks (1 ms at 2 MHz). The count saturates at 1023.
The last complete count is held for the packetizer.

### BPSK timing (`bpsk_modulator`)
* The carrier is a square wave with half period `HALF` = 25 clocks: 40 kHz
  at 2 MHz.
* Each symbol is 22 carrier periods: 1100 clocks, 550 µs, 1818 baud.
* A packet is 51 symbols: 56 100 clocks, 28.05 ms.
* A '1' symbol starts high and a '0' symbol starts low. The line therefore
  shows a pulse one full period long at every change of bit value. The
  receiver relies on this (see below).

### Power component and bridge states (`power_pulse_gen`, `bridge_mux`)
* The period is T = CLK_HZ/50 or CLK_HZ/60, selected by `freq`.
* The firing delay is d = (id·T/4) >> 10.
* The output is +V for d ≤ t < T/2−d and −V for T/2+d ≤ t < T−d. It is
  zero otherwise.
* At 50 Hz, ID 683 gives a firing delay of 6669 clocks, a firing angle of 60°.
* The bridge states are:
  * +V: S1 and S4 on;
  * −V: S2 and S3 on;
  * zero: S2 and S4 on.
* Outputs are registered.
* An assertion checks that the two switches of one leg are never on
  together.

### Time slots (`timeslot_counter`)
* Cells are numbered 1 to 1000.
* The counter restarts on Wake. It fires `sync_o` at (id−1)·60 ms, and then
  again every 60 s frame.
* 1000 slots of 60 ms fill the one-minute reporting period. Each slot has
  room for the 28 ms packet and a guard time.
* The first sync arrives one clock after the exact slot boundary, because
  the output is registered.

## Receiver back-end (`rx_backend`)

```
 vs ─► rx_despike ─► rx_dpll ─► rx_demod ─► rx_serial_if ─► 3-wire / 1-wire
```

### Despiking (`rx_despike`)
A two-flop synchroniser comes first. A run-length filter follows it: the
output takes a new level only after the input has held that level for 3
clocks. Spikes shorter than that are removed. This adds a fixed delay of a
few clocks and does not change edge spacing.

### Carrier recovery (`rx_dpll`)
The line carries the slow power waveform, long idle stretches and bursts of
40 kHz carrier. The loop must pick out the burst, lock to it within one
symbol, and mark the symbol boundaries.

* **Acquisition.** The first edge after idle starts a candidate. The phase
  counter `ph` (period P = 50) is aligned to that edge, and the current line
  level is taken as the reference level `lvl0`. The next 7 edges must arrive
  no sooner than HALF−6 and no later than P+6 clocks after the previous
  edge. An edge that comes too early restarts the candidate. If no edge
  comes in time, the candidate is dropped (`cand_drop`). The edges of the
  50/60 Hz waveform fail this test.
* **Tracking.** Every later edge is compared with the nearest reference
  edge. The error is taken modulo P/2, so a 180° symbol flip gives zero
  error. The counter is moved by about half the error. This first-order loop
  tracks clock offsets of a few tenths of a percent; the testbenches use
  0.3 %. If no edge arrives for 100 clocks, the packet is abandoned.
* **Symbol timing.** Symbol windows are 22 reference periods long, counted
  from the aligned edge. `sym_end` marks the end of each window, and `done`
  marks the end of symbol 50.

### The phase ambiguity
This is the least obvious part of the design. The line level between
packets is arbitrary, so the first edge the receiver sees is one of two
things:

* **Case A:** the start of symbol 0. The line sat at the opposite level.
* **Case B:** the middle of the first carrier period of symbol 0. The line
  was already at the symbol's first-half level, so the start of the symbol
  made no edge.

In case B every symbol window is half a carrier period late. The start level
`lvl0` is then the complement of symbol 0's true first-half level, so every
bit would decode inverted.

Phase flips resolve the ambiguity:
* A flip at a symbol boundary makes one line pulse a full period long,
  centred on the boundary.
* In case A the pulse's closing edge lands at `ph` ≈ P/2.
* In case B it lands at `ph` ≈ 0.
* The first pulse longer than 3P/4 sets `case_b`.

The demodulator reads `case_b` at the end of the packet.

A packet with no bit change at all has no flip. Such a packet is assumed to
be case A, which can invert it. With IDs 1 to 1000 the ID field always holds
both a 0 and a 1, so every real packet has a flip. With ID 0 or 1023 a flip
would not be guaranteed, so the design does not use them. `tb_rx_backend` checks the
inverted reading of an all-ones word on a high idle line, so the limit is
documented by a test.

### Demodulation (`rx_demod`)
* In each symbol window, the despiked line is XNORed with the reference
  (digital down-conversion). A signed accumulator counts +1/−1 (`CNTR`).
* At `sym_end` the sign of the accumulator is the raw symbol value, and the
  value is stored (`S/H`). The raw values are relative to `lvl0`.
* At `done` the absolute polarity comes from symbol 0: b0 = `lvl0` XOR
  `case_b`. The stored word is then passed on, either as it is or inverted.
* The packet is output one cycle after `done`, with `pkt_valid`.

### Serial links (`rx_serial_if`)
* The interface plays a packet out in 52 slots of 1000 clocks (500 µs): one
  packet slot, then bits 0 to 50.
* **3-wire link.** A 100-clock pulse marks each slot: on `pack_strt` for the
  packet slot, and on `bit_one` or `bit_zero` for each bit.
* **1-wire link.** Each slot begins with a 100-clock square wavelet. The
  half period is 5 clocks (200 kHz) for the packet slot and 10 clocks
  (100 kHz) for a bit slot. For the rest of the slot the line shows the bit
  value.
* The play-out takes 26 ms, which is less than the 28.05 ms a packet takes
  to arrive. Back-to-back packets are therefore never lost.
* A packet that does arrive during play-out is dropped and flagged with
  `dropped`.

## What follows the published design, and what does not

These points follow the published design:
* the block structure of both sides;
* the 10/10/10-bit fields and the 21-bit CRC generator;
* the transmission order;
* the fixed vector and `SN_FX`;
* 40 kHz carrier, 22 periods per symbol, 2 MHz clock;
* 50/60 Hz with `Freq`;
* falling-edge Wake, Sync and RST behaviour, and the shorted bridge in halt;
* up to 1000 cells sampled once a minute;
* the 3-wire and 1-wire receiver links.

These points are choices of this design:
* **CRC convention.** The generator is the published one. The bit order,
  initial value and final XOR are not known. The convention used here does
  not reproduce the three published test checksums. Several common
  conventions were tried, and none does. `tb_paper_vectors` sends the three
  published data words and prints both checksums side by side.
* **ID to firing angle:** a linear law.
* **ID to time slot:** (id−1)·60 ms. The 60 ms slot length is also a choice.
* **PRM window:** 1 ms, with saturation.
* **The whole receiver algorithm:** acquisition rule, loop gain, ambiguity
  resolution, despike length, serial slot timing and wavelet frequencies.
* **Receiver clock:** 2 MHz is assumed. All receiver timing is in
  parameters derived from `CLK_HZ`.
* **Switch states:** the zero state uses the lower two switches.

Not built:
* The uplink PLL that phase-aligns the power components of a string. Its
  function is described only in outline.
* The H-bridge itself.
* The analogue receiver front end (high-pass filter and comparator).
* The LC output filter.
* The remote user interface.

## Files and parameters

| module | role | main parameters (default) |
|---|---|---|
| `plc_pkg` | field widths, CRC generator, fixed vector, `bridge_t`, `crc_of()` | – |
| `plc_top` | one transmitter and one receiver back-end side by side | none |
| `uplink_module` | transmitter | `CLK_HZ` 2 000 000, `FC_HZ` 40 000, `PERIODS` 22, `WINDOW_TICKS` 2000, `SLOT_TICKS` 120 000, `FRAME_TICKS` 120 000 000 |
| `uplink_ctrl`, `prm_meter`, `info_packetizer`, `bpsk_modulator`, `power_pulse_gen`, `timeslot_counter`, `bridge_mux` | transmitter blocks | as above |
| `rx_backend` | receiver | `CLK_HZ` 2 000 000, `FC_HZ` 40 000, `PERIODS` 22, `NSYM` 51, `DF_LEN` 3, `BIT_TICKS` 1000 |
| `rx_despike`, `rx_dpll`, `rx_demod`, `rx_serial_if` | receiver blocks | as above |

Every module has a self-checking testbench `tb/tb_<module>.sv`. The
testbenches print `TB_RESULT checks=N failures=M`, and each has a watchdog.
The following testbenches go further:

* **`tb_plc_top`** runs the whole design at default parameters, with S1
  wired to the receiver. It covers:
  * reset and halt;
  * Wake and Sync;
  * back-to-back packets;
  * `SN_FX`;
  * 50 Hz and 60 Hz;
  * the slot-driven packet;
  * both phase cases;
  * both serial links.

  It counts each mechanism and fails if any one never happens. It takes
  about a second of simulation time.
* **`tb_paper_vectors`** sends the three published data words.
* **`tb_string_slots`** puts four cells, IDs 1 to 4, on one line with one
  receiver. Each cell must report in its own slot.
* **`tb_bpsk_line`** is a behavioural line source used by the receiver
  testbenches. It has an adjustable clock and idle level.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/plc_pkg.sv tb/tb_plc_top.sv --top-module tb_plc_top
./obj_dir/Vtb_plc_top
```

Replace `tb_plc_top` with any other testbench name to run that one.
