# Pixel read-out logic for a 100 ps hybrid pixel tracker

A beam tracker with 1800 pixels per read-out chip (40 columns of 45 pixels) has to
time-stamp every hit to about 100 ps while particles arrive at about 140 kHz per pixel.
That gives about 130 M hits/s per chip. There are two ways to build it, and this
repository holds the read-out logic of both, side by side:

* **On-pixel TDC (OPX).** Every pixel has its own time-to-amplitude converter.
  - A constant-fraction discriminator removes time-walk.
  - The hit latches the 10-bit coarse clock count.
  - The hit also starts a voltage ramp, which the next trailing clock edge stops.
  - The pixel digitises the ramp with a Wilkinson converter into 8 fine bits (about 98 ps per bin).
  - The pixel buffers its own hits, so it derandomises locally.
  - Column and matrix controllers collect the words and merge them onto fast serial outputs.
* **End-of-column TDC (EOC).** The pixels send only a pulse whose width is the time over
  threshold; that width is used to correct time-walk offline.
  - Each column has 9 hit lines (each shared by 5 pixels) and 5 address lines (each shared by 9 pixels).
  - The far end of the column has 9 DLL-based TDCs.
  - Each TDC latches the 32 DLL phases and a 6-bit coarse count on both edges of its hit line.
  - The TDC encodes the phases into 5 bits and decodes the pixel from the line pair.
  - Each column keeps its own serial output.

The top module `gtk_readout_top` instantiates both chips. They share nothing; each has
its own clock, reset, hit inputs and serial outputs.

## Analog boundary

The preamplifiers and discriminators are not in this RTL, and neither are the ramp
capacitors, the comparators, the column transmission lines and receivers, the PLL, the
DLL and the LVDS/serial pads. Their digital sides are ports:

| Port (top) | Meaning |
|---|---|
| `opx_hit[c][p]` | discriminator output of pixel p in column c (asynchronous) |
| `opx_ramp_arm`, `opx_ramp_slot` | a free analog slot exists / which of the 4 capacitors the next ramp charges |
| `opx_adc_run`, `opx_adc_slot`, `opx_adc_cmp` | Wilkinson rundown: enable, capacitor, comparator (1 while charge remains) |
| `eoc_hit_lines[c]`, `eoc_addr_lines[c]` | receiver outputs of column c: 9 hit lines, 5 address lines |
| `eoc_taps` | the 32 DLL phases t0..t31 |
| `opx_ser_*`, `eoc_ser_*` | parallel side of the output serializers |

Two behavioural models in `tb/` stand in for the analog parts in simulation:
- `opx_tac_model` integrates the time from the hit to the next falling clock edge on the
  chosen capacitor, then holds `adc_cmp` high for that many 98 ps bins, counted in clock
  cycles.
- `eoc_dll_model` produces the 32 phases of the EOC clock from simulation time, each phase
  100 ps later than the one before.

## On-pixel TDC chain

`opx_pixel_logic` (one per pixel) works as follows:
1. The hit is synchronised by two flops. A hit is accepted only if `ramp_arm` was high
   when it arrived, i.e. if the 4-deep digital buffer had room.
2. An accepted hit writes the coarse count into the digital buffer. Its ramp charges
   the slot named by `ramp_slot`.
3. The slots are converted in order by `opx_wilkinson_counter`, which counts cycles while
   the comparator is high and saturates at 255.
4. The result `{lost, coarse, fine}` goes into a 2-deep output buffer.

A hit that finds no free slot is lost. The next accepted hit carries `lost = 1`.

The stored coarse value is the count of the clock period in which the hit arrived,
plus 2 (the synchroniser delay). The fine code is the time from the hit to the end of
that clock period in 98 ps bins. The hit time is
`(coarse - 2) * 6.25 ns + 6.25 ns - fine * 98 ps`. A pixel needs hits at least 3 clock
periods apart and discriminator pulses at least one clock period long.

`opx_column_ctrl` reads the 45 pixels round-robin, one word per cycle, and adds the
column and pixel numbers. It stores the 32-bit word in a column buffer.

`opx_matrix_ctrl` merges the columns of a group of M round-robin into one
`word_serializer`. The serializer has a small buffer and sends each word as 4 chunks of
8 bits, most significant chunk first, with `ser_first` marking the first chunk. When the
serializer is busy, the column buffers fill up. After that, the pixel output buffers stop
being read, and finally hits are lost in the pixel. Nothing is dropped between the pixel
and the serial output.

Hit word (32 bits):

| 31 | 30 | 29:24 | 23:18 | 17:8 | 7:0 |
|---|---|---|---|---|---|
| lost | 0 | column | pixel | coarse | fine |

Default: 40 columns, 45 pixels, M = 8, so 5 groups. Each group runs 8 bits at 160 MHz
(1.28 Gb/s), or 6.4 Gb/s per chip, which is enough for the ~6 Gb/s peak rate expected at
130 M hits/s.

## End-of-column TDC chain

Pixel `5*i + j` of a column drives hit line `i` and address line `j`, so each hit line
and address line pair names one pixel.

`eoc_tdc` (9 per column) works as follows:
- The rising edge of its hit line clocks hit register 1, which captures the DLL phases,
  the coarse count and the address lines.
- The falling edge clocks hit register 2, which captures the phases and coarse count.
- These registers are clocked by the hit line itself. They reach the system clock
  through toggle flags synchronised by two flops, so the lint warning about a signal used
  as both clock and reset on these flops is expected.
- A hit that arrives while the TDC still holds an unread one is dropped and counted in
  `eoc_lost_cnt`.

`eoc_fine_encoder` turns the 32 phases into the index of the 1→0 boundary (5 bits).

`eoc_column` reads the 9 TDCs round-robin and builds a 32-bit word. If more than one
address line was high at the leading edge, the address is ambiguous (two pixels on the
same address line were hit together) and the `amb` bit is set. The word goes through a
FIFO and a 1-bit serializer, most significant bit first.

EOC word (32 bits):

| 31 | 30:27 | 26:22 | 21:16 | 15:11 | 10:5 | 4:0 |
|---|---|---|---|---|---|---|
| amb | TDC (hit line) | address lines | coarse LE | fine LE | coarse TE | fine TE |

Leading-edge time = `coarse_le * T + fine_le * T/32`, with T the EOC clock period
(3.125 ns at 320 MHz). The coarse count is sampled asynchronously: near a clock edge it
may be the old or the new value. This is the usual coarse/fine ambiguity of this kind of
TDC, and the RTL does not correct it.

## Departures and choices

- **Word formats.** Both word layouts, the round-robin arbitration, the buffer depths
  beyond the pixel (column buffer 8, serializer buffer 4, EOC FIFO 8), the frame format of
  the serializers, and the reset are this design's. All state uses an active-low reset.
- **Group size and lanes.** M = 8 and 8-bit lanes are chosen to meet the rate; the source
  names the group size only as "m, depending on the output speed".
- **No raw EOC mode.** The EOC chip always encodes the fine time. The 81-bit raw word
  (5 address bits + 2 × (6 + 32)) is not built.
- **One counter and DLL per EOC chip.** All columns share one 6-bit coarse counter and
  one DLL, and each TDC samples that counter on both edges.
- **Demonstrators.** The small demonstrator chips (3 OPX columns; 45+15 EOC pixels with
  5+1 TDCs) are not separate tops. They are parameter settings of `opx_chip` and
  `eoc_column`.
- **Analog models are idealised.** The models have no noise, no non-linearity and no
  time-walk.

## Simulating

No file sets a time unit, so delays are in ps. Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module gtk_readout_top_tb \
  rtl/gtk_pkg.sv rtl/*.sv tb/opx_tac_model.sv tb/eoc_dll_model.sv tb/gtk_readout_top_tb.sv
./obj_dir/Vgtk_readout_top_tb +verilator+rand+reset+2
```

The same pattern works for every `tb/<block>_tb.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. The EOC testbenches run
the EOC clock at 312.5 MHz (3.2 ns) so that a DLL step is exactly 100 ps.

| Testbench | What it covers |
|---|---|
| `sync_fifo_tb`, `coarse_counter_tb`, `word_serializer_tb` | shared blocks against reference models |
| `opx_wilkinson_counter_tb`, `opx_pixel_logic_tb` | conversion codes, coarse/fine timing, buffer overflow and lost flag |
| `opx_column_ctrl_tb`, `opx_matrix_ctrl_tb`, `opx_chip_tb` | formatting, fairness, back-pressure, word-for-word delivery |
| `eoc_fine_encoder_tb`, `eoc_tdc_tb`, `eoc_column_tb`, `eoc_chip_tb` | phase encoding, edge capture, ambiguity, busy-TDC loss, column rate |
| `gtk_readout_top_tb` | both chips end to end (16×9 OPX pixels, 4 EOC columns); counts merges, lost flags, full column buffers, serializer stalls, ambiguous and lost EOC hits, and fails if any never happens |

**Largest sizes simulated.** End to end: 16 OPX columns of 9 pixels in 2 groups, plus 4
EOC columns. Block level: `opx_column_ctrl` and `eoc_column` at their full column sizes,
45 pixels and 9 TDCs. The default top (40×45 OPX pixels and 40 EOC columns) passes lint
and elaboration, but it has not been simulated: Verilator needs well over half an hour to
compile the C++ for it. At that size the logic is the same per column and per group; only
the instance counts grow.
