# On-chip driver for a VGA active-matrix polymer EL microdisplay

This is the driver of a monochrome active-matrix polymer electroluminescent
(PLED) microdisplay built directly on a CMOS silicon substrate. Every pixel has
its own two-transistor, one-capacitor cell under the light-emitting polymer,
so a pixel keeps emitting for a whole frame after it has been addressed. Gray
scale (256 levels) comes from pulse amplitude modulation: each column line is
driven with a voltage proportional to the pixel's 8-bit code, the pixel stores
that voltage, and its driving transistor turns it into a diode current.

The panel is VGA: 640 columns by 480 rows. The row clock runs at 28.8 kHz
and the column clock at 25.2 MHz. That gives 875 column clocks per row time
and a 60 Hz frame.

## Block structure

```
 col_din, col_clear, col_clk ─► column shift register (640 x ps_dff) ─┐ col_sel[639:0]
 pixel_data[7:0], output_enable ─► column_latch (640 x 8 bit, 2 ranks) ◄┘
                                        │ col_code[c]
 vref ─────────────────────────────►  640 x r2r_dac
                                        │ col_v[c]   (column address lines)
 row_din, row_clear, row_clk ─► row shift register ─► row_line[479:0] ─► pixel_array (480 x 640 2T1C)
                                (480 x ps_dff)
```

| Module | Kind | What it is |
|---|---|---|
| `peld_pkg` | package | sizes (640, 480, 8 bits), clock rates, `gray_t` |
| `ps_dff` | RTL | shift-register stage: edge-triggered D flip-flop with asynchronous clear |
| `shift_register` | RTL | chain of `ps_dff`, `STAGES` long (640 for columns, 480 for rows) |
| `column_latch` | RTL | per-column sampling rank and output rank, 8 bits each |
| `r2r_dac` | behavioural | ideal 8-bit R-2R ladder, `vout = vref*code/256` (real-valued) |
| `column_driver` | RTL + models | column shift register, latches and one DAC per column |
| `pixel_array` | behavioural | track-and-hold pixels with a square-law driving transistor |
| `peld_driver_top` | top | row shift register, column driver and pixel array |

The digital part is the two shift registers and the latch bank. The DAC and
the pixel are analog circuits and are given as behavioural models with
`real` voltages. They exist so that the whole chain from pixel code to pixel
current can be simulated. They are not meant for synthesis.

## How one row gets onto the panel

The row and column shift registers are used as token shifters, not as data
registers. A single 1 is entered at `din`, and each clock moves it one stage.

**Column side.** At the start of a row time, `col_din` is high for one
column clock. After that edge the token sits on column 0. After edge *k* it
sits on column *k*. At each edge, the column holding the token copies
`pixel_data` into its sampling rank. So the pixel for column *c* must be on
`pixel_data` before edge *c+1*. Streaming a full row takes 640 column clocks
of the 875 in a row time.

**Output enable.** When `output_enable` is high at a column-clock edge, every
column's output rank copies its sampling rank in one step. The DACs then hold
all 640 column lines at `vref*code/256` for the whole next row time. Meanwhile
the sampling ranks fill with the following row. With a DAC in every column,
each DAC has a full row time to settle, at the cost of area.

**Row side.** `row_din` is high for one row-clock edge per frame. Row *r* is
selected after the *(r+1)*-th row-clock edge. While a row line is high, each
pixel on that row follows its column voltage onto its storage capacitor. When
the line drops, the pixel holds that voltage until the next frame.

**Ordering at a row boundary.** This is the one timing rule the user of the
top must respect. In row time *p*:
1. row *p-1* is selected and shown on the columns;
2. row *p* is shifted into the sampling ranks.

At the end of row time *p*, `row_clk` rises first, which releases row *p-1*
and selects row *p*. Then `output_enable` is taken at the next column edge.
If the order were reversed, row *p-1* would briefly see row *p*'s voltages and
would keep them. The testbench raises `row_clk` on a falling column-clock
edge, half a column period before the `output_enable` edge. A frame therefore
takes 481 row times, counting the time to load row 0 and the final row-clock
edge that shifts the token off row 479. In continuous operation, the next
frame's row 0 loads during that last row time.

Both shift registers clear at once when `row_clear` / `col_clear` is high.
The top asserts that at most one row line is high at any column-clock edge.

## The flip-flop stage

The silicon stage is a pseudo-static two-phase dynamic D flip-flop. It has two
halves in series. Each half is a transmission gate into an inverter, with a
clocked feedback path through a gate that also takes the clear input. The
feedback keeps the stored node static while the input gate is closed. In RTL
this is one rising-edge flip-flop. Clear is modelled as asynchronous and active
high, because in the circuit it acts through the feedback gates and does not
wait for an edge.

## Analog models

- `r2r_dac`: ideal ladder, bit *i* worth `vref/2^(8-i)`. Full scale is
  255/256 of `vref`. No offset, non-linearity or settling time is modelled.
- `pixel_array`: samples at every rising edge of the column clock. Each pixel
  whose row line is high takes its column voltage. Capacitors start at 0 V and
  never leak. The diode current equals the driving-transistor current, taken as
  `I = K_UA*(Vg-VT)^2` with `VT = 0 V` and `K_UA = 1 uA/V^2`. A 5 V reference
  then gives about 25 µA at full scale. Both constants are parameters and are
  this design's own choice, not measured values. The real diode's non-linear
  I-V curve is not modelled, so the gray-scale curve is an ideal parabola. The
  capacitor voltages are held in a class object.
  The `probe_row`/`probe_col` → `probe_vg`/`probe_ua` port shows one pixel. It
  is an observation aid with no counterpart on the chip.

## Where this RTL departs from the circuit or fills gaps

- The two-phase dynamic flip-flop is written as a single-clock edge flip-flop.
  The clear polarity and its asynchronous action are assumptions.
- The "8-bit latches" are written as two ranks of column-clocked registers
  with enables. One rank gathers the row; the other drives the DACs after
  output enable. The circuit only states that the latches hold the data during
  the row time and release it to all columns on output enable.
- The 640 × 480 size is the VGA format. The clock rates are the design's; the
  875 clocks per row and the 60 Hz frame follow from them.
- Row/column sequencing, reset behaviour and the pixel current law are this
  design's own choices.
- The layout, the polymer diode itself and the CMOS process steps have no
  logic function and are not represented.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | Size | What it checks |
|---|---|---|
| `tb_ps_dff` | 1 stage | capture at the rising edge, hold, asynchronous clear |
| `tb_shift_register` | 24 stages | token latency, random streams against a model, clear |
| `tb_column_latch` | 12 columns | both ranks against a model, gaps in the token, output enable mid-row |
| `tb_r2r_dac` | 256 codes | all codes at two references, exact one-LSB steps |
| `tb_column_driver` | 16 columns | token position per edge, codes and voltages per row, clear mid-row |
| `tb_pixel_array` | 6 × 5 | track while selected, hold when released, current law |
| `tb_peld_driver_top` | full 640 × 480 | two frames end to end at VGA timing |
| `tb_gray_scale_sweep` | 16 × 16 | all 256 codes, FF down to 00, through the whole chain |

`tb_peld_driver_top` runs the top with every parameter at its default. It
writes two different images, each computed from a formula of frame, row and
column. It checks:

- the latched codes of every row;
- the row selected in each row time;
- that the selected row tracks its columns while the next row still holds the
  previous frame;
- every pixel's voltage and current after each frame;
- a row clock of 28.8 kHz and a frame rate of 60 Hz, measured from simulated
  time;
- both clears.

It counts each of these events and fails if any count stays at zero. It runs
in about 20 seconds of wall time (about 1.25 million checks).

`tb_gray_scale_sweep` writes each of the 256 codes into one pixel of a
16 × 16 panel. It checks that the pixel current rises strictly with the code,
so all 256 levels are distinct. With a 5 V reference the current goes from 0
to 24.8 µA. That curve is the ideal square law of the model; the real diode
bends it.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/peld_pkg.sv tb/tb_peld_driver_top.sv \
          --top-module tb_peld_driver_top
./obj_dir/Vtb_peld_driver_top
```

Replace the testbench name to run any other. To build a smaller panel, set
`ROWS` and `COLS` on `peld_driver_top`. Every size comes from those two
parameters, so nothing else needs to change.
