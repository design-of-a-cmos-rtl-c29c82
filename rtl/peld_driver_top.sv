// peld_driver_top: on-chip driver of a monochrome VGA active-matrix polymer
// electroluminescent display.
//
// Three parts share the substrate. The row driver is a 480-stage shift
// register: a single 1 entered at row_din is moved one row per rising edge of
// row_clk (28.8 kHz for VGA), and the stage holding it drives that row's
// address line, so rows are selected one after the other. The column driver
// (640-stage shift register, 8-bit latches, one 8-bit DAC per column) gathers
// one row of 8-bit pixel data at one pixel per column clock (25.2 MHz) and,
// on output_enable, drives all column lines at once with voltages of
// vref * code / 256. The pixel array stores in each pixel of the selected row
// the voltage on its column, and each pixel then keeps its diode current for
// the rest of the frame.
//
// Operation, one row time (875 column clocks at VGA rates): while row r is
// selected and its data sits on the column lines, the data of row r+1 is
// shifted into the sampling latches. At the end of the row time, row_clk moves
// the row token to r+1 and then output_enable, at the next rising edge of
// col_clk, moves row r+1's data onto the columns. The row must change at
// least half a column clock before output_enable is taken, so that row r has
// been released before its column voltages change.
//
// row_clear and col_clear (active high) empty the shift registers at once.
// The row lines, the latched codes and a probe of one pixel are outputs. The
// assertion below checks that no more than one row is selected at a time.
//
// Ports follow the design's block diagram: Column DIN/Clear/Clock, Pixel Data
// (8 bits), Output Enable, Reference Voltage, Row DIN/Clear/Clock.
module peld_driver_top
  import peld_pkg::*;
#(
  parameter int unsigned ROWS = NUM_ROWS,
  parameter int unsigned COLS = NUM_COLS
) (
  input  logic                    col_clk,
  input  logic                    col_clear,
  input  logic                    col_din,
  input  gray_t                   pixel_data,
  input  logic                    output_enable,
  input  real                     vref,
  input  logic                    row_clk,
  input  logic                    row_clear,
  input  logic                    row_din,
  output logic [ROWS-1:0]         row_line,
  output logic [COLS-1:0]         col_sel,
  output gray_t                   col_code [COLS],
  input  logic [$clog2(ROWS)-1:0] probe_row,
  input  logic [$clog2(COLS)-1:0] probe_col,
  output real                     probe_vg,
  output real                     probe_ua
);

  real col_v [COLS];

  // Row driving circuit
  shift_register #(.STAGES(ROWS)) u_row_sr (
    .clk  (row_clk),
    .clear(row_clear),
    .din  (row_din),
    .q    (row_line)
  );

  // Column driving circuit
  column_driver #(.COLS(COLS)) u_col_drv (
    .col_clk      (col_clk),
    .col_clear    (col_clear),
    .col_din      (col_din),
    .pixel_data   (pixel_data),
    .output_enable(output_enable),
    .vref         (vref),
    .col_sel      (col_sel),
    .col_code     (col_code),
    .col_v        (col_v)
  );

  // Pixel driving circuit
  pixel_array #(.ROWS(ROWS), .COLS(COLS)) u_pixels (
    .clk      (col_clk),
    .row_line (row_line),
    .col_v    (col_v),
    .probe_row(probe_row),
    .probe_col(probe_col),
    .probe_vg (probe_vg),
    .probe_ua (probe_ua)
  );

  // At most one row line is selected at any time.
  a_one_row : assert property (@(posedge col_clk) $onehot0(row_line))
    else $error("more than one row line selected");

endmodule
