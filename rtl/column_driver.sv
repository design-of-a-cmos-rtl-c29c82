// column_driver: the column driving circuit of the display.
//
// It is a column shift register, a bank of 8-bit latches and one 8-bit DAC per
// column. A single 1 entered at col_din walks along the shift register, one
// column per rising edge of col_clk, and enables each column's sampling latch
// in turn, so the 8-bit pixel_data stream of one row is gathered one pixel per
// column clock. When output_enable is seen at a rising edge of col_clk, every
// column's output latch takes the gathered row and its DAC drives the column
// line with vref * code / 256 until the next output_enable. Having a latch
// and a DAC in every column costs area but lets each DAC settle over a whole
// row time.
//
// Timing: col_din high before edge 0 puts the token on column 0 after that
// edge; the pixel for column c must then be on pixel_data before edge c+1.
// col_clear empties the shift register at once (active high).
//
// Ports: col_clk, col_clear, col_din, pixel_data, output_enable, vref (volts);
// col_sel (latch enables, for observation), col_code (latched codes) and
// col_v (column line voltages, volts).
module column_driver
  import peld_pkg::*;
#(
  parameter int unsigned COLS = NUM_COLS
) (
  input  logic            col_clk,
  input  logic            col_clear,
  input  logic            col_din,
  input  gray_t           pixel_data,
  input  logic            output_enable,
  input  real             vref,
  output logic [COLS-1:0] col_sel,
  output gray_t           col_code [COLS],
  output real             col_v [COLS]
);

  shift_register #(.STAGES(COLS)) u_col_sr (
    .clk  (col_clk),
    .clear(col_clear),
    .din  (col_din),
    .q    (col_sel)
  );

  column_latch #(.COLS(COLS)) u_latch (
    .clk          (col_clk),
    .sel          (col_sel),
    .pixel_data   (pixel_data),
    .output_enable(output_enable),
    .col_code     (col_code)
  );

  for (genvar c = 0; c < COLS; c++) begin : g_dac
    r2r_dac u_dac (
      .code(col_code[c]),
      .vref(vref),
      .vout(col_v[c])
    );
  end

endmodule
