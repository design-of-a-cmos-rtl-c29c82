// column_latch: the bank of 8-bit latches of the column driver.
//
// Each column has two 8-bit ranks. The sampling rank of column c takes the
// value on pixel_data at a rising edge of clk when sel[c] is high; sel[] comes
// from the column shift register, whose single token enables one column after
// the other, so one row of pixel data is gathered serially, one pixel per
// column clock. The output rank of every column takes its sampling rank at a
// rising edge of clk when output_enable is high, and drives col_code[] (the
// DAC inputs) for the whole next row time while the sampling rank is filled
// with the following row.
//
// The design calls this block 8-bit latches that hold the pixel data during
// the row addressing time and supply it to all columns when Output Enable
// arrives. Splitting it into a sampling and an output rank, and clocking both
// with the column clock instead of building level-sensitive latches, are
// this design's choices. If sel[c] and output_enable are high at the same
// edge, the output rank gets the sampling rank's old value.
//
// Timing: with the token on sel[c] before edge k, pixel_data must be valid
// before edge k; col_code changes one edge after output_enable is seen.
module column_latch
  import peld_pkg::*;
#(
  parameter int unsigned COLS = NUM_COLS
) (
  input  logic            clk,
  input  logic [COLS-1:0] sel,
  input  gray_t           pixel_data,
  input  logic            output_enable,
  output gray_t           col_code [COLS]
);

  gray_t sample_q [COLS];

  always_ff @(posedge clk) begin
    for (int unsigned c = 0; c < COLS; c++) begin
      if (sel[c]) sample_q[c] <= pixel_data;
      if (output_enable) col_code[c] <= sample_q[c];
    end
  end

endmodule
