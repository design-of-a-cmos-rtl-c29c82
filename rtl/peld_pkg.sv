// peld_pkg: sizes and types shared by the active-matrix polymer EL display driver.
//
// The panel is a monochrome VGA array (640 columns by 480 rows) with 256 gray
// levels, so every pixel value is an 8-bit code. The row shift register is
// clocked at 28.8 kHz and the column shift register at 25.2 MHz, which gives
// 875 column clocks per row time and a 60 Hz frame (28.8 kHz / 480 rows).
// The 875 clocks per row and the 60 Hz frame are derived from those two clock
// rates; the rest are the design's stated figures.
package peld_pkg;

  localparam int unsigned NUM_COLS      = 640;     // VGA horizontal resolution
  localparam int unsigned NUM_ROWS      = 480;     // VGA vertical resolution
  localparam int unsigned GRAY_BITS     = 8;       // 256 gray levels
  localparam int unsigned ROW_CLK_HZ    = 28_800;  // row shift register clock
  localparam int unsigned COL_CLK_HZ    = 25_200_000; // column shift register clock
  localparam int unsigned COL_CLKS_PER_ROW = COL_CLK_HZ / ROW_CLK_HZ; // 875

  typedef logic [GRAY_BITS-1:0] gray_t;

endpackage
