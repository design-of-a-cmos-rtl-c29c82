// tb_gray_scale_sweep: 256-level gray scale through the whole driver.
//
// Builds a 16 x 16 panel and writes one frame in which the pixels, in row
// order, carry the codes FF, FE, ... 00, so every gray level appears once.
// After the frame it reads each pixel's current and checks that:
//   - each pixel shows vref * code / 256 and K*(V-VT)^2 with this model's
//     constants (VT = 0, K = 1 uA/V^2);
//   - the current falls strictly from one code to the next lower one, so all
//     256 levels are distinct;
//   - the current at code FF is within 25 uA +- 1 uA for a 5 V reference.
// Row and column timing follow the same sequence as the full-size test, with
// a row time shortened to COLS + 4 column clocks.
module tb_gray_scale_sweep;
  timeunit 1ns; timeprecision 1ps;
  import peld_pkg::*;

  localparam int ROWS = 16, COLS = 16;
  localparam int LINE = COLS + 4;
  localparam real VREF = 5.0;

  logic col_clk = 1'b0, col_clear = 1'b1, col_din = 1'b0, output_enable = 1'b0;
  logic row_clk = 1'b0, row_clear = 1'b1, row_din = 1'b0;
  gray_t pixel_data = '0;
  real vref = VREF;
  logic [ROWS-1:0] row_line;
  logic [COLS-1:0] col_sel;
  gray_t col_code [COLS];
  logic [$clog2(ROWS)-1:0] probe_row = '0;
  logic [$clog2(COLS)-1:0] probe_col = '0;
  real probe_vg, probe_ua;
  real cur [256];
  int checks = 0, failures = 0;

  peld_driver_top #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #19.841ns col_clk = ~col_clk;

  function automatic gray_t code_at(input int r, input int c);
    return gray_t'(255 - (r * COLS + c));
  endfunction

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  initial begin
    repeat (3) @(negedge col_clk);
    row_clear = 1'b0;
    col_clear = 1'b0;
    for (int p = 0; p <= ROWS; p++) begin
      for (int k = 0; k < LINE; k++) begin
        @(negedge col_clk);
        col_din = (k == 0) && (p < ROWS);
        output_enable = (k == 0) && (p >= 1);
        pixel_data = (p < ROWS && k >= 1 && k <= COLS) ? code_at(p, k - 1) : gray_t'(0);
        if (k == LINE - 2) row_din = (p == 0);
        if (k == LINE - 1) row_clk = 1'b1;
        if (k == LINE / 2) row_clk = 1'b0;
      end
    end
    @(negedge col_clk) row_clk = 1'b0;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        real v;
        gray_t code;
        probe_row = 4'(r);
        probe_col = 4'(c);
        #0.001;
        code = code_at(r, c);
        v = VREF * real'(code) / 256.0;
        cur[code] = probe_ua;
        checks++;
        if (absr(probe_vg - v) > 1e-9 || absr(probe_ua - v * v) > 1e-9) begin
          failures++;
          $display("FAIL code %h: %f V %f uA", code, probe_vg, probe_ua);
        end
      end
    end
    for (int code = 1; code < 256; code++) begin
      checks++;
      if (!(cur[code] > cur[code - 1])) begin
        failures++;
        $display("FAIL current not rising from code %h to %h", code - 1, code);
      end
    end
    checks++;
    if (absr(cur[255] - 25.0) > 1.0) begin
      failures++;
      $display("FAIL full-scale current %f uA", cur[255]);
    end
    $display("gray scale: code FF %.3f uA, 80 %.3f uA, 01 %.5f uA, 00 %.5f uA",
             cur[255], cur[128], cur[1], cur[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((ROWS + 2) * LINE + 1000) @(posedge col_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
