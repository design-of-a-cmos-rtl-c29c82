// tb_peld_driver_top: end-to-end test of the whole display driver at its
// full VGA size (640 x 480, 8-bit gray), with VGA timing.
//
// The column clock runs at 25.2 MHz and one row time lasts 875 column clocks,
// which makes the row clock 28.8 kHz and the frame 60 Hz. Each row time
// enters a token at col_din and streams 640 pixels, one per column clock; at
// its end the row clock moves the row token on and output_enable, at the
// next column clock, puts the row just gathered on the column lines. Two
// frames of different images, computed here from a formula of frame, row and
// column, are written. The test checks:
//   - the column token position and the latched codes of every row;
//   - that exactly the expected row is selected in each row time;
//   - that the pixel of the selected row follows its column (track) and
//     that the pixels of the following row still show the previous frame
//     while their column carries other data (hold);
//   - every pixel's voltage (vref * code / 256) and current after each frame;
//   - the row clock frequency and frame rate from the simulated time;
//   - that Row Clear and Column Clear empty both shift registers at once.
// Each of these mechanisms is counted, and one that never happens fails.
module tb_peld_driver_top;
  timeunit 1ns; timeprecision 1ps;
  import peld_pkg::*;

  localparam int ROWS = NUM_ROWS;
  localparam int COLS = NUM_COLS;
  localparam int LINE = 875;                 // 25.2 MHz / 28.8 kHz
  localparam realtime HALF = 19.841ns;       // 25.2 MHz column clock
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

  int checks = 0, failures = 0;
  int n_token = 0, n_sample = 0, n_oe = 0, n_rowsel = 0, n_track = 0, n_hold = 0;
  int n_colclear = 0, n_rowclear = 0, n_rate = 0;
  realtime t_row_edge [$];

  peld_driver_top dut (.*);

  always #HALF col_clk = ~col_clk;
  always @(posedge row_clk) t_row_edge.push_back($realtime);

  function automatic gray_t image(input int fr, input int r, input int c);
    return gray_t'(r * 7 + c * 13 + fr * 101 + ((r * c) >> 3));
  endfunction

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s at %0t", msg, $time);
  endtask

  task automatic check_pixel(input int r, input int c, input gray_t code, input string what);
    real v;
    probe_row = 9'(r);
    probe_col = 10'(c);
    #0.001;
    v = vref * real'(code) / 256.0;
    checks++;
    if (absr(probe_vg - v) > 1e-9 || absr(probe_ua - v * v) > 1e-9)
      fail($sformatf("%s pixel (%0d,%0d): %f V %f uA, expected %f V", what, r, c, probe_vg, probe_ua, v));
  endtask

  task automatic run_frame(input int fr);
    for (int p = 0; p <= ROWS; p++) begin
      for (int k = 0; k < LINE; k++) begin
        @(negedge col_clk);
        col_din = (k == 0) && (p < ROWS);
        output_enable = (k == 0) && (p >= 1);
        pixel_data = (p < ROWS && k >= 1 && k <= COLS) ? image(fr, p, k - 1) : gray_t'(0);
        if (k == LINE - 2) row_din = (p == 0);
        if (k == LINE - 1) row_clk = 1'b1;
        if (k == LINE / 2) row_clk = 1'b0;
        @(posedge col_clk);
        #1;
        // the gathered row of p-1 reaches the columns one edge after output_enable
        if (k == 0 && p >= 1) begin
          n_oe++;
          for (int c = 0; c < COLS; c++) begin
            checks++;
            if (col_code[c] !== image(fr, p - 1, c))
              fail($sformatf("row %0d col %0d code %h expected %h", p - 1, c, col_code[c], image(fr, p - 1, c)));
            else n_sample++;
          end
        end
        // column token on column k after edge k
        if (p < ROWS && (k == 0 || k == COLS / 2 || k == COLS - 1 || k == COLS)) begin
          checks++;
          if (col_sel !== ((k < COLS) ? (COLS'(1) << k) : '0)) fail($sformatf("column token after edge %0d", k));
          else if (k == COLS) n_token++;
        end
        if (k == LINE / 2 && p >= 1) begin
          checks++;
          if (row_line !== (ROWS'(1) << (p - 1))) fail($sformatf("row select in row time %0d", p));
          else n_rowsel++;
          // selected row follows its columns
          for (int c = 0; c < COLS; c += 97) begin
            check_pixel(p - 1, c, image(fr, p - 1, c), "track");
            n_track++;
          end
          // the next row still holds the previous frame
          if (p < ROWS) begin
            for (int c = 3; c < COLS; c += 89) begin
              gray_t old = (fr == 0) ? gray_t'(0) : image(fr - 1, p, c);
              check_pixel(p, c, old, "hold");
              if (old != image(fr, p - 1, c)) n_hold++;
            end
          end
        end
      end
    end
    @(negedge col_clk) row_clk = 1'b0;
    checks++;
    if (row_line !== '0) fail("row token did not leave the last row");
  endtask

  task automatic check_frame(input int fr);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        check_pixel(r, c, image(fr, r, c), "frame");
  endtask

  task automatic check_rates();
    // row clock period and frame time from the row clock edges of one frame
    realtime period, frame;
    period = t_row_edge[1] - t_row_edge[0];
    frame  = t_row_edge[ROWS] - t_row_edge[0];
    checks += 2;
    if (absr(1.0e9 / period - 28800.0) > 28.8) fail($sformatf("row clock %f Hz", 1.0e9 / period));
    else n_rate++;
    if (absr(1.0e9 / frame - 60.0) > 0.06) fail($sformatf("frame rate %f Hz", 1.0e9 / frame));
    else n_rate++;
    $display("row clock %.1f Hz, frame rate %.3f Hz", 1.0e9 / period, 1.0e9 / frame);
  endtask

  initial begin
    repeat (3) @(negedge col_clk);
    row_clear = 1'b0;
    col_clear = 1'b0;
    checks++;
    if (row_line !== '0 || col_sel !== '0) fail("shift registers not empty after clear");
    run_frame(0);
    check_frame(0);
    check_rates();
    run_frame(1);
    check_frame(1);
    // Clear: put tokens in both registers, then clear them between edges.
    @(negedge col_clk) begin col_din = 1'b1; row_din = 1'b1; row_clk = 1'b1; end
    @(negedge col_clk) begin col_din = 1'b0; row_din = 1'b0; row_clk = 1'b0; end
    repeat (5) @(negedge col_clk);
    checks++;
    if (col_sel === '0 || row_line === '0) fail("tokens not entered before clear");
    #3 col_clear = 1'b1;
    #0.1;
    checks++;
    if (col_sel !== '0) fail("column clear");
    else n_colclear++;
    #3 row_clear = 1'b1;
    #0.1;
    checks++;
    if (row_line !== '0) fail("row clear");
    else n_rowclear++;
    @(negedge col_clk) begin col_clear = 1'b0; row_clear = 1'b0; end
    // every mechanism must have happened
    checks++;
    if (n_token == 0 || n_sample == 0 || n_oe == 0 || n_rowsel == 0 || n_track == 0 ||
        n_hold == 0 || n_colclear == 0 || n_rowclear == 0 || n_rate == 0)
      fail("a mechanism never happened");
    $display("token walks %0d, pixels latched %0d, output enables %0d, row selects %0d",
             n_token, n_sample, n_oe, n_rowsel);
    $display("tracks %0d, holds %0d, column clears %0d, row clears %0d, rate checks %0d",
             n_track, n_hold, n_colclear, n_rowclear, n_rate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * (ROWS + 1) * LINE + 10000) @(posedge col_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
