// tb_pixel_array: self-checking test of the 2T1C pixel array model.
//
// Uses 6 rows by 5 columns. The column voltages are changed at random while
// random sets of rows (mostly one, sometimes none) are selected. A pixel on
// a selected row must follow its column voltage at each clock edge; a pixel
// on a released row must keep the last voltage it took, whatever the column
// does. Every pixel is read through the probe and compared with the
// testbench's own copy, and the reported current with K*(V-VT)^2.
module tb_pixel_array;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned R = 6, C = 5;
  localparam real VT = 0.0, K = 1.0;

  logic clk = 1'b0;
  logic [R-1:0] row_line = '0;
  real col_v [C];
  logic [$clog2(R)-1:0] probe_row = '0;
  logic [$clog2(C)-1:0] probe_col = '0;
  real probe_vg, probe_ua;
  real model [R][C];
  int checks = 0, failures = 0, holds = 0;

  pixel_array #(.ROWS(R), .COLS(C)) dut (.clk, .row_line, .col_v, .probe_row, .probe_col,
                                         .probe_vg, .probe_ua);

  always #5 clk = ~clk;

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic check_all();
    for (int r = 0; r < int'(R); r++) begin
      for (int c = 0; c < int'(C); c++) begin
        real iexp;
        probe_row = 3'(r);
        probe_col = 3'(c);
        #0.01;
        iexp = (model[r][c] > VT) ? K * (model[r][c] - VT) ** 2 : 0.0;
        checks++;
        if (absr(probe_vg - model[r][c]) > 1e-9 || absr(probe_ua - iexp) > 1e-9) begin
          failures++;
          $display("FAIL pixel (%0d,%0d): %f V %f uA expected %f V %f uA", r, c,
                   probe_vg, probe_ua, model[r][c], iexp);
        end
        if (!row_line[r] && absr(model[r][c] - col_v[c]) > 1e-3) holds++;
      end
    end
  endtask

  initial begin
    for (int r = 0; r < int'(R); r++) for (int c = 0; c < int'(C); c++) model[r][c] = 0.0;
    foreach (col_v[c]) col_v[c] = 0.0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      foreach (col_v[c]) col_v[c] = real'($urandom % 5001) / 1000.0;
      case ($urandom % 8)
        0:       row_line = '0;
        1:       row_line = R'($urandom);
        default: row_line = R'(1) << ($urandom % R);
      endcase
      @(posedge clk);
      for (int r = 0; r < int'(R); r++)
        if (row_line[r]) for (int c = 0; c < int'(C); c++) model[r][c] = col_v[c];
      #1 check_all();
    end
    checks++;
    if (holds == 0) begin
      failures++;
      $display("FAIL no pixel ever held against a different column voltage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
