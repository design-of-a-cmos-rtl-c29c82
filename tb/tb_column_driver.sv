// tb_column_driver: self-checking test of the column driving circuit.
//
// Uses 16 columns. Each row time starts by entering a token at col_din and
// presenting one random 8-bit pixel per column clock; the next row time
// starts with output_enable, after which every column must carry the code
// of its pixel and the voltage vref * code / 256 (computed here). The column
// voltages must stay put while the next row is shifted in, and the gathering
// of 16 pixels must take 16 column clocks after the token is entered.
// col_clear in the middle of a row must stop the token so that the remaining
// pixels of that row are not taken.
module tb_column_driver;
  timeunit 1ns; timeprecision 1ps;
  import peld_pkg::*;

  localparam int unsigned C = 16;
  localparam int unsigned LINE = C + 4;   // column clocks per row time

  logic col_clk = 1'b0, col_clear = 1'b1, col_din = 1'b0, output_enable = 1'b0;
  gray_t pixel_data = '0;
  real vref = 5.0;
  logic [C-1:0] col_sel;
  gray_t col_code [C];
  real col_v [C];
  gray_t row_data [C], shown [C];
  int checks = 0, failures = 0;
  bit shown_valid = 1'b0;

  column_driver #(.COLS(C)) dut (.col_clk, .col_clear, .col_din, .pixel_data,
                                 .output_enable, .vref, .col_sel, .col_code, .col_v);

  always #5 col_clk = ~col_clk;

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic check_columns(input string what);
    for (int c = 0; c < int'(C); c++) begin
      checks++;
      if (col_code[c] !== shown[c] ||
          absr(col_v[c] - vref * real'(shown[c]) / 256.0) > 1e-9) begin
        failures++;
        $display("FAIL %s col %0d: code %h v %f expected %h", what, c, col_code[c], col_v[c], shown[c]);
      end
    end
  endtask

  // One row time: output_enable with the token entry, then C pixels.
  task automatic row_time(input bit oe, input int clear_at);
    for (int k = 0; k < int'(LINE); k++) begin
      @(negedge col_clk);
      col_din = (k == 0);
      output_enable = oe && (k == 0);
      col_clear = (clear_at >= 0 && k == clear_at);
      pixel_data = (k >= 1 && k <= int'(C)) ? row_data[k-1] : gray_t'($urandom);
      @(posedge col_clk);
      #1;
      if (oe && k == 0) shown = row_data_prev;
      if (oe && k == 0) shown_valid = 1'b1;
      if (shown_valid) check_columns("column output");
      // token position: after edge k the token sits on column k
      if (clear_at < 0) begin
        checks++;
        if (col_sel !== ((k < int'(C)) ? (C'(1) << k) : '0)) begin
          failures++;
          $display("FAIL token after edge %0d: %h", k, col_sel);
        end
      end
    end
  endtask

  gray_t row_data_prev [C];

  initial begin
    repeat (2) @(posedge col_clk);
    @(negedge col_clk) col_clear = 1'b0;
    foreach (row_data[c]) row_data[c] = gray_t'($urandom);
    row_time(1'b0, -1);
    for (int r = 0; r < 30; r++) begin
      row_data_prev = row_data;
      foreach (row_data[c]) row_data[c] = gray_t'($urandom);
      if (r == 10) vref = 3.3;
      if (r == 20) begin
        // clear after 6 columns: only columns 0..5 take the new row
        row_time(1'b1, 7);
        for (int c = 6; c < int'(C); c++) row_data[c] = row_data_prev[c];
      end else begin
        row_time(1'b1, -1);
      end
    end
    row_data_prev = row_data;
    row_time(1'b1, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge col_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
