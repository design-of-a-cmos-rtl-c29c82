// tb_column_latch: self-checking test of the column latch bank.
//
// Uses 12 columns. A token walks across sel[] (as the column shift register
// drives it) while random pixel data is presented, then output_enable moves
// the gathered row to col_code[]. The testbench keeps its own copy of both
// ranks and checks col_code[] after every edge: it must not change while the
// next row is gathered, and must change to the whole new row exactly one
// edge after output_enable. Rows with random gaps in the token and
// output_enable in the middle of a row are also run.
module tb_column_latch;
  timeunit 1ns; timeprecision 1ps;
  import peld_pkg::*;

  localparam int unsigned C = 12;

  logic clk = 1'b0;
  logic [C-1:0] sel = '0;
  gray_t pixel_data = '0;
  logic output_enable = 1'b0;
  gray_t col_code [C];
  gray_t m_sample [C], m_out [C];
  int checks = 0, failures = 0;
  int oe_seen = 0;

  column_latch #(.COLS(C)) dut (.clk, .sel, .pixel_data, .output_enable, .col_code);

  always #5 clk = ~clk;

  task automatic edge_and_check();
    @(posedge clk);
    for (int c = 0; c < int'(C); c++) begin
      if (output_enable) m_out[c] = m_sample[c];
    end
    for (int c = 0; c < int'(C); c++) begin
      if (sel[c]) m_sample[c] = pixel_data;
    end
    if (output_enable) oe_seen++;
    #1;
    for (int c = 0; c < int'(C); c++) begin
      if (oe_seen > 0) begin
        checks++;
        if (col_code[c] !== m_out[c]) begin
          failures++;
          $display("FAIL col %0d: %h expected %h at %0t", c, col_code[c], m_out[c], $time);
        end
      end
    end
  endtask

  initial begin
    for (int row = 0; row < 40; row++) begin
      for (int c = 0; c < int'(C); c++) begin
        @(negedge clk);
        sel = C'(1) << c;
        if (row >= 20 && ($urandom % 4) == 0) sel = '0;   // gap in the token
        pixel_data = gray_t'($urandom);
        output_enable = (row >= 30) ? (($urandom % 5) == 0) : 1'b0;
        edge_and_check();
      end
      @(negedge clk);
      sel = '0;
      pixel_data = gray_t'($urandom);
      output_enable = 1'b1;
      edge_and_check();
      @(negedge clk) output_enable = 1'b0;
      edge_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
