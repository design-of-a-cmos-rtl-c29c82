// tb_ps_dff: self-checking test of the shift-register stage.
//
// Drives random data and checks that q takes d at each rising clock edge,
// that clear forces q to 0 in the middle of a clock phase without waiting for
// an edge, and that q stays 0 across edges while clear is held. The expected
// value is kept by the testbench itself.
module tb_ps_dff;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0, clear = 1'b1, d = 1'b0, q;
  int checks = 0, failures = 0;
  logic expected;

  ps_dff dut (.clk, .clear, .d, .q);

  always #5 clk = ~clk;

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b at %0t", what, q, exp, $time);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(1'b0, "held clear");
    @(negedge clk) clear = 1'b0;
    expected = 1'b0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      d = 1'($urandom);
      check(expected, "hold between edges");
      @(posedge clk);
      expected = d;
      #1 check(expected, "capture at rising edge");
      // now and then, clear asynchronously in the high phase
      if (i % 37 == 36) begin
        #1 clear = 1'b1;
        #0.1 check(1'b0, "asynchronous clear");
        @(posedge clk);
        #1 check(1'b0, "clear held across an edge");
        @(negedge clk) begin clear = 1'b0; d = 1'b0; end
        expected = 1'b0;
      end
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
