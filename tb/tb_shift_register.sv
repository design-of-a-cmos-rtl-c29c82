// tb_shift_register: self-checking test of the shift-register chain.
//
// Uses a 24-stage chain. Feeds single tokens (as the row and column drivers
// do) and random bit streams, and compares q after every rising edge with a
// vector shifted by the testbench. Clear is asserted between edges and must
// empty every stage at once. A token must reach stage k exactly k+1 edges
// after it is presented at din.
module tb_shift_register;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned N = 24;

  logic clk = 1'b0, clear = 1'b1, din = 1'b0;
  logic [N-1:0] q, model;
  int checks = 0, failures = 0;

  shift_register #(.STAGES(N)) dut (.clk, .clear, .din, .q);

  always #5 clk = ~clk;

  task automatic check(input string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s: q=%h expected %h at %0t", what, q, model, $time);
    end
  endtask

  task automatic step(input logic bit_in);
    @(negedge clk) din = bit_in;
    @(posedge clk) model = {model[N-2:0], bit_in};
    #1 check("shift");
  endtask

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    #1 check("clear held");
    @(negedge clk) clear = 1'b0;
    // single token: must arrive on stage N-1 after exactly N edges, then leave
    step(1'b1);
    for (int k = 1; k < N + 2; k++) begin
      step(1'b0);
      if (k == N - 1) begin
        checks++;
        if (q != (N'(1) << (N - 1))) begin
          failures++;
          $display("FAIL token latency: q=%h after %0d edges", q, k + 1);
        end
      end
    end
    // random streams
    for (int i = 0; i < 300; i++) step(1'($urandom));
    // asynchronous clear between edges
    @(negedge clk);
    #1 clear = 1'b1;
    model = '0;
    #0.1 check("asynchronous clear");
    @(posedge clk) #1 check("clear held across an edge");
    @(negedge clk) begin clear = 1'b0; din = 1'b0; end
    for (int i = 0; i < 100; i++) step(1'($urandom));
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
