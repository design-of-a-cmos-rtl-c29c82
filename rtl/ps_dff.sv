// ps_dff: one stage of the row and column shift registers.
//
// The circuit stage is a pseudo-static two-phase dynamic D flip-flop: a
// master and a slave, each a transmission gate into an inverter, with a
// feedback gate that keeps the stored node static while the input gate is
// open and that also takes the clear signal. Here that pair is written as one
// edge-triggered flip-flop: the master is transparent while clk is low and the
// slave while clk is high, so q takes d at the rising edge of clk.
//
// Clear is active high and, as in the circuit where it acts through the
// feedback gates, it does not wait for a clock edge: q goes to 0 as soon as
// clear is high and stays 0 while it is held. Which clock level opens which
// half and the polarity of clear are this design's choices.
//
// Ports: clk (shift clock), clear (asynchronous, active high), d, q.
module ps_dff (
  input  logic clk,
  input  logic clear,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or posedge clear) begin
    if (clear) q <= 1'b0;
    else       q <= d;
  end

endmodule
