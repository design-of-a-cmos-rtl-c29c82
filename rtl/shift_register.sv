// shift_register: serial chain of ps_dff stages, used by both the row and the
// column driver.
//
// A 1 shifted in at din walks one stage per rising edge of clk, so after the
// k-th edge that follows its entry it appears on q[k]. The row driver feeds a
// single 1 per frame and uses q[] as the row select lines (one row after the
// other); the column driver feeds a single 1 per row and uses q[] as the
// enables of the column latches. The chain is not circular: a token falls off
// the last stage. clear empties every stage at once.
//
// Parameter STAGES is the chain length: 640 for the column driver (the
// default) and 480 for the row driver.
module shift_register #(
  parameter int unsigned STAGES = 640
) (
  input  logic              clk,
  input  logic              clear,
  input  logic              din,
  output logic [STAGES-1:0] q
);

  // chain[i] is the input of stage i: din, then the previous stage's output.
  logic [STAGES-1:0] chain;
  assign chain[0] = din;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    ps_dff u_dff (
      .clk  (clk),
      .clear(clear),
      .d    (chain[i]),
      .q    (q[i])
    );
    if (i + 1 < STAGES) begin : g_link
      assign chain[i+1] = q[i];
    end
  end

endmodule
