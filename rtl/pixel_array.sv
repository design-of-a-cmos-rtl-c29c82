// pixel_array: behavioural model of the active-matrix array of 2T1C pixels.
//
// This is not synthesizable logic: each pixel is an analog circuit of an
// addressing transistor, a storage capacitor and a driving transistor in
// series with the polymer light emitting diode. While a pixel's row line is
// selected, its addressing transistor connects the column line to the storage
// capacitor, so the capacitor follows the column voltage; when the row line
// is released the capacitor holds the last value for the rest of the frame,
// and the driving transistor keeps passing a current set by that held voltage
// through the diode. The diode current equals the driving transistor current.
//
// The model samples at each rising edge of clk (the column clock, the fastest
// clock of the display): every pixel whose row line is high takes its column
// voltage, every other pixel keeps its value. The capacitor starts discharged
// (0 V). The driving transistor is modelled as a saturated square-law device,
// I = K_UA * (Vg - VT)^2 for Vg > VT and 0 otherwise; VT = 0 V and
// K_UA = 1 uA/V^2 are this design's choices, picked so that a full-scale
// 5 V reference gives about 25 uA, the top of the simulated gray-scale curve.
// Leakage, charge sharing and the diode's own non-linearity are not modelled.
//
// Ports: clk, row_line[ROWS] (row select lines), col_v[COLS] (column
// voltages, volts); probe_row/probe_col pick one pixel whose held gate voltage
// (probe_vg, volts) and diode current (probe_ua, microamps) are shown
// combinationally. The probe is for observation only.
module pixel_array
  import peld_pkg::*;
#(
  parameter int  ROWS = NUM_ROWS,
  parameter int  COLS = NUM_COLS,
  parameter real VT   = 0.0,
  parameter real K_UA = 1.0
) (
  input  logic                    clk,
  input  logic [ROWS-1:0]         row_line,
  input  real                     col_v [COLS],
  input  logic [$clog2(ROWS)-1:0] probe_row,
  input  logic [$clog2(COLS)-1:0] probe_col,
  output real                     probe_vg,
  output real                     probe_ua
);

  // Voltages on the storage capacitors, pixel (r, c) at index r*COLS + c.
  // This is analog state, so it is held in a class object, not in registers.
  class cap_store;
    real v [];
    function new(int n);
      v = new [n];
      foreach (v[i]) v[i] = 0.0;     // capacitors start discharged
    endfunction
    function void put(int i, real x);
      v[i] = x;
    endfunction
    function real get(int i);
      return v[i];
    endfunction
  endclass

  cap_store caps = new(ROWS * COLS);
  int unsigned updates;              // counts sampling edges, re-triggers the probe
  initial updates = 0;

  // Track while selected, hold otherwise.
  always @(posedge clk) begin
    for (int r = 0; r < ROWS; r++) begin
      if (row_line[r]) begin
        for (int c = 0; c < COLS; c++) caps.put(r * COLS + c, col_v[c]);
      end
    end
    if (|row_line) updates <= updates + 1;
  end

  always @(probe_row, probe_col, updates) begin
    int  idx;
    real v;
    idx = int'(probe_row) * COLS + int'(probe_col);
    v = 0.0;
    if (int'(probe_row) < ROWS && int'(probe_col) < COLS) v = caps.get(idx);
    probe_vg = v;
    probe_ua = (v > VT) ? K_UA * (v - VT) * (v - VT) : 0.0;
  end

endmodule
