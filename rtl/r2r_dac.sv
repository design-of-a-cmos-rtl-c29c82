// r2r_dac: behavioural model of one column's 8-bit R-2R ladder DAC.
//
// This is not synthesizable logic: the real part is an analog R-2R ladder
// built from PMOS devices, one per column, that converts the latched 8-bit
// gray code into a column voltage (pulse amplitude modulation: the gray level
// is set by the amplitude of the column voltage). The model is the ideal
// ladder: bit i adds vref / 2^(8-i), so vout = vref * code / 256, which
// spans 0 to 255/256 of the reference voltage in 256 equal steps.
//
// The ideal, offset-free transfer is this design's choice; the real ladder's
// non-linearity and the gray-scale curve it yields through the pixel and the
// diode are not modelled. vout follows code and vref with no delay.
//
// Ports: code (8-bit gray code), vref (reference voltage, volts),
// vout (column voltage, volts).
module r2r_dac
  import peld_pkg::*;
(
  input  gray_t code,
  input  real   vref,
  output real   vout
);

  always_comb begin
    vout = 0.0;
    for (int i = 0; i < int'(GRAY_BITS); i++) begin
      if (code[i]) vout = vout + vref / real'(2 ** (int'(GRAY_BITS) - i));
    end
  end

endmodule
