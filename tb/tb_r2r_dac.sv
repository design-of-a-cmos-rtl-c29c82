// tb_r2r_dac: self-checking test of the R-2R DAC model.
//
// Sweeps all 256 codes at two reference voltages and checks the output
// against vref * code / 256 computed here, and that the output rises by
// exactly one step, vref / 256, from each code to the next.
module tb_r2r_dac;
  timeunit 1ns; timeprecision 1ps;
  import peld_pkg::*;

  gray_t code;
  real vref, vout, prev;
  int checks = 0, failures = 0;

  r2r_dac dut (.code, .vref, .vout);

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  initial begin
    real refs [2] = '{5.0, 3.3};
    foreach (refs[k]) begin
      vref = refs[k];
      prev = -1.0;
      for (int c = 0; c < 256; c++) begin
        code = gray_t'(c);
        #1;
        checks++;
        if (absr(vout - vref * real'(c) / 256.0) > 1e-9) begin
          failures++;
          $display("FAIL vref=%f code=%0d vout=%f", vref, c, vout);
        end
        if (c > 0) begin
          checks++;
          if (absr((vout - prev) - vref / 256.0) > 1e-9) begin
            failures++;
            $display("FAIL step at code %0d: %f", c, vout - prev);
          end
        end
        prev = vout;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
