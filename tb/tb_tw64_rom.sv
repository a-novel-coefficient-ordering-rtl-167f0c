// tb_tw64_rom - checks the 64-point first-stage twiddle ROM.
//
// For every slot idx = 16*m1 + q1 the output must be W64^(q1*m1),
// quantised here as floor(v * 2^15) per part with 1.0 clipped to 0x7fff,
// and the flag must be clear.
//
// The 64-point twiddle values follow from the transform; their format
// matches the published 16-point table.
module tb_tw64_rom;
  import fft16_pkg::*;
  import fft_ref_pkg::*;

  logic [5:0] idx = '0;
  coef_t      coef;

  tw64_rom dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < 64; i++) begin
      automatic int m = i / 16, q = i % 16;
      automatic longint cr = qtw($cos(2.0 * 3.14159265358979323846 * q * m / 64.0));
      automatic longint ci = qtw(-$sin(2.0 * 3.14159265358979323846 * q * m / 64.0));
      idx = 6'(i);
      #1;
      checks++;
      if (coef.flag || longint'(coef.re) != cr || longint'(coef.im) != ci) begin
        failures++;
        $display("idx %0d: (%0d,%0d,%0d) expected W64^%0d = (%0d,%0d)", i,
                 coef.flag, coef.re, coef.im, q * m, cr, ci);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
