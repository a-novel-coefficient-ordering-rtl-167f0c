// tb_coef_rom_ordered - checks the ordered twiddle ROM.
//
// For each slot j, with (m1, q1) from the ordered flow graph, the stored
// word must be W16^(q1*m1) quantised as floor(v * 2^15) (1.0 clipped to
// 0x7fff), its real part negated when flag is set.  It also recomputes the
// bit toggles between successive words over one frame, cyclically:
// 192 for the natural-order twiddles (32-bit {re, im}), 78 for the ROM
// ({re, im}, flag not counted).
//
// The ordered table and both toggle counts (192 and 78) are the published
// figures; the expected words are recomputed here from the twiddle formula.
module tb_coef_rom_ordered;
  import fft16_pkg::*;

  logic [3:0] idx = '0;
  coef_t      coef;

  coef_rom_ordered dut (.*);

  localparam int MSEQ [16] = '{0,0,0,0,1,2,3,2,1,1,3,1,2,2,3,3};
  localparam int QSEQ [16] = '{0,1,2,3,0,0,0,2,1,3,1,2,1,3,2,3};

  int checks = 0, failures = 0;

  function automatic int qtw(real v);
    int q = int'($floor(v * 32768.0 + 1.0e-6));
    if (q > 32767) q = 32767;
    return q;
  endfunction

  initial begin
    logic [31:0] words [16];
    logic [31:0] nat   [16];
    automatic int toggles = 0, toggles_nat = 0;
    automatic real pi = 3.14159265358979323846;
    for (int j = 0; j < 16; j++) begin
      automatic int e = QSEQ[j] * MSEQ[j];
      automatic int cr = qtw($cos(2.0 * pi * e / 16.0));
      automatic int ci = qtw(-$sin(2.0 * pi * e / 16.0));
      int re;
      idx = 4'(j);
      #1;
      re = coef.flag ? -int'(coef.re) : int'(coef.re);
      checks++;
      if (re != cr || int'(coef.im) != ci) begin
        failures++;
        $display("slot %0d: (%0d,%0d,%0d) expected W16^%0d = (%0d,%0d)",
                 j, coef.flag, coef.re, coef.im, e, cr, ci);
      end
      words[j] = {coef.re, coef.im};
    end
    // natural order: m1 = 0..3, q1 = 0..3
    for (int m = 0; m < 4; m++)
      for (int q = 0; q < 4; q++)
        nat[4*m + q] = {16'(qtw($cos(2.0 * pi * q * m / 16.0))),
                        16'(qtw(-$sin(2.0 * pi * q * m / 16.0)))};
    for (int j = 0; j < 16; j++) begin
      toggles     += $countones(words[j] ^ words[(j + 1) % 16]);
      toggles_nat += $countones(nat[j] ^ nat[(j + 1) % 16]);
    end
    $display("toggles per frame: natural %0d, ordered %0d", toggles_nat, toggles);
    checks++;
    if (toggles != 78) failures++;
    checks++;
    if (toggles_nat != 192) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
