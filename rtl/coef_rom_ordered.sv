// coef_rom_ordered - twiddle ROM of stage 1, read in the low-switching
// order.
//
// Slot j of a frame (j = 0..15) returns the twiddle for the stage-1 result
// produced in that slot.  The sixteen words, W16^(q*m) quantised to Q1.15,
// are arranged so that successive words differ in few bits: the imaginary
// parts are ordered by Hamming distance, and each real part is stored
// either as is or negated (two's complement), whichever is closer to the
// previous real part; `flag` marks a negated real part.  Over a frame
// (cyclically) the real+imaginary words toggle 78 bits against 192 for the
// same twiddles in natural order.
//
// Interface: combinational, idx in, {flag, re, im} out.  Contents follow
// the design description (fft16_pkg::coef_ordered).
module coef_rom_ordered
  import fft16_pkg::*;
(
  input  logic [3:0] idx,
  output coef_t      coef
);

  assign coef = coef_ordered(idx);

endmodule
