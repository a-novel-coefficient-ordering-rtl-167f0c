// tw64_rom - natural-order twiddle ROM of the first stage of the 64-point
// processor.
//
// Slot index idx = 16*m1 + q1 (m1 = 0..3, q1 = 0..15), the order in which
// the first-stage butterfly produces its results, returns W64^(q1*m1) with
// both parts quantised as floor(v * 2^15), 1.0 clipped to 0x7fff.  The
// table below lists W64^e for e = 0..63 in that format; the flag bit is
// always 0 (this stage is not reordered).
//
// Interface: combinational, idx in, coef_t out.  The quantisation rule is
// the one the 16-point table uses; the table itself is computed for this
// implementation.
module tw64_rom
  import fft16_pkg::*;
(
  input  logic [5:0] idx,
  output coef_t      coef
);

  function automatic coef_t w64(input logic [5:0] e);
    case (e)
      6'd0: return '{1'b0, 16'sh7fff, 16'sh0000};
      6'd1: return '{1'b0, 16'sh7f62, 16'shf374};
      6'd2: return '{1'b0, 16'sh7d8a, 16'she707};
      6'd3: return '{1'b0, 16'sh7a7d, 16'shdad7};
      6'd4: return '{1'b0, 16'sh7641, 16'shcf04};
      6'd5: return '{1'b0, 16'sh70e2, 16'shc3a9};
      6'd6: return '{1'b0, 16'sh6a6d, 16'shb8e3};
      6'd7: return '{1'b0, 16'sh62f2, 16'shaecc};
      6'd8: return '{1'b0, 16'sh5a82, 16'sha57d};
      6'd9: return '{1'b0, 16'sh5133, 16'sh9d0d};
      6'd10: return '{1'b0, 16'sh471c, 16'sh9592};
      6'd11: return '{1'b0, 16'sh3c56, 16'sh8f1d};
      6'd12: return '{1'b0, 16'sh30fb, 16'sh89be};
      6'd13: return '{1'b0, 16'sh2528, 16'sh8582};
      6'd14: return '{1'b0, 16'sh18f8, 16'sh8275};
      6'd15: return '{1'b0, 16'sh0c8b, 16'sh809d};
      6'd16: return '{1'b0, 16'sh0000, 16'sh8000};
      6'd17: return '{1'b0, 16'shf374, 16'sh809d};
      6'd18: return '{1'b0, 16'she707, 16'sh8275};
      6'd19: return '{1'b0, 16'shdad7, 16'sh8582};
      6'd20: return '{1'b0, 16'shcf04, 16'sh89be};
      6'd21: return '{1'b0, 16'shc3a9, 16'sh8f1d};
      6'd22: return '{1'b0, 16'shb8e3, 16'sh9592};
      6'd23: return '{1'b0, 16'shaecc, 16'sh9d0d};
      6'd24: return '{1'b0, 16'sha57d, 16'sha57d};
      6'd25: return '{1'b0, 16'sh9d0d, 16'shaecc};
      6'd26: return '{1'b0, 16'sh9592, 16'shb8e3};
      6'd27: return '{1'b0, 16'sh8f1d, 16'shc3a9};
      6'd28: return '{1'b0, 16'sh89be, 16'shcf04};
      6'd29: return '{1'b0, 16'sh8582, 16'shdad7};
      6'd30: return '{1'b0, 16'sh8275, 16'she707};
      6'd31: return '{1'b0, 16'sh809d, 16'shf374};
      6'd32: return '{1'b0, 16'sh8000, 16'sh0000};
      6'd33: return '{1'b0, 16'sh809d, 16'sh0c8b};
      6'd34: return '{1'b0, 16'sh8275, 16'sh18f8};
      6'd35: return '{1'b0, 16'sh8582, 16'sh2528};
      6'd36: return '{1'b0, 16'sh89be, 16'sh30fb};
      6'd37: return '{1'b0, 16'sh8f1d, 16'sh3c56};
      6'd38: return '{1'b0, 16'sh9592, 16'sh471c};
      6'd39: return '{1'b0, 16'sh9d0d, 16'sh5133};
      6'd40: return '{1'b0, 16'sha57d, 16'sh5a82};
      6'd41: return '{1'b0, 16'shaecc, 16'sh62f2};
      6'd42: return '{1'b0, 16'shb8e3, 16'sh6a6d};
      6'd43: return '{1'b0, 16'shc3a9, 16'sh70e2};
      6'd44: return '{1'b0, 16'shcf04, 16'sh7641};
      6'd45: return '{1'b0, 16'shdad7, 16'sh7a7d};
      6'd46: return '{1'b0, 16'she707, 16'sh7d8a};
      6'd47: return '{1'b0, 16'shf374, 16'sh7f62};
      6'd48: return '{1'b0, 16'sh0000, 16'sh7fff};
      6'd49: return '{1'b0, 16'sh0c8b, 16'sh7f62};
      6'd50: return '{1'b0, 16'sh18f8, 16'sh7d8a};
      6'd51: return '{1'b0, 16'sh2528, 16'sh7a7d};
      6'd52: return '{1'b0, 16'sh30fb, 16'sh7641};
      6'd53: return '{1'b0, 16'sh3c56, 16'sh70e2};
      6'd54: return '{1'b0, 16'sh471c, 16'sh6a6d};
      6'd55: return '{1'b0, 16'sh5133, 16'sh62f2};
      6'd56: return '{1'b0, 16'sh5a82, 16'sh5a82};
      6'd57: return '{1'b0, 16'sh62f2, 16'sh5133};
      6'd58: return '{1'b0, 16'sh6a6d, 16'sh471c};
      6'd59: return '{1'b0, 16'sh70e2, 16'sh3c56};
      6'd60: return '{1'b0, 16'sh7641, 16'sh30fb};
      6'd61: return '{1'b0, 16'sh7a7d, 16'sh2528};
      6'd62: return '{1'b0, 16'sh7d8a, 16'sh18f8};
      6'd63: return '{1'b0, 16'sh7f62, 16'sh0c8b};
      default: return '0;
    endcase
  endfunction

  logic [5:0] e;

  // exponent q1 * m1 (at most 45)
  assign e    = 6'(idx[3:0]) * 6'(idx[5:4]);
  assign coef = w64(e);

endmodule
