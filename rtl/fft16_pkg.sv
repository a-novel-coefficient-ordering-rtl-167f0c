// fft16_pkg - constants, types and look-up tables shared by the ordered
// 16-point radix-4 pipelined FFT.
//
// Complex samples travel between blocks as packed vectors {re, im}, real part
// in the upper half, both halves two's complement.
//
// What is taken from the design description:
//   * the 30 useful bits of each ROM1 word (commutator control, 16 words),
//   * the ordered twiddle sequence with its flag bit (16 words, Q1.15),
//   * the order in which the 16 stage-1 results leave the multiplier.
// What is this implementation's own: the packing of the butterfly control
// c[2:0] into "rotate/negate" actions (derived from the ROM1 contents),
// and the function that builds the ADM address sequence (ROM0).
package fft16_pkg;

  localparam int unsigned COEF_W = 16;  // twiddle word width (Q1.15)

  // One word of ROM1: {cs, c[2:0], aw, adrf, adre, adrd, adrc, adra, m[7:0]}.
  typedef struct packed {
    logic       cs;    // 1: TM2 write disabled
    logic [2:0] c;     // butterfly control of the following butterfly
    logic [2:0] aw;    // TM2 write address
    logic [2:0] af;    // TM2 read port 2 address (output F)
    logic [2:0] ae;    // TM2 read port 1 address (output E)
    logic [2:0] ad;    // TM1 read port 2 address (output D)
    logic [2:0] ac;    // TM1 read port 1 address (output C)
    logic [2:0] aa;    // TM0 read port 1 address (output A)
    logic [7:0] m;     // mux selects {O4, O3, O2, O1}, 2 bits each
  } rom1_word_t;

  // Ordered twiddle: real part stored negated when flag is set.
  typedef struct packed {
    logic                     flag;
    logic signed [COEF_W-1:0] re;
    logic signed [COEF_W-1:0] im;
  } coef_t;

  // ROM1 contents (22 control bits and the mux byte, as two hex fields).
  function automatic rom1_word_t rom1_lookup(input logic [3:0] a);
    logic [21:0] hi;
    logic [7:0]  lo;
    case (a)
      4'd0:  begin hi = 22'h2e8804; lo = 8'h29; end
      4'd1:  begin hi = 22'h1b4184; lo = 8'he4; end
      4'd2:  begin hi = 22'h2fac86; lo = 8'h29; end
      4'd3:  begin hi = 22'h16a34d; lo = 8'h89; end
      4'd4:  begin hi = 22'h17a7df; lo = 8'h89; end
      4'd5:  begin hi = 22'h38534d; lo = 8'he5; end
      4'd6:  begin hi = 22'h346595; lo = 8'h9a; end
      4'd7:  begin hi = 22'h2c1a6d; lo = 8'ha9; end
      4'd8:  begin hi = 22'h2c3efd; lo = 8'ha9; end
      4'd9:  begin hi = 22'h386595; lo = 8'he5; end
      4'd10: begin hi = 22'h3877dd; lo = 8'he5; end
      4'd11: begin hi = 22'h000000; lo = 8'h41; end
      4'd12: begin hi = 22'h008041; lo = 8'h41; end
      4'd13: begin hi = 22'h010082; lo = 8'h41; end
      4'd14: begin hi = 22'h0180c3; lo = 8'h41; end
      default: begin hi = 22'h160104; lo = 8'h49; end
    endcase
    return rom1_word_t'({hi, lo});
  endfunction

  // Ordered twiddle sequence, one word per stage-1 output slot j.
  function automatic coef_t coef_ordered(input logic [3:0] j);
    case (j)
      4'd0, 4'd1, 4'd2, 4'd3,
      4'd4, 4'd5, 4'd6:  return '{1'b1, 16'sh8001, 16'sh0000}; // W0
      4'd7:              return '{1'b0, 16'sh0000, 16'sh8000}; // W4
      4'd8:              return '{1'b0, 16'sh7641, 16'shcf04}; // W1
      4'd9, 4'd10:       return '{1'b1, 16'shcf05, 16'sh89be}; // W3
      4'd11, 4'd12:      return '{1'b0, 16'sh5a82, 16'sha57d}; // W2
      4'd13, 4'd14:      return '{1'b1, 16'sh5a83, 16'sha57d}; // W6
      default:           return '{1'b1, 16'sh7642, 16'sh30fb}; // W9
    endcase
  endfunction

  // Normal-order index k = 4*m1 + q1 of the stage-1 result produced in
  // ordered slot j.
  function automatic logic [3:0] ord_index(input logic [3:0] j);
    case (j)
      4'd0: return 4'd0;   4'd1: return 4'd1;   4'd2: return 4'd2;   4'd3: return 4'd3;
      4'd4: return 4'd4;   4'd5: return 4'd8;   4'd6: return 4'd12;  4'd7: return 4'd10;
      4'd8: return 4'd5;   4'd9: return 4'd7;   4'd10: return 4'd13; 4'd11: return 4'd6;
      4'd12: return 4'd9;  4'd13: return 4'd11; 4'd14: return 4'd14; default: return 4'd15;
    endcase
  endfunction

  // Butterfly control for output m, when butterfly line k holds input
  // p = (m - k) mod 4: c[2] rotates lines 0/2 by -j/+j, c[1] negates
  // line 1, c[0] negates line 3.  Same code as the c field of ROM1.
  function automatic logic [2:0] bfly_ctrl(input logic [1:0] m);
    return {m[0], m[1], m[0] ^ m[1]};
  endfunction

  // ROM0: address sequence of the six-word ADM over its 96-slot period.
  // The first six words of the first frame take addresses 0..5; from then
  // on the word written in slot t takes the address of the word read in
  // the same slot, which is result k = (t - 6) mod 16.
  localparam int unsigned ADM_DEPTH  = 6;
  localparam int unsigned ADM_PERIOD = 96;

  function automatic logic [ADM_PERIOD-1:0][2:0] rom0_table();
    logic [ADM_PERIOD-1:0][2:0] seq;
    logic [15:0][2:0]           addr_of;
    logic [3:0]                 s, kw, kr;
    logic [2:0]                 a;
    addr_of = '0;
    seq     = '0;
    for (int t = 0; t < ADM_PERIOD; t++) begin
      s  = 4'(t % 16);
      kw = ord_index(s);
      kr = s - 4'(ADM_DEPTH);
      if (t < ADM_DEPTH) a = 3'(t);
      else               a = addr_of[kr];
      addr_of[kw] = a;
      seq[t]      = a;
    end
    return seq;
  endfunction

endpackage
