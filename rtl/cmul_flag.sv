// cmul_flag - complex multiplier for ordered twiddles.
//
// Multiplies the data word d = a + jb by the stored twiddle (flag, cr, ci).
// When flag is set the stored real part cr is the negated twiddle real
// part, so the two real partial products that use cr (a*cr and b*cr) are
// complemented before they are summed:
//     re = s*a*cr - b*ci,   im = a*ci + s*b*cr,   s = flag ? -1 : +1,
// which equals the product with the true twiddle.  The sums are scaled back
// by 2^-15 (Q1.15 twiddle) with an arithmetic shift, i.e. rounded toward
// minus infinity.
//
// Interface: d = {re, im}, W bits each; p = {re, im}, W+1 bits each
// (|twiddle| <= 1 gives |re|,|im| < sqrt(2)*2^(W-1)).  One register stage:
// p holds the product of the inputs presented one clock earlier.
//
// The flag-controlled complement follows the design description; placing
// it on the partial products, the word widths, the truncation and the
// single pipeline register are this implementation's choices.  The real
// multipliers are written as '*' and left to synthesis.
module cmul_flag
  import fft16_pkg::*;
#(
  parameter int unsigned W = 18
) (
  input  logic                clk,
  input  logic [2*W-1:0]      d,
  input  coef_t               coef,
  output logic [2*(W+1)-1:0]  p
);

  localparam int unsigned PW = W + COEF_W + 1;

  logic signed [W-1:0]  a, b;
  logic signed [PW-1:0] p_acr, p_bci, p_aci, p_bcr, re_s, im_s;

  assign a = d[2*W-1:W];
  assign b = d[W-1:0];

  always_comb begin
    p_acr = PW'(a) * PW'(coef.re);
    p_bcr = PW'(b) * PW'(coef.re);
    p_aci = PW'(a) * PW'(coef.im);
    p_bci = PW'(b) * PW'(coef.im);
    if (coef.flag) begin
      p_acr = -p_acr;
      p_bcr = -p_bcr;
    end
    re_s = p_acr - p_bci;
    im_s = p_aci + p_bcr;
  end

  always_ff @(posedge clk)
    p <= {(W+1)'(re_s >>> (COEF_W - 1)), (W+1)'(im_s >>> (COEF_W - 1))};

endmodule
