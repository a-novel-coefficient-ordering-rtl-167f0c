// r4_bfly - word-serial radix-4 butterfly built from control inverters and
// one summer.
//
// Each slot it forms ONE of the four radix-4 outputs
//     y = sum_k x_k * W4^(p_k * m),
// for the output index m selected by c[2:0], where input line k carries
// p_k = (m - k) mod 4 (the rotation both commutators produce).  With that
// rotation the per-line factors reduce to:
//     line 0: -j if c[2]    line 1: -1 if c[1]
//     line 2: +j if c[2]    line 3: -1 if c[0]
// and c = 000, 101, 011, 110 for m = 0, 1, 2, 3 (fft16_pkg::bfly_ctrl).
// Negation is done as on silicon: the word is inverted with XOR gates and
// the missing +1 of each inverted component enters the summer as a carry.
// Rotation by +-j swaps re and im and inverts one of them.
//
// Interface: x[k] = {re, im}, W bits each.  y = {re, im}, W+2 bits each
// (full radix-4 growth, no scaling), registered: y holds the result of the
// inputs presented one clock earlier.
//
// The XOR/summer structure follows the design description; the mapping of
// the c bits to lines is read off the ROM1 contents.
module r4_bfly #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic [3:0][2*W-1:0] x,
  input  logic [2:0]          c,
  output logic [2*(W+2)-1:0]  y
);

  localparam int unsigned WO = W + 2;

  logic signed [WO-1:0] re_t [4];
  logic signed [WO-1:0] im_t [4];
  logic        [2:0]    cy_re, cy_im;
  logic signed [WO-1:0] sum_re, sum_im;

  always_comb begin
    logic signed [W-1:0] xr [4];
    logic signed [W-1:0] xi [4];
    logic                inv_re [4];
    logic                inv_im [4];
    logic signed [W-1:0] sr, si;
    for (int k = 0; k < 4; k++) begin
      xr[k] = x[k][2*W-1:W];
      xi[k] = x[k][W-1:0];
    end
    // line 0: times -j when c[2]:  (a + jb)(-j) = b - ja
    // line 2: times +j when c[2]:  (a + jb)(+j) = -b + ja
    // line 1 / 3: times -1 when c[1] / c[0]
    cy_re = '0;
    cy_im = '0;
    for (int k = 0; k < 4; k++) begin
      case (k)
        0: begin
             sr = c[2] ? xi[0] : xr[0];  si = c[2] ? xr[0] : xi[0];
             inv_re[0] = 1'b0;           inv_im[0] = c[2];
           end
        1: begin
             sr = xr[1];  si = xi[1];
             inv_re[1] = c[1];  inv_im[1] = c[1];
           end
        2: begin
             sr = c[2] ? xi[2] : xr[2];  si = c[2] ? xr[2] : xi[2];
             inv_re[2] = c[2];           inv_im[2] = 1'b0;
           end
        default: begin
             sr = xr[3];  si = xi[3];
             inv_re[3] = c[0];  inv_im[3] = c[0];
           end
      endcase
      // sign-extend, then XOR control inverter
      re_t[k] = WO'(sr) ^ {WO{inv_re[k]}};
      im_t[k] = WO'(si) ^ {WO{inv_im[k]}};
      cy_re   = cy_re + 3'(inv_re[k]);
      cy_im   = cy_im + 3'(inv_im[k]);
    end
    sum_re = re_t[0] + re_t[1] + re_t[2] + re_t[3] + WO'(cy_re);
    sum_im = im_t[0] + im_t[1] + im_t[2] + im_t[3] + WO'(cy_im);
  end

  always_ff @(posedge clk)
    y <= {sum_re, sum_im};

endmodule
