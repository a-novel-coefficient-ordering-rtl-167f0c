// comm1_ordered - stage-1 commutator of the ordered 16-point radix-4 FFT.
//
// The commutator turns the word-serial input x(0..15) into four parallel
// butterfly inputs per word slot, in the order that lets the following
// complex multiplier see its twiddles in the low-switching sequence.
// Three eight-word triple-port RAMs form a chain of FIFOs:
//   TM0: written with the input at a1; port 1 (aa) gives A, port 2 (a1)
//        gives B, the input delayed by eight slots;
//   TM1: written with B at a1; port 1 (ac) gives C, port 2 (ad) gives D;
//   TM2: written with D at aw unless cs is high; ports give E (ae), F (af).
// Four multiplexers choose the outputs, selects from ROM1 m[7:0]:
//   O1 = {A, D, F}[m1:m0]   O2 = {input, C, E}[m3:m2]
//   O3 = {A, D, F}[m5:m4]   O4 = {A, B, C, E}[m7:m6]
// In slot n = 16f + 12 + j (j = 0..15) the outputs hold the four samples
// x_f(4p + q) that form ordered result j of frame f, with line k carrying
// p = (m - k) mod 4, and `c` is the matching butterfly control.  The
// result order is fixed by ROM1 (see fft16_pkg::ord_index).
//
// Structure and ROM contents follow the design description; the mux input
// numbering (top input = select 0) is inferred and checked by simulation.
// Unused select code 3 of a three-input mux picks its first input.
module comm1_ordered
  import fft16_pkg::*;
#(
  parameter int unsigned W = 16  // width of re and of im
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [2*W-1:0]       din,      // {re, im}
  output logic [3:0][2*W-1:0]  o,        // o[0] = O1 ... o[3] = O4
  output logic [2:0]           c,        // butterfly control for o
  output logic [3:0]           slot      // input slot within the frame
);

  logic [2:0]     a1;
  rom1_word_t     r;
  logic [2*W-1:0] a_w, b_w, c_w, d_w, e_w, f_w;

  comm1_ctrl u_ctrl (.clk, .rst_n, .a1, .rom1_q(r), .slot);

  tm_ram #(.W(2*W), .DEPTH(8)) u_tm0 (
    .clk, .cs(1'b0), .wa(a1), .in(din), .ra1(r.aa), .ra2(a1), .o1(a_w), .o2(b_w));
  tm_ram #(.W(2*W), .DEPTH(8)) u_tm1 (
    .clk, .cs(1'b0), .wa(a1), .in(b_w), .ra1(r.ac), .ra2(r.ad), .o1(c_w), .o2(d_w));
  tm_ram #(.W(2*W), .DEPTH(8)) u_tm2 (
    .clk, .cs(r.cs), .wa(r.aw), .in(d_w), .ra1(r.ae), .ra2(r.af), .o1(e_w), .o2(f_w));

  always_comb begin
    case (r.m[1:0])
      2'd1:    o[0] = d_w;
      2'd2:    o[0] = f_w;
      default: o[0] = a_w;
    endcase
    case (r.m[3:2])
      2'd1:    o[1] = c_w;
      2'd2:    o[1] = e_w;
      default: o[1] = din;
    endcase
    case (r.m[5:4])
      2'd1:    o[2] = d_w;
      2'd2:    o[2] = f_w;
      default: o[2] = a_w;
    endcase
    case (r.m[7:6])
      2'd0:    o[3] = a_w;
      2'd1:    o[3] = b_w;
      2'd2:    o[3] = c_w;
      default: o[3] = e_w;
    endcase
  end

  assign c = r.c;

endmodule
