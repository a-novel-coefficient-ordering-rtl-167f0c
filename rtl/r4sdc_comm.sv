// r4sdc_comm - conventional radix-4 delay commutator: six shift registers
// and three multiplexers.
//
// Radix-4 partners that are L words apart in the input stream
// (L = 1 for stage 2 of the 16-point FFT) are brought together.  The input
// runs through six L-word shift registers, giving taps d[i] = input
// delayed by i*L words.  For output m of a group (m = 0..3) the four
// butterfly lines are
//     O1 = d[3]
//     O2 = m == 0 ? d[0] : d[4]
//     O3 = m <  2 ? d[1] : d[5]
//     O4 = m <  3 ? d[2] : d[6]
// so line k carries input p = (m - k) mod 4 of the group, the same rotation
// the stage-1 ordered commutator produces, and `c` is the butterfly control
// for m.  A group's 4L inputs occupy slots i = 0..4L-1; its outputs for
// (m, q) appear in slot 3L + m*L + q, i.e. from the last quarter of the
// group on, one per slot.
//
// Interface: `en` is high from input slot 0 of the first group on; i counts
// input slots modulo 4L.  Outputs are combinational from the taps.
//
// Six shift registers with three multiplexers follow the design
// description; the tap assignment is derived here.
module r4sdc_comm
  import fft16_pkg::*;
#(
  parameter int unsigned W = 38,   // complex word width {re, im}
  parameter int unsigned L = 1     // partner spacing in words
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [W-1:0]       din,
  output logic [3:0][W-1:0]  o,
  output logic [2:0]         c
);

  localparam int unsigned CW = $clog2(4 * L) + 1;

  logic [W-1:0]  sr [6*L];     // sr[i] = input delayed by i+1 words
  logic [CW-1:0] i_cnt, i_ofs;
  logic [1:0]    m;

  always_ff @(posedge clk) begin
    sr[0] <= din;
    for (int i = 1; i < 6 * L; i++) sr[i] <= sr[i-1];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  i_cnt <= '0;
    else if (en) i_cnt <= (i_cnt == CW'(4 * L - 1)) ? '0 : i_cnt + CW'(1);

  // output index m = ((i + L) mod 4L) / L
  always_comb begin
    i_ofs = i_cnt + CW'(L);
    if (i_ofs >= CW'(4 * L)) i_ofs = i_ofs - CW'(4 * L);
    m = 2'(i_ofs / CW'(L));
  end

  always_comb begin
    o[0] = sr[3*L-1];
    o[1] = (m == 2'd0) ? din        : sr[4*L-1];
    o[2] = (m <  2'd2) ? sr[L-1]    : sr[5*L-1];
    o[3] = (m <  2'd3) ? sr[2*L-1]  : sr[6*L-1];
  end

  assign c = bfly_ctrl(m);

endmodule
