// fft16_ordered - 16-point radix-4 pipelined FFT with coefficient ordering
// in stage 1.
//
// Two radix-4 stages process one complex word per clock, word-serially.
// Stage 1 computes, for each q1 and m1,
//     x1(q1, m1) = W16^(q1*m1) * sum_p x(4p + q1) * W4^(p*m1),
// but not in the natural order m1 = 0..3: its commutator (comm1_ordered)
// releases the sixteen butterfly input sets in the order that lets the
// twiddle ROM feed the complex multiplier a sequence of coefficients with
// few toggling bits (coef_rom_ordered, cmul_flag).  A six-word memory with
// a ROM-generated address sequence (adm_reorder) puts the results back in
// natural order, and stage 2 (r4sdc_comm + r4_bfly) computes
//     X(4*m2 + m1) = sum_q1 x1(q1, m1) * W4^(q1*m2).
//
// Interface: after reset release, x(n) of frame f is presented on din in
// cycle 16f + n, continuously (one new word every clock).  dout carries X
// in digit-reversed order: X(4*m2 + g) of frame f in cycle 16f + 25 + 4g +
// m2, flagged by dout_valid, with its bin number on dout_bin.  Latency from
// x(0) to X(0) is 25 clocks.  No scaling: W-bit input, W+5-bit output.
//
// Pipeline (cycle of frame f, ordered slot j / natural index k):
//   commutator outputs 16f+12+j -> butterfly reg 16f+13+j ->
//   multiplier reg (DI) 16f+14+j -> ADM output (DO) 16f+21+k ->
//   stage-2 butterfly reg -> dout.
// The block structure follows the design description; widths, the pipeline
// registers and the start-up sequencing are this implementation's choices.
module fft16_ordered
  import fft16_pkg::*;
#(
  parameter int unsigned W = 16    // input width of re and of im
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [2*W-1:0]      din,        // {re, im}
  output logic [2*(W+5)-1:0]  dout,       // {re, im}
  output logic                dout_valid,
  output logic [3:0]          dout_bin
);

  localparam int unsigned W1 = W + 2;  // after stage-1 butterfly
  localparam int unsigned W2 = W + 3;  // after the complex multiplier

  localparam logic [4:0] T_DI  = 5'd14;  // first DI word
  localparam logic [4:0] T_DO  = 5'd21;  // first DO word
  localparam logic [4:0] T_OUT = 5'd25;  // first output

  // start-up timer (saturates) and free-running slot counter
  logic [4:0] cyc;
  logic [3:0] slot;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cyc  <= '0;
      slot <= '0;
    end else begin
      if (cyc != 5'd31) cyc <= cyc + 5'd1;
      slot <= slot + 4'd1;
    end

  // ---------------- stage 1 ----------------
  logic [3:0][2*W-1:0] s1_x;
  logic [2:0]          s1_c;
  logic [2*W1-1:0]     s1_y;
  logic [3:0]          s1_slot;
  coef_t               coef;
  logic [2*W2-1:0]     di, do_w;

  comm1_ordered #(.W(W)) u_comm1 (
    .clk, .rst_n, .din, .o(s1_x), .c(s1_c), .slot(s1_slot));

  r4_bfly #(.W(W)) u_bfly1 (.clk, .x(s1_x), .c(s1_c), .y(s1_y));

  // butterfly result in cycle n is ordered slot (n - 13) mod 16
  coef_rom_ordered u_coef (.idx(slot + 4'd3), .coef);

  cmul_flag #(.W(W1)) u_cmul (.clk, .d(s1_y), .coef, .p(di));

  // ---------------- reorder ----------------
  adm_reorder #(.W(2*W2)) u_adm (
    .clk, .rst_n, .en(cyc >= T_DI), .din(di), .dout(do_w));

  // ---------------- stage 2 ----------------
  logic [3:0][2*W2-1:0] s2_x;
  logic [2:0]           s2_c;

  r4sdc_comm #(.W(2*W2), .L(1)) u_comm2 (
    .clk, .rst_n, .en(cyc >= T_DO), .din(do_w), .o(s2_x), .c(s2_c));

  r4_bfly #(.W(W2)) u_bfly2 (.clk, .x(s2_x), .c(s2_c), .y(dout));

  // output bookkeeping: output u = (n - 25) mod 16 = 4g + m2 -> bin 4*m2 + g
  logic [3:0] u;
  assign u          = slot + 4'd7;
  assign dout_valid = (cyc >= T_OUT);
  assign dout_bin   = {u[1:0], u[3:2]};

  // the commutator's own frame counter must stay in step with the top's
  a_slot_sync: assert property (@(posedge clk) disable iff (!rst_n) s1_slot == slot);

endmodule
