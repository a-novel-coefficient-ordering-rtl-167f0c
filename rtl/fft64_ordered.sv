// fft64_ordered - 64-point radix-4 pipelined FFT whose second stage uses
// the coefficient-ordered 16-point datapath.
//
// Three radix-4 stages.  The first is conventional: a delay commutator
// with 16-word shift registers (r4sdc_comm, L = 16), a butterfly and a
// complex multiplier fed with W64^(q1*m1) in natural order (tw64_rom).  It
// produces, for m1 = 0..3 in turn, sixteen words x1(q1, m1), q1 = 0..15.
// Each such group is a 16-point sub-transform, so the remaining two stages
// are exactly the ordered 16-point processor (fft16_ordered): its first
// stage - the ordered commutator, low-switching twiddle sequence and
// reorder memory - becomes stage 2 of the 64-point transform.
//
// Interface: after reset release x(n) of frame F is presented in cycle
// 64F + n, one word per clock.  First-stage results leave the multiplier
// in cycle 64F + 50 + 16*m1 + q1; the 16-point core is held in reset until
// cycle 50 so that its frames line up with these groups.  dout carries X
// in digit-reversed order, bin 16*m3 + 4*m2 + m1 on dout_bin, flagged by
// dout_valid; the first result X(0) appears 75 clocks after x(0).  No
// scaling: W-bit input, W+8-bit output.
//
// Applying the ordering to stage 2 of the 64-point processor follows the
// design description; the first-stage commutator type, widths, pipeline
// registers and start-up sequencing are this implementation's choices.
module fft64_ordered
  import fft16_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [2*W-1:0]      din,
  output logic [2*(W+8)-1:0]  dout,
  output logic                dout_valid,
  output logic [5:0]          dout_bin
);

  localparam int unsigned W1 = W + 2;   // after first butterfly
  localparam int unsigned W2 = W + 3;   // after first multiplier

  localparam logic [5:0] T_CORE = 6'd49; // last cycle before the core runs

  logic [5:0] cnt;        // input slot within the 64-word frame
  logic       core_run;   // 16-point core released from reset

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt      <= '0;
      core_run <= 1'b0;
    end else begin
      cnt <= cnt + 6'd1;
      if (cnt == T_CORE) core_run <= 1'b1;
    end

  // ---------------- stage 1 (conventional) ----------------
  logic [3:0][2*W-1:0] s1_x;
  logic [2:0]          s1_c;
  logic [2*W1-1:0]     s1_y;
  coef_t               tw;
  logic [2*W2-1:0]     s1_p;

  r4sdc_comm #(.W(2*W), .L(16)) u_comm1 (
    .clk, .rst_n, .en(1'b1), .din, .o(s1_x), .c(s1_c));

  r4_bfly #(.W(W)) u_bfly1 (.clk, .x(s1_x), .c(s1_c), .y(s1_y));

  // butterfly result in cycle n is (m1, q1) with 16*m1 + q1 = (n - 49) mod 64
  tw64_rom u_tw (.idx(cnt + 6'd15), .coef(tw));

  cmul_flag #(.W(W1)) u_cmul1 (.clk, .d(s1_y), .coef(tw), .p(s1_p));

  // ---------------- stages 2 and 3 (ordered 16-point core) ----------------
  logic                  core_rst_n;
  logic [2*(W2+5)-1:0]   core_dout;
  logic                  core_valid;
  logic [3:0]            core_bin;
  logic [5:0]            o_cnt;    // results delivered, modulo 64

  assign core_rst_n = rst_n & core_run;

  fft16_ordered #(.W(W2)) u_core (
    .clk, .rst_n(core_rst_n), .din(s1_p), .dout(core_dout),
    .dout_valid(core_valid), .dout_bin(core_bin));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)          o_cnt <= '0;
    else if (core_valid) o_cnt <= o_cnt + 6'd1;

  // core frame m1 = o_cnt[5:4]; core bin 4*m3 + m2 -> 16*m3 + 4*m2 + m1
  assign dout       = core_dout;
  assign dout_valid = core_valid;
  assign dout_bin   = {core_bin, o_cnt[5:4]};

endmodule
