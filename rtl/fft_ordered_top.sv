// fft_ordered_top - the two coefficient-ordered pipelined FFT processors,
// side by side.
//
// fft16_ordered is the 16-point radix-4 processor whose first stage feeds
// its complex multiplier a low-switching twiddle sequence; fft64_ordered
// is the 64-point processor that applies the same ordered datapath to its
// second stage.  They share only the clock and reset; each has its own
// word-serial input and its own result port (value, valid, bin number), as
// documented in the two modules.  Latencies: 25 clocks (16-point) and 75
// clocks (64-point) from x(0) to X(0).
module fft_ordered_top #(
  parameter int unsigned W = 16    // input width of re and of im
) (
  input  logic                clk,
  input  logic                rst_n,
  // 16-point processor
  input  logic [2*W-1:0]      din16,
  output logic [2*(W+5)-1:0]  dout16,
  output logic                dout16_valid,
  output logic [3:0]          dout16_bin,
  // 64-point processor
  input  logic [2*W-1:0]      din64,
  output logic [2*(W+8)-1:0]  dout64,
  output logic                dout64_valid,
  output logic [5:0]          dout64_bin
);

  fft16_ordered #(.W(W)) u_fft16 (
    .clk, .rst_n, .din(din16), .dout(dout16),
    .dout_valid(dout16_valid), .dout_bin(dout16_bin));

  fft64_ordered #(.W(W)) u_fft64 (
    .clk, .rst_n, .din(din64), .dout(dout64),
    .dout_valid(dout64_valid), .dout_bin(dout64_bin));

endmodule
