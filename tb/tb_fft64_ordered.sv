// tb_fft64_ordered - end-to-end test of the 64-point processor at its
// default size.
//
// Streams NF frames without gaps (random, impulse, constant, most negative
// constant, a tone) and checks every result against the bit-true model of
// fft_ref_pkg, against a floating-point DFT within the error the
// quantisation allows, and its bin number; also the 75-clock latency to
// the first result and one result per clock.  It fails if the ordered
// stage never uses a flagged twiddle or a gated TM2 write, or if a
// butterfly mode never occurs in the first stage.
//
// The published design gives the 64-point processor's structure; its
// widths, latency and the test data are this design's choices.
module tb_fft64_ordered;
  import fft_ref_pkg::*;

  localparam int W  = 16;
  localparam int WO = W + 8;
  localparam int NF = 8;
  localparam int NPT = 64;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic [2*W-1:0]  din = '0;
  logic [2*WO-1:0] dout;
  logic            dout_valid;
  logic [5:0]      dout_bin;

  fft64_ordered dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  longint xr [NF][NPT], xi [NF][NPT];
  longint er [NF][NPT], ei [NF][NPT];
  real    fr [NF][NPT], fi [NF][NPT];
  real    tol [NF];

  task automatic prepare();
    for (int f = 0; f < NF; f++) begin
      longint ir [] = new [NPT];
      longint ii [] = new [NPT];
      longint Xr [], Xi [], pk [3];
      real    Fr [], Fi [];
      for (int n = 0; n < NPT; n++) begin
        case (f)
          1: begin ir[n] = (n == 5) ? 32767 : 0; ii[n] = 0; end
          2: begin ir[n] = 32767;  ii[n] = -32768; end
          3: begin ir[n] = -32768; ii[n] = -32768; end
          4: begin
               ir[n] = longint'($floor(30000.0 * $cos(2.0 * 3.14159265358979 * 11 * n / 64.0)));
               ii[n] = longint'($floor(30000.0 * $sin(2.0 * 3.14159265358979 * 11 * n / 64.0)));
             end
          default: begin
               ir[n] = longint'($signed(16'($urandom())));
               ii[n] = longint'($signed(16'($urandom())));
             end
        endcase
        xr[f][n] = ir[n];
        xi[f][n] = ii[n];
      end
      model_fft(NPT, ir, ii, Xr, Xi, pk);
      model_dft(NPT, ir, ii, Fr, Fi);
      for (int k = 0; k < NPT; k++) begin
        er[f][k] = Xr[k]; ei[f][k] = Xi[k];
        fr[f][k] = Fr[k]; fi[f][k] = Fi[k];
      end
      // floored products and twiddle quantisation, amplified by later stages
      tol[f] = 16.0 * (2.0 + real'(pk[0]) / 16384.0) + 4.0 * (2.0 + real'(pk[1]) / 16384.0) + 1.0;
    end
  endtask

  int n_cs_off = 0, n_flag = 0, n_mode [8];
  int first_valid = -1, n_out = 0;

  initial begin : watchdog
    repeat (NPT * NF + 300) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    void'($urandom(11));
    foreach (n_mode[i]) n_mode[i] = 0;
    prepare();
    repeat (3) @(negedge clk);
    for (int n = 0; n < NPT * NF + 80; n++) begin
      @(negedge clk);
      rst_n = 1'b1;
      din = (n < NPT * NF) ? {W'(xr[n / NPT][n % NPT]), W'(xi[n / NPT][n % NPT])} : '0;
      if (dut.u_core.u_comm1.u_ctrl.rom1_q.cs && dut.core_run) n_cs_off++;
      if (dut.u_core.coef.flag && dut.core_run) n_flag++;
      if (n >= 48) n_mode[dut.s1_c]++;
      if (dout_valid) begin
        int u, f, m1, g, m2, bin;
        longint gr, gi;
        if (first_valid < 0) first_valid = n;
        u   = n_out;
        f   = u / NPT;
        m1  = (u % NPT) / 16;
        g   = (u % 16) / 4;
        m2  = u % 4;
        bin = 4 * (4 * m2 + g) + m1;
        if (f < NF) begin
          n_out++;
          gr = longint'($signed(dout[2*WO-1:WO]));
          gi = longint'($signed(dout[WO-1:0]));
          checks++;
          if (dout_bin != 6'(bin)) begin
            failures++;
            $display("cycle %0d: bin %0d, expected %0d", n, dout_bin, bin);
          end
          checks++;
          if (gr != er[f][bin] || gi != ei[f][bin]) begin
            failures++;
            $display("frame %0d bin %0d: got (%0d,%0d) expected (%0d,%0d)",
                     f, bin, gr, gi, er[f][bin], ei[f][bin]);
          end
          checks++;
          if (rabs(real'(gr) - fr[f][bin]) > tol[f] || rabs(real'(gi) - fi[f][bin]) > tol[f]) begin
            failures++;
            $display("frame %0d bin %0d: (%0d,%0d) far from DFT (%f,%f)",
                     f, bin, gr, gi, fr[f][bin], fi[f][bin]);
          end
        end
      end
    end
    checks++;
    if (first_valid != 75) begin
      failures++;
      $display("first result in cycle %0d, expected 75", first_valid);
    end
    checks++;
    if (n_out != NPT * NF) begin
      failures++;
      $display("%0d results, expected %0d", n_out, NPT * NF);
    end
    $display("TM2 write-disabled slots %0d, flagged twiddles %0d", n_cs_off, n_flag);
    checks++; if (n_cs_off == 0) failures++;
    checks++; if (n_flag == 0)   failures++;
    for (int i = 0; i < 8; i++)
      if (i == 0 || i == 3 || i == 5 || i == 6) begin
        checks++;
        if (n_mode[i] == 0) begin failures++; $display("stage-1 mode %03b unused", 3'(i)); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
