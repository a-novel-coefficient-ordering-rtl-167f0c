// tb_fft16_ordered - end-to-end test of the ordered 16-point FFT at its
// default size.
//
// Streams NF frames without gaps (random full-scale frames, an impulse, a
// constant, the most negative constant and a single tone) and checks every
// output word against a bit-true model built here from the transform
// equations: exact radix-4 sums, twiddles quantised from $cos/$sin
// (floor(v * 2^15), 1.0 clipped to 0x7fff), products floored by 2^-15.
// It also checks each result against a floating-point DFT within a few
// LSBs, the output bin numbering, the 25-clock latency to the first result
// and one result per clock.  It counts how often each mechanism of the
// design is exercised - TM2 write gating, flagged (negated real part)
// twiddles, each butterfly mode in both stages, a complete ROM0 period of
// the reorder memory - and fails if one never happens.
//
// The transform and its processor structure follow the published design;
// widths, rounding, latency and the test data are this design's choices.
module tb_fft16_ordered;
  import fft16_pkg::*;

  localparam int W  = 16;
  localparam int WO = W + 5;
  localparam int NF = 14;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic [2*W-1:0]      din = '0;
  logic [2*WO-1:0]     dout;
  logic                dout_valid;
  logic [3:0]          dout_bin;

  fft16_ordered dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  longint xr [NF*16], xi [NF*16];
  longint er [NF*16], ei [NF*16];      // bit-true expected, natural bin order
  real    fr [NF*16], fi [NF*16];      // floating-point DFT
  real    tol [NF];                    // allowed distance from the DFT

  function automatic longint qtw(real v);
    longint q = longint'($floor(v * 32768.0 + 1.0e-6));
    if (q > 32767) q = 32767;
    return q;
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic build_model();
    real pi = 3.14159265358979323846;
    for (int f = 0; f < NF; f++) begin
      longint s1r [16], s1i [16];          // x1(q, m) at index 4m + q
      longint peak = 0;
      for (int q = 0; q < 4; q++)
        for (int m = 0; m < 4; m++) begin
          longint ar = 0, ai = 0, cr, ci, pr, pim;
          for (int p = 0; p < 4; p++) begin
            longint vr = xr[16*f + 4*p + q], vi = xi[16*f + 4*p + q];
            case ((p * m) % 4)
              0: begin ar += vr;  ai += vi; end
              1: begin ar += vi;  ai -= vr; end   // * -j
              2: begin ar -= vr;  ai -= vi; end
              default: begin ar -= vi; ai += vr; end  // * +j
            endcase
          end
          if (ar > peak) peak = ar;
          if (-ar > peak) peak = -ar;
          if (ai > peak) peak = ai;
          if (-ai > peak) peak = -ai;
          cr  = qtw($cos(2.0 * pi * q * m / 16.0));
          ci  = qtw(-$sin(2.0 * pi * q * m / 16.0));
          pr  = ar * cr - ai * ci;
          pim = ar * ci + ai * cr;
          s1r[4*m + q] = pr >>> 15;
          s1i[4*m + q] = pim >>> 15;
        end
      // four floored products, each off by < 1 LSB plus the twiddle
      // quantisation error (< 2^-15 relative per part)
      tol[f] = 4.0 * (2.0 + real'(peak) / 16384.0);
      for (int m1 = 0; m1 < 4; m1++)
        for (int m2 = 0; m2 < 4; m2++) begin
          longint ar = 0, ai = 0;
          for (int q = 0; q < 4; q++) begin
            longint vr = s1r[4*m1 + q], vi = s1i[4*m1 + q];
            case ((q * m2) % 4)
              0: begin ar += vr;  ai += vi; end
              1: begin ar += vi;  ai -= vr; end
              2: begin ar -= vr;  ai -= vi; end
              default: begin ar -= vi; ai += vr; end
            endcase
          end
          er[16*f + 4*m2 + m1] = ar;
          ei[16*f + 4*m2 + m1] = ai;
        end
      for (int k = 0; k < 16; k++) begin
        real sr = 0.0, si = 0.0;
        for (int n = 0; n < 16; n++) begin
          real ang = -2.0 * pi * n * k / 16.0;
          sr += xr[16*f + n] * $cos(ang) - xi[16*f + n] * $sin(ang);
          si += xr[16*f + n] * $sin(ang) + xi[16*f + n] * $cos(ang);
        end
        fr[16*f + k] = sr;
        fi[16*f + k] = si;
      end
    end
  endtask

  task automatic gen_input();
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < 16; n++) begin
        longint r, i;
        case (f)
          1:       begin r = (n == 0) ? 32767 : 0; i = (n == 0) ? -32768 : 0; end
          2:       begin r = 32767;  i = 32767;  end
          3:       begin r = -32768; i = -32768; end
          4:       begin   // tone at bin 3
                     r = longint'($floor(30000.0 * $cos(2.0 * 3.14159265358979 * 3 * n / 16.0)));
                     i = longint'($floor(30000.0 * $sin(2.0 * 3.14159265358979 * 3 * n / 16.0)));
                   end
          default: begin
                     r = longint'($signed(16'($urandom())));
                     i = longint'($signed(16'($urandom())));
                   end
        endcase
        xr[16*f + n] = r;
        xi[16*f + n] = i;
      end
  endtask

  // mechanism counters
  int n_cs_off = 0, n_flag = 0, n_rom0_wrap = 0;
  int n_mode1 [8], n_mode2 [8];
  int first_valid = -1, n_out = 0;

  initial begin : watchdog
    repeat (16 * NF + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    void'($urandom(7));
    foreach (n_mode1[i]) begin n_mode1[i] = 0; n_mode2[i] = 0; end
    gen_input();
    build_model();
    repeat (3) @(negedge clk);
    for (n = 0; n < 16 * NF + 25; n++) begin
      @(negedge clk);
      rst_n = 1'b1;
      din = (n < 16 * NF) ? {W'(xr[n]), W'(xi[n])} : '0;
      // mechanisms, observed in cycle n
      if (n >= 12) begin
        if (dut.u_comm1.u_ctrl.rom1_q.cs) n_cs_off++;
        n_mode1[dut.s1_c]++;
      end
      if (n >= 13 && dut.coef.flag) n_flag++;
      if (n >= 24) n_mode2[dut.s2_c]++;
      if (n >= 14 && dut.u_adm.t == 7'd95) n_rom0_wrap++;
      // outputs of cycle n
      if (dout_valid) begin
        int u, f, g, m2, bin;
        longint gr, gi;
        if (first_valid < 0) first_valid = n;
        u   = n - 25;
        f   = u / 16;
        g   = (u % 16) / 4;
        m2  = u % 4;
        bin = 4 * m2 + g;
        if (f < NF) begin
          n_out++;
          gr = longint'($signed(dout[2*WO-1:WO]));
          gi = longint'($signed(dout[WO-1:0]));
          checks++;
          if (dout_bin != 4'(bin)) begin
            failures++;
            $display("cycle %0d: bin %0d, expected %0d", n, dout_bin, bin);
          end
          checks++;
          if (gr != er[16*f + bin] || gi != ei[16*f + bin]) begin
            failures++;
            $display("frame %0d bin %0d: got (%0d,%0d) expected (%0d,%0d)",
                     f, bin, gr, gi, er[16*f + bin], ei[16*f + bin]);
          end
          checks++;
          if (rabs(real'(gr) - fr[16*f + bin]) > tol[f] || rabs(real'(gi) - fi[16*f + bin]) > tol[f]) begin
            failures++;
            $display("frame %0d bin %0d: (%0d,%0d) far from DFT (%f,%f)",
                     f, bin, gr, gi, fr[16*f + bin], fi[16*f + bin]);
          end
        end
      end
    end
    // latency and throughput
    checks++;
    if (first_valid != 25) begin
      failures++;
      $display("first result in cycle %0d, expected 25", first_valid);
    end
    checks++;
    if (n_out != 16 * NF) begin
      failures++;
      $display("%0d results, expected %0d", n_out, 16 * NF);
    end
    $display("TM2 write-disabled slots: %0d", n_cs_off);
    $display("flagged twiddles applied:  %0d", n_flag);
    $display("ROM0 periods completed:    %0d", n_rom0_wrap);
    foreach (n_mode1[i])
      if (i == 0 || i == 5 || i == 3 || i == 6)
        $display("butterfly mode c=%03b: stage1 %0d, stage2 %0d", 3'(i), n_mode1[i], n_mode2[i]);
    checks++; if (n_cs_off == 0)    begin failures++; $display("TM2 gating never used"); end
    checks++; if (n_flag == 0)      begin failures++; $display("no flagged twiddle"); end
    checks++; if (n_rom0_wrap == 0) begin failures++; $display("ROM0 never wrapped"); end
    for (int i = 0; i < 8; i++)
      if (i == 0 || i == 5 || i == 3 || i == 6) begin
        checks++;
        if (n_mode1[i] == 0 || n_mode2[i] == 0) begin
          failures++;
          $display("butterfly mode %03b not exercised", 3'(i));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
