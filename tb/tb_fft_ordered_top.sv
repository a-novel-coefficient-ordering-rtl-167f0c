// tb_fft_ordered_top - end-to-end test of both processors at their default
// sizes, run at the same time.
//
// The 16-point processor receives 16 frames and the 64-point processor 4
// frames of random full-scale data (the first frame of each is a single
// impulse).  Every result is compared with the bit-true model of
// fft_ref_pkg and with its bin number; first-result latencies of 25 and 75
// clocks are checked.  Each mechanism of the design is counted and must
// occur at least once: TM2 write gating and flagged (negated real part)
// twiddles in both ordered stages, every butterfly mode in each of the
// five butterflies, and a complete 96-slot ROM0 period in both reorder
// memories.  The bits toggled on the 16-point processor's twiddle bus
// ({re, im} into the multiplier) are counted over 15 frames in steady state
// and must come to 78 per frame, the figure of the ordered twiddle sequence
// (the natural order would give 192).
//
// The 78 and 192 toggle figures are the published ones; latencies and test
// data are this design's choices.
module tb_fft_ordered_top;
  import fft_ref_pkg::*;

  localparam int W   = 16;
  localparam int N16 = 16;
  localparam int N64 = 64;
  localparam int F16 = 16;
  localparam int F64 = 4;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic [2*W-1:0]      din16 = '0, din64 = '0;
  logic [2*(W+5)-1:0]  dout16;
  logic [2*(W+8)-1:0]  dout64;
  logic                dout16_valid, dout64_valid;
  logic [3:0]          dout16_bin;
  logic [5:0]          dout64_bin;

  fft_ordered_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  longint x16r [F16][N16], x16i [F16][N16], e16r [F16][N16], e16i [F16][N16];
  longint x64r [F64][N64], x64i [F64][N64], e64r [F64][N64], e64i [F64][N64];

  function automatic longint rnd16();
    return longint'($signed(16'($urandom())));
  endfunction

  task automatic prepare();
    for (int f = 0; f < F16; f++) begin
      longint ir [] = new [N16];
      longint ii [] = new [N16];
      longint Xr [], Xi [], pk [3];
      for (int n = 0; n < N16; n++) begin
        ir[n] = (f == 0) ? ((n == 3) ? 20000 : 0) : rnd16();
        ii[n] = (f == 0) ? 0 : rnd16();
        x16r[f][n] = ir[n]; x16i[f][n] = ii[n];
      end
      model_fft(N16, ir, ii, Xr, Xi, pk);
      for (int k = 0; k < N16; k++) begin e16r[f][k] = Xr[k]; e16i[f][k] = Xi[k]; end
    end
    for (int f = 0; f < F64; f++) begin
      longint ir [] = new [N64];
      longint ii [] = new [N64];
      longint Xr [], Xi [], pk [3];
      for (int n = 0; n < N64; n++) begin
        ir[n] = (f == 0) ? ((n == 9) ? -20000 : 0) : rnd16();
        ii[n] = (f == 0) ? 0 : rnd16();
        x64r[f][n] = ir[n]; x64i[f][n] = ii[n];
      end
      model_fft(N64, ir, ii, Xr, Xi, pk);
      for (int k = 0; k < N64; k++) begin e64r[f][k] = Xr[k]; e64i[f][k] = Xi[k]; end
    end
  endtask

  // mechanism counters
  int cs16 = 0, cs64 = 0, flag16 = 0, flag64 = 0, wrap16 = 0, wrap64 = 0;
  int coef_toggles = 0;
  logic [31:0] coef_prev = '0;
  int mode [5][8];
  int first16 = -1, first64 = -1, out16 = 0, out64 = 0;

  initial begin : watchdog
    repeat (N64 * F64 + 400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    void'($urandom(5));
    foreach (mode[b, i]) mode[b][i] = 0;
    prepare();
    repeat (3) @(negedge clk);
    for (int n = 0; n < N64 * F64 + 80; n++) begin
      @(negedge clk);
      rst_n = 1'b1;
      din16 = (n < N16 * F16) ? {W'(x16r[n / N16][n % N16]), W'(x16i[n / N16][n % N16])} : '0;
      din64 = (n < N64 * F64) ? {W'(x64r[n / N64][n % N64]), W'(x64i[n / N64][n % N64])} : '0;
      // mechanisms
      if (dut.u_fft16.u_comm1.u_ctrl.rom1_q.cs) cs16++;
      if (dut.u_fft64.u_core.u_comm1.u_ctrl.rom1_q.cs && dut.u_fft64.core_run) cs64++;
      if (dut.u_fft16.coef.flag) flag16++;
      if (n >= 16 && n < 16 + 15 * N16)
        coef_toggles += $countones({dut.u_fft16.coef.re, dut.u_fft16.coef.im} ^ coef_prev);
      coef_prev = {dut.u_fft16.coef.re, dut.u_fft16.coef.im};
      if (dut.u_fft64.u_core.coef.flag && dut.u_fft64.core_run) flag64++;
      if (dut.u_fft16.u_adm.t == 7'd95) wrap16++;
      if (dut.u_fft64.u_core.u_adm.t == 7'd95) wrap64++;
      if (n >= 12) mode[0][dut.u_fft16.s1_c]++;
      if (n >= 24) mode[1][dut.u_fft16.s2_c]++;
      if (n >= 48) mode[2][dut.u_fft64.s1_c]++;
      if (dut.u_fft64.core_run) begin
        mode[3][dut.u_fft64.u_core.s1_c]++;
        mode[4][dut.u_fft64.u_core.s2_c]++;
      end
      // 16-point results
      if (dout16_valid && out16 < N16 * F16) begin
        automatic int u = out16;
        int f, bin;
        if (first16 < 0) first16 = n;
        f   = u / N16;
        bin = 4 * (u % 4) + (u % 16) / 4;
        out16++;
        checks++;
        if (dout16_bin != 4'(bin) ||
            longint'($signed(dout16[2*(W+5)-1:W+5])) != e16r[f][bin] ||
            longint'($signed(dout16[W+4:0])) != e16i[f][bin]) begin
          failures++;
          $display("16-point frame %0d bin %0d/%0d: (%0d,%0d) expected (%0d,%0d)", f,
                   dout16_bin, bin, $signed(dout16[2*(W+5)-1:W+5]), $signed(dout16[W+4:0]),
                   e16r[f][bin], e16i[f][bin]);
        end
      end
      // 64-point results
      if (dout64_valid && out64 < N64 * F64) begin
        automatic int u = out64;
        int f, bin;
        if (first64 < 0) first64 = n;
        f   = u / N64;
        bin = 4 * (4 * (u % 4) + (u % 16) / 4) + (u % N64) / 16;
        out64++;
        checks++;
        if (dout64_bin != 6'(bin) ||
            longint'($signed(dout64[2*(W+8)-1:W+8])) != e64r[f][bin] ||
            longint'($signed(dout64[W+7:0])) != e64i[f][bin]) begin
          failures++;
          $display("64-point frame %0d bin %0d/%0d: (%0d,%0d) expected (%0d,%0d)", f,
                   dout64_bin, bin, $signed(dout64[2*(W+8)-1:W+8]), $signed(dout64[W+7:0]),
                   e64r[f][bin], e64i[f][bin]);
        end
      end
    end
    checks++; if (first16 != 25) begin failures++; $display("16-point latency %0d", first16); end
    checks++; if (first64 != 75) begin failures++; $display("64-point latency %0d", first64); end
    checks++; if (out16 != N16 * F16 || out64 != N64 * F64) begin
      failures++; $display("results: %0d and %0d", out16, out64);
    end
    $display("TM2 gated writes: 16-point %0d, 64-point %0d", cs16, cs64);
    $display("flagged twiddles: 16-point %0d, 64-point %0d", flag16, flag64);
    $display("ROM0 periods:     16-point %0d, 64-point %0d", wrap16, wrap64);
    $display("twiddle bus toggles over 15 frames: %0d", coef_toggles);
    checks++; if (coef_toggles != 15 * 78) begin failures++; $display("twiddle toggles not 78 per frame"); end
    checks++; if (cs16 == 0 || cs64 == 0)     begin failures++; $display("TM2 gating unused"); end
    checks++; if (flag16 == 0 || flag64 == 0) begin failures++; $display("flag unused"); end
    checks++; if (wrap16 == 0 || wrap64 == 0) begin failures++; $display("ROM0 period incomplete"); end
    for (int b = 0; b < 5; b++) begin
      $display("butterfly %0d modes 000/101/011/110: %0d %0d %0d %0d", b,
               mode[b][0], mode[b][5], mode[b][3], mode[b][6]);
      checks++;
      if (mode[b][0] == 0 || mode[b][5] == 0 || mode[b][3] == 0 || mode[b][6] == 0) begin
        failures++;
        $display("butterfly %0d: a mode never used", b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
