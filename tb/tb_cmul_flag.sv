// tb_cmul_flag - random test of the flagged complex multiplier.
//
// Random data words and random twiddles (random flag, random Q1.15 parts,
// plus the extreme values) are applied; the true twiddle real part is
// -cr when flag is set.  Expected: floor((a*c - b*d) / 2^15) and
// floor((a*d + b*c) / 2^15) with 64-bit integers, checked one clock later.
//
// The flag meaning (real part stored negated) follows the published design;
// the widths and floor rounding checked here are this design's choices.
module tb_cmul_flag;
  import fft16_pkg::*;

  localparam int W = 18;

  logic               clk = 1'b0;
  logic [2*W-1:0]     d = '0;
  coef_t              coef = '0;
  logic [2*(W+1)-1:0] p;

  cmul_flag #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_flag = 0;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      longint a, b, cr, ci, cre, er, ei;
      @(negedge clk);
      a  = longint'($signed(W'($urandom())));
      b  = longint'($signed(W'($urandom())));
      cr = longint'($signed(16'($urandom())));
      ci = longint'($signed(16'($urandom())));
      if (n < 4) begin
        a = -(1 << (W - 1)); b = (n % 2) ? (1 << (W - 1)) - 1 : -(1 << (W - 1));
        cr = (n < 2) ? 32767 : -32767; ci = -32768;
      end
      if (cr == -32768) cr = -32767;   // a negated real part must exist
      d = {W'(a), W'(b)};
      coef.flag = (n % 3 == 1);
      coef.re   = 16'(cr);
      coef.im   = 16'(ci);
      if (coef.flag) n_flag++;
      cre = coef.flag ? -cr : cr;
      er = (a * cre - b * ci) >>> 15;
      ei = (a * ci + b * cre) >>> 15;
      @(negedge clk);
      checks++;
      if (longint'($signed(p[2*(W+1)-1:W+1])) != er || longint'($signed(p[W:0])) != ei) begin
        failures++;
        $display("n=%0d: got (%0d,%0d) expected (%0d,%0d)", n,
                 $signed(p[2*(W+1)-1:W+1]), $signed(p[W:0]), er, ei);
      end
    end
    checks++;
    if (n_flag == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
