// tb_r4sdc_comm - checks the delay commutator for spacing L = 1 (stage 2 of
// the 16-point FFT) and L = 4.
//
// A stream of tags {group, position} is fed from cycle 0 on with en high.
// For a group of 4L inputs (input i = p*L + q), output (m, q) is due in
// slot 3L + m*L + q of the group; line k must then carry input
// p = (m - k) mod 4, position p*L + q, and c the code of m
// (000, 101, 011, 110).
//
// The six-register, three-multiplexer structure is the published one; the
// slot timing checked here is this implementation's.
module tb_r4sdc_comm;

  localparam int W  = 16;
  localparam int NG = 12;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              en = 1'b0;
  logic [W-1:0]      din1 = '0, din4 = '0;
  logic [3:0][W-1:0] o1, o4;
  logic [2:0]        c1, c4;

  r4sdc_comm #(.W(W), .L(1)) dut  (.clk, .rst_n, .en, .din(din1), .o(o1), .c(c1));
  r4sdc_comm #(.W(W), .L(4)) dut4 (.clk, .rst_n, .en, .din(din4), .o(o4), .c(c4));

  always #5 clk = ~clk;

  localparam logic [2:0] CODE [4] = '{3'b000, 3'b101, 3'b011, 3'b110};

  int checks = 0, failures = 0;

  task automatic check(int n, int L, logic [3:0][W-1:0] o, logic [2:0] c);
    int t = n - 3 * L;           // output slot counted from group start
    int g, u, m, q;
    if (t < 0) return;
    g = t / (4 * L);
    if (g >= NG) return;
    u = t % (4 * L);
    m = u / L;
    q = u % L;
    for (int k = 0; k < 4; k++) begin
      int p = (m - k + 4) % 4;
      checks++;
      if (o[k] != {8'(g + 1), 8'(p * L + q)}) begin
        failures++;
        $display("L=%0d cycle %0d line %0d: %h expected %h", L, n, k, o[k],
                 {8'(g + 1), 8'(p * L + q)});
      end
    end
    checks++;
    if (c != CODE[m]) begin
      failures++;
      $display("L=%0d cycle %0d: c %b expected %b", L, n, c, CODE[m]);
    end
  endtask

  initial begin : watchdog
    repeat (16 * NG + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    for (int n = 0; n < 16 * NG + 16; n++) begin
      @(negedge clk);
      rst_n = 1'b1;
      en    = 1'b1;
      din1  = {8'(n / 4 + 1), 8'(n % 4)};
      din4  = {8'(n / 16 + 1), 8'(n % 16)};
      #1;
      check(n, 1, o1, c1);
      check(n, 4, o4, c4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
