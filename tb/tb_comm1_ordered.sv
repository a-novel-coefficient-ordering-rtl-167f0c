// tb_comm1_ordered - checks the data ordering of the stage-1 commutator.
//
// Input words are tags {frame, index}.  The expected result order is the
// coefficient order of the ordered flow graph, as (m1, q1) pairs:
//   (0,0)(0,1)(0,2)(0,3)(1,0)(2,0)(3,0)(2,2)(1,1)(1,3)(3,1)(1,2)(2,1)(2,3)(3,2)(3,3).
// In slot 16f + 12 + j line k must carry x_f(4p + q1) with
// p = (m1 - k) mod 4, and c must be the butterfly code of m1
// (000, 101, 011, 110 for m1 = 0..3).  Six frames are streamed; a run in
// which TM2 is never write-disabled counts as a failure.
//
// The result order is the published one; the slot timing and the line
// rotation p = (m1 - k) mod 4 are this design's reading of it.
module tb_comm1_ordered;

  localparam int W  = 8;
  localparam int NF = 6;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic [2*W-1:0]      din = '0;
  logic [3:0][2*W-1:0] o;
  logic [2:0]          c;
  logic [3:0]          slot;

  comm1_ordered #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  localparam int MSEQ [16] = '{0,0,0,0,1,2,3,2,1,1,3,1,2,2,3,3};
  localparam int QSEQ [16] = '{0,1,2,3,0,0,0,2,1,3,1,2,1,3,2,3};
  localparam logic [2:0] CODE [4] = '{3'b000, 3'b101, 3'b011, 3'b110};

  int checks = 0, failures = 0, n_cs = 0;

  function automatic logic [2*W-1:0] tag(int f, int i);
    return {8'(f + 1), 8'(i * 7 + 3)};
  endfunction

  initial begin : watchdog
    repeat (16 * NF + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    for (int n = 0; n < 16 * NF + 12; n++) begin
      @(negedge clk);
      rst_n = 1'b1;
      din = tag(n / 16, n % 16);
      #1;
      if (dut.u_ctrl.rom1_q.cs) n_cs++;
      if (n >= 12 && (n - 12) / 16 < NF) begin
        automatic int f = (n - 12) / 16, j = (n - 12) % 16;
        automatic int m = MSEQ[j], q = QSEQ[j];
        for (int k = 0; k < 4; k++) begin
          automatic int p = (m - k + 4) % 4;
          checks++;
          if (o[k] != tag(f, 4 * p + q)) begin
            failures++;
            $display("slot %0d line %0d: %h expected %h", n, k, o[k], tag(f, 4 * p + q));
          end
        end
        checks++;
        if (c != CODE[m]) begin
          failures++;
          $display("slot %0d: c %b expected %b", n, c, CODE[m]);
        end
      end
    end
    checks++;
    if (n_cs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
