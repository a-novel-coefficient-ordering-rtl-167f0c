// tb_r4_bfly - random test of the radix-4 butterfly.
//
// For random inputs and a random output index m, line k is taken to carry
// input p = (m - k) mod 4 and the expected output is
// sum_k x_k * (-j)^(p*m), computed here with plain integer arithmetic.
// The control word is the code of m (000, 101, 011, 110).  Full-scale
// extremes are included.  The output is checked one clock later.
//
// The butterfly sums follow the radix-4 equations; the control code and
// line rotation are this design's reading of the published control ROM.
module tb_r4_bfly;

  localparam int W = 10;

  logic                clk = 1'b0;
  logic [3:0][2*W-1:0] x = '0;
  logic [2:0]          c = '0;
  logic [2*(W+2)-1:0]  y;

  r4_bfly #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  localparam logic [2:0] CODE [4] = '{3'b000, 3'b101, 3'b011, 3'b110};

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int er, ei;
    for (int n = 0; n < 1000; n++) begin
      automatic int m = $urandom() % 4;
      er = 0; ei = 0;
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        automatic int p = (m - k + 4) % 4;
        int vr, vi;
        if (n < 8) begin
          vr = (n % 2) ? -(1 << (W - 1)) : (1 << (W - 1)) - 1;
          vi = (n % 4 < 2) ? -(1 << (W - 1)) : (1 << (W - 1)) - 1;
          if (k % 2 == 1) vi = -vi - 1;
        end else begin
          vr = int'($signed(W'($urandom())));
          vi = int'($signed(W'($urandom())));
        end
        x[k] = {W'(vr), W'(vi)};
        case ((p * m) % 4)
          0: begin er += vr; ei += vi; end
          1: begin er += vi; ei -= vr; end
          2: begin er -= vr; ei -= vi; end
          default: begin er -= vi; ei += vr; end
        endcase
      end
      c = CODE[m];
      @(negedge clk);
      checks++;
      if (int'($signed(y[2*(W+2)-1:W+2])) != er || int'($signed(y[W+1:0])) != ei) begin
        failures++;
        $display("m=%0d: got (%0d,%0d) expected (%0d,%0d)", m,
                 $signed(y[2*(W+2)-1:W+2]), $signed(y[W+1:0]), er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
