// tb_adm_reorder - checks that the ADM restores natural order.
//
// Frames of tagged words {frame, k} are fed in the ordered result sequence
// k = 0,1,2,3,4,8,12,10,5,7,13,6,9,11,14,15, one per clock from cycle 0 on
// (en high).  Result k of frame f must appear on dout in cycle 16f + k + 7.
// Fourteen frames cover more than two 96-slot ROM0 periods.
//
// The ordered input sequence and the natural output order follow the
// published design; the 7-slot latency follows from this implementation.
module tb_adm_reorder;

  localparam int W  = 16;
  localparam int NF = 14;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         en = 1'b0;
  logic [W-1:0] din = '0;
  logic [W-1:0] dout;

  adm_reorder #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  localparam int ORD [16] = '{0,1,2,3,4,8,12,10,5,7,13,6,9,11,14,15};

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (16 * NF + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    for (int n = 0; n < 16 * NF + 8; n++) begin
      @(negedge clk);
      rst_n = 1'b1;
      en    = 1'b1;
      din   = {8'(n / 16 + 1), 8'(ORD[n % 16])};
      if (n >= 7 && (n - 7) / 16 < NF) begin
        automatic logic [W-1:0] exp_w = {8'((n - 7) / 16 + 1), 8'((n - 7) % 16)};
        checks++;
        if (dout != exp_w) begin
          failures++;
          $display("cycle %0d: dout %h expected %h", n, dout, exp_w);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
