// tb_comm1_ctrl - checks the commutator control block over three frames.
//
// The testbench keeps its own copy of the 16 ROM1 words as 30-bit numbers
// and slices them as described: m[7:0] in the low byte, then the six 3-bit
// addresses (adra lowest ... aw highest), then c[2:0], then cs.  In slot n
// after reset it expects a1 = n mod 8, slot = n mod 16 and the ROM1 word of
// row (n - 1) mod 16.
//
// The ROM1 words and field order are the published ones; the registered
// read (row n - 1 in slot n) is this design's choice.
module tb_comm1_ctrl;
  import fft16_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [2:0] a1;
  rom1_word_t rom1_q;
  logic [3:0] slot;

  comm1_ctrl dut (.*);

  always #5 clk = ~clk;

  localparam logic [29:0] TABLE [16] = '{
    30'h2e880429, 30'h1b4184e4, 30'h2fac8629, 30'h16a34d89,
    30'h17a7df89, 30'h38534de5, 30'h3465959a, 30'h2c1a6da9,
    30'h2c3efda9, 30'h386595e5, 30'h3877dde5, 30'h00000041,
    30'h00804141, 30'h01008241, 30'h0180c341, 30'h16010449};

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    for (int n = 0; n < 48; n++) begin
      logic [29:0] w;
      @(negedge clk);
      rst_n = 1'b1;
      w = TABLE[(n + 15) % 16];
      checks++;
      if (a1 != 3'(n % 8) || slot != 4'(n % 16)) begin
        failures++;
        $display("slot %0d: a1 %0d slot %0d", n, a1, slot);
      end
      checks++;
      if (rom1_q.m != w[7:0] || rom1_q.aa != w[10:8] || rom1_q.ac != w[13:11] ||
          rom1_q.ad != w[16:14] || rom1_q.ae != w[19:17] || rom1_q.af != w[22:20] ||
          rom1_q.aw != w[25:23] || rom1_q.c != w[28:26] || rom1_q.cs != w[29]) begin
        failures++;
        $display("slot %0d: ROM1 word %h expected %h", n, rom1_q, w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
