// tb_tm_ram - random test of the triple-port RAM.
//
// Drives random write addresses, data, chip selects and read addresses for
// 400 cycles and compares both asynchronous read ports with a reference
// array kept in the testbench (read-before-write in the same cycle, no
// write while cs is high).  The reference is initialised by a first pass
// that writes every word.
//
// Two read ports and one gated write port follow the published design; the
// asynchronous read-before-write behaviour is this design's choice.
module tb_tm_ram;

  localparam int W = 12;

  logic         clk = 1'b0;
  logic         cs = 1'b0;
  logic [2:0]   wa = '0, ra1 = '0, ra2 = '0;
  logic [W-1:0] in = '0;
  logic [W-1:0] o1, o2;
  logic [W-1:0] ref_mem [8];

  tm_ram #(.W(W), .DEPTH(8)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_blocked = 0;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      cs = 1'b0; wa = 3'(i); in = W'($urandom()); ref_mem[i] = in;
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      cs  = ($urandom() % 3) == 0;
      wa  = 3'($urandom());
      in  = W'($urandom());
      ra1 = 3'($urandom());
      ra2 = (n % 4 == 0) ? wa : 3'($urandom());
      #1;
      checks++;
      if (o1 !== ref_mem[ra1] || o2 !== ref_mem[ra2]) begin
        failures++;
        $display("cycle %0d: o1 %h/%h o2 %h/%h", n, o1, ref_mem[ra1], o2, ref_mem[ra2]);
      end
      @(posedge clk);
      if (!cs) ref_mem[wa] = in;
      else     n_blocked++;
    end
    checks++;
    if (n_blocked == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
