// adm_reorder - six-word additional dual-port memory (ADM) with its address
// ROM (ROM0): turns the ordered stage-1 results back into normal order.
//
// The stage-1 results DI of a frame arrive in ordered slots j = 0..15 as
// results k = ord_index(j) = 0,1,2,3,4,8,12,10,5,7,13,6,9,11,14,15.
// Result k must leave as DO exactly seven slots after slot k, so that DO
// carries k = 0..15 in natural order with a fixed latency.  Six results are
// in flight at any slot boundary, so six words suffice if the word read in
// a slot and the word written in that slot share one address.  ROM0 holds
// that single address per slot; because the chain of shared addresses only
// repeats after six frames, ROM0 has 96 entries (fft16_pkg::rom0_table).
//
// Each enabled cycle: a = ROM0[t]; DO <= mem[a] (read before write);
// mem[a] <= DI; t = (t + 1) mod 96.  `en` is held high from the first DI
// word of the first frame on.  DO is registered; result k of frame f, fed
// in ordered slot j, appears on `dout` in cycle t0 + 16f + k + 7, where t0
// is the cycle of the first enabled DI word.
//
// The six-word depth, the ROM-driven addressing and the DI/DO sequences
// follow the design description; the shared read/write address, the
// synchronous read and the way ROM0 is computed are this implementation's.
module adm_reorder
  import fft16_pkg::*;
#(
  parameter int unsigned W = 38  // complex word width {re, im}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,    // DI
  output logic [W-1:0] dout    // DO
);

  localparam logic [ADM_PERIOD-1:0][2:0] ROM0 = rom0_table();

  logic [W-1:0] mem [ADM_DEPTH];
  logic [6:0]   t;
  logic [2:0]   a;

  assign a = ROM0[t];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  t <= '0;
    else if (en) t <= (t == 7'(ADM_PERIOD - 1)) ? '0 : t + 7'd1;

  always_ff @(posedge clk)
    if (en) begin
      dout   <= mem[a];
      mem[a] <= din;
    end

  // Every ROM0 address must name one of the six words.
  a_addr_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 en |-> a < 3'(ADM_DEPTH));

endmodule
