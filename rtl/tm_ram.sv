// tm_ram - triple-port RAM (TM): one write port and two read ports.
//
// Used as an eight-word FIFO with two taps in the stage-1 ordered
// commutator.  The write is synchronous (rising clock edge) and is blocked
// while the chip select `cs` is high, which the commutator uses to skip
// needless writes into TM2.  Both reads are asynchronous: o1 = mem[ra1] and
// o2 = mem[ra2] reflect the contents before the write of the current
// cycle, so reading the address being written returns the word written
// DEPTH cycles ago.
//
// The port set (ra1, ra2, in, wa, o1, o2, cs) and the depth of eight words
// follow the design description; the asynchronous read and the active-high
// write-disable sense of cs are this implementation's choices.  The array
// is not reset: the commutator discards whatever it reads before the first
// frame has been written.
module tm_ram #(
  parameter int unsigned W     = 32,  // word width (complex {re, im})
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          cs,    // 1: write disabled
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  in,
  input  logic [AW-1:0] ra1,
  input  logic [AW-1:0] ra2,
  output logic [W-1:0]  o1,
  output logic [W-1:0]  o2
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (!cs) mem[wa] <= in;

  assign o1 = mem[ra1];
  assign o2 = mem[ra2];

endmodule
