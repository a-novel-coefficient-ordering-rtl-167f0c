// comm1_ctrl - control block of the stage-1 ordered commutator.
//
// A four-bit frame counter (the FSM) counts word slots; its lower three
// bits are the sequential address a1 used by the TM0/TM1 write ports and by
// read port 2 of TM0.  ROM1 (16 words, contents in fft16_pkg) is read
// synchronously with the same count, so in slot n the registered ROM1 word
// is the one for row (n - 1) mod 16.  It supplies the other TM addresses,
// the TM2 chip select, the four multiplexer selects and the butterfly
// control c[2:0].
//
// Timing: after reset release the first input word of a frame is expected
// in slot 0.  The FSM, the ROM1 contents and the one-slot offset between
// them are what make the data, addresses and selects line up; the offset
// follows from the ROM1 contents and the multiplexer order of the
// commutator diagram, and realising it as a registered ROM is this
// implementation's choice.
module comm1_ctrl
  import fft16_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  output logic [2:0] a1,
  output rom1_word_t rom1_q,
  output logic [3:0] slot     // FSM count (input slot within the frame)
);

  logic [3:0] cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt    <= '0;
      rom1_q <= rom1_lookup(4'd15);
    end else begin
      cnt    <= cnt + 4'd1;
      rom1_q <= rom1_lookup(cnt);
    end

  assign a1   = cnt[2:0];
  assign slot = cnt;

endmodule
