// Toggle element (two-phase event steering).
//
// Every transition of in causes exactly one transition on an output,
// alternately on y1 and y2: the first input transition moves y1, the second
// y2, the third y1 again, and so on. Fed with a square wave, y1 is that wave
// divided by two. Two latches in a loop keep the state: latch a is open
// while in is high and loads ~b, latch b is open while in is low and loads
// a. cdn clears both; release it while in is low.
//
// The cell is one of the library's event-logic cells; its inner structure
// and the clear pin are this design's choice.
//
// Lint tools report latches and a loop through them: that loop is how the
// element remembers which output moves next.
`timescale 1ps / 1ps
module toggle (
  input  logic cdn,   // active-low clear
  input  logic in,
  output logic y1,
  output logic y2
);
  always_latch begin
    if (!cdn)
      y1 = 1'b0;
    else if (in)
      y1 = ~y2;
  end

  always_latch begin
    if (!cdn)
      y2 = 1'b0;
    else if (!in)
      y2 = y1;
  end
endmodule
