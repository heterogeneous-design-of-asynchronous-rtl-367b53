// Select element (two-phase event steering by a level).
//
// A transition on in is passed to yt when sel is high and to yf when sel is
// low. sel must be stable around the input event, as in any bundled-data
// circuit. Each output is a latch that is open only while its side is
// selected and loads in XOR the other output, so after every event
// yt ^ yf equals in. cdn clears both outputs; release it while in is low.
//
// The cell is one of the library's event-logic cells; its inner structure
// and the clear pin are this design's choice.
//
// Lint tools report latches and a loop through them: each output latch
// reads the other output, which is the element's state.
`timescale 1ps / 1ps
module select (
  input  logic cdn,   // active-low clear
  input  logic in,
  input  logic sel,
  output logic yt,
  output logic yf
);
  always_latch begin
    if (!cdn)
      yt = 1'b0;
    else if (sel)
      yt = in ^ yf;
  end

  always_latch begin
    if (!cdn)
      yf = 1'b0;
    else if (!sel)
      yf = in ^ yt;
  end
endmodule
