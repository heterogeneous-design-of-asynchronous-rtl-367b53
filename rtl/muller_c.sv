// Muller C-element with active-low clear.
//
// The output copies the inputs when both agree and holds its value while
// they differ; this is the rendezvous gate every asynchronous handshake in
// the design is built from. The cell has the pins IN1, IN2, CDN and OUT, and
// CDN forces the output low. The state is kept in a level-sensitive latch
// and reaches the pin through an inertial delay: RISE_PS for a rising and
// FALL_PS for a falling output, so an input pulse shorter than that never
// shows. Synthesis ignores the delays; set both to 0 for a zero-delay view.
//
// Pins, the clear input and the default delays (142 ps rise, 110 ps fall
// propagation) follow the characterized library cell. The polarity of the
// clear (low active, output forced low) is read from the pin name CDN; a
// single lumped pin-to-pin delay per output edge is this model's choice.
//
// Lint tools report a latch here: the latch is the C-element's state.
`timescale 1ps / 1ps
module muller_c #(
  parameter int unsigned RISE_PS = 142,  // output rise propagation delay
  parameter int unsigned FALL_PS = 110   // output fall propagation delay
) (
  input  logic cdn,   // active-low clear, forces out to 0
  input  logic in1,
  input  logic in2,
  output logic out
);
  logic st;
  wire  st_dly;

  always_latch begin
    if (!cdn)
      st = 1'b0;
    else if (in1 == in2)
      st = in1;
  end

  assign #(RISE_PS, FALL_PS) st_dly = st;
  assign out = st_dly;
endmodule
