// Handshake control of one micropipeline stage (four-phase, bundled data).
//
// A Muller C-element joins the request from the previous stage with the
// inverted acknowledge of the next stage. Its output is at once the request
// passed on (rout), the acknowledge returned (ain) and, inverted, the enable
// of the stage's data latch: the latch is transparent while the stage is
// empty and closes the moment the stage takes a token, holding the word
// until the next stage has taken it and the stage has returned to zero.
//
// Timing: rin rises -> rout/ain rise once aout is low; rin falls -> rout/ain
// fall once aout is high. clear resets the stage to empty. The C-element
// carries the library cell's delays (142 ps rise, 110 ps fall) and rout
// passes through a further matched delay, REQ_DLY_PS, so that the request
// of a stage (142 + 70 ps) is never faster than its data latch (at worst
// 203 ps for a falling bit): the data are always at the next stage, and at
// the FIFO output, before their request (the bundled-data rule). The value
// of that margin is this design's choice; 0 with zero-delay cells gives a
// zero-delay view.
//
// The control block, its neighbours and the Clear line follow the FIFO's
// block diagram. The four-phase protocol (both documented protocols are
// possible) and the single C-element controller are this design's choice.
//
// The C-element is a latch; with neighbouring stages it forms the
// combinational loops that lint tools report, which is how a self-timed
// pipeline holds its state.
`timescale 1ps / 1ps
module mp_stage_ctrl #(
  parameter int unsigned REQ_DLY_PS = 70  // matched delay on the request
) (
  input  logic clear,  // active-high clear of the stage
  input  logic rin,    // request from the previous stage
  output logic ain,    // acknowledge to the previous stage
  output logic rout,   // request to the next stage
  input  logic aout,   // acknowledge from the next stage
  output logic len     // data latch enable, high = transparent
);
  logic c;

  muller_c u_c (
    .cdn (~clear),
    .in1 (rin),
    .in2 (~aout),
    .out (c)
  );

  assign #(REQ_DLY_PS) rout = c;
  assign ain  = c;
  assign len  = ~c;
endmodule
