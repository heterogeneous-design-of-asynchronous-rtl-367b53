// Transparent latch, WIDTH bits wide.
//
// While en is high the output follows d; when en falls the last value is
// held. It is the datapath latch of the micropipeline FIFO: one of these per
// stage stores the word that the stage's handshake control owns. There is no
// reset: the word is only read after a handshake has written it.
// Each bit reaches its pin through an inertial delay, RISE_PS for a rising
// and FALL_PS for a falling bit; synthesis ignores the delays, and 0 for
// both gives a zero-delay view.
//
// Function and the default delays (130 ps rise, 203 ps fall propagation)
// follow the library's transparent latch cell; the bus width is a parameter
// of this design, and the delay is lumped at the output as this model's
// choice.
//
// Lint tools report a latch here: it is the intended storage element.
`timescale 1ps / 1ps
module trans_latch #(
  parameter int unsigned WIDTH   = 1,
  parameter int unsigned RISE_PS = 130,  // output rise propagation delay
  parameter int unsigned FALL_PS = 203   // output fall propagation delay
) (
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] st;
  wire  [WIDTH-1:0] st_dly;

  always_latch begin
    if (en)
      st = d;
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    assign #(RISE_PS, FALL_PS) st_dly[i] = st[i];
  end

  assign q = st_dly;
endmodule
