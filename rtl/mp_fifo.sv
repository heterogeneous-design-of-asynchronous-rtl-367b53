// Transparent-latch micropipeline FIFO, STAGES deep and WIDTH bits wide.
//
// A self-timed FIFO: a chain of STAGES pipeline controls, each owning one
// transparent data latch. A word presented on data_in with req_in raised is
// captured by the first stage and ripples forward through every empty stage
// on its own, with no clock, until it reaches the last occupied position.
// Stage i's latch feeds stage i+1's latch; data_out is the last latch.
//
// Interface, four-phase bundled data on both sides:
//   input side  : set data_in, then raise req_in; ack_out rises when the word
//                 is captured; lower req_in; ack_out falls.
//   output side : req_out rises with a valid word on data_out; the receiver
//                 raises ack_in, req_out falls, the receiver lowers ack_in.
// clear (active high) empties every stage.
//
// A four-phase pipeline of C-elements holds a token in at most every other
// stage, so this FIFO buffers at most STAGES/2 words, counting the one
// waiting at its output.
//
// Four stages, 32 bits, the Clear line and the transparent-latch style
// follow the published design; the protocol choice is this design's (see
// mp_stage_ctrl). The cells carry the library's characterized delays, so
// through an empty FIFO a request takes STAGES * (142 + 70) ps, 848 ps for
// four stages, and a data bit STAGES * 130 ps rising or STAGES * 203 ps
// falling (520 or 812 ps): the data always lead their request.
//
// The latches and combinational loops that lint tools report are the
// circuit itself: a self-timed pipeline keeps its state in level-sensitive
// loops between neighbouring stages, not in clocked flip-flops.
`timescale 1ps / 1ps
module mp_fifo #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned STAGES = 4
) (
  input  logic             clear,
  input  logic             req_in,
  output logic             ack_out,
  input  logic [WIDTH-1:0] data_in,
  output logic             req_out,
  input  logic             ack_in,
  output logic [WIDTH-1:0] data_out
);
  logic [STAGES:0] req;               // req[i] is the request into stage i
  logic [STAGES:0] ack;               // ack[i] is the acknowledge out of stage i
  logic [STAGES-1:0] len;
  logic [WIDTH-1:0] dat [STAGES+1];   // dat[i] is the word into stage i

  assign req[0]      = req_in;
  assign ack_out     = ack[0];
  assign ack[STAGES] = ack_in;
  assign dat[0]      = data_in;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    mp_stage_ctrl u_ctrl (
      .clear (clear),
      .rin   (req[i]),
      .ain   (ack[i]),
      .rout  (req[i+1]),
      .aout  (ack[i+1]),
      .len   (len[i])
    );

    trans_latch #(.WIDTH(WIDTH)) u_lat (
      .en (len[i]),
      .d  (dat[i]),
      .q  (dat[i+1])
    );
  end

  assign req_out  = req[STAGES];
  assign data_out = dat[STAGES];
endmodule
