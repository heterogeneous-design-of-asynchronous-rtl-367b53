// Arbiter of the pausible clock control.
//
// The two ports of the asynchronous state machine (receive side rq_rx and
// send side rq_tx) may both want the clock paused. A mutex picks one of
// them; the winner's request goes on to the clock mutex as mreq, and the
// clock mutex's grant mgnt is routed back to the winning port only. The
// winner keeps the arbiter until its request falls, which it does once its
// latches have been updated inside the grant.
//
// All combinational apart from the mutex; no clock. The block and its place
// between the state machine and the mutual exclusion element follow the
// published design; its contents are this design's choice.
//
// The mutex inside holds a latch; with the state machine it closes the
// request/grant loop that lint tools report, as intended.
`timescale 1ps / 1ps
module pcc_arbiter (
  input  logic rq_rx,
  input  logic rq_tx,
  output logic gt_rx,
  output logic gt_tx,
  output logic mreq,
  input  logic mgnt
);
  logic wa, wb;

  mutex u_mx (
    .r1 (rq_rx),
    .r2 (rq_tx),
    .g1 (wa),
    .g2 (wb)
  );

  assign mreq  = wa | wb;
  assign gt_rx = mgnt & wa;
  assign gt_tx = mgnt & wb;
endmodule
