// Asynchronous state machine of the pausible clock control.
//
// It sits between the self-timed FIFOs and the synchronous module. Every
// handshake event from a FIFO (a rising or a falling edge of a request or an
// acknowledge) is turned into a request for the local clock (rq_rx, rq_tx).
// The clock is then held low through the mutex, and inside that grant
// (gt_rx, gt_tx) the state machine latches the event: incoming data, its
// acknowledge to the FIFO, or the acknowledge seen from the FIFO. The
// request falls again, the grant ends and the clock resumes. Because the
// latches change only while the clock is paused, the synchronous side never
// samples a signal in transition and no synchronizer is needed.
//
// Receive channel (FIFO output side, four-phase):
//   rx_req rises with a word: taken in a grant only when the one-word receive
//   register is free, and rx_ack rises with it. rx_req falls: rx_ack falls in
//   the next grant. rx_valid = got ^ taken; the synchronous module consumes
//   the word with rx_take on a rising sysclk edge.
// Send channel (FIFO input side, four-phase):
//   tx_valid/tx_ready accept a word on a rising sysclk edge into tx_fdata;
//   tx_req rises one cycle later (data set up a full cycle ahead of the
//   request), and falls on the first edge after the acknowledge has been
//   latched. tx_ready returns once the acknowledge has gone low again.
// Inside one receive grant the data, the got flag and rx_ack are updated
// by one latch, so they change together and the update itself closes the
// latch (rx_ack then equals rx_req) and withdraws the clock request. Had
// rx_ack its own latch, opened by rx_valid, the rise of rx_valid would
// race the end of the grant that it causes. A gate-level version delays
// rx_ack behind the closing of the data latch, since the FIFO may change
// its data once it sees the acknowledge.
//
// That each Req edge is an event acknowledged in a paused clock, and the
// blocks this one talks to, follow the published design. The one-word receive
// register, the valid/ready interface to the synchronous module and the
// one-cycle data set-up on the send side are this design's choices.
//
// The latches, and the loops through them and the grant inputs that lint
// tools report, are intended: the grant opens a latch, the latch update
// clears the request, and the request clears the grant.
`timescale 1ps / 1ps
module pcc_async_fsm #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clear,     // active-high reset of all state
  input  logic             sysclk,    // paused local clock
  // receive channel, from a FIFO output
  input  logic             rx_req,
  output logic             rx_ack,
  input  logic [WIDTH-1:0] rx_fdata,
  // send channel, to a FIFO input
  output logic             tx_req,
  input  logic             tx_ack,
  output logic [WIDTH-1:0] tx_fdata,
  // to and from the arbiter
  output logic             rq_rx,
  output logic             rq_tx,
  input  logic             gt_rx,
  input  logic             gt_tx,
  // synchronous module side, sysclk domain
  output logic [WIDTH-1:0] rx_data,
  output logic             rx_valid,
  input  logic             rx_take,
  input  logic [WIDTH-1:0] tx_data,
  input  logic             tx_valid,
  output logic             tx_ready
);
  // ---------------- receive channel ----------------
  logic got, taken, ack_seen, tx_pend;

  assign rx_valid = got ^ taken;

  // data, got flag and acknowledge: one latch, open in a receive grant
  // while an rx_req edge is pending (a rising one only with a free register)
  always_latch begin
    if (clear) begin
      got     = 1'b0;
      rx_data = '0;
      rx_ack  = 1'b0;
    end else if (gt_rx && rx_req && !rx_ack && !rx_valid) begin
      got     = ~taken;
      rx_data = rx_fdata;
      rx_ack  = 1'b1;
    end else if (gt_rx && !rx_req && rx_ack) begin
      rx_ack  = 1'b0;
    end
  end

  // a pending event: new word with a free register, or return to zero
  assign rq_rx = (rx_req & ~rx_ack & ~rx_valid) | (~rx_req & rx_ack);

  always_ff @(posedge sysclk or posedge clear) begin
    if (clear)
      taken <= 1'b0;
    else if (rx_take && rx_valid)
      taken <= ~taken;
  end

  // ---------------- send channel ----------------
  always_latch begin
    if (clear)
      ack_seen = 1'b0;
    else if (gt_tx)
      ack_seen = tx_ack;
  end

  assign rq_tx    = tx_ack ^ ack_seen;
  assign tx_ready = ~tx_pend & ~tx_req & ~ack_seen;

  always_ff @(posedge sysclk or posedge clear) begin
    if (clear) begin
      tx_fdata <= '0;
      tx_pend  <= 1'b0;
      tx_req   <= 1'b0;
    end else if (tx_valid && tx_ready) begin
      tx_fdata <= tx_data;
      tx_pend  <= 1'b1;
    end else if (tx_pend) begin
      tx_req   <= 1'b1;
      tx_pend  <= 1'b0;
    end else if (tx_req && ack_seen) begin
      tx_req   <= 1'b0;
    end
  end
endmodule
