// Pausible clocking control (PCC): a local clock that is stretched for
// asynchronous handshakes.
//
// The synchronous module's clock comes from a ring oscillator that is closed
// through a mutual exclusion element. One mutex input is the ring's own
// request (rclk), the other is the request of the arbiter, which takes the
// receive and send events of the asynchronous state machine in turn. When a
// handshake event arrives while sysclk is low it wins the mutex, the next
// rising clock edge waits, the state machine latches the event, lets go, and
// the clock continues. An event that arrives while sysclk is high waits for
// the falling edge. The synchronous side therefore only ever sees settled
// handshake signals, at the price of an occasionally longer low phase.
//
// Ports: en starts the ring; clear resets the state machine; the FIFO-side
// four-phase channels rx_* and tx_*; the synchronous side's valid/ready
// words; sysclk and rclk out. Free-running frequency 1 / (2*HALF_PERIOD_PS).
//
// The block structure (state machine, arbiter, mutual exclusion, clock
// generation) follows the published design; see the sub-blocks for their own choices.
//
// Lint tools report combinational loops through the mutex, the arbiter and
// the state machine's latches: a request/grant handshake is such a loop by
// nature, and the clock ring is closed through the mutex on purpose.
`timescale 1ps / 1ps
module pcc #(
  parameter int unsigned WIDTH          = 32,
  parameter int unsigned HALF_PERIOD_PS = 227
) (
  input  logic             en,
  input  logic             clear,
  output logic             sysclk,
  output logic             rclk,
  output logic             pause,     // high while a handshake holds the clock
  // receive channel, from a FIFO output
  input  logic             rx_req,
  output logic             rx_ack,
  input  logic [WIDTH-1:0] rx_fdata,
  // send channel, to a FIFO input
  output logic             tx_req,
  input  logic             tx_ack,
  output logic [WIDTH-1:0] tx_fdata,
  // synchronous module side
  output logic [WIDTH-1:0] rx_data,
  output logic             rx_valid,
  input  logic             rx_take,
  input  logic [WIDTH-1:0] tx_data,
  input  logic             tx_valid,
  output logic             tx_ready
);
  logic rq_rx, rq_tx, gt_rx, gt_tx;
  logic mreq, mgnt, cgnt;

  pcc_async_fsm #(.WIDTH(WIDTH)) u_fsm (
    .clear    (clear),
    .sysclk   (sysclk),
    .rx_req   (rx_req),
    .rx_ack   (rx_ack),
    .rx_fdata (rx_fdata),
    .tx_req   (tx_req),
    .tx_ack   (tx_ack),
    .tx_fdata (tx_fdata),
    .rq_rx    (rq_rx),
    .rq_tx    (rq_tx),
    .gt_rx    (gt_rx),
    .gt_tx    (gt_tx),
    .rx_data  (rx_data),
    .rx_valid (rx_valid),
    .rx_take  (rx_take),
    .tx_data  (tx_data),
    .tx_valid (tx_valid),
    .tx_ready (tx_ready)
  );

  pcc_arbiter u_arb (
    .rq_rx (rq_rx),
    .rq_tx (rq_tx),
    .gt_rx (gt_rx),
    .gt_tx (gt_tx),
    .mreq  (mreq),
    .mgnt  (mgnt)
  );

  mutex u_mutex (
    .r1 (rclk),
    .r2 (mreq),
    .g1 (cgnt),
    .g2 (mgnt)
  );

  pcc_clock_gen #(.HALF_PERIOD_PS(HALF_PERIOD_PS)) u_clk (
    .en     (en),
    .grant  (cgnt),
    .rclk   (rclk),
    .sysclk (sysclk)
  );

  assign pause = mgnt;
endmodule
