// Behavioural model: clock generation of the pausible clock (ring oscillator).
//
// This is a timing model of an analog-ish part, not synthesizable logic. The
// real block is an odd ring of inverting gates closed through the clock side
// of the mutual exclusion element: rclk is the ring's request for the next
// high phase, grant is what the mutex gives back, and sysclk is the buffered
// grant that clocks the synchronous module. The ring delay is lumped into
// one delay of HALF_PERIOD_PS, so with a free mutex the clock runs at
// 1 / (2 * HALF_PERIOD_PS):
//   grant rises -> HALF_PERIOD_PS later rclk falls -> grant falls
//   grant falls -> HALF_PERIOD_PS later rclk rises -> grant rises when free
// While the other mutex input holds the grant, rclk waits high and the low
// phase of sysclk is stretched: that is the pause. en low stops the ring
// with rclk and sysclk low.
//
// The ring-oscillator principle and the 2.2 GHz clock (227 ps half period)
// follow the published design; the lumped delay and the buffer delay are this model's
// choice.
`timescale 1ps / 1ps
module pcc_clock_gen #(
  parameter int unsigned HALF_PERIOD_PS = 227,  // 2.2 GHz free-running
  parameter int unsigned BUF_PS         = 20    // clock buffer delay
) (
  input  logic en,      // ring enable, low stops the clock
  input  logic grant,   // clock-side grant of the mutex
  output logic rclk,    // ring request to the mutex
  output logic sysclk   // local clock
);
  logic grant_dly;

  assign #(HALF_PERIOD_PS) grant_dly = grant;
  assign rclk = en & ~grant_dly;
  assign #(BUF_PS) sysclk = grant;
endmodule
