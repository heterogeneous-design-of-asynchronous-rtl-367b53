// Heterogeneous-system interface: two clock domains joined by self-timed
// FIFOs and pausible clocks.
//
// Side A (for instance a processor) and side B (a peripheral) each run from
// their own local ring-oscillator clock, at unrelated frequencies. Between
// them sit two self-timed micropipeline FIFOs, one per direction, and on
// each side a pausible clocking control (PCC) that hands words between the
// FIFO handshakes and the synchronous module, pausing its clock whenever a
// handshake event has to be latched. No clock crosses the boundary and no
// synchronizer flip-flops are used.
//
//   side A  --tx-->  PCC A  --> fifo_ab -->  PCC B  --rx-->  side B
//   side A  <--rx--  PCC A  <-- fifo_ba <--  PCC B  <--tx--  side B
//
// Each side's synchronous module sees a valid/ready word interface on its
// own sysclk: tx_data/tx_valid/tx_ready to send, rx_data/rx_valid/rx_take to
// receive (a word is taken on a rising sysclk edge with rx_take high). The
// synchronous modules themselves are outside this block.
//
// Beside the interface, and unconnected to it, the block carries the
// library's characterization structure: a 21-stage ring oscillator with its
// divide-by-256 counter, and a Select cell with its pins brought out.
//
// The two-FIFO, two-PCC arrangement, the 32-bit width and the four-stage
// FIFOs follow the published design. Side A's 227 ps half period gives the 2.2 GHz
// clock of the published design; side B's slower default clock is this design's own
// choice, as is the single clear for both sides.
//
// Latches and combinational loops reported by lint tools come from the
// self-timed FIFOs, the mutexes and the pausible clock loop; they are the
// circuit, not mistakes. rclk of each side stays internal.
`timescale 1ps / 1ps
module hetero_interface #(
  parameter int unsigned WIDTH            = 32,
  parameter int unsigned STAGES           = 4,
  parameter int unsigned HALF_PERIOD_A_PS = 227,
  parameter int unsigned HALF_PERIOD_B_PS = 313
) (
  input  logic             clear,
  // side A
  input  logic             en_a,
  output logic             sysclk_a,
  output logic             pause_a,
  input  logic [WIDTH-1:0] a_tx_data,
  input  logic             a_tx_valid,
  output logic             a_tx_ready,
  output logic [WIDTH-1:0] a_rx_data,
  output logic             a_rx_valid,
  input  logic             a_rx_take,
  // side B
  input  logic             en_b,
  output logic             sysclk_b,
  output logic             pause_b,
  input  logic [WIDTH-1:0] b_tx_data,
  input  logic             b_tx_valid,
  output logic             b_tx_ready,
  output logic [WIDTH-1:0] b_rx_data,
  output logic             b_rx_valid,
  input  logic             b_rx_take,
  // ring-oscillator test structure
  input  logic             osc_select,
  input  logic             osc_enable,
  input  logic             osc_reset,
  output logic             osc_out,
  output logic             osc_div_out,
  // stand-alone Select cell
  input  logic             sel_cdn,
  input  logic             sel_in,
  input  logic             sel_sel,
  output logic             sel_yt,
  output logic             sel_yf
);
  // A -> B channel
  logic             ab_req_in, ab_ack_out, ab_req_out, ab_ack_in;
  logic [WIDTH-1:0] ab_din, ab_dout;
  // B -> A channel
  logic             ba_req_in, ba_ack_out, ba_req_out, ba_ack_in;
  logic [WIDTH-1:0] ba_din, ba_dout;
  logic             rclk_a, rclk_b;

  pcc #(.WIDTH(WIDTH), .HALF_PERIOD_PS(HALF_PERIOD_A_PS)) u_pcc_a (
    .en       (en_a),
    .clear    (clear),
    .sysclk   (sysclk_a),
    .rclk     (rclk_a),
    .pause    (pause_a),
    .rx_req   (ba_req_out),
    .rx_ack   (ba_ack_in),
    .rx_fdata (ba_dout),
    .tx_req   (ab_req_in),
    .tx_ack   (ab_ack_out),
    .tx_fdata (ab_din),
    .rx_data  (a_rx_data),
    .rx_valid (a_rx_valid),
    .rx_take  (a_rx_take),
    .tx_data  (a_tx_data),
    .tx_valid (a_tx_valid),
    .tx_ready (a_tx_ready)
  );

  mp_fifo #(.WIDTH(WIDTH), .STAGES(STAGES)) u_fifo_ab (
    .clear    (clear),
    .req_in   (ab_req_in),
    .ack_out  (ab_ack_out),
    .data_in  (ab_din),
    .req_out  (ab_req_out),
    .ack_in   (ab_ack_in),
    .data_out (ab_dout)
  );

  mp_fifo #(.WIDTH(WIDTH), .STAGES(STAGES)) u_fifo_ba (
    .clear    (clear),
    .req_in   (ba_req_in),
    .ack_out  (ba_ack_out),
    .data_in  (ba_din),
    .req_out  (ba_req_out),
    .ack_in   (ba_ack_in),
    .data_out (ba_dout)
  );

  pcc #(.WIDTH(WIDTH), .HALF_PERIOD_PS(HALF_PERIOD_B_PS)) u_pcc_b (
    .en       (en_b),
    .clear    (clear),
    .sysclk   (sysclk_b),
    .rclk     (rclk_b),
    .pause    (pause_b),
    .rx_req   (ab_req_out),
    .rx_ack   (ab_ack_in),
    .rx_fdata (ab_dout),
    .tx_req   (ba_req_in),
    .tx_ack   (ba_ack_out),
    .tx_fdata (ba_din),
    .rx_data  (b_rx_data),
    .rx_valid (b_rx_valid),
    .rx_take  (b_rx_take),
    .tx_data  (b_tx_data),
    .tx_valid (b_tx_valid),
    .tx_ready (b_tx_ready)
  );

  // ---------------- library characterization structure ----------------
  logic [7:0] osc_count;

  ring_osc u_ring (
    .select (osc_select),
    .enable (osc_enable),
    .out    (osc_out)
  );

  divider256 u_div (
    .reset (osc_reset),
    .in    (osc_out),
    .out   (osc_div_out),
    .count (osc_count)
  );

  select u_select (
    .cdn (sel_cdn),
    .in  (sel_in),
    .sel (sel_sel),
    .yt  (sel_yt),
    .yf  (sel_yf)
  );
endmodule
