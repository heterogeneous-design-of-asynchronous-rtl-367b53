// Behavioural model: 21-stage ring oscillator for library characterization.
//
// A timing model of an analog part, not synthesizable logic. The ring is a
// three-input NAND (select, enable and the ring's feedback) followed by
// STAGES-1 inverting stages; with an odd count of inversions it oscillates
// while select and enable are both high, with a period of
// 2 * STAGES * STAGE_PS. An isolation buffer decouples the ring from the
// divider that loads its output. With select or enable low the ring is
// forced to a steady state (NAND output high) after STAGES stage delays.
//
// Twenty-one stages, the select/enable gate and the isolation buffer follow
// the published design; the per-stage and buffer delays are this model's
// own numbers.
`timescale 1ps / 1ps
module ring_osc #(
  parameter int unsigned STAGES   = 21,
  parameter int unsigned STAGE_PS = 60,
  parameter int unsigned BUF_PS   = 40
) (
  input  logic select,
  input  logic enable,
  output logic out       // isolation buffer output
);
  logic [STAGES-1:0] s;   // s[i] is the output of stage i, s[0] the NAND

  assign #(STAGE_PS) s[0] = ~(select & enable & s[STAGES-1]);
  for (genvar i = 1; i < STAGES; i++) begin : g_inv
    assign #(STAGE_PS) s[i] = ~s[i-1];
  end

  assign #(BUF_PS) out = s[STAGES-1];
endmodule
