// Divide-by-256 ripple counter for the ring-oscillator test structure.
//
// Eight toggle elements in a chain: each toggle's first output changes once
// per period of its input, so it is the input divided by two, and it feeds
// the next toggle. The last stage's output is the input frequency divided by
// 256, slow enough to measure off chip. count gives the eight stage outputs
// (stage k at bit k), a ripple count of input periods. reset (active high)
// clears all stages; release it while in is low.
//
// The divide ratio and the reset pin follow the published design; building it from the
// library's toggle cells is this design's choice.
//
// The latches reported by lint tools are those of the toggle cells.
`timescale 1ps / 1ps
module divider256 #(
  parameter int unsigned BITS = 8   // 2**BITS = 256
) (
  input  logic            reset,
  input  logic            in,
  output logic            out,
  output logic [BITS-1:0] count
);
  logic [BITS:0] t;
  assign t[0] = in;

  for (genvar k = 0; k < BITS; k++) begin : g_tog
    logic unused;
    toggle u_tog (
      .cdn (~reset),
      .in  (t[k]),
      .y1  (t[k+1]),
      .y2  (unused)
    );
    assign count[k] = t[k+1];
  end

  assign out = t[BITS];
endmodule
