// Two-way mutual exclusion element.
//
// Two requests r1 and r2 compete for one resource; at most one of g1 and g2
// is high at any time. A grant once given is kept until its own request
// falls, then a waiting request is granted at once. The grant of r2 is kept
// in a set/reset latch (set while r2 is high and r1 is low, cleared when r2
// falls) and g1 is r1 gated by it.
//
// A silicon mutex resolves two requests that arrive together through a
// metastability filter, taking an unbounded but usually short time. This
// zero-delay model settles such a tie in favour of r1 instead. In the
// pausible clock that means the clock edge wins a tie with a handshake.
//
// Lint tools report a latch here: it holds the r2 grant, as in the cell.
`timescale 1ps / 1ps
module mutex (
  input  logic r1,
  input  logic r2,
  output logic g1,
  output logic g2
);
  always_latch begin
    if (!r2)
      g2 = 1'b0;
    else if (!r1)
      g2 = 1'b1;
  end

  assign g1 = r1 & ~g2;

  always_comb begin
    assert (!(g1 && g2)) else $error("mutex: both grants high");
  end
endmodule
