// mutex2: two-way mutual exclusion element.
//
// Requests r1 and r2 compete for one resource. At most one grant is high.
// If both requests are present when the element is free, r1 wins; a grant,
// once given, stays until its own request falls, and only then may the other
// request be granted. This is the behaviour of the cross-coupled NAND mutex
// (the analog metastability filter of a real cell has no RTL equivalent and
// is not modelled). The two grant latches form an intended feedback loop.
//
// Circuit notes: each grant is a latch and each depends on the other
// grant, a deliberate cross-coupled loop (the two-NAND arbiter).
//
// Source and choices: the behaviour (grant 1 wins a tie, grant 2 waits for
// request 1 to fall) follows the source; the metastability filter of a real
// mutex is not modelled.
`timescale 1ns/1ps
module mutex2 (
  input  logic r1,
  input  logic r2,
  output logic g1,
  output logic g2
);
  always_latch begin
    if (!r1)      g1 <= 1'b0;
    else if (!g2) g1 <= 1'b1;
  end

  always_latch begin
    if (!r2)                g2 <= 1'b0;
    else if (!g1 && !r1)    g2 <= 1'b1;
  end

  always_comb assert (!(g1 && g2)) else $error("mutex2: both grants high");
endmodule
