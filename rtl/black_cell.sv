// black_cell: the fundamental carry operator of a prefix adder.
// It joins the (g,p) pair of a span with that of the span directly below it:
//   G = gL | pL & gR    (the joined span generates if the upper part generates, or the
//                        lower part generates and the upper part passes it on)
//   P = pL & pR         (the joined span propagates only if both parts do)
// The operator is associative, which lets the carry tree evaluate it in log2 levels.
// Timing: combinational, one AND-OR level.
module black_cell
  import adder_pkg::*;
(
  input  gp_t left,
  input  gp_t right,
  output gp_t out
);

  always_comb begin
    out.g = left.g | (left.p & right.g);
    out.p = left.p & right.p;
  end

endmodule
