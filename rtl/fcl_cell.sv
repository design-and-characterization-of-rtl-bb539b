// fcl_cell: Fast Carry Logic prefix cell, the multiplexer form of the carry operator.
// On an FPGA the dedicated carry chain is a column of 2:1 muxes. This cell expresses the
// operator in that form, so the tree can be mapped onto carry-chain muxes instead of LUTs:
//   G = pL ? gR : gL
//   P = pL & pR
// It equals the AND-OR black cell whenever g and p of a span are never both 1. That holds
// for the pre-computed pairs (a&b, a^b) and (cin, 0), and the operator preserves it; an
// assertion flags an input span that breaks the rule.
// Timing: combinational, one mux level.
module fcl_cell
  import adder_pkg::*;
(
  input  gp_t left,
  input  gp_t right,
  output gp_t out
);

  always_comb begin
    out.g = left.p ? right.g : left.g;
    out.p = left.p & right.p;
  end

  // The mux form is exact only for legal spans.
  always_comb begin
    assert (!(left.g && left.p) && !(right.g && right.p))
      else $error("fcl_cell: span with g and p both set");
  end

endmodule
