// grey_cell: generate-only carry operator.
// Used where the lower span already reaches the carry-in column: the joined span's
// propagate is then always 0 and only its generate, which is the carry itself, is needed:
//   G = gL | pL & gR
// Timing: combinational, one AND-OR level.
module grey_cell
  import adder_pkg::*;
(
  input  gp_t  left,
  input  logic g_right,
  output logic g_out
);

  always_comb g_out = left.g | (left.p & g_right);

endmodule
