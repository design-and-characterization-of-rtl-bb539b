// pg_precompute: pre-computation stage of the parallel-prefix adder.
// For every operand bit i it forms generate g = a&b and propagate p = a^b. The carry-in is
// treated as one more column below bit 0 with (g,p) = (cin,0), so a prefix tree over
// columns 0..WIDTH yields the carry into each bit directly, with no special case for cin.
// Interface: column i+1 carries bit i of the operands, column 0 carries cin.
// Timing: combinational, one gate level.
// The equations, including (cin,0) for column 0, follow the published pre-computation step.
module pg_precompute #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH:0]   g,
  output logic [WIDTH:0]   p
);

  always_comb begin
    g = {a & b, cin};
    p = {a ^ b, 1'b0};
  end

endmodule
