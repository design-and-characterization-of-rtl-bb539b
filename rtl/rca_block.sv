// rca_block: ripple-carry sum block that finishes a sparse prefix adder.
// It receives the per-bit (g,p) of its WIDTH bits and its block carry-in from the prefix
// tree, ripples the carry through a carry-chain mux per bit, c[j+1] = p[j] ? c[j] : g[j],
// and forms the sum s[j] = p[j] ^ c[j] (post-computation). It has no carry-out: the next
// block takes its carry-in from the tree, which is what keeps the tree sparse.
// Timing: combinational, WIDTH mux levels plus one XOR.
// The 4-bit ripple finish follows the published sparse adder; the mux form of the ripple is
// the FPGA carry-chain form and a choice made here.
module rca_block #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] g,
  input  logic [WIDTH-1:0] p,
  input  logic             cin,
  output logic [WIDTH-1:0] sum
);

  logic c;   // carry into the bit being summed

  always_comb begin
    c = cin;
    for (int j = 0; j < WIDTH; j++) begin
      sum[j] = p[j] ^ c;
      c      = p[j] ? c : g[j];
    end
  end

endmodule
