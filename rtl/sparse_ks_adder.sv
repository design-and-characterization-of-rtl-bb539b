// sparse_ks_adder: sparse Kogge-Stone parallel-prefix adder, sum = a + b + cin.
// Three stages. Pre-computation (pg_precompute) forms per-bit generate/propagate, with the
// carry-in as column 0. The sparse prefix tree (sparse_ks_carry_tree) computes only the
// carries into every RCA_WIDTH-th bit. Post-computation is done by WIDTH/RCA_WIDTH ripple-carry
// blocks (rca_block), each starting from its tree carry, so the short ripples can use an
// FPGA's fast carry chain while the tree bounds the long-distance carry delay to log2 levels.
// Defaults follow the 16-bit sparse adder with 4-bit ripple blocks. FAST_CARRY=1 builds the
// tree from carry-chain muxes instead of AND-OR cells; RCA_WIDTH=1 gives a dense Kogge-Stone.
// Interface: WIDTH-bit operands and sum, carry in and out. Timing: combinational.
// Making the mux-form cells an option (default off) is a choice of this implementation.
module sparse_ks_adder #(
  parameter int unsigned WIDTH      = 16,
  parameter int unsigned RCA_WIDTH  = 4,
  parameter bit          FAST_CARRY = 1'b0
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NBLK = WIDTH / RCA_WIDTH;

  logic [WIDTH:0]  g, p;
  logic [NBLK-1:0] blk_carry;   // blk_carry[k]: carry into bit (k+1)*RCA_WIDTH
  logic [NBLK-1:0] blk_cin;

  pg_precompute #(.WIDTH(WIDTH)) u_pre (.a(a), .b(b), .cin(cin), .g(g), .p(p));

  sparse_ks_carry_tree #(.WIDTH(WIDTH), .INTERVAL(RCA_WIDTH), .FAST_CARRY(FAST_CARRY)) u_tree (
    .g(g), .p(p), .carry(blk_carry)
  );

  if (NBLK > 1) begin : g_cin_many
    assign blk_cin = {blk_carry[NBLK-2:0], cin};
  end else begin : g_cin_one
    assign blk_cin = cin;
  end

  for (genvar k = 0; k < NBLK; k++) begin : g_rca
    rca_block #(.WIDTH(RCA_WIDTH)) u_rca (
      .g  (g[k*RCA_WIDTH+1 +: RCA_WIDTH]),
      .p  (p[k*RCA_WIDTH+1 +: RCA_WIDTH]),
      .cin(blk_cin[k]),
      .sum(sum[k*RCA_WIDTH +: RCA_WIDTH])
    );
  end

  assign cout = blk_carry[NBLK-1];

endmodule
