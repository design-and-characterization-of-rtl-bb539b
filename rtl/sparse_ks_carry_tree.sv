// sparse_ks_carry_tree: Kogge-Stone prefix network trimmed to every INTERVAL-th carry.
// Columns 0..WIDTH hold the pre-computed (g,p) pairs, column 0 being the carry-in (cin,0).
// A full Kogge-Stone tree has $clog2(WIDTH+1) levels; at level l every column i >= 2^(l-1)
// joins its span with the span ending 2^(l-1) columns below, so after the last level the
// generate of column i is the carry into operand bit i. A sparse tree needs only the
// carries into bits INTERVAL, 2*INTERVAL, ..., WIDTH (the last is the carry-out), so only
// the cells those columns depend on are built: the set NEED is found by walking back from
// the wanted columns through the tree. A built cell whose lower span already reaches column
// 0 is a grey cell (its propagate is always 0); the others are black cells. Columns that
// are already complete pass straight down (the white buffers of a drawn tree are wires).
// FAST_CARRY=1 builds every cell as the carry-chain mux form (fcl_cell) instead.
// INTERVAL=1 gives the regular, dense Kogge-Stone tree.
// Tree entries that no wanted carry depends on are not built and read as 0.
// Interface: carry[k] is the carry into bit (k+1)*INTERVAL of the operands.
// Timing: combinational, $clog2(WIDTH+1) cell levels.
// The sparse Kogge-Stone structure, the carry-in column and the black/grey split follow the
// published design; deriving the kept cells by the backward walk is this implementation's.
module sparse_ks_carry_tree
  import adder_pkg::*;
#(
  parameter int unsigned WIDTH      = 16,
  parameter int unsigned INTERVAL   = 4,
  parameter bit          FAST_CARRY = 1'b0
) (
  input  logic [WIDTH:0]            g,
  input  logic [WIDTH:0]            p,
  output logic [WIDTH/INTERVAL-1:0] carry
);

  localparam int unsigned LEVELS = $clog2(WIDTH + 1);
  localparam int unsigned NCARRY = WIDTH / INTERVAL;

  if (INTERVAL == 0 || WIDTH % INTERVAL != 0) begin : g_bad_interval
    $error("sparse_ks_carry_tree: WIDTH must be a non-zero multiple of INTERVAL");
  end

  typedef logic [LEVELS:0][WIDTH:0] need_t;

  // need[l][i] is set when the tree output of level l, column i, feeds a wanted carry.
  function automatic need_t need_map();
    need_t m = '0;
    for (int unsigned i = INTERVAL; i <= WIDTH; i += INTERVAL)
      m[LEVELS][i] = 1'b1;
    for (int l = LEVELS; l >= 1; l--) begin
      for (int i = 0; i <= int'(WIDTH); i++) begin
        if (m[l][i]) begin
          m[l-1][i] = 1'b1;
          if (i >= (1 << (l - 1)))
            m[l-1][i - (1 << (l - 1))] = 1'b1;
        end
      end
    end
    return m;
  endfunction

  localparam need_t NEED = need_map();

  // One generate scope per tree level; g_lvl[l].t[i] is the (g,p) of column i after level l.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    gp_t t [WIDTH+1];
    if (l == 0) begin : g_pre
      for (genvar i = 0; i <= WIDTH; i++) begin : g_col
        assign t[i] = '{g: g[i], p: p[i]};
      end
    end else begin : g_cells
      localparam int unsigned D = 1 << (l - 1);
      for (genvar i = 0; i <= WIDTH; i++) begin : g_col
        if (!NEED[l][i]) begin : g_absent
          assign t[i] = '0;
        end else if (i < D) begin : g_wire
          assign t[i] = g_lvl[l-1].t[i];
        end else if (FAST_CARRY) begin : g_fcl
          fcl_cell u_cell (.left(g_lvl[l-1].t[i]), .right(g_lvl[l-1].t[i-D]), .out(t[i]));
        end else if (i < 2 * D) begin : g_grey
          grey_cell u_cell (.left(g_lvl[l-1].t[i]), .g_right(g_lvl[l-1].t[i-D].g), .g_out(t[i].g));
          assign t[i].p = 1'b0;
        end else begin : g_black
          black_cell u_cell (.left(g_lvl[l-1].t[i]), .right(g_lvl[l-1].t[i-D]), .out(t[i]));
        end
      end
    end
  end

  for (genvar k = 0; k < NCARRY; k++) begin : g_carry
    assign carry[k] = g_lvl[LEVELS].t[(k + 1) * INTERVAL].g;
  end

endmodule
