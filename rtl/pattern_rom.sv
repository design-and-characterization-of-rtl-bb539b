// pattern_rom: read-only memory of the input patterns applied to the adder under test.
// Each word is {cin, b, a}. The first half of the memory holds the worst-case sequence for
// a prefix tree: even words put every column into the (g,p) = (0,1) "propagate" state
// (a = all ones, b = 0, cin = 0), odd words put every column into the (1,0) "generate"
// state (a = b = all ones, cin = 1), so stepping through them toggles every prefix cell.
// The second half holds pseudo-random operands from a fixed multiplicative hash of the
// word index (see rom_word). The contents are computed at elaboration, no file is read.
// Timing: synchronous read, data appears on a/b/cin one clock after addr.
// The worst-case alternation follows the published test method; the depth, the hashed half
// and the read latency are choices of this implementation.
module pattern_rom #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [WIDTH-1:0]         a,
  output logic [WIDTH-1:0]         b,
  output logic                     cin
);

  localparam int unsigned NCHUNK = (WIDTH + 31) / 32;

  typedef logic [2*WIDTH:0] word_t;

  // 32-bit hash chunk j of operand sel (0 = a, 1 = b) of word k.
  function automatic logic [31:0] hash32(int unsigned k, int unsigned sel, int unsigned j);
    logic [31:0] x;
    x = (32'(k) * 32'h9E37_79B1) ^ (32'(2 * j + sel + 1) * 32'h85EB_CA77);
    x = x ^ (x >> 15);
    x = x * 32'hC2B2_AE3D;
    return x ^ (x >> 13);
  endfunction

  function automatic word_t rom_word(int unsigned k);
    logic [WIDTH-1:0] ra, rb;
    logic [31:0]      ha, hb;
    if (k < DEPTH / 2) begin
      if (k % 2 == 0) return {1'b0, {WIDTH{1'b0}}, {WIDTH{1'b1}}};
      else            return {1'b1, {WIDTH{1'b1}}, {WIDTH{1'b1}}};
    end
    for (int unsigned j = 0; j < NCHUNK; j++) begin
      ha = hash32(k, 0, j);
      hb = hash32(k, 1, j);
      for (int unsigned i = 0; i < 32; i++) begin
        if (32 * j + i < WIDTH) begin
          ra[32*j+i] = ha[i];
          rb[32*j+i] = hb[i];
        end
      end
    end
    return {1'(k % 3 == 0), rb, ra};
  endfunction

  word_t mem [DEPTH];

  initial begin
    for (int unsigned k = 0; k < DEPTH; k++)
      mem[k] = rom_word(k);
  end

  always_ff @(posedge clk)
    {cin, b, a} <= mem[addr];

endmodule
