// pattern_model_pkg: reference model of the test patterns, for testbenches.
// exp_a/exp_b/exp_cin give the operands the pattern ROM should hold at index k of a
// memory of the given depth: the first half alternates all-propagate (a = ones, b = 0,
// cin = 0) and all-generate (a = b = ones, cin = 1) words; the second half holds operands
// from a multiplicative hash of (k, operand, 32-bit chunk), with cin = 1 when k % 3 == 0.
package pattern_model_pkg;

  localparam int MAXW = 256;

  function automatic logic [31:0] mix(int unsigned k, int unsigned salt);
    logic [31:0] x;
    x = (32'(k) * 32'd2654435761) ^ (32'(salt) * 32'd2246822519);
    x = x ^ (x >> 15);
    x = x * 32'd3266489917;
    return x ^ (x >> 13);
  endfunction

  function automatic logic [MAXW-1:0] hashed(int unsigned k, int unsigned sel);
    logic [MAXW-1:0] v;
    for (int unsigned j = 0; j < MAXW / 32; j++)
      v[32*j +: 32] = mix(k, 2 * j + sel + 1);
    return v;
  endfunction

  // operands of word k, as MAXW-bit values; callers keep the low WIDTH bits
  function automatic logic [MAXW-1:0] exp_a(int unsigned k, int unsigned depth);
    return (k < depth / 2) ? '1 : hashed(k, 0);
  endfunction

  function automatic logic [MAXW-1:0] exp_b(int unsigned k, int unsigned depth);
    if (k < depth / 2) return (k % 2 == 1) ? '1 : '0;
    return hashed(k, 1);
  endfunction

  function automatic logic exp_cin(int unsigned k, int unsigned depth);
    return (k < depth / 2) ? 1'(k % 2) : (k % 3 == 0);
  endfunction

endpackage
