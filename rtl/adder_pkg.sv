// adder_pkg: types shared by the prefix-adder modules.
// A (generate, propagate) pair describes how a span of bit positions treats a carry:
// g=1 means the span produces a carry by itself, p=1 means it passes an incoming carry on.
// All prefix cells of the carry tree take and return this pair.
package adder_pkg;

  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

endpackage
