// tb_pg_precompute: random check of the pre-computation stage.
// Column 0 must be (cin, 0); for every bit, 2*g + p must equal a + b of that bit
// (g is the half-adder carry, p the half-adder sum).
module tb_pg_precompute;
  localparam int W = 16;

  logic [W-1:0] a, b;
  logic         cin;
  logic [W:0]   g, p;
  int           checks = 0, failures = 0;

  pg_precompute #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .g(g), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      a = W'($urandom); b = W'($urandom); cin = 1'($urandom);
      #1;
      checks++;
      if (g[0] !== cin || p[0] !== 1'b0) begin
        failures++;
        $display("FAIL column 0: g=%b p=%b cin=%b", g[0], p[0], cin);
      end
      for (int i = 0; i < W; i++) begin
        checks++;
        if (2 * int'(g[i+1]) + int'(p[i+1]) != int'(a[i]) + int'(b[i])) begin
          failures++;
          $display("FAIL bit %0d: a=%b b=%b g=%b p=%b", i, a[i], b[i], g[i+1], p[i+1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
