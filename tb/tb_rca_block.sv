// tb_rca_block: exhaustive check of the 4-bit ripple-carry sum block.
// For every a, b (4 bits) and carry-in it feeds g = a&b, p = a^b and checks the sum
// against the low 4 bits of the integer a + b + cin.
module tb_rca_block;
  localparam int W = 4;

  logic [W-1:0] a, b, g, p, sum;
  logic         cin;
  int           checks = 0, failures = 0;

  assign g = a & b;
  assign p = a ^ b;

  rca_block #(.WIDTH(W)) dut (.g(g), .p(p), .cin(cin), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * W + 1)); v++) begin
      {cin, b, a} = (2 * W + 1)'(v);
      #1;
      checks++;
      if (sum !== W'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b sum=%h", a, b, cin, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
