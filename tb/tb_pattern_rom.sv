// tb_pattern_rom: reads every word of the pattern ROM and checks it and the read latency.
// Expected words: in the first half, even addresses hold a = all ones, b = 0, cin = 0 and odd
// addresses a = b = all ones, cin = 1; the second half holds the hash-generated operands,
// recomputed by pattern_model_pkg from their definition (multiplicative hash of the word index), with
// cin = 1 when the index is a multiple of 3. Data must appear one clock after the address.
module tb_pattern_rom;
  import pattern_model_pkg::*;

  localparam int W = 16;
  localparam int D = 16;

  logic                 clk = 0;
  logic [$clog2(D)-1:0] addr;
  logic [W-1:0]         a, b;
  logic                 cin;
  int                   checks = 0, failures = 0;

  always #5 clk = ~clk;

  pattern_rom #(.WIDTH(W), .DEPTH(D)) dut (.clk(clk), .addr(addr), .a(a), .b(b), .cin(cin));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] ea, eb;
    logic         ec;
    for (int k = 0; k < D; k++) begin
      @(negedge clk) addr = $clog2(D)'(k);
      @(negedge clk);
      ea = W'(exp_a(k, D)); eb = W'(exp_b(k, D)); ec = exp_cin(k, D);
      checks++;
      if ({ec, eb, ea} !== {cin, b, a}) begin
        failures++;
        $display("FAIL word %0d: got %b %h %h exp %b %h %h", k, cin, b, a, ec, eb, ea);
      end
      // latency: a new address must not change the data before the next clock edge
      addr = $clog2(D)'(k + 1);
      #1;
      checks++;
      if ({ec, eb, ea} !== {cin, b, a}) begin
        failures++;
        $display("FAIL word %0d changed before a clock edge", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
