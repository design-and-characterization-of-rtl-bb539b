// tb_sparse_ks_adder: checks the sparse Kogge-Stone adder against integer addition.
// Instances: the default 16-bit adder with 4-bit ripple blocks, the same with mux-form
// (fast carry) cells, and a dense 16-bit Kogge-Stone (1-bit blocks). Operands are random,
// random with long propagate runs, and the directed worst cases: all columns propagating with
// cin = 1, all generating, and the alternation between those two states.
module tb_sparse_ks_adder;
  localparam int W = 16;

  logic [W-1:0] a, b;
  logic         cin;
  logic [W:0]   res0, res1, res2;
  int           checks = 0, failures = 0;

  sparse_ks_adder dut (.a(a), .b(b), .cin(cin), .sum(res0[W-1:0]), .cout(res0[W]));
  sparse_ks_adder #(.WIDTH(W), .RCA_WIDTH(4), .FAST_CARRY(1'b1)) dut_fcl (
    .a(a), .b(b), .cin(cin), .sum(res1[W-1:0]), .cout(res1[W]));
  sparse_ks_adder #(.WIDTH(W), .RCA_WIDTH(1), .FAST_CARRY(1'b0)) dut_dense (
    .a(a), .b(b), .cin(cin), .sum(res2[W-1:0]), .cout(res2[W]));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W:0] exp;
    #1;
    exp = (W+1)'(a) + (W+1)'(b) + (W+1)'(cin);
    checks += 3;
    if (res0 !== exp) begin failures++; $display("FAIL sparse  a=%h b=%h cin=%b got %h exp %h", a, b, cin, res0, exp); end
    if (res1 !== exp) begin failures++; $display("FAIL fcl     a=%h b=%h cin=%b got %h exp %h", a, b, cin, res1, exp); end
    if (res2 !== exp) begin failures++; $display("FAIL dense   a=%h b=%h cin=%b got %h exp %h", a, b, cin, res2, exp); end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) begin
      a = '1; b = '0; cin = 1'b1; check();
      a = '1; b = '1; cin = 1'b0; check();
      a = '1; b = '0; cin = 1'b0; check();
      a = '1; b = '1; cin = 1'b1; check();
    end
    for (int n = 0; n < 3000; n++) begin
      a = W'($urandom); b = W'($urandom); cin = 1'($urandom);
      if (n % 3 == 0) b = ~a ^ W'(1 << (n % W));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
