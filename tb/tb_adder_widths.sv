// tb_adder_widths: the sparse Kogge-Stone adder at every bit width evaluated for it:
// 4, 8, 16, 32, 64, 128 and 256 bits, each with 4-bit ripple blocks, built once with AND-OR
// (black/grey) cells and once with mux-form fast-carry cells. Every instance is checked
// against integer addition on the worst-case patterns (all columns propagating with
// cin = 1, all generating, and the alternation of the two) and on random operands,
// including operands with long propagate runs.
module tb_adder_widths;
  localparam int NW   = 7;
  localparam int MAXW = 256;
  localparam int WS [NW] = '{4, 8, 16, 32, 64, 128, 256};

  logic [MAXW-1:0] a, b;
  logic            cin;
  logic [MAXW:0]   res [NW][2];
  int              checks = 0, failures = 0;

  for (genvar w = 0; w < NW; w++) begin : g_w
    for (genvar f = 0; f < 2; f++) begin : g_f
      localparam int W = WS[w];
      logic [W-1:0] sum;
      logic         cout;
      sparse_ks_adder #(.WIDTH(W), .RCA_WIDTH(4), .FAST_CARRY(f == 1)) dut (
        .a(a[W-1:0]), .b(b[W-1:0]), .cin(cin), .sum(sum), .cout(cout)
      );
      assign res[w][f] = (MAXW+1)'({cout, sum});
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [MAXW:0] mask, exp;
    #1;
    for (int w = 0; w < NW; w++) begin
      mask = ((MAXW+1)'(1) << WS[w]) - 1'b1;
      exp  = ((MAXW+1)'(a) & mask) + ((MAXW+1)'(b) & mask) + (MAXW+1)'(cin);
      exp  = exp & ((mask << 1) | (MAXW+1)'(1));
      for (int f = 0; f < 2; f++) begin
        checks++;
        if (res[w][f] !== exp) begin
          failures++;
          $display("FAIL width %0d fast_carry=%0d: a=%h b=%h cin=%b", WS[w], f, a, b, cin);
        end
      end
    end
  endtask

  function automatic logic [MAXW-1:0] rand_wide();
    logic [MAXW-1:0] v;
    for (int j = 0; j < MAXW / 32; j++) v[32*j +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    for (int k = 0; k < 3; k++) begin
      a = '1; b = '0; cin = 1'b1; check();
      a = '1; b = '1; cin = 1'b0; check();
      a = '1; b = '0; cin = 1'b0; check();
      a = '1; b = '1; cin = 1'b1; check();
    end
    for (int n = 0; n < 1000; n++) begin
      a = rand_wide(); b = rand_wide(); cin = 1'($urandom);
      if (n % 2 == 0) b = ~a ^ (MAXW'(1) << ($urandom % MAXW));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
