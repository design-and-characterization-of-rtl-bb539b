// tb_sparse_ks_carry_tree: checks the trimmed Kogge-Stone carry network in several shapes.
// Each configuration (width, carry interval, cell style) gets (g,p) formed from random and
// directed operands; every carry it outputs is compared with the carry into that bit taken
// from integer addition of the operands' low bits plus cin. Directed patterns: every column
// propagating with cin = 1 (the carry must cross the whole word), every column generating,
// and alternating columns.
module tb_sparse_ks_carry_tree;
  localparam int NCFG = 7;
  localparam int MAXW = 32;
  localparam int CW [NCFG] = '{16, 16, 16, 16, 32, 12, 12};
  localparam int CI [NCFG] = '{ 4,  4,  1,  2,  8,  4,  3};
  localparam bit CF [NCFG] = '{ 0,  1,  0,  0,  0,  0,  1};

  logic [MAXW-1:0] a, b;
  logic            cin;
  logic [MAXW-1:0] carry_o [NCFG];
  int              checks = 0, failures = 0;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int W = CW[c];
    localparam int I = CI[c];
    logic [W:0]     g, p;
    logic [W/I-1:0] carry;
    assign g = {a[W-1:0] & b[W-1:0], cin};
    assign p = {a[W-1:0] ^ b[W-1:0], 1'b0};
    sparse_ks_carry_tree #(.WIDTH(W), .INTERVAL(I), .FAST_CARRY(CF[c])) dut (
      .g(g), .p(p), .carry(carry)
    );
    assign carry_o[c] = MAXW'(carry);
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    logic [MAXW:0] s, mask;
    #1;
    for (int c = 0; c < NCFG; c++) begin
      for (int k = 0; k < CW[c] / CI[c]; k++) begin
        int n = (k + 1) * CI[c];
        mask = ((MAXW+1)'(1) << n) - 1'b1;
        s = ((MAXW+1)'(a) & mask) + ((MAXW+1)'(b) & mask) + (MAXW+1)'(cin);
        checks++;
        if (carry_o[c][k] !== s[n]) begin
          failures++;
          $display("FAIL cfg %0d carry into bit %0d: a=%h b=%h cin=%b got %b", c, n, a, b, cin, carry_o[c][k]);
        end
      end
    end
  endtask

  initial begin
    a = '1; b = '0; cin = 1'b1; check_all();   // every column propagates, carry crosses all
    a = '1; b = '0; cin = 1'b0; check_all();
    a = '1; b = '1; cin = 1'b0; check_all();   // every column generates
    a = {(MAXW/2){2'b10}}; b = {(MAXW/2){2'b11}}; cin = 1'b1; check_all();
    for (int n = 0; n < 500; n++) begin
      a = MAXW'($urandom); b = MAXW'($urandom); cin = 1'($urandom);
      if (n % 4 == 0) b = ~a ^ MAXW'(1 << (n % MAXW));   // long propagate runs
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
