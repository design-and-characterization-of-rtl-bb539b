// tb_adder_test_top: end-to-end test of the adder test circuit at its default parameters
// (16-bit sparse Kogge-Stone adder, 4-bit ripple blocks, 16-word pattern ROM).
// A reference model in the testbench tracks the address counter and the one-clock ROM
// latency; at every falling edge the outputs are compared with the model: with the switch
// on the adder, {cout, sum} must equal a + b + cin of the applied pattern; with the switch
// on bypass, {cin, a}. 'step' and the switch are driven pseudo-randomly, and one reset is
// applied mid-run. Each mechanism of the circuit is counted and must occur: adder and bypass
// selection, all-propagate and all-generate patterns, the switch from all-propagate to
// all-generate (every carry toggles), hashed patterns, held address, address wrap, reset.
module tb_adder_test_top;
  import pattern_model_pkg::*;

  localparam int W  = 16;
  localparam int D  = 16;
  localparam int AW = $clog2(D);

  logic          clk = 0;
  logic          rst_n, step, sel_adder;
  logic [AW-1:0] pattern_addr;
  logic [W-1:0]  out_sum;
  logic          out_cout;
  int            checks = 0, failures = 0;

  // model state
  int m_addr, m_pat, prev_pat;
  bit m_valid;

  // mechanism counters
  int n_adder, n_bypass, n_prop, n_gen, n_toggle, n_hashed, n_hold, n_wrap, n_reset;

  always #5 clk = ~clk;

  adder_test_top dut (
    .clk(clk), .rst_n(rst_n), .step(step), .sel_adder(sel_adder),
    .pattern_addr(pattern_addr), .out_sum(out_sum), .out_cout(out_cout)
  );

  always @(posedge clk) begin
    if (!rst_n) begin
      m_addr  <= 0;
      m_pat   <= 0;
      m_valid <= 1'b0;
    end else begin
      m_pat   <= m_addr;
      m_valid <= 1'b1;
      if (step) begin
        if (m_addr == D - 1) n_wrap++;
        m_addr <= (m_addr + 1) % D;
      end else begin
        n_hold++;
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs();
    logic [W-1:0] a, b;
    logic         c;
    logic [W:0]   exp;
    a = W'(exp_a(m_pat, D)); b = W'(exp_b(m_pat, D)); c = exp_cin(m_pat, D);
    exp = sel_adder ? (W+1)'(a) + (W+1)'(b) + (W+1)'(c) : {c, a};
    checks++;
    if (pattern_addr !== AW'(m_pat)) begin
      failures++;
      $display("FAIL pattern_addr=%0d expected %0d", pattern_addr, m_pat);
    end
    checks++;
    if ({out_cout, out_sum} !== exp) begin
      failures++;
      $display("FAIL pattern %0d sel=%b: got %h expected %h", m_pat, sel_adder, {out_cout, out_sum}, exp);
    end
    if (sel_adder) begin
      n_adder++;
      if (m_pat < D / 2 && m_pat % 2 == 0) n_prop++;
      if (m_pat < D / 2 && m_pat % 2 == 1) begin
        n_gen++;
        if (prev_pat < D / 2 && prev_pat % 2 == 0 && prev_pat != m_pat) n_toggle++;
      end
      if (m_pat >= D / 2) n_hashed++;
    end else begin
      n_bypass++;
    end
    prev_pat = m_pat;
  endtask

  initial begin
    rst_n = 1'b0; step = 1'b0; sel_adder = 1'b1; prev_pat = -1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    n_reset++;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      if (m_valid) begin
        check_outputs();
        sel_adder = 1'b0;      // the switch flips between samples: check the bypass leg too
        #1 check_outputs();
        sel_adder = 1'b1;
        #1 check_outputs();
      end
      step      = ($urandom % 8) != 0;
      sel_adder = ($urandom % 4) != 0;
      if (cyc == 200) begin
        rst_n = 1'b0;
        @(negedge clk) rst_n = 1'b1;
        n_reset++;
        prev_pat = -1;
      end
    end
    $display("mechanisms: adder=%0d bypass=%0d all_propagate=%0d all_generate=%0d carry_toggle=%0d hashed=%0d hold=%0d wrap=%0d reset=%0d",
             n_adder, n_bypass, n_prop, n_gen, n_toggle, n_hashed, n_hold, n_wrap, n_reset);
    if (n_adder == 0)  begin failures++; $display("FAIL adder path never selected"); end
    if (n_bypass == 0) begin failures++; $display("FAIL bypass path never selected"); end
    if (n_prop == 0)   begin failures++; $display("FAIL all-propagate pattern never applied"); end
    if (n_gen == 0)    begin failures++; $display("FAIL all-generate pattern never applied"); end
    if (n_toggle == 0) begin failures++; $display("FAIL propagate-to-generate switch never seen"); end
    if (n_hashed == 0) begin failures++; $display("FAIL hashed pattern never applied"); end
    if (n_hold == 0)   begin failures++; $display("FAIL address never held"); end
    if (n_wrap == 0)   begin failures++; $display("FAIL address never wrapped"); end
    if (n_reset < 2)   begin failures++; $display("FAIL mid-run reset not applied"); end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
