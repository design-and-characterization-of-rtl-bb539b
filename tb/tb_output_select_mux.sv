// tb_output_select_mux: random check that the output follows adder_in when sel = 1 and
// bypass_in when sel = 0.
module tb_output_select_mux;
  localparam int W = 17;

  logic         sel;
  logic [W-1:0] adder_in, bypass_in, y;
  int           checks = 0, failures = 0;

  output_select_mux #(.WIDTH(W)) dut (.sel(sel), .adder_in(adder_in), .bypass_in(bypass_in), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 100; n++) begin
      sel = 1'(n % 2); adder_in = W'($urandom); bypass_in = W'($urandom);
      #1;
      checks++;
      if (y !== (n % 2 == 1 ? adder_in : bypass_in)) begin
        failures++;
        $display("FAIL sel=%b adder_in=%h bypass_in=%h y=%h", sel, adder_in, bypass_in, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
