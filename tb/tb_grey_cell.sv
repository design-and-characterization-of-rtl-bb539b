// tb_grey_cell: exhaustive check of the generate-only carry operator.
// The lower span reaches the carry-in column, so its generate is the carry into the upper
// span; the output must be the carry out of the upper span, i.e. what a one-bit add of the
// upper span's (g,p) with that carry produces.
module tb_grey_cell;
  import adder_pkg::*;

  gp_t  left;
  logic g_right, g_out;
  int   checks = 0, failures = 0;

  grey_cell dut (.left(left), .g_right(g_right), .g_out(g_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int v = 0; v < 8; v++) begin
      {left, g_right} = 3'(v);
      #1;
      case ({left.g, left.p})
        2'b10:   exp = 1'b1;      // generates whatever comes in
        2'b01:   exp = g_right;   // passes the incoming carry on
        2'b11:   exp = 1'b1;
        default: exp = 1'b0;      // kills the carry
      endcase
      checks++;
      if (g_out !== exp) begin
        failures++;
        $display("FAIL left=%b g_right=%b g_out=%b exp=%b", left, g_right, g_out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
