// tb_black_cell: exhaustive check of the black (generate/propagate) carry operator.
// For all 16 input pairs it checks the operator by its meaning: a span described by (g,p)
// turns a carry-in c into g | p&c, so the joined span must act on c exactly as the lower
// span followed by the upper span does, for c = 0 and c = 1.
module tb_black_cell;
  import adder_pkg::*;

  gp_t left, right, out;
  int  checks = 0, failures = 0;

  black_cell dut (.left(left), .right(right), .out(out));

  function automatic logic span(gp_t s, logic c);
    return s.g | (s.p & c);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {left, right} = 4'(v);
      #1;
      for (int c = 0; c < 2; c++) begin
        checks++;
        if (span(out, 1'(c)) !== span(left, span(right, 1'(c)))) begin
          failures++;
          $display("FAIL left=%b right=%b c=%0d out=%b", left, right, c, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
