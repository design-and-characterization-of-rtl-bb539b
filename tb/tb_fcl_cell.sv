// tb_fcl_cell: check of the mux-form (Fast Carry Logic) carry operator.
// For every pair of legal spans (g and p never both 1, as pre-computation produces) it checks
// that the joined span turns each carry-in into the same carry-out as the two spans in
// series, and that the output is again a legal span.
module tb_fcl_cell;
  import adder_pkg::*;

  gp_t left, right, out;
  int  checks = 0, failures = 0;

  fcl_cell dut (.left(left), .right(right), .out(out));

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
      gp_t l, r;
      {l, r} = 4'(v);
      if ((l.g & l.p) | (r.g & r.p)) continue;   // only legal spans are applied
      left = l; right = r;
      #1;
      for (int c = 0; c < 2; c++) begin
        checks++;
        if (span(out, 1'(c)) !== span(left, span(right, 1'(c)))) begin
          failures++;
          $display("FAIL left=%b right=%b c=%0d out=%b", left, right, c, out);
        end
      end
      checks++;
      if (out.g & out.p) begin
        failures++;
        $display("FAIL output span not legal: left=%b right=%b out=%b", left, right, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
