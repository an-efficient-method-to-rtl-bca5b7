// tb_csla_mux2 -- exhaustive self-check of the 2:1 multiplexer.
//
// Applies all eight combinations of s, i0 and i1, one per time step, and
// compares o with the selected input worked out here (i0 for s = 0, i1 for
// s = 1). A watchdog ends the run with a failure if it does not finish.
module tb_csla_mux2;

  logic s, i0, i1, o;
  int   checks   = 0;
  int   failures = 0;

  csla_mux2 u_dut (.s(s), .i0(i0), .i1(i1), .o(o));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    for (int v = 0; v < 8; v++) begin
      {s, i1, i0} = 3'(v);
      #1;
      expected = s ? i1 : i0;
      checks++;
      if (o !== expected) begin
        failures++;
        $display("FAIL s=%b i0=%b i1=%b o=%b expected %b", s, i0, i1, o, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
