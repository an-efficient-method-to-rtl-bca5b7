// tb_csla_bit -- exhaustive self-check of the one-bit carry-select cell.
//
// The expected sum and carry come from the cell's truth table, written out
// below as a constant (row index {cin, a, b}); they are not derived from the
// cell's gates. Each of the eight rows is applied for one time step. A
// watchdog ends the run with a failure if it does not finish.
module tb_csla_bit;

  logic a, b, cin, sum, cout;
  int   checks   = 0;
  int   failures = 0;

  // {sum, carry} for rows cin,a,b = 000 ... 111
  localparam logic [1:0] TRUTH [8] = '{
    2'b00, 2'b10, 2'b10, 2'b01,
    2'b10, 2'b01, 2'b01, 2'b11
  };

  csla_bit u_dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {cin, a, b} = 3'(v);
      #1;
      checks++;
      if ({sum, cout} !== TRUTH[v]) begin
        failures++;
        $display("FAIL cin=%b a=%b b=%b -> sum=%b carry=%b, expected sum=%b carry=%b",
                 cin, a, b, sum, cout, TRUTH[v][1], TRUTH[v][0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
