// tb_csla_proposed -- exhaustive end-to-end check of the adder at its
// default width.
//
// Every combination of a, b and cin (2^(2*WIDTH+1) vectors, 131072 for the
// default 8 bits) is applied for one time step and {cout, sum} is compared
// with a + b + cin computed here at full precision. The adder is left at its
// default parameters. Besides the result, the run counts how often each
// mechanism of the design was exercised and fails if one never was:
//   - bit 0 selecting the carry-in-0 pair (XOR/AND) and the carry-in-1 pair
//     (NOT/OR),
//   - a carry that ripples through the select of every bit from the carry-in
//     to cout (all bits propagate, cin = 1),
//   - a carry out of the top bit (cout = 1).
// A watchdog ends the run with a failure if it does not finish.
module tb_csla_proposed;

  localparam int unsigned W = 8;   // default width of csla_proposed

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int   checks   = 0;
  int   failures = 0;
  int   n_sel0 = 0, n_sel1 = 0, n_full_ripple = 0, n_cout = 0;

  csla_proposed u_dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #(64'd1 << (2 * W + 2));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] expected;
    for (longint v = 0; v < (64'd1 << (2 * W + 1)); v++) begin
      {cin, a, b} = (2 * W + 1)'(v);
      #1;
      expected = {1'b0, a} + {1'b0, b} + (W + 1)'(cin);
      checks++;
      if ({cout, sum} !== expected) begin
        failures++;
        if (failures <= 10)
          $display("FAIL a=%h b=%h cin=%b -> cout=%b sum=%h, expected %h",
                   a, b, cin, cout, sum, expected);
      end
      if (cin) n_sel1++; else n_sel0++;
      if (cin && ((a ^ b) == '1)) n_full_ripple++;
      if (cout) n_cout++;
    end
    $display("bit0 carry-in-0 selections=%0d carry-in-1 selections=%0d", n_sel0, n_sel1);
    $display("full-length carry ripples=%0d carry-outs=%0d", n_full_ripple, n_cout);
    if (n_sel0 == 0 || n_sel1 == 0 || n_full_ripple == 0 || n_cout == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
