// tb_csla_widths -- the adder at the other widths the cell is cascaded to:
// 4, 16 and 32 bits.
//
// Three csla_proposed instances, one per width, share the same operand
// stream. The 4-bit adder is checked exhaustively (512 vectors); the 16 and
// 32-bit adders get corner cases (all-zero, all-one, alternating patterns,
// full-length carry ripple) followed by 20000 random vectors from $urandom.
// Each result is compared with a + b + cin computed here one bit wider than
// the adder. A watchdog ends the run with a failure if it does not finish.
module tb_csla_widths;

  localparam int NRAND = 20000;

  logic [3:0]  a4,  b4,  s4;
  logic [15:0] a16, b16, s16;
  logic [31:0] a32, b32, s32;
  logic        cin, co4, co16, co32;
  int checks   = 0;
  int failures = 0;
  int n_ripple16 = 0, n_ripple32 = 0;

  csla_proposed #(.WIDTH(4))  u_w4  (.a(a4),  .b(b4),  .cin(cin), .sum(s4),  .cout(co4));
  csla_proposed #(.WIDTH(16)) u_w16 (.a(a16), .b(b16), .cin(cin), .sum(s16), .cout(co16));
  csla_proposed #(.WIDTH(32)) u_w32 (.a(a32), .b(b32), .cin(cin), .sum(s32), .cout(co32));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_wide(input logic [31:0] x, input logic [31:0] y, input logic c);
    logic [16:0] e16;
    logic [32:0] e32;
    a16 = x[15:0]; b16 = y[15:0];
    a32 = x;       b32 = y;
    cin = c;
    #1;
    e16 = 17'(a16) + 17'(b16) + 17'(cin);
    e32 = 33'(a32) + 33'(b32) + 33'(cin);
    checks += 2;
    if ({co16, s16} !== e16) begin
      failures++;
      if (failures <= 10) $display("FAIL w16 a=%h b=%h cin=%b -> %b %h", a16, b16, cin, co16, s16);
    end
    if ({co32, s32} !== e32) begin
      failures++;
      if (failures <= 10) $display("FAIL w32 a=%h b=%h cin=%b -> %b %h", a32, b32, cin, co32, s32);
    end
    if (cin && (a16 ^ b16) == '1) n_ripple16++;
    if (cin && (a32 ^ b32) == '1) n_ripple32++;
  endtask

  initial begin
    logic [4:0] e4;
    a16 = '0; b16 = '0; a32 = '0; b32 = '0;
    // 4 bits: exhaustive
    for (int v = 0; v < 512; v++) begin
      {cin, a4, b4} = 9'(v);
      #1;
      e4 = 5'(a4) + 5'(b4) + 5'(cin);
      checks++;
      if ({co4, s4} !== e4) begin
        failures++;
        if (failures <= 10) $display("FAIL w4 a=%h b=%h cin=%b -> %b %h", a4, b4, cin, co4, s4);
      end
    end
    // 16 and 32 bits: corner cases
    for (int c = 0; c < 2; c++) begin
      check_wide(32'h0000_0000, 32'h0000_0000, 1'(c));
      check_wide(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'(c));
      check_wide(32'hFFFF_FFFF, 32'h0000_0000, 1'(c));
      check_wide(32'hAAAA_AAAA, 32'h5555_5555, 1'(c));
      check_wide(32'h5555_5555, 32'h5555_5555, 1'(c));
      check_wide(32'h8000_8000, 32'h8000_8000, 1'(c));
    end
    // random vectors
    for (int n = 0; n < NRAND; n++)
      check_wide($urandom, $urandom, 1'($urandom));
    $display("full-length ripples: 16-bit=%0d 32-bit=%0d", n_ripple16, n_ripple32);
    if (n_ripple16 == 0 || n_ripple32 == 0) begin
      failures++;
      $display("FAIL full-length carry ripple never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
