// tb_rca: self-check of the ripple carry adder.
// A 32-bit adder (the multiplier's final adder) gets corner cases, among
// them all-ones + 1 which makes the carry ripple through every stage, and
// random operands; a 4-bit adder, the size of the four-cell drawing, is
// checked exhaustively. Expected values are plain integer sums.
module tb_rca;
  localparam int unsigned W = 32;

  logic [W-1:0] a, b, s;
  logic         cin, cout;
  logic [3:0]   a4, b4, s4;
  logic         cin4, cout4;
  int           checks = 0;
  int           failures = 0;

  rca #(.W(W)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  rca #(.W(4)) dut4 (.a(a4), .b(b4), .cin(cin4), .s(s4), .cout(cout4));

  task automatic check32(input logic [W-1:0] x, input logic [W-1:0] y, input logic ci);
    logic [W:0] exp;
    a = x; b = y; cin = ci;
    #1;
    exp = {1'b0, x} + {1'b0, y} + (W+1)'(ci);
    checks++;
    if ({cout, s} != exp) begin
      failures++;
      $display("FAIL %h + %h + %b = %h, expected %h", x, y, ci, {cout, s}, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check32('1, '0, 1'b1);          // carry ripples through all 32 stages
    check32('1, 32'd1, 1'b0);
    check32('1, '1, 1'b1);
    check32('0, '0, 1'b0);
    check32(32'h8000_0000, 32'h8000_0000, 1'b0);
    for (int i = 0; i < 20000; i++)
      check32($urandom, $urandom, 1'($urandom));

    for (int v = 0; v < 512; v++) begin
      {cin4, a4, b4} = 9'(v);
      #1;
      checks++;
      if ({cout4, s4} != 5'(int'(a4) + int'(b4) + int'(cin4))) begin
        failures++;
        $display("FAIL 4-bit %h + %h + %b = %h", a4, b4, cin4, {cout4, s4});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
