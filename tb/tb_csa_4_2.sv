// tb_csa_4_2: self-check of the W-bit 4:2 carry-save compressor row.
// Checks x0+x1+x2+x3+ci = s + 2*c + 2^W*co in 35-bit arithmetic for a
// 32-bit row with corner and random operands, and exhaustively over all
// operand and carry-in values of a 2-bit row.
module tb_csa_4_2;
  localparam int unsigned W = 32;

  logic [W-1:0] x0, x1, x2, x3, s, c;
  logic         ci, co;
  logic [1:0]   y0, y1, y2, y3, s2, c2;
  logic         ci2, co2;
  int           checks = 0;
  int           failures = 0;

  csa_4_2 #(.W(W)) dut (.x0(x0), .x1(x1), .x2(x2), .x3(x3), .ci(ci),
                        .s(s), .c(c), .co(co));
  csa_4_2 #(.W(2)) dut2 (.x0(y0), .x1(y1), .x2(y2), .x3(y3), .ci(ci2),
                         .s(s2), .c(c2), .co(co2));

  task automatic check(input logic [W-1:0] a0, input logic [W-1:0] a1,
                       input logic [W-1:0] a2, input logic [W-1:0] a3,
                       input logic cin);
    logic [W+2:0] lhs, rhs;
    x0 = a0; x1 = a1; x2 = a2; x3 = a3; ci = cin;
    #1;
    lhs = (W+3)'(a0) + (W+3)'(a1) + (W+3)'(a2) + (W+3)'(a3) + (W+3)'(cin);
    rhs = (W+3)'(s) + ((W+3)'(c) << 1) + ((W+3)'(co) << W);
    checks++;
    if (lhs != rhs) begin
      failures++;
      $display("FAIL %h %h %h %h ci=%b: s=%h c=%h co=%b", a0, a1, a2, a3, cin, s, c, co);
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
    check('1, '1, '1, '1, 1'b1);
    check('0, '0, '0, '0, 1'b0);
    check('1, '0, '0, '0, 1'b1);
    check(32'h5555_5555, 32'haaaa_aaaa, 32'h5555_5555, 32'haaaa_aaaa, 1'b0);
    for (int i = 0; i < 20000; i++)
      check($urandom, $urandom, $urandom, $urandom, 1'($urandom));

    for (int v = 0; v < 512; v++) begin
      {ci2, y3, y2, y1, y0} = 9'(v);
      #1;
      checks++;
      if (int'(y0) + int'(y1) + int'(y2) + int'(y3) + int'(ci2)
          != int'(s2) + 2 * int'(c2) + 4 * int'(co2)) begin
        failures++;
        $display("FAIL 2-bit %h %h %h %h ci=%b", y0, y1, y2, y3, ci2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
