// tb_wallace_tree_4_2: self-check of the sixteen-operand 4:2 compressor tree.
// Sixteen 32-bit operands go in; sum + carry must equal the operands'
// total modulo 2^32. Cases: all zero, all ones, one operand at a time set
// (each tree input reaches the output), small operands whose total fits in
// 32 bits, and full-range random operands.
module tb_wallace_tree_4_2;
  localparam int unsigned W = 32;

  logic [W-1:0] op [16];
  logic [W-1:0] sum, carry;
  int           checks = 0;
  int           failures = 0;

  wallace_tree_4_2 #(.W(W)) dut (.op(op), .sum(sum), .carry(carry));

  task automatic check(input string what);
    logic [W-1:0] exp;
    #1;
    exp = '0;
    for (int i = 0; i < 16; i++) exp += op[i];
    checks++;
    if (W'(sum + carry) != exp) begin
      failures++;
      $display("FAIL %s: sum=%h carry=%h total=%h expected %h", what, sum, carry,
               W'(sum + carry), exp);
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
    for (int i = 0; i < 16; i++) op[i] = '0;
    check("zero");
    for (int i = 0; i < 16; i++) op[i] = '1;
    check("ones");
    for (int j = 0; j < 16; j++) begin
      for (int i = 0; i < 16; i++) op[i] = (i == j) ? W'($urandom) : '0;
      check("single");
    end
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < 16; i++) op[i] = W'($urandom) >> 4;
      check("fits");
    end
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < 16; i++) op[i] = W'($urandom);
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
