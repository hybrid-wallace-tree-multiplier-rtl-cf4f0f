// tb_hybrid_multiplier_small: exhaustive self-check of the hybrid
// multiplier at reduced operand widths.
// A 4 x 4 and an 8 x 8 instance are checked against a * b for every pair of
// operands. At these sizes only 4 or 8 of the tree's sixteen inputs carry
// partial products and the rest are tied to zero, which the default-size
// test never exercises.
module tb_hybrid_multiplier_small;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  int          checks = 0;
  int          failures = 0;

  hybrid_multiplier #(.N(4)) dut4 (.a(a4), .b(b4), .p(p4));
  hybrid_multiplier #(.N(8)) dut8 (.a(a8), .b(b8), .p(p8));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      checks++;
      if (int'(p4) != int'(a4) * int'(b4)) begin
        failures++;
        $display("FAIL 4x4 %0d * %0d = %0d", a4, b4, p4);
      end
    end
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      #1;
      checks++;
      if (int'(p8) != int'(a8) * int'(b8)) begin
        failures++;
        $display("FAIL 8x8 %0d * %0d = %0d", a8, b8, p8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
