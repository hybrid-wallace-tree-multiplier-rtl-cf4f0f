// tb_compressor_4_2: exhaustive self-check of the one-bit 4:2 compressor.
// For all 32 input combinations it checks the counting identity
// x0+x1+x2+x3+ci = s + 2*(c+co), the parity sum, and that co is the same
// for ci = 0 and ci = 1 (no carry propagation through the compressor).
module tb_compressor_4_2;
  logic [3:0] x;
  logic       ci, s, c, co;
  logic       co_ci0;
  int         checks = 0;
  int         failures = 0;

  compressor_4_2 dut (.x(x), .ci(ci), .s(s), .c(c), .co(co));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      for (int k = 0; k < 2; k++) begin
        int ones;
        ci = 1'(k);
        #1;
        ones = $countones(x) + k;
        checks++;
        if (int'(s) + 2 * (int'(c) + int'(co)) != ones) begin
          failures++;
          $display("FAIL count x=%b ci=%b -> s=%b c=%b co=%b", x, ci, s, c, co);
        end
        checks++;
        if (s != 1'(ones)) begin
          failures++;
          $display("FAIL parity x=%b ci=%b -> s=%b", x, ci, s);
        end
        if (k == 0) co_ci0 = co;
        else begin
          checks++;
          if (co != co_ci0) begin
            failures++;
            $display("FAIL co depends on ci for x=%b", x);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
