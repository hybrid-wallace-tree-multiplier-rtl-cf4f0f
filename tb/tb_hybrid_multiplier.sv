// tb_hybrid_multiplier: end-to-end self-check of the 16 x 16 hybrid
// multiplier at its default size.
// Products are compared with the integer product a * b for corner cases
// (zero, one, all ones, walking ones) and random operands. The testbench
// also watches the design's mechanisms and counts a failure for any that
// never happened:
//   - carry-save output: the tree hands the final adder a non-zero carry
//     vector;
//   - compressor carry: a 4:2 compressor in the last tree row passes a
//     carry-out to the compressor of the next bit;
//   - long ripple: the final ripple carry adder carries through 8 or more
//     consecutive stages (worked out here from the adder's inputs).
// The design is combinational; each product is sampled 1 time unit after
// the operands change.
module tb_hybrid_multiplier;
  localparam int unsigned N = 16;
  localparam int unsigned W = 2 * N;

  logic [N-1:0] a, b;
  logic [W-1:0] p;
  int           checks = 0;
  int           failures = 0;
  int           n_carry_save = 0;
  int           n_cmp_carry = 0;
  int           n_long_ripple = 0;

  hybrid_multiplier dut (.a(a), .b(b), .p(p));

  // Longest run of consecutive carries when x + y is done by ripple carry.
  function automatic int longest_ripple(input logic [W-1:0] x, input logic [W-1:0] y);
    logic c;
    int   run, best;
    c = 1'b0; run = 0; best = 0;
    for (int i = 0; i < W; i++) begin
      c = (x[i] & y[i]) | ((x[i] ^ y[i]) & c);
      run = c ? run + 1 : 0;
      if (run > best) best = run;
    end
    return best;
  endfunction

  task automatic check(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [W-1:0] exp;
    a = x; b = y;
    #1;
    exp = W'(x) * W'(y);
    checks++;
    if (p != exp) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", x, y, p, exp);
    end
    if (dut.t_carry != '0) n_carry_save++;
    if (dut.u_tree.u_csa_l3.k[W-1:1] != '0) n_cmp_carry++;
    if (longest_ripple(dut.t_sum, dut.t_carry) >= 8) n_long_ripple++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0);
    check('1, '0);
    check('0, '1);
    check('1, '1);
    check(N'(1), '1);
    check('1, N'(1));
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        check(N'(1) << i, N'(1) << j);
    for (int i = 0; i < 100000; i++)
      check(N'($urandom), N'($urandom));

    $display("mechanisms: carry_save=%0d compressor_carry=%0d long_ripple=%0d",
             n_carry_save, n_cmp_carry, n_long_ripple);
    checks++;
    if (n_carry_save == 0) begin failures++; $display("FAIL carry-save output never seen"); end
    checks++;
    if (n_cmp_carry == 0) begin failures++; $display("FAIL compressor carry never seen"); end
    checks++;
    if (n_long_ripple == 0) begin failures++; $display("FAIL long ripple never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
