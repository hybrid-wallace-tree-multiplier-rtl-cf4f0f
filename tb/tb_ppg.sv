// tb_ppg: self-check of the 16 x 16 partial product generator.
// Each partial product must equal (b[i] ? a : 0) shifted left by i, and
// the sixteen together must add up to a * b.
module tb_ppg;
  localparam int unsigned N = 16;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] pp [N];
  int             checks = 0;
  int             failures = 0;

  ppg #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  task automatic check(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [2*N-1:0] total;
    a = x; b = y;
    #1;
    total = '0;
    for (int i = 0; i < N; i++) begin
      logic [2*N-1:0] exp;
      exp = y[i] ? ((2*N)'(x) << i) : '0;
      total += pp[i];
      checks++;
      if (pp[i] != exp) begin
        failures++;
        $display("FAIL a=%h b=%h pp[%0d]=%h expected %h", x, y, i, pp[i], exp);
      end
    end
    checks++;
    if (total != (2*N)'(x) * (2*N)'(y)) begin
      failures++;
      $display("FAIL a=%h b=%h sum of pp=%h", x, y, total);
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
    check('1, '1);
    check('0, '1);
    check('1, '0);
    for (int i = 0; i < N; i++) check(N'($urandom), N'(1) << i);
    for (int i = 0; i < 2000; i++) check(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
