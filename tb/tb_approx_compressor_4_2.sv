// Exhaustive test of the approximate 4:2 compressor. For each of the 16
// inputs the output value s + 2*c must equal the number of ones, less one when
// x1, x2 and x3 are all 1. The test also counts the inputs where the output
// differs from the exact count and requires exactly 2 of 16, both with
// error -1.
module tb_approx_compressor_4_2;
  logic x1, x2, x3, x4, s, c;
  int checks = 0, failures = 0;
  int wrong = 0;

  approx_compressor_4_2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .s(s), .c(c));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exact, expect_v, got;
    for (int v = 0; v < 16; v++) begin
      {x4, x3, x2, x1} = 4'(v);
      #1;
      exact    = int'(x1) + int'(x2) + int'(x3) + int'(x4);
      expect_v = exact - ((x1 && x2 && x3) ? 1 : 0);
      got      = int'(s) + 2 * int'(c);
      checks++;
      if (got != expect_v) begin
        failures++;
        $display("FAIL x=%b%b%b%b -> %0d, expected %0d", x4, x3, x2, x1, got, expect_v);
      end
      if (got != exact) begin
        wrong++;
        checks++;
        if (exact - got != 1) begin
          failures++;
          $display("FAIL error of %0d for x=%b%b%b%b", exact - got, x4, x3, x2, x1);
        end
      end
    end
    checks++;
    if (wrong != 2) begin
      failures++;
      $display("FAIL %0d of 16 inputs wrong, expected 2", wrong);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
