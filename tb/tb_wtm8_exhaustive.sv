// Exhaustive test of the multiplier built at 8 x 8 bits (three-stage tree
// becomes two stages, 8 -> 4 -> 2 rows, and a 16-bit Kogge-Stone adder with
// 34 black and 15 grey cells). All 65536 operand pairs are compared with the
// column-level reference model and with A*B; the number of inexact products
// and the mean and worst relative error are printed.
module tb_wtm8_exhaustive;
  import wtm_ref_pkg::*;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;
  int n_approx = 0;
  real err_sum = 0.0, err_max = 0.0;

  wallace_mult_42_ksa #(.N(8)) dut (.A(a), .B(b), .sum(p));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned ref_v, exact;
    real rel;
    checks++;
    if (dut.u_ksa.N_BLACK != 34 || dut.u_ksa.N_GREY != 15) begin
      failures++;
      $display("FAIL final adder has %0d black and %0d grey cells",
               dut.u_ksa.N_BLACK, dut.u_ksa.N_GREY);
    end
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      #1;
      ref_v = approx_product(8, longint'(a), longint'(b));
      exact = longint'(a) * longint'(b);
      checks++;
      if (longint'(p) != ref_v || longint'(p) > exact) begin
        failures++;
        if (failures < 10) $display("FAIL %0d x %0d = %0d, model %0d", a, b, p, ref_v);
      end
      if (longint'(p) != exact) begin
        n_approx++;
        rel = real'(exact - longint'(p)) / real'(exact);
        err_sum += rel;
        if (rel > err_max) err_max = rel;
      end
    end
    $display("inexact products %0d of 65536, mean relative error %e, worst %e",
             n_approx, err_sum / 65536.0, err_max);
    checks++;
    if (n_approx == 0) begin
      failures++;
      $display("FAIL no inexact product");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
