// End-to-end test of the 16 x 16 approximate multiplier at its default size.
//  - The operand pair 41088 x 43273 must give 1778001024 (its exact product,
//    which the reference design's simulation also shows).
//  - Corner operands and 20000 random pairs are compared with a column-level
//    reference model of the approximate tree (wtm_ref_pkg); the product must
//    also never exceed A*B.
//  - The mechanisms are counted and each must occur: products the
//    approximation makes smaller than A*B, exact products, and final
//    additions where the Kogge-Stone adder carries over 8 or more bit
//    positions. The mean and worst relative error are printed.
module tb_wallace_mult_42_ksa;
  import wtm_ref_pkg::*;
  logic [15:0] A, B;
  logic [31:0] sum;
  int checks = 0, failures = 0;
  int n_approx = 0, n_exact = 0, n_long_carry = 0;
  real err_sum = 0.0, err_max = 0.0;
  int n_nonzero = 0;

  wallace_mult_42_ksa dut (.A(A), .B(B), .sum(sum));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Longest run of bit positions a carry travels through in row_s + row_c.
  function automatic int longest_carry(input logic [31:0] x, input logic [31:0] y);
    int run, best;
    logic cy;
    run = 0; best = 0; cy = 1'b0;
    for (int i = 0; i < 32; i++) begin
      if (x[i] & y[i]) begin
        cy = 1'b1; run = 1;
      end else if ((x[i] ^ y[i]) && cy) begin
        run++;
      end else begin
        cy = 1'b0; run = 0;
      end
      if (run > best) best = run;
    end
    return best;
  endfunction

  task automatic check();
    longint unsigned ref_v, exact;
    real rel;
    #1;
    ref_v = approx_product(16, longint'(A), longint'(B));
    exact = longint'(A) * longint'(B);
    checks++;
    if (longint'(sum) != ref_v || longint'(sum) > exact) begin
      failures++;
      $display("FAIL A=%0d B=%0d sum=%0d, model %0d, exact %0d", A, B, sum, ref_v, exact);
    end
    if (longint'(sum) < exact) n_approx++;
    else n_exact++;
    if (longest_carry(dut.row_s, dut.row_c) >= 8) n_long_carry++;
    if (exact != 0) begin
      rel = real'(exact - longint'(sum)) / real'(exact);
      err_sum += rel;
      n_nonzero++;
      if (rel > err_max) err_max = rel;
    end
  endtask

  initial begin
    A = 16'd41088; B = 16'd43273; #1;
    checks++;
    if (sum != 32'd1778001024) begin
      failures++;
      $display("FAIL 41088 x 43273 = %0d, expected 1778001024", sum);
    end
    A = '0; B = '0; check();
    A = '1; B = '1; check();
    A = '1; B = 16'd1; check();
    A = 16'h8000; B = 16'h8000; check();
    for (int i = 0; i < 20000; i++) begin
      A = 16'($urandom);
      B = 16'($urandom);
      check();
    end
    $display("approximate products %0d, exact products %0d, long final carries %0d",
             n_approx, n_exact, n_long_carry);
    $display("mean relative error %e, worst %e", err_sum / n_nonzero, err_max);
    checks += 3;
    if (n_approx == 0) begin failures++; $display("FAIL no approximate product seen"); end
    if (n_exact == 0) begin failures++; $display("FAIL no exact product seen"); end
    if (n_long_carry == 0) begin failures++; $display("FAIL no long carry seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
