// Test of the reduction tree at its default size (16 rows). The partial
// product rows are formed here from random and corner operands; the two
// output rows must add up (mod 2^32) to the reference model's approximate
// product, which is never above A*B. Operands with a single bit set in B
// give one non-zero row, where the result must be exact.
module tb_wallace_reduce;
  import wtm_ref_pkg::*;
  localparam int N = 16;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] pp [N];
  logic [2*N-1:0] row_s, row_c;
  int checks = 0, failures = 0;

  wallace_reduce dut (.pp(pp), .row_s(row_s), .row_c(row_c));

  always_comb
    for (int j = 0; j < N; j++) pp[j] = b[j] ? ((2*N)'(a) << j) : '0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint unsigned got, ref_v, exact;
    #1;
    got   = (longint'(row_s) + longint'(row_c)) & 64'hFFFF_FFFF;
    ref_v = approx_product(N, longint'(a), longint'(b));
    exact = longint'(a) * longint'(b);
    checks++;
    if (got != ref_v || ref_v > exact) begin
      failures++;
      $display("FAIL a=%h b=%h rows sum %h, model %h, exact %h", a, b, got, ref_v, exact);
    end
  endtask

  initial begin
    a = '0; b = '0; check();
    a = '1; b = '1; check();
    for (int j = 0; j < N; j++) begin
      a = N'($urandom);
      b = N'(1) << j;
      check();
      checks++;
      if ((longint'(row_s) + longint'(row_c)) != longint'(a) * longint'(b)) begin
        failures++;
        $display("FAIL single row a=%h b=%h not exact", a, b);
      end
    end
    for (int i = 0; i < 1000; i++) begin
      a = N'($urandom);
      b = N'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
