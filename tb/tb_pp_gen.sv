// Test of the partial product generator at its default size (16 x 16):
// every row must equal A * B[j] shifted left by j, and the rows must add up
// to A * B. Corner values plus random operands.
module tb_pp_gen;
  localparam int N = 16;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] pp [N];
  int checks = 0, failures = 0;

  pp_gen dut (.a(a), .b(b), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint unsigned total, row;
    #1;
    total = 0;
    for (int j = 0; j < N; j++) begin
      row = b[j] ? (longint'(a) << j) : 0;
      total += longint'(pp[j]);
      checks++;
      if (longint'(pp[j]) != row) begin
        failures++;
        $display("FAIL a=%h b=%h row %0d = %h, expected %h", a, b, j, pp[j], row);
      end
    end
    checks++;
    if (total != longint'(a) * longint'(b)) begin
      failures++;
      $display("FAIL a=%h b=%h rows sum to %h", a, b, total);
    end
  endtask

  initial begin
    a = '0; b = '0; check();
    a = '1; b = '1; check();
    a = 16'hA080; b = 16'hA909; check();
    for (int i = 0; i < 500; i++) begin
      a = N'($urandom);
      b = N'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
