// Exhaustive test of the full adder: a + b + cin = s + 2*c for all eight inputs.
module tb_full_adder;
  logic a, b, cin, s, c;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .c(c));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if (int'(s) + 2 * int'(c) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b -> s=%b c=%b", a, b, cin, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
