// Exhaustive test of the grey cell: with g_lo being the carry out of the
// lower group (carry in 0), g must be the carry out of the high group.
module tb_grey_cell;
  logic g_hi, p_hi, g_lo, g;
  int checks = 0, failures = 0;

  grey_cell dut (.g_hi(g_hi), .p_hi(p_hi), .g_lo(g_lo), .g(g));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic eg;
    for (int v = 0; v < 8; v++) begin
      {g_hi, p_hi, g_lo} = 3'(v);
      #1;
      eg = g_hi ? 1'b1 : (p_hi ? g_lo : 1'b0);
      checks++;
      if (g !== eg) begin
        failures++;
        $display("FAIL %b%b%b -> g=%b", g_hi, p_hi, g_lo, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
