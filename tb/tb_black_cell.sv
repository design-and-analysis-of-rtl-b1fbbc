// Exhaustive test of the black cell: g = g_hi | p_hi & g_lo, p = p_hi & p_lo,
// checked against the carry behaviour of two adjoining bit groups.
module tb_black_cell;
  logic g_hi, p_hi, g_lo, p_lo, g, p;
  int checks = 0, failures = 0;

  black_cell dut (.g_hi(g_hi), .p_hi(p_hi), .g_lo(g_lo), .p_lo(p_lo), .g(g), .p(p));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic eg, ep, cin, cout_lo, cout_hi;
    for (int v = 0; v < 16; v++) begin
      {g_hi, p_hi, g_lo, p_lo} = 4'(v);
      #1;
      // The merged group must give, for a carry in of 0 and of 1, the carry
      // out of passing it through the low group and then the high group.
      eg = 1'b0;
      ep = 1'b1;
      for (int ci = 0; ci < 2; ci++) begin
        cin     = 1'(ci);
        cout_lo = g_lo ? 1'b1 : (p_lo ? cin : 1'b0);
        cout_hi = g_hi ? 1'b1 : (p_hi ? cout_lo : 1'b0);
        if (ci == 0) eg = cout_hi;
        else ep = cout_hi && !eg;
      end
      checks++;
      if (g !== eg || (p !== (p_hi & p_lo))) begin
        failures++;
        $display("FAIL %b%b%b%b -> g=%b p=%b", g_hi, p_hi, g_lo, p_lo, g, p);
      end
      checks++;
      if (ep && !p) begin
        failures++;
        $display("FAIL propagate missing for %b%b%b%b", g_hi, p_hi, g_lo, p_lo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
