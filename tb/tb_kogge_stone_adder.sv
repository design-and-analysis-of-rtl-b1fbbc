// Test of the Kogge-Stone adder at its default width (32) and at 16 bits.
// Sums and carry outs are compared with integer addition for corner values
// (long carry chains, all ones plus one) and random operands. The 16-bit
// instance must use 34 black and 15 grey cells.
module tb_kogge_stone_adder;
  logic [31:0] a32, b32, s32;
  logic        co32;
  logic [15:0] a16, b16, s16;
  logic        co16;
  int checks = 0, failures = 0;

  kogge_stone_adder dut (.a(a32), .b(b32), .sum(s32), .cout(co32));
  kogge_stone_adder #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .sum(s16), .cout(co16));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint unsigned e32, e16;
    #1;
    e32 = longint'(a32) + longint'(b32);
    e16 = longint'(a16) + longint'(b16);
    checks++;
    if ({co32, s32} != e32[32:0]) begin
      failures++;
      $display("FAIL 32: %h + %h = %b %h, expected %h", a32, b32, co32, s32, e32);
    end
    checks++;
    if ({co16, s16} != e16[16:0]) begin
      failures++;
      $display("FAIL 16: %h + %h = %b %h, expected %h", a16, b16, co16, s16, e16);
    end
  endtask

  initial begin
    checks++;
    if (dut16.N_BLACK != 34 || dut16.N_GREY != 15) begin
      failures++;
      $display("FAIL 16-bit cell count %0d black %0d grey", dut16.N_BLACK, dut16.N_GREY);
    end
    a32 = '1; b32 = 32'd1; a16 = '1; b16 = 16'd1; check();
    a32 = '1; b32 = '1;    a16 = '1; b16 = '1;    check();
    a32 = 32'h7FFF_FFFF; b32 = 32'h0000_0001; a16 = 16'h7FFF; b16 = 16'h0001; check();
    a32 = 32'hAAAA_AAAA; b32 = 32'h5555_5556; a16 = 16'hAAAA; b16 = 16'h5556; check();
    a32 = '0; b32 = '0; a16 = '0; b16 = '0; check();
    for (int i = 0; i < 2000; i++) begin
      a32 = $urandom; b32 = $urandom;
      a16 = 16'($urandom); b16 = 16'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
