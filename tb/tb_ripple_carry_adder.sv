// tb_ripple_carry_adder: checks the ripple carry adder at the three widths the
// Vedic multipliers use. The 4-bit adder is tested exhaustively (all a, b and
// carry-in), the 8- and 16-bit adders with corner values and random operands;
// every result {cout, sum} is compared with a + b + cin computed in integers.
module tb_ripple_carry_adder;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4, s4;
  logic [7:0]  a8, b8, s8;
  logic [15:0] a16, b16, s16;
  logic        ci4, ci8, ci16, co4, co8, co16;

  ripple_carry_adder             dut4  (.a(a4),  .b(b4),  .cin(ci4),  .sum(s4),  .cout(co4));
  ripple_carry_adder #(.W(8))    dut8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  ripple_carry_adder #(.W(16))   dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [16:0] got, input longint unsigned exp, input string what);
    checks++;
    if (64'(got) != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 512; i++) begin
      {ci4, a4, b4} = 9'(i);
      #1;
      check16(17'({co4, s4}), longint'(a4) + longint'(b4) + longint'(ci4), "w4");
    end
    for (int i = 0; i < 3000; i++) begin
      if (i < 8) begin
        a8  = (i & 1) ? 8'hFF : 8'h00;    b8  = (i & 2) ? 8'hFF : 8'h01;    ci8  = i[2];
        a16 = (i & 1) ? 16'hFFFF : 16'h0; b16 = (i & 2) ? 16'hFFFF : 16'h1; ci16 = i[2];
      end else begin
        a8  = 8'($urandom);  b8  = 8'($urandom);  ci8  = 1'($urandom);
        a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
      end
      #1;
      check16(17'({co8, s8}),   longint'(a8)  + longint'(b8)  + longint'(ci8),  "w8");
      check16(17'({co16, s16}), longint'(a16) + longint'(b16) + longint'(ci16), "w16");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
