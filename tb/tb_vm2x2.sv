// tb_vm2x2: self-check of the 2x2 Vedic multiplier. The product of the
// unit under test is compared with the integer product a * b for all 16 operand pairs.
module tb_vm2x2;
  int checks = 0, failures = 0;
  logic [1:0]   a, b;
  logic [3:0] p;

  vm2x2 dut (.a(a), .b(b), .p(p));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [1:0] x, input logic [1:0] y);
    longint unsigned expected;
    a = x;
    b = y;
    #1;
    expected = longint'(x) * longint'(y);
    checks++;
    if (64'(p) != expected) begin
      failures++;
      if (failures < 10) $display("FAIL %0d x %0d: got %0d expected %0d", x, y, p, expected);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) apply(2'(i >> 2), 2'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
