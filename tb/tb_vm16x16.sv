// tb_vm16x16: self-check of the 16x16 Vedic multiplier. The product of the
// unit under test is compared with the integer product a * b for corner
// values, every operand against 0xFFFF, random pairs and the decimal worked
// example of the vertical-and-crosswise method, 252 x 846 = 213192.
module tb_vm16x16;
  int checks = 0, failures = 0;
  logic [15:0]   a, b;
  logic [31:0] p;

  vm16x16 dut (.a(a), .b(b), .p(p));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] x, input logic [15:0] y);
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
    apply(16'd252, 16'd846);
    checks++;
    if (p != 32'd213192) begin
      failures++;
      $display("FAIL 252 x 846 gave %0d", p);
    end
    apply(16'hFFFF, 16'hFFFF);
    apply(16'h0000, 16'hFFFF);
    apply(16'h8000, 16'h8000);
    for (int i = 0; i < 65536; i++) apply(16'(i), 16'hFFFF);
    for (int i = 0; i < 65536; i++) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
