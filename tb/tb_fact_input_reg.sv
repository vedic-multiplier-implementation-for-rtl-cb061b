// tb_fact_input_reg: drives random load/d sequences into the input register
// and compares q after every clock with a reference copy that takes d only
// when load was high; also checks the reset value 0.
module tb_fact_input_reg;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [15:0] d = '0, q, ref_q;

  fact_input_reg dut (.clk(clk), .rst_n(rst_n), .load(load), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q != '0) begin failures++; $display("FAIL reset value %0d", q); end
    rst_n = 1'b1;
    ref_q = '0;
    for (int i = 0; i < 2000; i++) begin
      load = ($urandom % 4) == 0;
      d    = 16'($urandom);
      @(posedge clk);
      if (load) ref_q = d;
      #1;
      checks++;
      if (q != ref_q) begin
        failures++;
        $display("FAIL cycle %0d: q=%0d expected %0d", i, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
