// tb_fact_temp_reg: checks the temporary-variable register: reset value 1,
// init forces 1 (even with load high), load takes d, and otherwise the value
// holds. Random sequences are compared with a reference after each clock.
module tb_fact_temp_reg;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, load = 1'b0;
  logic [31:0] d = '0, q, ref_q;

  fact_temp_reg dut (.clk(clk), .rst_n(rst_n), .init(init), .load(load), .d(d), .q(q));

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
    if (q != 32'd1) begin failures++; $display("FAIL reset value %0d", q); end
    rst_n = 1'b1;
    ref_q = 32'd1;
    for (int i = 0; i < 2000; i++) begin
      init = ($urandom % 8) == 0;
      load = ($urandom % 2) == 0;
      d    = $urandom;
      @(posedge clk);
      if (init)      ref_q = 32'd1;
      else if (load) ref_q = d;
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
