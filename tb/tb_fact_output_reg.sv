// tb_fact_output_reg: checks the output register: capture stores value and
// overflow, sets valid and gives a done pulse of exactly one clock; clear
// drops valid but keeps value; capture wins over clear. Random sequences
// are compared with a reference after each clock.
module tb_fact_output_reg;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, capture = 1'b0, d_ovf = 1'b0;
  logic [31:0] d = '0, value;
  logic overflow, valid, done;
  logic [31:0] r_value;
  logic r_ovf, r_valid, r_done;

  fact_output_reg dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .capture(capture), .d(d),
    .d_overflow(d_ovf), .value(value), .overflow(overflow), .valid(valid), .done(done)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input int i);
    checks++;
    if (value != r_value || overflow != r_ovf || valid != r_valid || done != r_done) begin
      failures++;
      $display("FAIL step %0d: value=%0d ovf=%0b valid=%0b done=%0b expected %0d %0b %0b %0b",
               i, value, overflow, valid, done, r_value, r_ovf, r_valid, r_done);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    {r_value, r_ovf, r_valid, r_done} = '0;
    compare(-1);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      capture = ($urandom % 4) == 0;
      clear   = ($urandom % 4) == 0;
      d       = $urandom;
      d_ovf   = 1'($urandom);
      @(posedge clk);
      r_done = capture;
      if (capture) begin
        r_value = d; r_ovf = d_ovf; r_valid = 1'b1;
      end else if (clear) begin
        r_valid = 1'b0;
      end
      #1;
      compare(i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
