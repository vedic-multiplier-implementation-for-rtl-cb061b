// tb_fact_up_counter: checks the up counter: it starts at 1 after reset and
// after clear, counts up by one on inc, holds otherwise, and at_limit is high
// exactly when the count equals limit. One directed run counts 1..n with the
// limit reached after n-1 increments; then random clear/inc/limit sequences
// are compared with a reference counter.
module tb_fact_up_counter;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, inc = 1'b0;
  logic [15:0] limit = 16'd7, count, ref_cnt;
  logic at_limit;

  fact_up_counter dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .inc(inc),
    .limit(limit), .count(count), .at_limit(at_limit)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input int i);
    checks++;
    if (count != ref_cnt || at_limit != (ref_cnt == limit)) begin
      failures++;
      $display("FAIL step %0d: count=%0d at_limit=%0b expected %0d limit %0d",
               i, count, at_limit, ref_cnt, limit);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    ref_cnt = 16'd1;
    compare(-1);
    rst_n = 1'b1;
    // directed: count 1..7, at_limit after exactly 6 increments
    inc = 1'b1;
    for (int k = 1; k < 7; k++) begin
      checks++;
      if (at_limit) begin failures++; $display("FAIL at_limit early at %0d", count); end
      @(posedge clk);
      ref_cnt++;
      #1;
      compare(k);
    end
    checks++;
    if (!at_limit) begin failures++; $display("FAIL at_limit missing at 7"); end
    // random
    for (int i = 0; i < 5000; i++) begin
      clear = ($urandom % 16) == 0;
      inc   = ($urandom % 4) != 0;
      if ($urandom % 32 == 0) limit = 16'($urandom % 40);
      @(posedge clk);
      if (clear)    ref_cnt = 16'd1;
      else if (inc) ref_cnt++;
      #1;
      compare(i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
