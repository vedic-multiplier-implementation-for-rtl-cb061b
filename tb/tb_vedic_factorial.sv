// tb_vedic_factorial: end-to-end test of the factorial unit at its default
// sizes. Every n from 0 to 20 and a few hundred random 16-bit n are run; for
// each the result, the overflow flag, result_valid and the latency from the
// accepted start to done are compared with values computed here:
//   n = 0        -> 1,  no overflow, done after 1 clock
//   1 <= n <= 9  -> n!, no overflow, done after n+1 clocks
//   n >= 10      -> overflow (result holds 9!), done after 11 clocks
// It also makes each control mechanism happen and counts it: the n = 0 short
// path, normal runs, overflow, a start ignored while busy, a start accepted in
// the done clock (back to back), and a reset in the middle of a run. A
// mechanism that never happened counts as a failure.
module tb_vedic_factorial;
  int checks = 0, failures = 0;
  int n_zero = 0, n_normal = 0, n_overflow = 0, n_ignored = 0, n_b2b = 0, n_reset = 0;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [15:0] n = '0;
  logic        busy, done, overflow, result_valid;
  logic [31:0] result;

  vedic_factorial dut (
    .clk(clk), .rst_n(rst_n), .start(start), .n(n), .busy(busy), .done(done),
    .result(result), .overflow(overflow), .result_valid(result_valid)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned fact(input int k);
    longint unsigned f = 1;
    for (int i = 2; i <= k; i++) f *= longint'(i);
    return f;
  endfunction

  function automatic int exp_latency(input int k);
    if (k == 0) return 1;
    if (k <= 9) return k + 1;
    return 11;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Pulse start with the given n at the next clock edge.
  task automatic pulse_start(input logic [15:0] k);
    n     = k;
    start = 1'b1;
    @(posedge clk);
    #1;
    start = 1'b0;
    n     = 16'($urandom);   // the stored n must be used, not the port
  endtask

  // Wait for done, counting clocks since the start edge; check the outcome.
  // If inject_start is set, a second start is pulsed while busy.
  task automatic finish_and_check(input int k, input bit inject_start);
    int cycles = 1;
    longint unsigned expected;
    bit exp_ovf;
    check(result_valid == 1'b0, $sformatf("n=%0d: result_valid not cleared by start", k));
    while (!done) begin
      if (inject_start && cycles == 3 && busy) begin
        start = 1'b1;
        n     = 16'd3;
        n_ignored++;
      end
      check(busy || done, $sformatf("n=%0d: busy low before done", k));
      @(posedge clk);
      #1;
      start = 1'b0;
      if (!done) cycles++;
      if (cycles > 40) break;
    end
    exp_ovf  = (k >= 10);
    expected = exp_ovf ? fact(9) : fact(k);
    check(done, $sformatf("n=%0d: no done", k));
    check(cycles == exp_latency(k),
          $sformatf("n=%0d: latency %0d expected %0d", k, cycles, exp_latency(k)));
    check(overflow == exp_ovf, $sformatf("n=%0d: overflow=%0b", k, overflow));
    check(result_valid, $sformatf("n=%0d: result_valid low with done", k));
    check(64'(result) == expected,
          $sformatf("n=%0d: result %0d expected %0d", k, result, expected));
    if (k == 0) n_zero++;
    else if (exp_ovf) n_overflow++;
    else n_normal++;
  endtask

  task automatic run(input int k, input bit inject_start);
    pulse_start(16'(k));
    finish_and_check(k, inject_start);
    @(posedge clk);
    #1;
    check(!done, $sformatf("n=%0d: done longer than one clock", k));
    check(64'(result) == ((k >= 10) ? fact(9) : fact(k)),
          $sformatf("n=%0d: result not held", k));
  endtask

  initial begin
    int k;
    repeat (3) @(posedge clk);
    #1;
    check(!busy && !done && !result_valid, "state after reset");
    rst_n = 1'b1;
    @(posedge clk);
    #1;

    for (int i = 0; i <= 20; i++) run(i, 1'b0);
    for (int i = 0; i < 300; i++) begin
      k = ($urandom % 3 == 0) ? int'($urandom % 65536) : int'($urandom % 12);
      run(k, 1'b0);
    end

    // a start while busy is ignored
    run(9, 1'b1);
    run(8, 1'b1);

    // back to back: the next start comes in the done clock
    pulse_start(16'd6);
    while (!done) @(posedge clk);
    #1;
    // the clock after done: state is idle, start is accepted
    for (int r = 0; r < 5; r++) begin
      k = 2 + r;
      n = 16'(k);
      start = 1'b1;
      @(posedge clk);
      #1;
      start = 1'b0;
      n_b2b++;
      finish_and_check(k, 1'b0);
    end
    @(posedge clk);
    #1;

    // reset in the middle of a run, then a clean run
    pulse_start(16'd9);
    repeat (4) @(posedge clk);
    #1;
    check(busy, "busy before mid-run reset");
    rst_n = 1'b0;
    #1;
    check(!busy && !result_valid && !done, "mid-run reset clears the unit");
    n_reset++;
    @(posedge clk);
    #1;
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    run(7, 1'b0);

    $display("mechanisms: zero=%0d normal=%0d overflow=%0d ignored_start=%0d back_to_back=%0d reset=%0d",
             n_zero, n_normal, n_overflow, n_ignored, n_b2b, n_reset);
    check(n_zero > 0,     "n = 0 short path never exercised");
    check(n_normal > 0,   "normal run never exercised");
    check(n_overflow > 0, "overflow never exercised");
    check(n_ignored > 0,  "start while busy never exercised");
    check(n_b2b > 0,      "back-to-back start never exercised");
    check(n_reset > 0,    "mid-run reset never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
