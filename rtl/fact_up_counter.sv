// fact_up_counter: the up counter that supplies the factors 1, 2, ..., n.
// clear sets the count to 1 (the first factor); inc adds one. at_limit is high
// while the count equals limit (the stored n), which tells the controller that
// the current factor is the last one. clear takes priority over inc.
// Reset sets the count to 1. Registered count, combinational at_limit.
// Counting up until the value reaches n follows the factorial architecture;
// the start value 1, the clear/inc controls and the reset are this design's.
module fact_up_counter #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         inc,
  input  logic [W-1:0] limit,
  output logic [W-1:0] count,
  output logic         at_limit
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= W'(1);
    else if (clear) count <= W'(1);
    else if (inc)   count <= count + W'(1);
  end

  assign at_limit = (count == limit);
endmodule
