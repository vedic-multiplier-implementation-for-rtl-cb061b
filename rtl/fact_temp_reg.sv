// fact_temp_reg: the "temporary variable" holding the running product.
// init sets it to 1, the neutral start value of a product; load takes the
// multiplier's result d. init takes priority over load. Reset also sets 1.
// Registered: q changes on the clock edge where init or load is high.
// The initial value 1 and the feedback through the multiplier follow the
// factorial architecture; the 32-bit width (the full product) is this design's.
module fact_temp_reg #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= W'(1);
    else if (init) q <= W'(1);
    else if (load) q <= d;
  end
endmodule
