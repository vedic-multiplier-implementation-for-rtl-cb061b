// fact_input_reg: holds the number n whose factorial is being computed.
// On a clock edge with load high, q takes d; otherwise q keeps its value, so
// n stays stable for the whole computation while the input port may change.
// Reset clears it to 0. Registered: q follows d one clock after load.
// Storing n before counting follows the factorial architecture; using one
// plain register as that storage, and the reset, are this design's choices.
module fact_input_reg #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end
endmodule
