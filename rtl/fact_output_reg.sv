// fact_output_reg: the output stage of the factorial unit.
// On a clock edge with capture high it stores the finished value and its
// overflow flag, sets valid and raises done for exactly one clock. clear
// (used when a new computation starts) drops valid so that a stale result is
// never mistaken for the new one; capture takes priority over clear.
// Reset clears everything. All outputs are registered.
// The architecture only names an output stage; the valid/done handshake is
// this design's own.
module fact_output_reg #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         capture,
  input  logic [W-1:0] d,
  input  logic         d_overflow,
  output logic [W-1:0] value,
  output logic         overflow,
  output logic         valid,
  output logic         done
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      value    <= '0;
      overflow <= 1'b0;
      valid    <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= capture;
      if (capture) begin
        value    <= d;
        overflow <= d_overflow;
        valid    <= 1'b1;
      end else if (clear) begin
        valid    <= 1'b0;
      end
    end
  end
endmodule
