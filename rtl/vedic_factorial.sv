// vedic_factorial: computes n! with the 16x16 Vedic multiplier.
// The number n is stored in an input register, an up counter steps through the
// factors 1, 2, ..., n, and a temporary variable that starts at 1 is replaced
// each clock by the product (temporary variable) x (counter) from the Vedic
// multiplier. When the counter has reached n the temporary variable holds n!
// and is handed to the output register. This chain of blocks follows the
// design's factorial block diagram; the controller that sequences it, the
// handshake and the overflow check are this design's own.
//
// Interface:
//   start, n       a one-clock start pulse with the number n (16 bits); start
//                  is ignored while busy is high.
//   busy           high from the clock after start until the clock before done;
//                  a new start is accepted again in the done clock.
//   done           one-clock pulse when result, overflow and result_valid
//                  have been updated.
//   result         n! (32 bits), held until the next start.
//   overflow       set with done when n! cannot be formed: the multiplier
//                  takes only the low 16 bits of the temporary variable, so
//                  once the running product exceeds 16 bits (from 9! on)
//                  another multiplication would be wrong. 9! = 362880 is the
//                  largest factorial produced; n >= 10 reports overflow, with
//                  result holding 9!.
// Timing: one multiplication per clock. done rises n+1 clocks after the clock
// edge that took start for 1 <= n <= 9, 1 clock after it for n = 0 (0! = 1),
// and 11 clocks after it for n >= 10.
// Lint note: Verilator reports rst_n as used both asynchronously (the flops)
// and synchronously; the synchronous use is only the assertion's disable iff,
// which is not hardware, so the warning stands.
module vedic_factorial
  import fact_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N_W-1:0] n,
  output logic           busy,
  output logic           done,
  output logic [P_W-1:0] result,
  output logic           overflow,
  output logic           result_valid
);
  fact_state_e state, state_nx;

  logic [N_W-1:0] n_q;
  logic [N_W-1:0] count;
  logic           at_limit;
  logic [P_W-1:0] temp;
  logic [P_W-1:0] product;
  logic           ovf_q;

  logic accept;      // start taken in IDLE
  logic temp_wide;   // running product no longer fits a multiplier operand
  logic step;        // one multiplication this clock

  assign accept    = (state == ST_IDLE) && start;
  assign temp_wide = (temp[P_W-1:N_W] != '0);
  assign step      = (state == ST_RUN) && !temp_wide;

  fact_input_reg #(.W(N_W)) u_input (
    .clk(clk), .rst_n(rst_n), .load(accept), .d(n), .q(n_q)
  );

  fact_up_counter #(.W(N_W)) u_counter (
    .clk(clk), .rst_n(rst_n), .clear(accept), .inc(step),
    .limit(n_q), .count(count), .at_limit(at_limit)
  );

  vm16x16 u_mult (
    .a(temp[N_W-1:0]), .b(count), .p(product)
  );

  fact_temp_reg #(.W(P_W)) u_temp (
    .clk(clk), .rst_n(rst_n), .init(accept), .load(step), .d(product), .q(temp)
  );

  fact_output_reg #(.W(P_W)) u_output (
    .clk(clk), .rst_n(rst_n), .clear(accept), .capture(state == ST_FIN),
    .d(temp), .d_overflow(ovf_q),
    .value(result), .overflow(overflow), .valid(result_valid), .done(done)
  );

  always_comb begin
    state_nx = state;
    unique case (state)
      ST_IDLE: if (start) state_nx = (n == '0) ? ST_FIN : ST_RUN;
      ST_RUN:  if (temp_wide || at_limit) state_nx = ST_FIN;
      ST_FIN:  state_nx = ST_IDLE;
      default: state_nx = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      ovf_q <= 1'b0;
    end else begin
      state <= state_nx;
      if (accept)                          ovf_q <= 1'b0;
      else if (state == ST_RUN && temp_wide) ovf_q <= 1'b1;
    end
  end

  assign busy = (state != ST_IDLE);

  // The counter never passes n while a computation runs.
  a_count_in_range: assert property (
    @(posedge clk) disable iff (!rst_n)
    (state == ST_RUN) |-> (count != '0 && count <= n_q)
  ) else $error("vedic_factorial: counter out of range");
endmodule
