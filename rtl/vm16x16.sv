// vm16x16: 16x16 unsigned Vedic multiplier, one level of the Urdhva Tiryakbhyam
// ("vertically and crosswise") recursion.
// Each operand is split into a high and a low 8-bit half. Four vm8x8
// multipliers form the vertical products q0 = aL*bL and q3 = aH*bH and the
// crosswise products q1 = aH*bL and q2 = aL*bH, all in parallel. Three 16-bit
// ripple carry adders then combine them:
//   adder 1: t1 = q1 + q2                      (carry out ca1)
//   adder 2: t2 = t1 + q0[15:8]             (carry out ca2)
//   adder 3: p[31:16] = q3 + {ca1|ca2, t2[15:8]}
// with p[7:0] = q0[7:0] and p[15:8] = t2[7:0].
// The split, the four sub-multipliers, the three adders and the carries ca1
// and ca2 feeding the third adder follow the design's 16x16 block diagram.
// How ca1 and ca2 enter the third adder is this design's choice: the two
// carries can never both be 1 (adder 1 carries out only when the low 16 bits
// of t1 are at most 2^16-2^10+2, too small for adder 2 to carry out as well),
// so they are merged into one bit of weight 2^24. Assertions check that,
// and that the third adder never carries out.
// Interface: a, b (16 bits each), p = a * b (32 bits).
// Purely combinational: p settles one propagation delay after a and b.
module vm16x16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);
  localparam int unsigned N = 16;
  localparam int unsigned H = N / 2;

  logic [N-1:0] q0, q1, q2, q3;
  logic [N-1:0] t1, t2;
  logic         ca1, ca2, ca3;

  vm8x8 u_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(q0));
  vm8x8 u_hl (.a(a[N-1:H]), .b(b[H-1:0]), .p(q1));
  vm8x8 u_lh (.a(a[H-1:0]), .b(b[N-1:H]), .p(q2));
  vm8x8 u_hh (.a(a[N-1:H]), .b(b[N-1:H]), .p(q3));

  ripple_carry_adder #(.W(N)) u_add1 (
    .a(q1), .b(q2), .cin(1'b0), .sum(t1), .cout(ca1)
  );

  ripple_carry_adder #(.W(N)) u_add2 (
    .a(t1), .b({{H{1'b0}}, q0[N-1:H]}), .cin(1'b0), .sum(t2), .cout(ca2)
  );

  ripple_carry_adder #(.W(N)) u_add3 (
    .a(q3), .b({{(H-1){1'b0}}, ca1 | ca2, t2[N-1:H]}), .cin(1'b0),
    .sum(p[2*N-1:N]), .cout(ca3)
  );

  assign p[H-1:0] = q0[H-1:0];
  assign p[N-1:H] = t2[H-1:0];

  always_comb begin
    assert (!(ca1 && ca2)) else $error("vm16x16: both middle carries set");
    assert (!ca3)          else $error("vm16x16: carry out of the upper adder");
  end
endmodule
