// vm8x8: 8x8 unsigned Vedic multiplier, one level of the Urdhva Tiryakbhyam
// ("vertically and crosswise") recursion.
// Each operand is split into a high and a low 4-bit half. Four vm4x4
// multipliers form the vertical products q0 = aL*bL and q3 = aH*bH and the
// crosswise products q1 = aH*bL and q2 = aL*bH, all in parallel. Three 8-bit
// ripple carry adders then combine them:
//   adder 1: t1 = q1 + q2                      (carry out ca1)
//   adder 2: t2 = t1 + q0[7:4]             (carry out ca2)
//   adder 3: p[15:8] = q3 + {ca1|ca2, t2[7:4]}
// with p[3:0] = q0[3:0] and p[7:4] = t2[3:0].
// The split, the four sub-multipliers, the three adders and the carries ca1
// and ca2 feeding the third adder follow the design's 8x8 block diagram.
// How ca1 and ca2 enter the third adder is this design's choice: the two
// carries can never both be 1 (adder 1 carries out only when the low 8 bits
// of t1 are at most 2^8-2^6+2, too small for adder 2 to carry out as well),
// so they are merged into one bit of weight 2^12. Assertions check that,
// and that the third adder never carries out.
// Interface: a, b (8 bits each), p = a * b (16 bits).
// Purely combinational: p settles one propagation delay after a and b.
module vm8x8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [15:0] p
);
  localparam int unsigned N = 8;
  localparam int unsigned H = N / 2;

  logic [N-1:0] q0, q1, q2, q3;
  logic [N-1:0] t1, t2;
  logic         ca1, ca2, ca3;

  vm4x4 u_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(q0));
  vm4x4 u_hl (.a(a[N-1:H]), .b(b[H-1:0]), .p(q1));
  vm4x4 u_lh (.a(a[H-1:0]), .b(b[N-1:H]), .p(q2));
  vm4x4 u_hh (.a(a[N-1:H]), .b(b[N-1:H]), .p(q3));

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
    assert (!(ca1 && ca2)) else $error("vm8x8: both middle carries set");
    assert (!ca3)          else $error("vm8x8: carry out of the upper adder");
  end
endmodule
