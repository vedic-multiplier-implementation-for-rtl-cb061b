// vm2x2: 2x2 unsigned Vedic multiplier ("vertically and crosswise").
// The four partial products a_i & b_j are formed with four AND gates. The
// vertical product a0b0 is s0 directly; the two crosswise products a0b1 and
// a1b0 go into a first half adder giving s1 and a carry c1; the second vertical
// product a1b1 and c1 go into a second half adder giving s2, whose carry is s3.
// This follows the 2x2 architecture of the design exactly. Combinational.
module vm2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a0b0, a1b0, a0b1, a1b1;
  logic c1;

  assign a0b0 = a[0] & b[0];
  assign a1b0 = a[1] & b[0];
  assign a0b1 = a[0] & b[1];
  assign a1b1 = a[1] & b[1];

  assign p[0] = a0b0;

  half_adder u_ha1 (.a(a0b1), .b(a1b0), .s(p[1]), .c(c1));
  half_adder u_ha2 (.a(a1b1), .b(c1),   .s(p[2]), .c(p[3]));
endmodule
