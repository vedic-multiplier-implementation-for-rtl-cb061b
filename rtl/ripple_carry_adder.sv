// ripple_carry_adder: W-bit adder made of a chain of full adders.
// Computes {cout, sum} = a + b + cin, the carry rippling from bit 0 upwards.
// The Vedic multipliers use three of these per level: 4-bit ones in the 4x4,
// 8-bit ones in the 8x8 and 16-bit ones in the 16x16 multiplier.
// Combinational; the delay grows linearly with W.
module ripple_carry_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .s   (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[W];
endmodule
