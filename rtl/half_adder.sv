// half_adder: one-bit half adder, the basic cell of the 2x2 Vedic multiplier.
// Adds two bits a and b; s is the sum bit (a xor b), c the carry (a and b).
// Purely combinational, no clock. The block's use comes from the 2x2 multiplier
// figure; its gate-level form is the textbook one.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
