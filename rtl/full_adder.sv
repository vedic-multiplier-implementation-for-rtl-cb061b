// full_adder: one-bit full adder, the cell the ripple carry adders are chained from.
// s = a xor b xor cin; cout is the majority of the three inputs.
// Purely combinational. The adders are only named as "ripple carry adders";
// building them from full adders is the usual reading of that name.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  assign s    = a ^ b ^ cin;
  assign cout = (a & b) | (a & cin) | (b & cin);
endmodule
