// full_adder: one-bit full adder (3:2 counter). s = a ^ b ^ ci and
// co = majority(a, b, ci). Purely combinational, no clock.
// It is the cell of the ripple carry adders inside the carry select
// blocks and of every Wallace column that holds three bits of a group.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (ci & (a ^ b));
endmodule
