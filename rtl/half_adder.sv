// half_adder: one-bit half adder, the two-input cell of the Wallace
// reduction layers. s = a ^ b, c = a & b. Purely combinational, no clock.
// The multiplier uses it wherever a column of a three-row group holds
// exactly two bits; the gate-level form is the usual textbook one.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
