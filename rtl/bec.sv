// bec: binary to excess-1 converter, x = s + 1 (modulo 2^W), built without
// an adder. Bit 0 is inverted; bit i (i > 0) is s[i] XOR the AND of all
// lower bits, the AND being formed as a chain (t[i] = t[i-1] & s[i-1]).
// For W = 3 this is exactly the three-input converter: x0 = ~s0,
// x1 = s1 ^ s0, the AND s1 & s0 as the internal carry, and the top output
// bit s2 ^ (s1 & s0).
// Interface: s (W bits) -> x (W bits). Combinational.
// In the carry select block it replaces the second ripple carry adder:
// the block's carry-in-0 sum and carry, plus one, is the carry-in-1 result.
module bec #(
  parameter int W = 3
) (
  input  logic [W-1:0] s,
  output logic [W-1:0] x
);
  logic [W-1:0] t;   // t[i]: all bits below i are one
  assign t[0] = 1'b1;
  for (genvar i = 1; i < W; i++) begin : g_chain
    assign t[i] = t[i-1] & s[i-1];
  end
  assign x[0] = ~s[0];
  for (genvar i = 1; i < W; i++) begin : g_bit
    assign x[i] = s[i] ^ t[i];
  end
endmodule
