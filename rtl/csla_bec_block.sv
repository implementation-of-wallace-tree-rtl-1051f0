// csla_bec_block: one W-bit carry select adder block that uses a binary to
// excess-1 converter in place of the second ripple carry adder.
// How it works: an rca adds a and b with carry in 0, giving {c0, s0}. The
// bec adds one to that (W+1)-bit word, which is exactly the result for a
// carry in of 1 ({c0, s0} + 1 never exceeds W+1 bits). A 2:1 multiplexer
// driven by ci picks {co, s} from the two once the real carry arrives, so
// ci only passes through a multiplexer, not through the ripple chain.
// Interface: a, b (W bits), ci -> s (W bits), co. Combinational.
// The block width of four follows the four-bit carry select adder of the
// design; the converter's NOT/XOR/AND structure is described in bec.
module csla_bec_block #(
  parameter int W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W-1:0] s0;
  logic         c0;
  logic [W:0]   r1;   // result for carry in 1: {c0, s0} + 1

  rca #(.W(W)) u_rca (.a(a), .b(b), .ci(1'b0), .s(s0), .co(c0));
  bec #(.W(W+1)) u_bec (.s({c0, s0}), .x(r1));

  always_comb begin
    if (ci) {co, s} = r1;
    else    {co, s} = {c0, s0};
  end
endmodule
