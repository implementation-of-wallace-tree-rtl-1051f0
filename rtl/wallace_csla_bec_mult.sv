// wallace_csla_bec_mult: unsigned N x N multiplier, M = A * B, made of a
// Wallace reduction tree with a carry select adder that uses binary to
// excess-1 converters as its final adder.
// Three stages, all combinational: partial_products forms the N rows of
// the AND array; wallace_tree reduces them three rows at a time with half
// and full adders until two rows are left (for N = 8: 8 -> 6 -> 4 -> 3 ->
// 2 rows, four layers); csla_bec_adder, inside wallace_tree, adds the last
// two rows. The bit positions each row can occupy (PP_MASK) are known at
// elaboration, so every column gets exactly the cell it needs.
// Interface: A, B (N bits) -> M (2N bits). There is no clock, no register
// and no handshake: M is valid one combinational delay after A or B
// changes. N = 8 follows the 8-bit operands and 16-bit product of the
// design's simulation; N = 4 gives the step-by-step 4 x 4 example.
module wallace_csla_bec_mult #(
  parameter int N = 8
) (
  input  logic [N-1:0]   A,
  input  logic [N-1:0]   B,
  output logic [2*N-1:0] M
);
  localparam int W = 2 * N;

  // row i of the AND array covers bits i .. i+N-1
  function automatic logic [N-1:0][W-1:0] pp_mask();
    logic [N-1:0][W-1:0] m = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        m[i][i+j] = 1'b1;
    return m;
  endfunction

  localparam logic [N-1:0][W-1:0] PP_MASK = pp_mask();

  logic [N-1:0][W-1:0] pp;

  partial_products #(.N(N)) u_pp (.a(A), .b(B), .pp(pp));

  wallace_tree #(.W(W), .ROWS(N), .MASK(PP_MASK)) u_tree (
    .rows_i(pp),
    .sum_o (M)
  );
endmodule
