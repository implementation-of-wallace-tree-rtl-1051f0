// wallace_layer: one layer of a Wallace reduction tree.
// The ROWS input rows are taken three at a time (rows 3g, 3g+1, 3g+2).
// In every column of such a group, three bits go into a full adder, two
// bits into a half adder and a single bit passes on; the sums form output
// row 2g and the carries, one column to the left, output row 2g+1. Rows
// left over when ROWS is not a multiple of three pass unchanged. A layer
// therefore turns ROWS rows into ROWS_O = 2*floor(ROWS/3) + ROWS mod 3.
// MASK tells, at elaboration time, which bit positions of which rows can
// hold a one (for partial products, the staircase of the AND array); the
// cell chosen for a column depends only on MASK, and absent positions of
// the outputs are driven to zero. The sum of the output rows equals the
// sum of the input rows modulo 2^W: a carry out of the top column is not
// formed, so the top column uses XOR gates only.
// Interface: rows_i (ROWS x W) -> rows_o (ROWS_O x W). Combinational.
// N_HA and N_FA count the cells the layer uses. For the 4 x 4 multiplier
// the first layer uses two half and two full adders and the second one
// half and three full adders, as in the step-by-step reduction of the
// design.
module wallace_layer #(
  parameter int W    = 16,
  parameter int ROWS = 8,
  parameter logic [ROWS-1:0][W-1:0] MASK = '1,
  localparam int NG     = ROWS / 3,
  localparam int ROWS_O = 2 * NG + ROWS % 3
) (
  input  logic [ROWS-1:0][W-1:0]   rows_i,
  output logic [ROWS_O-1:0][W-1:0] rows_o
);
  // number of present bits in column j of group g
  function automatic int col_cnt(int g, int j);
    return int'(MASK[3*g][j]) + int'(MASK[3*g+1][j]) + int'(MASK[3*g+2][j]);
  endfunction

  function automatic int count_cells(int n);
    int c = 0;
    for (int g = 0; g < NG; g++)
      for (int j = 0; j < W - 1; j++)
        if (col_cnt(g, j) == n) c++;
    return c;
  endfunction

  localparam int N_FA = count_cells(3);
  localparam int N_HA = count_cells(2);

  for (genvar g = 0; g < NG; g++) begin : g_grp
    logic [W-1:0] x0, x1, x2;   // the group's rows, absent bits forced to 0
    logic [W-1:0] s_row, c_row;
    assign x0 = rows_i[3*g]   & MASK[3*g];
    assign x1 = rows_i[3*g+1] & MASK[3*g+1];
    assign x2 = rows_i[3*g+2] & MASK[3*g+2];
    assign c_row[0] = 1'b0;

    for (genvar j = 0; j < W; j++) begin : g_col
      localparam int CNT = col_cnt(g, j);
      localparam bit M0 = MASK[3*g][j];
      localparam bit M1 = MASK[3*g+1][j];
      if (j == W - 1) begin : g_top
        // top column: the sum only, the carry would leave the word
        assign s_row[j] = x0[j] ^ x1[j] ^ x2[j];
      end else if (CNT == 3) begin : g_fa
        full_adder u_fa (.a(x0[j]), .b(x1[j]), .ci(x2[j]), .s(s_row[j]), .co(c_row[j+1]));
      end else if (CNT == 2) begin : g_ha
        if (M0 && M1) begin : g_01
          half_adder u_ha (.a(x0[j]), .b(x1[j]), .s(s_row[j]), .c(c_row[j+1]));
        end else if (M0) begin : g_02
          half_adder u_ha (.a(x0[j]), .b(x2[j]), .s(s_row[j]), .c(c_row[j+1]));
        end else begin : g_12
          half_adder u_ha (.a(x1[j]), .b(x2[j]), .s(s_row[j]), .c(c_row[j+1]));
        end
      end else begin : g_pass
        // one bit or none: it passes to the sum row, no carry
        assign s_row[j]   = x0[j] | x1[j] | x2[j];
        assign c_row[j+1] = 1'b0;
      end
    end

    assign rows_o[2*g]   = s_row;
    assign rows_o[2*g+1] = c_row;
  end

  for (genvar r = 0; r < ROWS % 3; r++) begin : g_rest
    assign rows_o[2*NG + r] = rows_i[3*NG + r] & MASK[3*NG + r];
  end
endmodule
