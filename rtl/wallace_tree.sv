// wallace_tree: adds ROWS rows of W bits, modulo 2^W, the Wallace way.
// While more than two rows are left, a wallace_layer reduces every three
// rows to two; layer l feeds layer l+1 (8 rows: 8 -> 6 -> 4 -> 3 -> 2,
// NL = 4 layers). When two rows remain, a carry select adder with binary
// to excess-1 converter (csla_bec_adder) adds them.
// MASK marks which bit positions of the input rows can be one. The masks
// of the later levels are worked out at elaboration (lvl_mask, the same
// rule the layer uses for its cells) and given to each layer. At the last
// level the adder spans only the columns from the lowest one where both
// rows have a bit (LO) to the highest one where either has a bit (HI);
// below LO at most one bit is present per column and it is copied, and
// the adder's carry out becomes bit HI+1. For the 4 x 4 multiplier this
// is a four-bit adder on product bits 3 to 6 with its carry out as bit 7.
// If HI is the top column the carry out is dropped: the sum is taken
// modulo 2^W, and for a multiplier it is zero anyway.
// Interface: rows_i (ROWS x W) -> sum_o (W bits). Combinational.
module wallace_tree #(
  parameter int W    = 16,
  parameter int ROWS = 8,
  parameter logic [ROWS-1:0][W-1:0] MASK = '1
) (
  input  logic [ROWS-1:0][W-1:0] rows_i,
  output logic [W-1:0]           sum_o
);
  typedef logic [ROWS-1:0][W-1:0] rows_t;

  function automatic int next_rows(int r);
    return (r > 2) ? 2 * (r / 3) + r % 3 : r;
  endfunction

  // number of rows at level l (level 0: the inputs)
  function automatic int rows_at(int l);
    int r = ROWS;
    for (int i = 0; i < l; i++) r = next_rows(r);
    return r;
  endfunction

  // number of layers needed to get down to two rows
  function automatic int n_layers();
    int r = ROWS;
    int n = 0;
    while (r > 2) begin
      r = next_rows(r);
      n++;
    end
    return n;
  endfunction

  // mask of the rows at level l
  function automatic rows_t lvl_mask(int l);
    rows_t m = MASK;
    rows_t o;
    int r = ROWS;
    for (int i = 0; i < l; i++) begin
      o = '0;
      for (int g = 0; g < r / 3; g++)
        for (int j = 0; j < W; j++) begin
          int cnt = int'(m[3*g][j]) + int'(m[3*g+1][j]) + int'(m[3*g+2][j]);
          o[2*g][j] = (cnt >= 1);
          if (j < W - 1) o[2*g+1][j+1] = (cnt >= 2);
        end
      for (int k = 0; k < r % 3; k++)
        o[2*(r/3) + k] = m[3*(r/3) + k];
      m = o;
      r = next_rows(r);
    end
    return m;
  endfunction

  // lowest column where both rows have a bit, W if none
  function automatic int lowest_both(logic [W-1:0] ma, logic [W-1:0] mb);
    for (int j = 0; j < W; j++) if (ma[j] && mb[j]) return j;
    return W;
  endfunction

  // highest column where either row has a bit
  function automatic int highest_any(logic [W-1:0] ma, logic [W-1:0] mb);
    for (int j = W - 1; j >= 0; j--) if (ma[j] || mb[j]) return j;
    return 0;
  endfunction

  localparam int NL = n_layers();

  rows_t lv [NL+1];   // rows at each level; lv[l] holds rows_at(l) rows
  assign lv[0] = rows_i;

  for (genvar l = 0; l < NL; l++) begin : g_lay
    localparam int    RI = rows_at(l);
    localparam int    RO = rows_at(l + 1);
    localparam rows_t MI = lvl_mask(l);
    wallace_layer #(.W(W), .ROWS(RI), .MASK(MI[RI-1:0])) u_layer (
      .rows_i(lv[l][RI-1:0]),
      .rows_o(lv[l+1][RO-1:0])
    );
    if (RO < ROWS) begin : g_fill
      assign lv[l+1][ROWS-1:RO] = '0;
    end
  end

  // last level: at most two rows
  localparam int    RF = rows_at(NL);
  localparam rows_t MF = lvl_mask(NL);
  localparam logic [W-1:0] MA = MF[0];
  localparam logic [W-1:0] MB = (RF == 2) ? MF[1] : '0;
  localparam int LO = lowest_both(MA, MB);
  localparam int HI = highest_any(MA, MB);

  logic [W-1:0] ra, rb;
  assign ra = lv[NL][0] & MA;
  assign rb = lv[NL][RF-1] & MB;

  if (LO >= W) begin : g_noadd
    // no column holds two bits: the rows are disjoint
    assign sum_o = ra | rb;
  end else begin : g_add
    localparam int AW = HI - LO + 1;
    logic [AW-1:0] s;
    logic          co;
    csla_bec_adder #(.WIDTH(AW)) u_add (
      .a(ra[HI:LO]), .b(rb[HI:LO]), .ci(1'b0), .s(s), .co(co)
    );
    for (genvar j = 0; j < W; j++) begin : g_out
      if (j < LO) begin : g_copy
        assign sum_o[j] = ra[j] | rb[j];
      end else if (j <= HI) begin : g_sum
        assign sum_o[j] = s[j-LO];
      end else if (j == HI + 1) begin : g_carry
        assign sum_o[j] = co;
      end else begin : g_zero
        assign sum_o[j] = 1'b0;
      end
    end
  end
endmodule
