// csla_bec_adder: WIDTH-bit carry select adder built as a chain of
// csla_bec_block blocks of BLK bits (the last block takes the remainder).
// Every block computes its carry-in-0 and carry-in-1 results at once, so
// the carry between blocks only passes one multiplexer per block.
// blk_c[k] is the carry into block k; blk_c[0] = ci.
// Interface: a, b (WIDTH bits), ci -> s (WIDTH bits), co. Combinational.
// Used as the final adder of the Wallace multiplier on the two rows left
// by the reduction tree. The chaining of several blocks for widths above
// four is this design's own generalisation of the four-bit block.
module csla_bec_adder #(
  parameter int WIDTH = 4,
  parameter int BLK   = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  localparam int NBLK = (WIDTH + BLK - 1) / BLK;

  logic [NBLK:0] blk_c;
  assign blk_c[0] = ci;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    localparam int LO = k * BLK;
    localparam int BW = (WIDTH - LO < BLK) ? (WIDTH - LO) : BLK;
    csla_bec_block #(.W(BW)) u_blk (
      .a (a[LO +: BW]),
      .b (b[LO +: BW]),
      .ci(blk_c[k]),
      .s (s[LO +: BW]),
      .co(blk_c[k+1])
    );
  end

  assign co = blk_c[NBLK];
endmodule
