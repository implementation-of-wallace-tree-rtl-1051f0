// tb_wallace_tree: self-check of the reduction tree with its final carry
// select adder. The default tree (8 full rows of 16 bits, four layers)
// must return the sum of its rows modulo 2^16; a 3-row tree of 10 bits
// (one layer) and a 2-row tree (adder only) must return the exact sum.
// Expected values are integer sums worked out here.
module tb_wallace_tree;
  logic [7:0][15:0] ra;
  logic [15:0]      sa;
  logic [2:0][9:0]  rb;
  logic [9:0]       sb;
  logic [1:0][6:0]  rc;
  logic [6:0]       sc;
  int checks = 0, failures = 0;

  wallace_tree dut (.rows_i(ra), .sum_o(sa));
  wallace_tree #(.W(10), .ROWS(3), .MASK({10'h0ff, 10'h0ff, 10'h0ff})) dut3 (.rows_i(rb), .sum_o(sb));
  wallace_tree #(.W(7), .ROWS(2), .MASK({7'h3f, 7'h3f})) dut2 (.rows_i(rc), .sum_o(sc));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(dut.NL == 4, "8 rows should take four layers");
    for (int t = 0; t < 5000; t++) begin
      logic [15:0] ea;
      int eb, ec;
      for (int i = 0; i < 8; i++) ra[i] = 16'($urandom);
      for (int i = 0; i < 3; i++) rb[i] = 10'($urandom) & 10'h0ff;
      for (int i = 0; i < 2; i++) rc[i] = 7'($urandom) & 7'h3f;
      if (t == 0) begin
        ra = '1; rb = {3{10'h0ff}}; rc = {2{7'h3f}};
      end
      #1;
      ea = '0;
      for (int i = 0; i < 8; i++) ea += ra[i];
      eb = int'(rb[0]) + int'(rb[1]) + int'(rb[2]);
      ec = int'(rc[0]) + int'(rc[1]);
      check(sa == ea, $sformatf("8-row sum %0d, expected %0d", sa, ea));
      check(int'(sb) == eb, $sformatf("3-row sum %0d, expected %0d", sb, eb));
      check(int'(sc) == ec, $sformatf("2-row sum %0d, expected %0d", sc, ec));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
