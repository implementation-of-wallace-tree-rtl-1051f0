// tb_wallace_csla_bec_mult: end-to-end test of the 8 x 8 multiplier at its
// default size. It applies the eight operand pairs of the reference
// waveform (B = 255 with A = 0, 240, 14, 7, 48, 128, 16, 2, whose products
// 0, 61200, 3570, 1785, 12240, 32640, 4080, 510 are written out here), then
// all 65536 operand pairs, and compares M with a * b.
// It also counts how the final carry select adder was used: how often a
// block above the first received a carry of one (its binary to excess-1
// converter result selected) or of zero (its ripple carry result selected),
// and how often the product used bit 15. Each must happen at least once.
module tb_wallace_csla_bec_mult;
  logic [7:0]  A, B;
  logic [15:0] M;
  int checks = 0, failures = 0;
  int n_bec_sel = 0, n_rca_sel = 0, n_top_bit = 0;

  localparam int FIG_A [8] = '{0, 240, 14, 7, 48, 128, 16, 2};
  localparam int FIG_M [8] = '{0, 61200, 3570, 1785, 12240, 32640, 4080, 510};

  wallace_csla_bec_mult dut (.A(A), .B(B), .M(M));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(dut.u_tree.NL == 4, "8 partial product rows should take four layers");
    for (int i = 0; i < 8; i++) begin
      A = 8'(FIG_A[i]); B = 8'd255;
      #1;
      check(int'(M) == FIG_M[i], $sformatf("%0d * 255 = %0d, expected %0d", A, M, FIG_M[i]));
    end
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        A = 8'(a); B = 8'(b);
        #1;
        check(int'(M) == a * b, $sformatf("%0d * %0d = %0d", a, b, M));
        for (int k = 1; k < 3; k++) begin
          if (dut.u_tree.g_add.u_add.blk_c[k]) n_bec_sel++;
          else n_rca_sel++;
        end
        if (M[15]) n_top_bit++;
      end
    end
    check(n_bec_sel > 0, "no block ever took its converter result");
    check(n_rca_sel > 0, "no block ever took its ripple carry result");
    check(n_top_bit > 0, "product bit 15 was never set");
    $display("converter result selected: %0d, ripple result selected: %0d, bit 15 set: %0d",
             n_bec_sel, n_rca_sel, n_top_bit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
