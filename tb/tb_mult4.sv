// tb_mult4: the 4 x 4 multiplier worked step by step (N = 4).
// Checks the structure of the reduction: two layers (4 -> 3 -> 2 rows),
// the first with two half and two full adders, the second with one half
// and three full adders, then a single four-bit carry select block on
// product bits 3 to 6 whose carry out is bit 7. Then all 256 operand pairs
// are applied and M is compared with a * b.
module tb_mult4;
  logic [3:0] A, B;
  logic [7:0] M;
  int checks = 0, failures = 0;

  wallace_csla_bec_mult #(.N(4)) dut (.A(A), .B(B), .M(M));

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
    check(dut.u_tree.NL == 2, "4 rows should take two layers");
    check(dut.u_tree.g_lay[0].u_layer.N_HA == 2 && dut.u_tree.g_lay[0].u_layer.N_FA == 2,
          "first layer should use 2 HA and 2 FA");
    check(dut.u_tree.g_lay[1].u_layer.N_HA == 1 && dut.u_tree.g_lay[1].u_layer.N_FA == 3,
          "second layer should use 1 HA and 3 FA");
    check(dut.u_tree.LO == 3 && dut.u_tree.HI == 6, "final adder should span bits 3..6");
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++) begin
        A = 4'(a); B = 4'(b);
        #1;
        check(int'(M) == a * b, $sformatf("%0d * %0d = %0d", a, b, M));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
