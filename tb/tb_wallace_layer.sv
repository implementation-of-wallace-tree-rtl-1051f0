// tb_wallace_layer: self-check of one Wallace reduction layer.
// 1) The first layer of the 4 x 4 multiplier: input rows are the staircase
//    of a 4 x 4 AND array (row i on bits i..i+3). It must use two half and
//    two full adders, give 3 rows, keep bit 0 (a0b0) and bit 5 (a3b2) of
//    the sum row as plain copies, and keep the total.
// 2) The second layer of the 4 x 4 multiplier: sum row on bits 0..5, carry
//    row on bits 2..5, fourth partial product row on bits 3..6. It must use
//    one half and three full adders and keep the total.
// 3) The default layer (8 full 16-bit rows): the total modulo 2^16 of the
//    6 output rows must equal that of the 8 inputs.
// Expected values are integer sums of the rows, worked out here.
module tb_wallace_layer;
  localparam logic [3:0][7:0] M1 = {8'b0111_1000, 8'b0011_1100, 8'b0001_1110, 8'b0000_1111};
  localparam logic [2:0][7:0] M2 = {8'b0111_1000, 8'b0011_1100, 8'b0011_1111};

  logic [3:0][7:0]  r1_i;
  logic [2:0][7:0]  r1_o;
  logic [2:0][7:0]  r2_i;
  logic [1:0][7:0]  r2_o;
  logic [7:0][15:0] r3_i;
  logic [5:0][15:0] r3_o;
  int checks = 0, failures = 0;

  wallace_layer #(.W(8), .ROWS(4), .MASK(M1)) dut1 (.rows_i(r1_i), .rows_o(r1_o));
  wallace_layer #(.W(8), .ROWS(3), .MASK(M2)) dut2 (.rows_i(r2_i), .rows_o(r2_o));
  wallace_layer dut3 (.rows_i(r3_i), .rows_o(r3_o));

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
    check(dut1.N_HA == 2 && dut1.N_FA == 2, "layer 1 should use 2 HA and 2 FA");
    check(dut2.N_HA == 1 && dut2.N_FA == 3, "layer 2 should use 1 HA and 3 FA");
    for (int t = 0; t < 3000; t++) begin
      int s_in, s_out;
      logic [15:0] t_in, t_out;
      for (int i = 0; i < 4; i++) r1_i[i] = 8'($urandom) & M1[i];
      for (int i = 0; i < 3; i++) r2_i[i] = 8'($urandom) & M2[i];
      for (int i = 0; i < 8; i++) r3_i[i] = 16'($urandom);
      #1;
      s_in = 0; s_out = 0;
      for (int i = 0; i < 4; i++) s_in += int'(r1_i[i]);
      for (int i = 0; i < 3; i++) s_out += int'(r1_o[i]);
      check(s_in == s_out, $sformatf("layer 1 total %0d != %0d", s_out, s_in));
      check(r1_o[0][0] == r1_i[0][0] && r1_o[0][5] == r1_i[2][5],
            "layer 1 should pass a0b0 and a3b2 unchanged");
      check(r1_o[2] == r1_i[3], "layer 1 should pass the fourth row");
      s_in = 0; s_out = 0;
      for (int i = 0; i < 3; i++) s_in += int'(r2_i[i]);
      for (int i = 0; i < 2; i++) s_out += int'(r2_o[i]);
      check(s_in == s_out, $sformatf("layer 2 total %0d != %0d", s_out, s_in));
      check(r2_o[0][6] == r2_i[2][6] && r2_o[0][1:0] == r2_i[0][1:0],
            "layer 2 should pass a3b3, s0 and a0b0 unchanged");
      t_in = '0; t_out = '0;
      for (int i = 0; i < 8; i++) t_in += r3_i[i];
      for (int i = 0; i < 6; i++) t_out += r3_o[i];
      check(t_in == t_out, $sformatf("default layer total %0d != %0d", t_out, t_in));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
