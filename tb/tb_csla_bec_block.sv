// tb_csla_bec_block: exhaustive self-check of the 4-bit carry select block
// with binary to excess-1 converter, and of a 3-bit block (the width of a
// last, shorter block). {co, s} must equal a + b + ci. The test also counts
// how often the carry-in-1 (converter) result was selected, and requires
// that both paths were exercised.
module tb_csla_bec_block;
  logic [3:0] a, b, s;
  logic       ci, co;
  logic [2:0] a3, b3, s3;
  logic       ci3, co3;
  int checks = 0, failures = 0;
  int n_bec = 0, n_rca = 0;

  csla_bec_block dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));
  csla_bec_block #(.W(3)) dut3 (.a(a3), .b(b3), .ci(ci3), .s(s3), .co(co3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {ci, a, b} = 9'(i);
      #1;
      checks++;
      if (ci) n_bec++; else n_rca++;
      if ({co, s} != 5'(int'(a) + int'(b) + int'(ci))) begin
        failures++;
        $display("FAIL a=%0d b=%0d ci=%b -> %0d", a, b, ci, {co, s});
      end
    end
    for (int i = 0; i < 128; i++) begin
      {ci3, a3, b3} = 7'(i);
      #1;
      checks++;
      if ({co3, s3} != 4'(int'(a3) + int'(b3) + int'(ci3))) begin
        failures++;
        $display("FAIL W=3 a=%0d b=%0d ci=%b -> %0d", a3, b3, ci3, {co3, s3});
      end
    end
    checks++;
    if (n_bec == 0 || n_rca == 0) begin
      failures++;
      $display("FAIL a result path was never selected");
    end
    $display("carry-in-1 (converter) path: %0d, carry-in-0 path: %0d", n_bec, n_rca);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
