// tb_rca: exhaustive self-check of the 4-bit ripple carry adder at its
// default width, plus random checks of a 13-bit instance. {co, s} is
// compared with the integer sum a + b + ci.
module tb_rca;
  localparam int W2 = 13;
  logic [3:0]    a, b, s;
  logic          ci, co;
  logic [W2-1:0] a2, b2, s2;
  logic          ci2, co2;
  int checks = 0, failures = 0;

  rca dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));
  rca #(.W(W2)) dut2 (.a(a2), .b(b2), .ci(ci2), .s(s2), .co(co2));

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
      if ({co, s} != 5'(int'(a) + int'(b) + int'(ci))) begin
        failures++;
        $display("FAIL a=%0d b=%0d ci=%b -> %0d", a, b, ci, {co, s});
      end
    end
    for (int i = 0; i < 2000; i++) begin
      a2 = W2'($urandom); b2 = W2'($urandom); ci2 = 1'($urandom);
      if (i == 0) begin a2 = '1; b2 = '0; ci2 = 1'b1; end  // full ripple
      #1;
      checks++;
      if ({co2, s2} != (W2+1)'(int'(a2) + int'(b2) + int'(ci2))) begin
        failures++;
        $display("FAIL W=%0d a=%0d b=%0d ci=%b", W2, a2, b2, ci2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
