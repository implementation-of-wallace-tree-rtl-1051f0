// tb_csla_bec_adder: self-check of the chained carry select adder.
// The default 4-bit adder is tested exhaustively; an 11-bit adder (blocks
// of 4, 4 and 3 bits, the final adder of the 8 x 8 multiplier) is tested
// with random and corner operands. {co, s} must equal a + b + ci. The
// carries between blocks are read from the adder and the test counts how
// often a block received a carry of one, i.e. took its converter result.
module tb_csla_bec_adder;
  localparam int W2 = 11;
  logic [3:0]    a, b, s;
  logic          ci, co;
  logic [W2-1:0] a2, b2, s2;
  logic          ci2, co2;
  int checks = 0, failures = 0;
  int n_blk_carry = 0;

  csla_bec_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));
  csla_bec_adder #(.WIDTH(W2)) dut2 (.a(a2), .b(b2), .ci(ci2), .s(s2), .co(co2));

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
    for (int i = 0; i < 5000; i++) begin
      a2 = W2'($urandom); b2 = W2'($urandom); ci2 = 1'($urandom);
      if (i == 0) begin a2 = '1; b2 = '0; ci2 = 1'b1; end  // carry through all blocks
      if (i == 1) begin a2 = '1; b2 = '1; ci2 = 1'b1; end
      #1;
      checks++;
      for (int k = 1; k < 3; k++) if (dut2.blk_c[k]) n_blk_carry++;
      if ({co2, s2} != (W2+1)'(int'(a2) + int'(b2) + int'(ci2))) begin
        failures++;
        $display("FAIL W=%0d a=%0d b=%0d ci=%b -> %0d", W2, a2, b2, ci2, {co2, s2});
      end
    end
    checks++;
    if (n_blk_carry == 0) begin
      failures++;
      $display("FAIL no carry between blocks was ever one");
    end
    $display("block carries of one: %0d", n_blk_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
