// tb_bec: exhaustive self-check of the binary to excess-1 converter at its
// default width (3) and at width 5 (the width used inside a 4-bit carry
// select block). x must equal s + 1 modulo 2^W.
module tb_bec;
  logic [2:0] s3, x3;
  logic [4:0] s5, x5;
  int checks = 0, failures = 0;

  bec dut (.s(s3), .x(x3));
  bec #(.W(5)) dut5 (.s(s5), .x(x5));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      s3 = 3'(i);
      #1;
      checks++;
      if (x3 != 3'(i + 1)) begin
        failures++;
        $display("FAIL W=3 s=%0d x=%0d", s3, x3);
      end
    end
    for (int i = 0; i < 32; i++) begin
      s5 = 5'(i);
      #1;
      checks++;
      if (x5 != 5'(i + 1)) begin
        failures++;
        $display("FAIL W=5 s=%0d x=%0d", s5, x5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
