// tb_partial_products: self-check of the AND array at N = 8 with random and
// corner operands. Every row must equal (a if b[i] else 0) << i, and the
// rows must add up to a * b.
module tb_partial_products;
  localparam int N = 8;
  logic [N-1:0]          a, b;
  logic [N-1:0][2*N-1:0] pp;
  int checks = 0, failures = 0;

  partial_products dut (.a(a), .b(b), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      logic [2*N-1:0] tot;
      a = N'($urandom); b = N'($urandom);
      if (t == 0) begin a = '1; b = '1; end
      #1;
      tot = '0;
      for (int i = 0; i < N; i++) begin
        logic [2*N-1:0] exp_row;
        exp_row = b[i] ? ((2*N)'(a) << i) : '0;
        checks++;
        if (pp[i] != exp_row) begin
          failures++;
          $display("FAIL a=%0d b=%0d row %0d = %h", a, b, i, pp[i]);
        end
        tot += pp[i];
      end
      checks++;
      if (tot != (2*N)'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL rows of %0d*%0d add to %0d", a, b, tot);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
