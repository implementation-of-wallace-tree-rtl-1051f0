// tb_mult_widths: the multiplier at other operand widths. Instances with
// N = 1, 3, 5, 12 and 16 get random operands (plus all ones) and their
// products are compared with a * b computed in 64-bit integers. This
// exercises trees whose row counts leave one or two rows out of a group
// and final adders whose last block is narrower than four bits.
module tb_mult_widths;
  logic [0:0]  a1, b1;   logic [1:0]  m1;
  logic [2:0]  a3, b3;   logic [5:0]  m3;
  logic [4:0]  a5, b5;   logic [9:0]  m5;
  logic [11:0] a12, b12; logic [23:0] m12;
  logic [15:0] a16, b16; logic [31:0] m16;
  int checks = 0, failures = 0;

  wallace_csla_bec_mult #(.N(1))  d1  (.A(a1),  .B(b1),  .M(m1));
  wallace_csla_bec_mult #(.N(3))  d3  (.A(a3),  .B(b3),  .M(m3));
  wallace_csla_bec_mult #(.N(5))  d5  (.A(a5),  .B(b5),  .M(m5));
  wallace_csla_bec_mult #(.N(12)) d12 (.A(a12), .B(b12), .M(m12));
  wallace_csla_bec_mult #(.N(16)) d16 (.A(a16), .B(b16), .M(m16));

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
    for (int t = 0; t < 10000; t++) begin
      {a1, b1} = 2'($urandom);
      a3 = 3'($urandom);   b3 = 3'($urandom);
      a5 = 5'($urandom);   b5 = 5'($urandom);
      a12 = 12'($urandom); b12 = 12'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom);
      if (t == 0) begin
        a1 = '1; b1 = '1; a3 = '1; b3 = '1; a5 = '1; b5 = '1;
        a12 = '1; b12 = '1; a16 = '1; b16 = '1;
      end
      #1;
      check(longint'(m1)  == longint'(a1)  * longint'(b1),  "N=1");
      check(longint'(m3)  == longint'(a3)  * longint'(b3),  $sformatf("N=3 %0d*%0d=%0d", a3, b3, m3));
      check(longint'(m5)  == longint'(a5)  * longint'(b5),  $sformatf("N=5 %0d*%0d=%0d", a5, b5, m5));
      check(longint'(m12) == longint'(a12) * longint'(b12), $sformatf("N=12 %0d*%0d=%0d", a12, b12, m12));
      check(longint'(m16) == longint'(a16) * longint'(b16), $sformatf("N=16 %0d*%0d=%0d", a16, b16, m16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
