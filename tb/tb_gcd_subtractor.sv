// tb_gcd_subtractor: self-checking test of the ripple-borrow subtractor.
//
// Exhaustive over all 4-bit operand pairs at the default width and 2000
// random 16-bit pairs. The expected difference is (a - b) mod 2**WIDTH and
// the expected borrow is (a < b), both from integer arithmetic.
module tb_gcd_subtractor;

  logic [3:0]  a4, b4, d4;
  logic [15:0] a16, b16, d16;
  logic        br4, br16;
  int          checks = 0;
  int          failures = 0;

  gcd_subtractor               u4  (.a(a4),  .b(b4),  .d(d4),  .borrow(br4));
  gcd_subtractor #(.WIDTH(16)) u16 (.a(a16), .b(b16), .d(d16), .borrow(br16));

  initial begin
    a16 = '0;
    b16 = '0;
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i);
        b4 = 4'(j);
        #1;
        checks++;
        if (d4 !== 4'((i - j + 16) % 16) || br4 !== (i < j)) begin
          failures++;
          $display("FAIL %0d - %0d gave d=%0d borrow=%0d", i, j, d4, br4);
        end
      end
    end
    for (int n = 0; n < 2000; n++) begin
      int x, y;
      x = int'($urandom_range(0, 65535));
      y = int'($urandom_range(0, 65535));
      a16 = 16'(x);
      b16 = 16'(y);
      #1;
      checks++;
      if (d16 !== 16'((x - y + 65536) % 65536) || br16 !== (x < y)) begin
        failures++;
        $display("FAIL 16-bit %0d - %0d gave d=%0d borrow=%0d", x, y, d16, br16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
