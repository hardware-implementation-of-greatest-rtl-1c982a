// tb_gcd_comparator: self-checking test of the A < B comparator.
//
// Exhaustive over all 4-bit operand pairs at the default width, and 2000
// random 10-bit pairs (with equal pairs forced now and then), each compared
// with the integer relation a < b.
module tb_gcd_comparator;

  logic [3:0] a4, b4;
  logic [9:0] a10, b10;
  logic       lt4, lt10;
  int         checks = 0;
  int         failures = 0;

  gcd_comparator               u4  (.a(a4),  .b(b4),  .lt(lt4));
  gcd_comparator #(.WIDTH(10)) u10 (.a(a10), .b(b10), .lt(lt10));

  initial begin
    a10 = '0;
    b10 = '0;
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i);
        b4 = 4'(j);
        #1;
        checks++;
        if (lt4 !== (i < j)) begin
          failures++;
          $display("FAIL a=%0d b=%0d lt=%0d", i, j, lt4);
        end
      end
    end
    for (int n = 0; n < 2000; n++) begin
      int unsigned x, y;
      x = $urandom_range(0, 1023);
      y = (n % 7 == 0) ? x : $urandom_range(0, 1023);
      a10 = 10'(x);
      b10 = 10'(y);
      #1;
      checks++;
      if (lt10 !== (x < y)) begin
        failures++;
        $display("FAIL 10-bit a=%0d b=%0d lt=%0d", x, y, lt10);
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
