// tb_gcd_mux2: self-checking test of the 2-to-1 multiplexer.
//
// Exhaustive over all 4-bit a, b and both select levels at the default
// width (s = 0 must give a, s = 1 must give b), plus random 12-bit words.
module tb_gcd_mux2;

  logic [3:0]  a4, b4, o4;
  logic [11:0] a12, b12, o12;
  logic        s;
  int          checks = 0;
  int          failures = 0;

  gcd_mux2              u4  (.a(a4),  .b(b4),  .s(s), .o(o4));
  gcd_mux2 #(.WIDTH(12)) u12 (.a(a12), .b(b12), .s(s), .o(o12));

  initial begin
    for (int sv = 0; sv < 2; sv++) begin
      for (int i = 0; i < 16; i++) begin
        for (int j = 0; j < 16; j++) begin
          s  = sv[0];
          a4 = 4'(i);
          b4 = 4'(j);
          a12 = 12'($urandom);
          b12 = 12'($urandom);
          #1;
          checks++;
          if (o4 !== (sv == 0 ? 4'(i) : 4'(j))) begin
            failures++;
            $display("FAIL s=%0d a=%h b=%h o=%h", sv, a4, b4, o4);
          end
          checks++;
          if (o12 !== (sv == 0 ? a12 : b12)) begin
            failures++;
            $display("FAIL 12-bit s=%0d a=%h b=%h o=%h", sv, a12, b12, o12);
          end
        end
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
