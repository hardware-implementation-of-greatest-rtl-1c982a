// tb_gcd_control: self-checking test of the GCD condition logic.
//
// Exhaustive over every 4-bit SUB value, both levels of the SUB < B' input
// and every 4-bit B'. Expected: sub_zero = (SUB == 0), swap = (SUB < B') and
// SUB != 0, result_d = B' when SUB == 0 and 0 otherwise.
module tb_gcd_control;

  logic [3:0] sub, reg_b, result_d;
  logic       sub_lt_b, sub_zero, swap;
  int         checks = 0;
  int         failures = 0;

  gcd_control u_dut (
    .sub(sub), .sub_lt_b(sub_lt_b), .reg_b(reg_b),
    .sub_zero(sub_zero), .swap(swap), .result_d(result_d)
  );

  initial begin
    for (int s = 0; s < 16; s++) begin
      for (int l = 0; l < 2; l++) begin
        for (int r = 0; r < 16; r++) begin
          bit       ez, es;
          bit [3:0] er;
          sub      = 4'(s);
          sub_lt_b = l[0];
          reg_b    = 4'(r);
          #1;
          ez = (s == 0);
          es = (l == 1) && (s != 0);
          er = ez ? 4'(r) : 4'd0;
          checks++;
          if (sub_zero !== ez || swap !== es || result_d !== er) begin
            failures++;
            $display("FAIL sub=%0d lt=%0d b=%0d: zero=%0d swap=%0d res=%0d",
                     s, l, r, sub_zero, swap, result_d);
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
