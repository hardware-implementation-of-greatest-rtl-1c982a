// tb_gcd_top_wide: the GCD calculator widened to 8 bits.
//
// The calculator's structure does not depend on its width; this bench
// builds it with WIDTH = 8 and runs the example pairs that need more than
// 4 bits, GCD(136, 144) = 8, GCD(12, 18) = 6 and GCD(9, 15) = 3, the worst
// case for the clock count, (255, 1), and 3000 random non-zero pairs. Each
// result is compared with the remainder form of Euclid's algorithm, and the
// clock on which RESULT becomes valid with an integer model of the
// subtract-or-swap sequence (k steps: valid on generate edge k + 1).
module tb_gcd_top_wide;

  localparam int W = 8;
  localparam int MAXV = (1 << W) - 1;

  logic         clk = 1'b0;
  logic         reset_generate;
  logic [W-1:0] a, b;
  logic [W-1:0] result;
  int           checks = 0;
  int           failures = 0;
  int           max_clocks = 0;

  gcd_top #(.WIDTH(W)) dut (
    .clk(clk), .reset_generate(reset_generate), .a(a), .b(b), .result(result)
  );

  always #5 clk = ~clk;

  function automatic int ref_gcd(int x, int y);
    while (y != 0) begin
      int t;
      t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  function automatic int ref_steps(int x, int y);
    int hi, lo, k;
    hi = (x > y) ? x : y;
    lo = (x > y) ? y : x;
    k = 0;
    while (hi - lo != 0) begin
      if (hi - lo < lo) begin
        int t;
        t  = hi - lo;
        hi = lo;
        lo = t;
      end else begin
        hi = hi - lo;
      end
      k++;
    end
    return k;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_pair(input int x, input int y, input bit show);
    int g, k, e;
    g = ref_gcd(x, y);
    k = ref_steps(x, y);
    @(negedge clk);
    reset_generate = 1'b0;
    a = W'(x);
    b = W'(y);
    @(negedge clk);
    reset_generate = 1'b1;
    // RESULT has no reset: the loading edge still latched the previous
    // run's value, so the first generate edge is always waited for.
    @(negedge clk);
    e = 1;
    while (result == '0 && e <= k + 2) begin
      @(negedge clk);
      e++;
    end
    check(result == W'(g), $sformatf("(%0d,%0d) RESULT=%0d expected %0d", x, y, result, g));
    check(e == k + 1, $sformatf("(%0d,%0d) valid after %0d clocks, expected %0d", x, y, e, k + 1));
    if (e > max_clocks) max_clocks = e;
    if (show) $display("GCD(%0d, %0d) = %0d after %0d clocks", x, y, result, e);
  endtask

  initial begin
    reset_generate = 1'b0;
    a = '0;
    b = '0;
    repeat (2) @(negedge clk);
    run_pair(136, 144, 1'b1);
    run_pair(12, 18, 1'b1);
    run_pair(9, 15, 1'b1);
    run_pair(255, 1, 1'b1);
    for (int n = 0; n < 3000; n++) begin
      run_pair(int'($urandom_range(1, MAXV)), int'($urandom_range(1, MAXV)), 1'b0);
    end
    $display("longest run %0d clocks", max_clocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
