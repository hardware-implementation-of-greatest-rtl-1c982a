// tb_gcd_top: end-to-end test of the GCD calculator at its default width.
//
// For every pair of 4-bit operands the bench loads A and B with
// RESET/GENERATE = 0 for one rising edge, switches to 1 and then checks,
// edge by edge, that RESULT stays 0 until the expected edge and then shows
// the GCD and keeps it. The expected GCD comes from the remainder form of
// Euclid's algorithm (a mod b); the expected number of clocks comes from an
// integer model of the subtract-or-swap sequence: for k steps until
// A' - B' = 0, RESULT becomes valid on generate edge k + 1. Pairs with a
// zero operand check the documented behaviour (RESULT stays 0).
//
// The bench also counts how often each mechanism of the design occurred:
// operands swapped at loading (A < B), a subtract step, a swap step, the
// done/hold state, and a return to input mode after a finished run. A
// mechanism that never occurred counts as a failure. The document's own
// example, GCD(12, 15) = 3, is run first.
module tb_gcd_top;

  localparam int W = gcd_pkg::GCD_WIDTH;
  localparam int MAXV = (1 << W) - 1;

  logic         clk = 1'b0;
  logic         reset_generate;
  logic [W-1:0] a, b;
  logic [W-1:0] result;
  int           checks = 0;
  int           failures = 0;
  int           n_load_swap = 0, n_sub_step = 0, n_swap_step = 0;
  int           n_done = 0, n_reload = 0;
  int           max_clocks = 0;

  gcd_top dut (
    .clk(clk), .reset_generate(reset_generate), .a(a), .b(b), .result(result)
  );

  always #5 clk = ~clk;

  // Mechanism counters, sampled on the rising edge.
  always @(posedge clk) begin
    if (reset_generate == 1'b0 && dut.in_lt) n_load_swap++;
    if (reset_generate == 1'b1) begin
      if (dut.sub_zero)                  n_done++;
      else if (dut.swap)                 n_swap_step++;
      else                               n_sub_step++;
    end
  end

  function automatic int ref_gcd(int x, int y);
    while (y != 0) begin
      int t;
      t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  // Number of subtract-or-swap clocks before A' - B' = 0 (x, y non-zero).
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

  task automatic run_pair(input int x, input int y);
    int g, k, limit;
    @(negedge clk);
    if (reset_generate == 1'b1 && result != '0) n_reload++;
    reset_generate = 1'b0;
    a = W'(x);
    b = W'(y);
    @(negedge clk);            // one loading edge has passed
    reset_generate = 1'b1;
    if (x != 0 && y != 0) begin
      g = ref_gcd(x, y);
      k = ref_steps(x, y);
      if (k + 1 > max_clocks) max_clocks = k + 1;
      for (int e = 1; e <= k; e++) begin
        @(negedge clk);
        check(result == '0, $sformatf("(%0d,%0d) RESULT=%0d early at edge %0d of %0d",
                                     x, y, result, e, k + 1));
      end
      @(negedge clk);
      check(result == W'(g), $sformatf("(%0d,%0d) RESULT=%0d expected %0d at edge %0d",
                                      x, y, result, g, k + 1));
      // Constant output afterwards.
      repeat (2) @(negedge clk);
      check(result == W'(g), $sformatf("(%0d,%0d) RESULT changed to %0d", x, y, result));
    end else begin
      limit = 2 * MAXV + 2;
      repeat (limit) @(negedge clk);
      check(result == '0, $sformatf("(%0d,%0d) zero operand: RESULT=%0d", x, y, result));
    end
  endtask

  initial begin
    reset_generate = 1'b0;
    a = '0;
    b = '0;
    repeat (2) @(negedge clk);
    run_pair(12, 15);
    for (int x = 0; x <= MAXV; x++) begin
      for (int y = 0; y <= MAXV; y++) begin
        run_pair(x, y);
      end
    end
    check(n_load_swap > 0, "operands were never swapped at loading");
    check(n_sub_step > 0,  "no subtract step occurred");
    check(n_swap_step > 0, "no swap step occurred");
    check(n_done > 0,      "the done state never occurred");
    check(n_reload > 0,    "input mode never followed a finished run");
    $display("mechanisms: load_swap=%0d subtract=%0d swap=%0d done=%0d reload=%0d; longest run %0d clocks",
             n_load_swap, n_sub_step, n_swap_step, n_done, n_reload, max_clocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
