// tb_gcd_register: self-checking test of the D flip-flop register.
//
// Drives random words at the falling edge and checks after each rising edge
// that q equals the word applied before it, and that q does not change
// between rising edges. Runs the default 4-bit width and a 9-bit instance.
module tb_gcd_register;

  logic       clk = 1'b0;
  logic [3:0] d4;
  logic [3:0] q4;
  logic [8:0] d9;
  logic [8:0] q9;
  int         checks = 0;
  int         failures = 0;

  gcd_register                u4 (.clk(clk), .d(d4), .q(q4));
  gcd_register #(.WIDTH(9))   u9 (.clk(clk), .d(d9), .q(q9));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [3:0] e4;
    logic [8:0] e9;
    d4 = '0;
    d9 = '0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      e4 = 4'($urandom);
      e9 = 9'($urandom);
      d4 = e4;
      d9 = e9;
      @(posedge clk);
      #1;
      check(q4 == e4, $sformatf("q4=%h expected %h", q4, e4));
      check(q9 == e9, $sformatf("q9=%h expected %h", q9, e9));
      // Change d mid-cycle: q must not follow until the next rising edge.
      d4 = ~e4;
      d9 = ~e9;
      #2;
      check(q4 == e4 && q9 == e9, "q changed without a clock edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
