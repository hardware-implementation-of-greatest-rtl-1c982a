// gcd_top: GCD calculator using repeated subtraction (Euclid's algorithm).
//
// Idea: Euclid's remainder a mod b is formed by subtracting b from a until
// the difference drops below b. The circuit holds two numbers A' >= B' in
// REG A and REG B and on each clock does exactly one of three things:
//   SUB = A' - B' >= B'        subtract:  A' <- SUB,  B' <- B'
//   0 < SUB < B'               swap:      A' <- B',   B' <- SUB
//   SUB = 0                    done:      A' and B' hold, RESULT <- B'
// A' >= B' holds throughout, so the subtraction never borrows, and B' at the
// moment SUB becomes 0 is the greatest common divisor.
//
// Datapath (block names follow the original schematic):
//   A<B? (input)   compares A and B; two 2x1 MUXes put max(A,B) towards
//                  REG A and min(A,B) towards REG B.
//   SUBTRACTOR     SUB = REG A - REG B.
//   A<B? (second)  SUB < REG B.
//   control        SUB = 0 detection, swap condition, RESULT gating.
//   2x1 MUX (x3)   next A' = swap ? B' : (SUB < B' ? A' : SUB);
//                  next B' = swap ? SUB : B'.
//   COMB A/B MUX   RESET/GENERATE = 0 loads the input numbers,
//                  RESET/GENERATE = 1 loads the next A', B' above.
//   REG A, REG B, RESULT  registers on the clock pulse CP.
//   RESULT's input is B' AND (SUB = 0), so RESULT reads 0 while the
//   computation runs and the GCD, constant, once it has finished.
//
// Use: hold reset_generate at 0 for at least one rising clock edge with the
// operands on a and b, then set it to 1. RESULT is valid (non-zero) one edge
// after SUB first becomes 0: for operands whose Euclid steps take k
// subtract-or-swap clocks, the GCD appears on the (k+1)-th rising edge in
// generate mode. If A = B that is the first edge after the loading edge.
// Operands are unsigned and should be non-zero: with exactly one operand 0
// the subtraction never reaches 0 and RESULT stays 0; with both 0 it is 0.
//
// Interface: clk (CP), reset_generate (0 input mode, 1 generate mode),
// a[WIDTH-1:0], b[WIDTH-1:0] in; result[WIDTH-1:0] out.
// The algorithm, the block list and the mode encoding follow the original
// design; the multiplexer select wiring and the absence of a register reset
// are this design's reading of the schematic.
module gcd_top #(
  parameter int unsigned WIDTH = gcd_pkg::GCD_WIDTH
) (
  input  logic             clk,
  input  logic             reset_generate,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] result
);

  import gcd_pkg::*;

  gcd_mode_e        mode;
  logic             in_lt;        // A < B at the inputs
  logic [WIDTH-1:0] in_max;       // max(A, B)
  logic [WIDTH-1:0] in_min;       // min(A, B)
  logic [WIDTH-1:0] reg_a;        // A'
  logic [WIDTH-1:0] reg_b;        // B'
  logic [WIDTH-1:0] sub;          // A' - B'
  logic             sub_borrow;   // A' < B', never in a correct run
  logic             sub_lt_b;     // SUB < B'
  logic             sub_zero;     // SUB = 0
  logic             swap;         // 0 < SUB < B'
  logic [WIDTH-1:0] step_a;       // SUB, or A' held when SUB < B'
  logic [WIDTH-1:0] next_a;       // A' for the next generate clock
  logic [WIDTH-1:0] next_b;       // B' for the next generate clock
  logic [WIDTH-1:0] d_a;          // REG A input after the mode multiplexer
  logic [WIDTH-1:0] d_b;          // REG B input after the mode multiplexer
  logic [WIDTH-1:0] result_d;     // RESULT input, B' gated by SUB = 0

  assign mode = gcd_mode_e'(reset_generate);

  // Input stage: order the operands so that REG A starts with the larger.
  gcd_comparator #(.WIDTH(WIDTH)) u_cmp_in (.a(a), .b(b), .lt(in_lt));
  gcd_mux2 #(.WIDTH(WIDTH)) u_mux_in_max (.a(a), .b(b), .s(in_lt), .o(in_max));
  gcd_mux2 #(.WIDTH(WIDTH)) u_mux_in_min (.a(b), .b(a), .s(in_lt), .o(in_min));

  // Subtraction and its tests.
  gcd_subtractor #(.WIDTH(WIDTH)) u_sub (
    .a(reg_a), .b(reg_b), .d(sub), .borrow(sub_borrow)
  );
  gcd_comparator #(.WIDTH(WIDTH)) u_cmp_sub (.a(sub), .b(reg_b), .lt(sub_lt_b));
  gcd_control #(.WIDTH(WIDTH)) u_ctrl (
    .sub(sub), .sub_lt_b(sub_lt_b), .reg_b(reg_b),
    .sub_zero(sub_zero), .swap(swap), .result_d(result_d)
  );

  // Next-state multiplexers for generate mode.
  gcd_mux2 #(.WIDTH(WIDTH)) u_mux_a_step (.a(sub),    .b(reg_a), .s(sub_lt_b), .o(step_a));
  gcd_mux2 #(.WIDTH(WIDTH)) u_mux_a_swap (.a(step_a), .b(reg_b), .s(swap),     .o(next_a));
  gcd_mux2 #(.WIDTH(WIDTH)) u_mux_b_swap (.a(reg_b),  .b(sub),   .s(swap),     .o(next_b));

  // Mode multiplexers (COMB A, COMB B): inputs in input mode, feedback otherwise.
  gcd_mux2 #(.WIDTH(WIDTH)) u_comb_a (
    .a(in_max), .b(next_a), .s(mode == MODE_GENERATE), .o(d_a)
  );
  gcd_mux2 #(.WIDTH(WIDTH)) u_comb_b (
    .a(in_min), .b(next_b), .s(mode == MODE_GENERATE), .o(d_b)
  );

  // Registers on the clock pulse.
  gcd_register #(.WIDTH(WIDTH)) u_reg_a  (.clk(clk), .d(d_a),      .q(reg_a));
  gcd_register #(.WIDTH(WIDTH)) u_reg_b  (.clk(clk), .d(d_b),      .q(reg_b));
  gcd_register #(.WIDTH(WIDTH)) u_result (.clk(clk), .d(result_d), .q(result));

  // REG A >= REG B once the operands have been loaded: the subtractor must
  // not borrow on the first generate clock after input mode.
  a_no_borrow_after_load : assert property (
    @(posedge clk) (mode == MODE_GENERATE && $past(mode) == MODE_INPUT) |-> !sub_borrow
  ) else $error("REG A < REG B after loading");

  // Once SUB = 0 in generate mode the registers hold and RESULT takes B'.
  a_done_holds : assert property (
    @(posedge clk) (mode == MODE_GENERATE && sub_zero) |=>
      (reg_b == $past(reg_b) && result == $past(reg_b))
  ) else $error("GCD calculator did not hold after SUB = 0");

endmodule
