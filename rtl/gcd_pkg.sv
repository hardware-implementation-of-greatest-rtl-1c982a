// gcd_pkg: shared definitions of the subtraction-based GCD calculator.
//
// The calculator has a single mode input, RESET/GENERATE. At 0 the circuit
// is in input mode and loads the operands; at 1 it is in output (generate)
// mode and runs Euclid's algorithm by repeated subtraction. The encoding
// 0 = input, 1 = generate is the one the design specifies. The default data
// width of 4 bits is the width of the original circuit; every block is
// parameterised so the same structure works for any width.
package gcd_pkg;

  // Default operand width of the calculator.
  parameter int unsigned GCD_WIDTH = 4;

  // Level of the RESET/GENERATE input.
  typedef enum logic {
    MODE_INPUT    = 1'b0,  // load max(A,B) into REG A and min(A,B) into REG B
    MODE_GENERATE = 1'b1   // one subtract-or-swap step per clock
  } gcd_mode_e;

endpackage
