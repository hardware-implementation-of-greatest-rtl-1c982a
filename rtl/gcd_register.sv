// gcd_register: WIDTH-bit register of D flip-flops on one clock.
//
// Each bit is a D flip-flop; all share the clock pulse, so the whole word is
// loaded on every rising edge. There is no enable and no reset: a value is
// kept by feeding it back to the data input through a multiplexer, which is
// how REG A, REG B and RESULT of the GCD calculator retain their contents.
// The absence of enable and reset follows the original register; the choice
// of the rising edge is this design's.
//
// Interface: clk, d[WIDTH-1:0] in; q[WIDTH-1:0] out.
// Timing: q takes the value of d one rising edge later.
module gcd_register #(
  parameter int unsigned WIDTH = gcd_pkg::GCD_WIDTH
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    q <= d;
  end

endmodule
