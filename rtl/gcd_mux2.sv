// gcd_mux2: WIDTH-bit 2-to-1 multiplexer.
//
// Each output bit is the sum of two products, (a & ~s) | (b & s): one AND
// gate per data bit and an OR per output bit, with a single inverter on the
// select line. s = 0 passes input a, s = 1 passes input b, as in the
// original multiplexer. Purely combinational.
//
// Interface: a[WIDTH-1:0], b[WIDTH-1:0], s in; o[WIDTH-1:0] out.
module gcd_mux2 #(
  parameter int unsigned WIDTH = gcd_pkg::GCD_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             s,
  output logic [WIDTH-1:0] o
);

  always_comb begin
    o = (a & {WIDTH{~s}}) | (b & {WIDTH{s}});
  end

endmodule
