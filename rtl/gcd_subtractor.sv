// gcd_subtractor: WIDTH-bit ripple-borrow subtractor, d = a - b.
//
// A chain of gcd_full_subtractor cells. The borrow input of bit 0 is tied
// to 0 and each cell's borrow output feeds the next cell, as in the original
// 4-bit full subtractor. The difference wraps modulo 2**WIDTH; borrow is 1
// exactly when a < b. Purely combinational; the delay grows linearly with
// WIDTH through the borrow chain.
//
// Interface: a[WIDTH-1:0], b[WIDTH-1:0] in; d[WIDTH-1:0], borrow out.
module gcd_subtractor #(
  parameter int unsigned WIDTH = gcd_pkg::GCD_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] d,
  output logic             borrow
);

  logic [WIDTH:0] chain;  // chain[i] is the borrow into bit i

  assign chain[0] = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    gcd_full_subtractor u_fs (
      .a   (a[i]),
      .b   (b[i]),
      .bin (chain[i]),
      .d   (d[i]),
      .bout(chain[i+1])
    );
  end

  assign borrow = chain[WIDTH];

endmodule
