// gcd_full_subtractor: one-bit full subtractor cell.
//
// Computes a - b - bin. The difference bit is the XOR of the three inputs
// (two XOR gates in series). A borrow is produced when a is 0 and either b
// or bin is 1, or when b and bin are both 1: three AND gates, one fed by an
// inverted a, into an OR. Purely combinational.
//
// Interface: a, b, bin in; d, bout out.
module gcd_full_subtractor (
  input  logic a,
  input  logic b,
  input  logic bin,
  output logic d,
  output logic bout
);

  always_comb begin
    d    = (a ^ b) ^ bin;
    bout = (~a & b) | (~a & bin) | (b & bin);
  end

endmodule
