// gcd_comparator: unsigned magnitude comparator with one output, A < B.
//
// Works from the most significant bit down. Bit i decides the comparison
// when all higher bit pairs are equal (XNOR of each pair) and a[i] = 0 while
// b[i] = 1 (an inverter on a[i] and an AND). The output is the OR of these
// per-bit terms. This is the gate structure of the original 4-bit comparator,
// written here for any WIDTH. Purely combinational.
//
// Interface: a[WIDTH-1:0], b[WIDTH-1:0] in; lt out (1 when a < b).
module gcd_comparator #(
  parameter int unsigned WIDTH = gcd_pkg::GCD_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             lt
);

  logic [WIDTH-1:0] eq;        // bit pair i equal (XNOR)
  logic [WIDTH-1:0] decide;    // bit i is the first difference and a < b there

  always_comb begin
    eq = ~(a ^ b);
    for (int i = 0; i < WIDTH; i++) begin
      decide[i] = ~a[i] & b[i];
      for (int j = i + 1; j < WIDTH; j++) begin
        decide[i] = decide[i] & eq[j];
      end
    end
    lt = |decide;
  end

endmodule
