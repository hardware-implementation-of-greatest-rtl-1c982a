// gcd_control: condition logic of the GCD calculator.
//
// Turns the subtractor and comparator outputs into the multiplexer selects
// and the RESULT register input, with inverters and AND gates only:
//   sub_zero = AND of the inverted bits of SUB           (A' - B' = 0: done)
//   swap     = sub_lt_b AND NOT sub_zero                  (A' <- B', B' <- SUB)
//   result_d = reg_b AND sub_zero, bit by bit             (RESULT <- B' when done)
// When neither sub_zero nor swap holds, SUB >= B' and the datapath performs
// another subtraction (A' <- SUB). The three outputs follow the steps of the
// subtraction-based algorithm; the exact gating is this design's reading of
// them. Purely combinational.
//
// Interface: sub[WIDTH-1:0], sub_lt_b, reg_b[WIDTH-1:0] in;
//            sub_zero, swap, result_d[WIDTH-1:0] out.
module gcd_control #(
  parameter int unsigned WIDTH = gcd_pkg::GCD_WIDTH
) (
  input  logic [WIDTH-1:0] sub,
  input  logic             sub_lt_b,
  input  logic [WIDTH-1:0] reg_b,
  output logic             sub_zero,
  output logic             swap,
  output logic [WIDTH-1:0] result_d
);

  always_comb begin
    sub_zero = &(~sub);
    swap     = sub_lt_b & ~sub_zero;
    result_d = reg_b & {WIDTH{sub_zero}};
  end

endmodule
