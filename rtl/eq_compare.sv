// eq_compare: the "=?" unit that compares the two register operands for BEQ/BNE.
//
// Combinational: eq is high when a equals b. The decoder turns eq into a taken
// or not-taken branch (taken on eq for BEQ, on !eq for BNE). A dedicated
// comparator, rather than the ALU, is how the reference lecture draws it.
module eq_compare #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             eq
);

  assign eq = (a == b);

endmodule
