// extend: widens the 16-bit immediate of an I-type instruction to 32 bits.
//
// Combinational. With sign high the immediate is sign extended (ADDIU, loads,
// stores); with sign low it is zero extended (ANDI, ORI, LUI). The unit and its
// control input are those of the reference lecture's datapath drawings; the polarity of the
// control bit is this design's choice.
module extend #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 32
) (
  input  logic [IN_W-1:0]  imm,
  input  logic             sign,
  output logic [OUT_W-1:0] y
);

  assign y = {{(OUT_W-IN_W){sign & imm[IN_W-1]}}, imm};

endmodule
