// zero_compare: the "cmp" unit that tests one register against zero for
// BLTZ, BGEZ, BLEZ and BGTZ.
//
// Combinational. The value is read as a two's-complement number; mode selects
// which relation to zero is reported on taken. The unit and its mode input are
// those of the reference lecture's datapath drawing; the mode encoding is this design's choice.
module zero_compare
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  cmp_mode_e        mode,
  output logic             taken
);

  logic neg, zero;
  assign neg  = a[WIDTH-1];
  assign zero = (a == '0);

  always_comb begin
    unique case (mode)
      CMP_LTZ: taken = neg;
      CMP_GEZ: taken = !neg;
      CMP_LEZ: taken = neg || zero;
      CMP_GTZ: taken = !neg && !zero;
      default: taken = 1'b0;
    endcase
  end

endmodule
