// alu: the arithmetic/logic unit of the single-cycle MIPS datapath.
//
// Purely combinational. Computes y = a op b for add, subtract, and, or, xor
// and nor, and shifts the B operand by shamt for the three shifts (SLL, SRL
// logical, SRA arithmetic). Shifting B rather than A lets the same path serve
// LUI: the datapath puts the immediate on B and selects a shift amount of 16.
// Addition and subtraction are modulo 2^32 with no overflow trap (the
// unsigned ADDU/SUBU/ADDIU forms of the reference lecture). The operation set comes from
// its instruction tables; AND is present because ANDI needs it.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  alu_op_e                    op,
  input  logic [WIDTH-1:0]           a,
  input  logic [WIDTH-1:0]           b,
  input  logic [$clog2(WIDTH)-1:0]   shamt,
  output logic [WIDTH-1:0]           y
);

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_NOR: y = ~(a | b);
      ALU_SLL: y = b << shamt;
      ALU_SRL: y = b >> shamt;
      ALU_SRA: y = WIDTH'($signed(b) >>> shamt);
      default: y = '0;
    endcase
  end

endmodule
