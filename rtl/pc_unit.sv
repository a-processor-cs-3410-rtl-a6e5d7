// pc_unit: the program counter and next-PC logic of the single-cycle MIPS.
//
// Holds the 32-bit PC and, each rising clock edge, loads one of four
// candidates chosen by sel:
//   PC_SEQ     PC+4
//   PC_BRANCH  PC+4 + (sign_extend(offset) << 2)   (BEQ/BNE/BLTZ/BGEZ/BLEZ/BGTZ)
//   PC_JUMP    (PC+4)[31:28] || target || 00        (J, JAL)
//   PC_JREG    jr_addr, a register value            (JR)
// Both relative and absolute targets are formed from the already incremented
// PC, as MIPS specifies. pc_plus8 (PC+4, incremented again) is the link value
// JAL writes to r31. The four sources, the adders and the concatenation follow
// the reference lecture's datapath drawings. The synchronous reset to address 0 and the absence of
// a branch delay slot (the selected target is fetched next) are this design's
// choices: the reference lecture mentions neither a reset nor a delay slot.
module pc_unit
  import mips_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  pc_sel_e     sel,
  input  logic [15:0] offset,
  input  logic [25:0] target,
  input  logic [31:0] jr_addr,
  output logic [31:0] pc,
  output logic [31:0] pc_plus4,
  output logic [31:0] pc_plus8
);

  logic [31:0] branch_tgt, jump_tgt, next_pc;

  assign pc_plus4   = pc + 32'd4;
  assign pc_plus8   = pc_plus4 + 32'd4;
  assign branch_tgt = pc_plus4 + {{14{offset[15]}}, offset, 2'b00};
  assign jump_tgt   = {pc_plus4[31:28], target, 2'b00};

  always_comb begin
    unique case (sel)
      PC_BRANCH: next_pc = branch_tgt;
      PC_JUMP:   next_pc = jump_tgt;
      PC_JREG:   next_pc = jr_addr;
      default:   next_pc = pc_plus4;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else     pc <= next_pc;
  end

endmodule
