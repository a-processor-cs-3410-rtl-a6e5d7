// control: the instruction decoder of the single-cycle MIPS.
//
// Combinational. From the 32-bit instruction and the two branch-compare
// results (eq from the "=?" unit, cmp_taken from the "cmp" unit) it produces
// the register indices of the three register-file ports, the write enable,
// the ALU operation and its operand selects, the extend mode, the memory
// enable and control code, the load narrowing, the write-back source, the
// compare mode and the next-PC source (ctrl_t in mips_pkg).
// Field use follows the instruction formats: R-type writes bits 15:11 and
// reads bits 25:21 and 20:16; I-type writes (or, for stores and BEQ/BNE,
// reads) bits 20:16; JAL writes r31 with PC+8. Shifts shift the bits 20:16
// register by the 5-bit shamt field, LUI shifts the zero-extended immediate by
// 16. The decoded instruction set is exactly the one in the reference lecture's tables:
//   R-type: SLL SRL SRA JR ADDU SUBU OR XOR NOR
//   I-type: ADDIU ANDI ORI LUI LB LBU LH LHU LW SB SH SW
//   branches: BEQ BNE BLTZ BGEZ BLEZ BGTZ; jumps: J JAL
// Any other encoding is this design's choice: it is executed as a no-op
// (no register or memory write, PC+4) and flagged on illegal.
module control
  import mips_pkg::*;
(
  input  logic [31:0] inst,
  input  logic        eq,
  input  logic        cmp_taken,
  output ctrl_t       ctrl,
  output cmp_mode_e   cmp_mode,
  output pc_sel_e     pc_sel
);

  // Kind of control transfer; resolved to pc_sel once the compares are known.
  typedef enum logic [2:0] {XFER_NONE, XFER_EQ, XFER_NE, XFER_CMP, XFER_JUMP, XFER_JREG} xfer_e;
  xfer_e xfer;

  logic [5:0] op, fn;
  logic [4:0] rs, rt, rd;

  assign op = inst[31:26];
  assign rs = inst[25:21];
  assign rt = inst[20:16];
  assign rd = inst[15:11];
  assign fn = inst[5:0];

  always_comb begin
    ctrl           = '0;
    ctrl.ra        = rs;
    ctrl.rb        = rt;
    ctrl.rw        = rt;
    ctrl.alu_op    = ALU_ADD;
    ctrl.mem_mc    = MC_READ_WORD;
    ctrl.load_kind = LD_WORD;
    ctrl.wb_sel    = WB_ALU;
    cmp_mode       = CMP_LTZ;
    xfer           = XFER_NONE;

    unique case (op)
      OP_RTYPE: begin
        ctrl.rw     = rd;
        ctrl.reg_we = 1'b1;
        unique case (fn)
          FN_SLL:  ctrl.alu_op = ALU_SLL;
          FN_SRL:  ctrl.alu_op = ALU_SRL;
          FN_SRA:  ctrl.alu_op = ALU_SRA;
          FN_ADDU: ctrl.alu_op = ALU_ADD;
          FN_SUBU: ctrl.alu_op = ALU_SUB;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_XOR:  ctrl.alu_op = ALU_XOR;
          FN_NOR:  ctrl.alu_op = ALU_NOR;
          FN_JR: begin
            ctrl.reg_we = 1'b0;
            xfer        = XFER_JREG;
          end
          default: begin
            ctrl.reg_we  = 1'b0;
            ctrl.illegal = 1'b1;
          end
        endcase
      end
      OP_ADDIU, OP_ANDI, OP_ORI, OP_LUI: begin
        ctrl.reg_we    = 1'b1;
        ctrl.alu_b_imm = 1'b1;
        unique case (op)
          OP_ADDIU: begin ctrl.alu_op = ALU_ADD; ctrl.ext_sign = 1'b1; end
          OP_ANDI:  ctrl.alu_op = ALU_AND;
          OP_ORI:   ctrl.alu_op = ALU_OR;
          default: begin ctrl.alu_op = ALU_SLL; ctrl.shamt_16 = 1'b1; end
        endcase
      end
      OP_LB, OP_LBU, OP_LH, OP_LHU, OP_LW: begin
        ctrl.reg_we    = 1'b1;
        ctrl.alu_b_imm = 1'b1;
        ctrl.ext_sign  = 1'b1;
        ctrl.mem_en    = 1'b1;
        ctrl.wb_sel    = WB_MEM;
        unique case (op)
          OP_LB:   ctrl.load_kind = LD_BYTE;
          OP_LBU:  ctrl.load_kind = LD_BYTE_U;
          OP_LH:   ctrl.load_kind = LD_HALF;
          OP_LHU:  ctrl.load_kind = LD_HALF_U;
          default: ctrl.load_kind = LD_WORD;
        endcase
      end
      OP_SB, OP_SH, OP_SW: begin
        ctrl.alu_b_imm = 1'b1;
        ctrl.ext_sign  = 1'b1;
        ctrl.mem_en    = 1'b1;
        unique case (op)
          OP_SB:   ctrl.mem_mc = MC_WRITE_BYTE;
          OP_SH:   ctrl.mem_mc = MC_WRITE_HALF;
          default: ctrl.mem_mc = MC_WRITE_WORD;
        endcase
      end
      OP_BEQ: xfer = XFER_EQ;
      OP_BNE: xfer = XFER_NE;
      OP_REGIMM: begin
        if (rt == SUB_BLTZ || rt == SUB_BGEZ) begin
          cmp_mode = (rt == SUB_BGEZ) ? CMP_GEZ : CMP_LTZ;
          xfer     = XFER_CMP;
        end else begin
          ctrl.illegal = 1'b1;
        end
      end
      OP_BLEZ: begin
        cmp_mode = CMP_LEZ;
        xfer     = XFER_CMP;
      end
      OP_BGTZ: begin
        cmp_mode = CMP_GTZ;
        xfer     = XFER_CMP;
      end
      OP_J: xfer = XFER_JUMP;
      OP_JAL: begin
        xfer        = XFER_JUMP;
        ctrl.reg_we = 1'b1;
        ctrl.rw     = REG_LINK;
        ctrl.wb_sel = WB_LINK;
      end
      default: ctrl.illegal = 1'b1;
    endcase
  end

  always_comb begin
    unique case (xfer)
      XFER_EQ:   pc_sel = eq        ? PC_BRANCH : PC_SEQ;
      XFER_NE:   pc_sel = !eq       ? PC_BRANCH : PC_SEQ;
      XFER_CMP:  pc_sel = cmp_taken ? PC_BRANCH : PC_SEQ;
      XFER_JUMP: pc_sel = PC_JUMP;
      XFER_JREG: pc_sel = PC_JREG;
      default:   pc_sel = PC_SEQ;
    endcase
  end

endmodule
