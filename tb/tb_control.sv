// tb_control: self-checking test of the instruction decoder.
// For each instruction of the implemented set (encoded with mips_asm_pkg) it
// checks the register indices, write enable, ALU operation and selects,
// extend mode, memory enable and control code, load kind, write-back source,
// compare mode and next-PC source, including taken and not-taken outcomes of
// every branch, and that unknown encodings decode as flagged no-ops.
module tb_control;
  import mips_pkg::*;
  import mips_asm_pkg::*;

  logic [31:0] inst;
  logic        eq, cmp_taken;
  ctrl_t       ctrl;
  cmp_mode_e   cmp_mode;
  pc_sel_e     pc_sel;
  int checks = 0, failures = 0;
  logic [5:0] bad_ops [4] = '{6'h08, 6'h0a, 6'h22, 6'h3f};

  control dut (.inst, .eq, .cmp_taken, .ctrl, .cmp_mode, .pc_sel);

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s inst=%h got=%0h exp=%0h", what, inst, got, exp);
    end
  endtask

  // Register-writing ALU instruction.
  task automatic alu_inst(logic [31:0] i, logic [4:0] rw, alu_op_e op, logic b_imm,
                          logic sgn, logic sh16);
    inst = i; eq = 0; cmp_taken = 0; #1;
    chk("reg_we", ctrl.reg_we, 1);
    chk("rw", ctrl.rw, rw);
    chk("ra", ctrl.ra, i[25:21]);
    chk("alu_op", ctrl.alu_op, op);
    chk("alu_b_imm", ctrl.alu_b_imm, b_imm);
    if (b_imm) chk("ext_sign", ctrl.ext_sign, sgn);
    chk("shamt_16", ctrl.shamt_16, sh16);
    chk("mem_en", ctrl.mem_en, 0);
    chk("wb_sel", ctrl.wb_sel, WB_ALU);
    chk("pc_sel", pc_sel, PC_SEQ);
    chk("illegal", ctrl.illegal, 0);
  endtask

  task automatic load_inst(logic [31:0] i, load_kind_e k);
    inst = i; #1;
    chk("ld reg_we", ctrl.reg_we, 1);
    chk("ld rw", ctrl.rw, i[20:16]);
    chk("ld mem_en", ctrl.mem_en, 1);
    chk("ld mc", ctrl.mem_mc, MC_READ_WORD);
    chk("ld kind", ctrl.load_kind, k);
    chk("ld wb", ctrl.wb_sel, WB_MEM);
    chk("ld sign ext offset", ctrl.ext_sign, 1);
    chk("ld alu add", ctrl.alu_op, ALU_ADD);
  endtask

  task automatic store_inst(logic [31:0] i, mem_ctrl_e mc);
    inst = i; #1;
    chk("st reg_we", ctrl.reg_we, 0);
    chk("st rb", ctrl.rb, i[20:16]);
    chk("st mem_en", ctrl.mem_en, 1);
    chk("st mc", ctrl.mem_mc, mc);
    chk("st sign ext offset", ctrl.ext_sign, 1);
    chk("st b_imm", ctrl.alu_b_imm, 1);
  endtask

  // Branch decided by eq (use_eq) or by the zero compare.
  task automatic branch_inst(logic [31:0] i, logic use_eq, logic take_when, cmp_mode_e m);
    inst = i;
    for (int v = 0; v < 2; v++) begin
      if (use_eq) begin eq = 1'(v); cmp_taken = 1'(~v); end
      else        begin cmp_taken = 1'(v); eq = 1'(~v); end
      #1;
      chk("br reg_we", ctrl.reg_we, 0);
      chk("br mem_en", ctrl.mem_en, 0);
      chk("br pc_sel", pc_sel, (1'(v) == take_when) ? PC_BRANCH : PC_SEQ);
      if (!use_eq) chk("br cmp_mode", cmp_mode, m);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_inst(addu(5'd4, 5'd1, 5'd2), 5'd4, ALU_ADD, 0, 0, 0);
    alu_inst(subu(5'd3, 5'd6, 5'd7), 5'd3, ALU_SUB, 0, 0, 0);
    alu_inst(or_ (5'd8, 5'd9, 5'd10), 5'd8, ALU_OR, 0, 0, 0);
    alu_inst(xor_(5'd11, 5'd12, 5'd13), 5'd11, ALU_XOR, 0, 0, 0);
    alu_inst(nor_(5'd14, 5'd15, 5'd16), 5'd14, ALU_NOR, 0, 0, 0);
    alu_inst(sll (5'd5, 5'd3, 5'd3), 5'd5, ALU_SLL, 0, 0, 0);
    alu_inst(srl (5'd5, 5'd3, 5'd3), 5'd5, ALU_SRL, 0, 0, 0);
    alu_inst(sra (5'd5, 5'd3, 5'd3), 5'd5, ALU_SRA, 0, 0, 0);
    alu_inst(addiu(5'd5, 5'd5, 16'd5), 5'd5, ALU_ADD, 1, 1, 0);
    alu_inst(andi (5'd9, 5'd1, 16'hffff), 5'd9, ALU_AND, 1, 0, 0);
    alu_inst(ori  (5'd9, 5'd0, 16'hffff), 5'd9, ALU_OR, 1, 0, 0);
    alu_inst(lui  (5'd5, 16'hdead), 5'd5, ALU_SLL, 1, 0, 1);
    // The examples' encodings printed in the instruction tables.
    inst = 32'b00100100101001010000000000000101; #1;   // addiu r5, r5, 5
    chk("addiu example rw", ctrl.rw, 5);
    chk("addiu example op", ctrl.alu_op, ALU_ADD);
    load_inst(lb (5'd6, 16'd2, 5'd0), LD_BYTE);
    load_inst(lbu(5'd6, 16'd2, 5'd0), LD_BYTE_U);
    load_inst(lh (5'd6, 16'd2, 5'd0), LD_HALF);
    load_inst(lhu(5'd6, 16'd2, 5'd0), LD_HALF_U);
    load_inst(lw (5'd6, 16'd8, 5'd1), LD_WORD);
    store_inst(sb(5'd5, 16'd2, 5'd0), MC_WRITE_BYTE);
    store_inst(sh(5'd5, 16'd2, 5'd0), MC_WRITE_HALF);
    store_inst(sw(5'd5, 16'd8, 5'd0), MC_WRITE_WORD);
    branch_inst(beq (5'd1, 5'd2, 16'd3), 1, 1, CMP_LTZ);
    branch_inst(bne (5'd1, 5'd2, 16'd3), 1, 0, CMP_LTZ);
    branch_inst(bltz(5'd1, 16'd3), 0, 1, CMP_LTZ);
    branch_inst(bgez(5'd1, 16'd3), 0, 1, CMP_GEZ);
    branch_inst(blez(5'd1, 16'd3), 0, 1, CMP_LEZ);
    branch_inst(bgtz(5'd1, 16'd3), 0, 1, CMP_GTZ);
    inst = beq(5'd1, 5'd2, 16'd3); #1;
    chk("beq ra", ctrl.ra, 1);
    chk("beq rb", ctrl.rb, 2);
    // Jumps.
    inst = j(32'h0000_1000); eq = 0; cmp_taken = 0; #1;
    chk("j pc_sel", pc_sel, PC_JUMP);
    chk("j reg_we", ctrl.reg_we, 0);
    inst = jal(32'h0000_1000); #1;
    chk("jal pc_sel", pc_sel, PC_JUMP);
    chk("jal reg_we", ctrl.reg_we, 1);
    chk("jal rw", ctrl.rw, 31);
    chk("jal wb", ctrl.wb_sel, WB_LINK);
    inst = jr(5'd31); #1;
    chk("jr pc_sel", pc_sel, PC_JREG);
    chk("jr reg_we", ctrl.reg_we, 0);
    chk("jr ra", ctrl.ra, 31);
    // Encodings outside the set.
    foreach (bad_ops[k]) begin
      inst = {bad_ops[k], 26'h123_4567}; #1;
      chk("illegal op", ctrl.illegal, 1);
      chk("illegal no write", ctrl.reg_we, 0);
      chk("illegal no mem", ctrl.mem_en, 0);
      chk("illegal pc", pc_sel, PC_SEQ);
    end
    inst = enc_r(6'h2a, 5'd1, 5'd2, 5'd3, 5'd0); #1;   // SLT is not in the set
    chk("illegal funct", ctrl.illegal, 1);
    chk("illegal funct no write", ctrl.reg_we, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
