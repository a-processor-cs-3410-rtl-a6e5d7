// tb_mips_system: end-to-end test of the single-cycle MIPS computer at its
// default sizes (64 KiB program and data memory).
//
// Programs are assembled in the testbench (mips_asm_pkg), written into the
// memories through the load port while reset is held, then run until the PC
// reaches the program's final "j ." halt loop. Results are checked in the
// register file and data memory against values worked out by hand here. Since
// every instruction takes one clock, the number of cycles from reset release
// to the halt loop must equal the number of instructions executed.
// Programs: the arithmetic examples (r4 = (r1+r2)|r3, r8 = 4*r3+r4-1, r9 = 9,
// r5 = r3*8, r5 += 5, r9 = -1, r9 = 65535, r5 = 0xdeadbeef), the memory
// layout and endianness examples, A[12] = h + A[8], the register jumps to
// 0xabcd1234 / 0x0decafe0 chosen by r3, the if (i == j) example both ways,
// every compare-with-zero branch taken and not taken, a counted loop and a
// JAL/JR subroutine call.
// A monitor decodes each executed instruction and counts every instruction
// kind plus taken and not-taken branches, link writes and writes to r0; a
// mechanism that never occurs counts as a failure.
module tb_mips_system;
  import mips_pkg::*;
  import mips_asm_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic load_we = 1'b0, load_dmem = 1'b0;
  logic [31:0] load_addr = '0, load_data = '0;
  logic [31:0] pc, inst;
  logic illegal;
  int checks = 0, failures = 0;
  int count [string];

  mips_system dut (.clk, .rst, .load_we, .load_dmem, .load_addr, .load_data, .pc, .inst, .illegal);

  always #5 clk = ~clk;

  // ------------------------------------------------------------------ helpers
  function automatic logic [31:0] reg_val(int r);
    return (r == 0) ? 32'h0 : dut.u_cpu.u_rf.regs[r];
  endfunction

  function automatic logic [31:0] dmem_word(logic [31:0] byte_addr);
    return dut.u_dmem.mem[byte_addr[15:2]];
  endfunction

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic load_word(logic dm, logic [31:0] addr, logic [31:0] data);
    @(negedge clk);
    load_we = 1'b1; load_dmem = dm; load_addr = addr; load_data = data;
    @(negedge clk);
    load_we = 1'b0;
  endtask

  task automatic load_prog(logic [31:0] base, logic [31:0] words [$]);
    foreach (words[i]) load_word(1'b0, base + 32'(4 * i), words[i]);
  endtask

  // Release reset, run until the PC sits on halt_pc, then hold reset again.
  task automatic run(string name, logic [31:0] halt_pc, int exp_cycles);
    int cycles;
    cycles = 0;
    @(negedge clk);
    rst = 1'b0;
    while (pc != halt_pc && cycles < 10000) begin
      @(posedge clk); #1;
      cycles++;
    end
    @(negedge clk);
    rst = 1'b1;
    chk({name, ": cycles to halt"}, 32'(cycles), 32'(exp_cycles));
    @(posedge clk); #1;
  endtask

  // ------------------------------------------------------------------ monitor
  function automatic string mnemonic(logic [31:0] i);
    case (i[31:26])
      6'h00: case (i[5:0])
        6'h00: return "sll";  6'h02: return "srl";  6'h03: return "sra";
        6'h08: return "jr";   6'h21: return "addu"; 6'h23: return "subu";
        6'h25: return "or";   6'h26: return "xor";  6'h27: return "nor";
        default: return "other";
      endcase
      6'h01: return i[16] ? "bgez" : "bltz";
      6'h02: return "j";    6'h03: return "jal";  6'h04: return "beq";  6'h05: return "bne";
      6'h06: return "blez"; 6'h07: return "bgtz"; 6'h09: return "addiu";
      6'h0c: return "andi"; 6'h0d: return "ori";  6'h0f: return "lui";
      6'h20: return "lb";   6'h21: return "lh";   6'h23: return "lw";
      6'h24: return "lbu";  6'h25: return "lhu";
      6'h28: return "sb";   6'h29: return "sh";   6'h2b: return "sw";
      default: return "other";
    endcase
  endfunction

  logic        pend_br = 1'b0;
  logic [31:0] pend_pc;

  always @(posedge clk) begin
    if (rst) begin
      pend_br <= 1'b0;
    end else begin
      string m;
      if (pend_br) begin
        if (pc == pend_pc + 4) count["branch_not_taken"]++;
        else                   count["branch_taken"]++;
      end
      m = mnemonic(inst);
      count[m]++;
      pend_br <= (m inside {"beq", "bne", "bltz", "bgez", "blez", "bgtz"});
      pend_pc <= pc;
      if (m == "jal") count["link_write"]++;
      if (m inside {"addu", "subu", "or", "xor", "nor", "sll", "srl", "sra"} && inst[15:11] == 0)
        count["r0_write_dropped"]++;
      if (m inside {"addiu", "andi", "ori", "lui", "lb", "lbu", "lh", "lhu", "lw"} && inst[20:16] == 0)
        count["r0_write_dropped"]++;
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ programs
  initial begin
    logic [31:0] p [$];
    logic [31:0] halt;

    repeat (2) @(posedge clk);

    // ---- 1. arithmetic, logic, shifts and immediates
    p = {};
    p.push_back(addiu(1, 0, 7));
    p.push_back(addiu(2, 0, 12));
    p.push_back(addiu(3, 0, 16'h30));
    p.push_back(addu(4, 1, 2));          // r4 = (r1 + r2) | r3
    p.push_back(or_(4, 4, 3));
    p.push_back(sll(8, 3, 2));           // r8 = 4*r3 + r4 - 1
    p.push_back(addu(8, 8, 4));
    p.push_back(addiu(8, 8, 16'hffff));
    p.push_back(addiu(9, 0, 9));         // r9 = 9
    p.push_back(sll(5, 3, 3));           // r5 = r3 * 8
    p.push_back(addiu(5, 5, 5));         // r5 += 5
    p.push_back(subu(10, 1, 2));
    p.push_back(xor_(11, 1, 2));
    p.push_back(nor_(12, 1, 2));
    p.push_back(addiu(13, 0, 16'hffff)); // r13 = -1
    p.push_back(ori(14, 0, 16'hffff));   // r14 = 65535
    p.push_back(andi(15, 13, 16'h0f0f));
    p.push_back(lui(16, 16'hdead));      // r16 = 0xdeadbeef
    p.push_back(ori(16, 16, 16'hbeef));
    p.push_back(srl(17, 16, 4));
    p.push_back(sra(18, 16, 4));
    p.push_back(addiu(0, 0, 5));         // r0 stays zero
    p.push_back(addu(19, 0, 0));
    halt = 32'(4 * p.size());
    p.push_back(j(halt));
    load_prog(32'h0, p);
    run("arith", halt, p.size() - 1);
    chk("r4", reg_val(4), 32'd51);
    chk("r8", reg_val(8), 32'd242);
    chk("r9", reg_val(9), 32'd9);
    chk("r5", reg_val(5), 32'd389);
    chk("r10", reg_val(10), 32'hffff_fffb);
    chk("r11", reg_val(11), 32'd11);
    chk("r12", reg_val(12), 32'hffff_fff0);
    chk("r13", reg_val(13), 32'hffff_ffff);
    chk("r14", reg_val(14), 32'd65535);
    chk("r15", reg_val(15), 32'h0000_0f0f);
    chk("r16", reg_val(16), 32'hdead_beef);
    chk("r17", reg_val(17), 32'h0dea_dbee);
    chk("r18", reg_val(18), 32'hfdea_dbee);
    chk("r19", reg_val(19), 32'h0);

    // ---- 2. memory layout and endianness
    p = {};
    p.push_back(addiu(5, 0, 5));
    p.push_back(sb(5, 2, 0));
    p.push_back(lb(6, 2, 0));
    p.push_back(sw(5, 8, 0));
    p.push_back(lb(7, 8, 0));
    p.push_back(lb(8, 11, 0));
    p.push_back(addiu(1, 0, 16'hff80));  // -128
    p.push_back(sw(0, 20, 0));
    p.push_back(sh(1, 22, 0));
    p.push_back(lh(2, 22, 0));
    p.push_back(lhu(3, 22, 0));
    p.push_back(sw(0, 24, 0));
    p.push_back(sb(1, 25, 0));
    p.push_back(lbu(4, 25, 0));
    p.push_back(lb(9, 25, 0));
    p.push_back(lw(10, 24, 0));
    p.push_back(lui(11, 16'h1234));
    p.push_back(ori(11, 11, 16'h5678));
    p.push_back(sw(11, 1000, 0));
    p.push_back(lbu(12, 1000, 0));
    p.push_back(lbu(13, 1003, 0));
    p.push_back(lhu(14, 1002, 0));
    p.push_back(lw(15, 20, 0));
    halt = 32'h100 + 32'(4 * p.size());
    p.push_back(j(halt));
    load_prog(32'h100, p);
    force_pc_base(32'h100);
    run("memory", halt, p.size());
    chk("lb r6, 2(r0)", reg_val(6), 32'd5);
    chk("lb r7, 8(r0)", reg_val(7), 32'd5);
    chk("lb r8, 11(r0)", reg_val(8), 32'd0);
    chk("dmem byte 2", 32'(dmem_word(0) >> 16) & 32'hff, 32'd5);
    chk("dmem word 8", dmem_word(8), 32'd5);
    chk("lh", reg_val(2), 32'hffff_ff80);
    chk("lhu", reg_val(3), 32'h0000_ff80);
    chk("lbu", reg_val(4), 32'h0000_0080);
    chk("lb negative", reg_val(9), 32'hffff_ff80);
    chk("lw after sb", reg_val(10), 32'h0000_8000);
    chk("lbu byte 1000", reg_val(12), 32'h78);
    chk("lbu byte 1003", reg_val(13), 32'h12);
    chk("lhu half 1002", reg_val(14), 32'h1234);
    chk("lw after sh", reg_val(15), 32'hff80_0000);
    chk("dmem word 1000", dmem_word(1000), 32'h1234_5678);

    // ---- 3. A[12] = h + A[8]   (h in r1, &A in r2)
    load_word(1'b1, 32'h2000 + 32, 32'h0000_1234);
    p = {};
    p.push_back(addiu(1, 0, 100));
    p.push_back(ori(2, 0, 16'h2000));
    p.push_back(lw(3, 32, 2));
    p.push_back(addu(3, 1, 3));
    p.push_back(sw(3, 48, 2));
    halt = 32'h200 + 32'(4 * p.size());
    p.push_back(j(halt));
    load_prog(32'h200, p);
    force_pc_base(32'h200);
    run("array", halt, p.size());
    chk("A[12]", dmem_word(32'h2000 + 48), 32'h0000_1234 + 100);
    chk("A[8] unchanged", dmem_word(32'h2000 + 32), 32'h0000_1234);

    // ---- 4. if (r3 == 0) jump to 0x0decafe0 else jump to 0xabcd1234
    for (int r3 = 0; r3 < 2; r3++) begin
      logic [31:0] far [$];
      p = {};
      p.push_back(addiu(3, 0, 16'(r3)));
      p.push_back(lui(1, 16'habcd));
      p.push_back(ori(1, 1, 16'h1234));
      p.push_back(lui(2, 16'h0dec));
      p.push_back(ori(2, 2, 16'hafe0));
      p.push_back(beq(3, 0, 16'd1));
      p.push_back(jr(1));
      p.push_back(jr(2));
      load_prog(32'h300, p);
      // The 64 KiB program memory repeats through the address space, so
      // 0xabcd1234 is stored at 0x1234 and 0x0decafe0 at 0xafe0.
      far = {addiu(20, 0, 16'h22), j(32'habcd_1238)};
      load_prog(32'h1234, far);
      far = {addiu(20, 0, 16'h11), j(32'h0dec_afe4)};
      load_prog(32'hafe0, far);
      force_pc_base(32'h300);
      halt = (r3 == 0) ? 32'h0dec_afe4 : 32'habcd_1238;
      run($sformatf("far jump r3=%0d", r3), halt, 9);
      chk("far jump landed", reg_val(20), (r3 == 0) ? 32'h11 : 32'h22);
    end

    // ---- 5. if (i == j) { i = i * 4; } else { j = i - j; }
    for (int k = 0; k < 2; k++) begin
      int ii, jj;
      ii = (k == 0) ? 6 : 9;
      jj = (k == 0) ? 6 : 4;
      p = {};
      p.push_back(addiu(1, 0, 16'(ii)));
      p.push_back(addiu(2, 0, 16'(jj)));
      p.push_back(bne(1, 2, 16'd2));
      p.push_back(sll(1, 1, 2));
      p.push_back(j(32'h400 + 6 * 4));
      p.push_back(subu(2, 1, 2));
      halt = 32'h400 + 32'(4 * p.size());
      p.push_back(j(halt));
      load_prog(32'h400, p);
      force_pc_base(32'h400);
      run($sformatf("if-else i=%0d j=%0d", ii, jj), halt, (k == 0) ? 6 : 5);
      chk("i", reg_val(1), (k == 0) ? 32'd24 : 32'd9);
      chk("j", reg_val(2), (k == 0) ? 32'd6 : 32'd5);
    end

    // ---- 6. compare-with-zero branches, a counted loop and a subroutine call
    p = {};
    for (int r = 10; r <= 17; r++) p.push_back(addu(5'(r), 0, 0));
    for (int r = 21; r <= 23; r++) p.push_back(addu(5'(r), 0, 0));
    p.push_back(addiu(1, 0, 16'hfffd));  // r1 = -3
    p.push_back(addiu(2, 0, 0));         // r2 = 0
    p.push_back(addiu(3, 0, 5));         // r3 = 5
    p.push_back(bltz(1, 1));  p.push_back(addiu(10, 0, 1));  // taken
    p.push_back(bgez(1, 1));  p.push_back(addiu(11, 0, 1));  // not taken
    p.push_back(blez(2, 1));  p.push_back(addiu(12, 0, 1));  // taken
    p.push_back(bgtz(2, 1));  p.push_back(addiu(13, 0, 1));  // not taken
    p.push_back(bgtz(3, 1));  p.push_back(addiu(14, 0, 1));  // taken
    p.push_back(bgez(2, 1));  p.push_back(addiu(15, 0, 1));  // taken
    p.push_back(blez(3, 1));  p.push_back(addiu(16, 0, 1));  // not taken
    p.push_back(bltz(3, 1));  p.push_back(addiu(17, 0, 1));  // not taken
    p.push_back(addiu(4, 0, 0));         // i = 0
    p.push_back(addiu(5, 0, 0));         // sum = 0
    p.push_back(addiu(6, 0, 10));
    p.push_back(addiu(4, 4, 1));         // loop: i++
    p.push_back(addu(5, 5, 4));          //       sum += i
    p.push_back(bne(4, 6, 16'hfffd));    //       until i == 10
    begin
      int jal_idx, sub_idx;
      logic [31:0] jal_pc;
      jal_idx = p.size();
      jal_pc = 32'h800 + 32'(4 * jal_idx);
      sub_idx = jal_idx + 4;
      p.push_back(jal(32'h800 + 32'(4 * sub_idx)));
      p.push_back(addiu(21, 0, 1));      // PC+4 of the JAL: not returned to
      p.push_back(addiu(22, 0, 1));      // PC+8: the link address
      halt = 32'h800 + 32'(4 * p.size());
      p.push_back(j(halt));
      p.push_back(addiu(23, 0, 7));      // subroutine
      p.push_back(jr(31));
      load_prog(32'h800, p);
      force_pc_base(32'h800);
      // 11 clears, 3 setup, 16 branch/fill slots with 4 skipped, 3 loop setup,
      // 10 loop iterations of 3, then jal, sub (2), addiu r22.
      run("branches/loop/call", halt, 1 + 11 + 3 + 12 + 3 + 30 + 4);
      chk("r31 link", reg_val(31), jal_pc + 8);
      chk("r21 (skipped)", reg_val(21), 0);
      chk("r22 (after return)", reg_val(22), 1);
      chk("r23 (subroutine)", reg_val(23), 7);
    end
    chk("bltz taken", reg_val(10), 0);
    chk("bgez not taken", reg_val(11), 1);
    chk("blez taken", reg_val(12), 0);
    chk("bgtz not taken", reg_val(13), 1);
    chk("bgtz taken", reg_val(14), 0);
    chk("bgez taken on zero", reg_val(15), 0);
    chk("blez not taken", reg_val(16), 1);
    chk("bltz not taken", reg_val(17), 1);
    chk("loop sum", reg_val(5), 32'd55);

    // ---- every mechanism must have happened
    check_counts();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The program for each run starts at the reset PC (0); a one-word stub at
  // 0 (one extra cycle, counted in the expected totals) jumps to the program's base so that programs can sit apart in memory.
  task automatic force_pc_base(logic [31:0] base);
    load_word(1'b0, 32'h0, j(base));
  endtask

  task automatic check_counts();
    string names [$] = '{"addu", "subu", "or", "xor", "nor", "sll", "srl", "sra", "jr",
                         "addiu", "andi", "ori", "lui", "lb", "lbu", "lh", "lhu", "lw",
                         "sb", "sh", "sw", "beq", "bne", "bltz", "bgez", "blez", "bgtz",
                         "j", "jal", "branch_taken", "branch_not_taken", "link_write",
                         "r0_write_dropped"};
    foreach (names[i]) begin
      int n;
      n = count.exists(names[i]) ? count[names[i]] : 0;
      $display("mechanism %-18s %0d", names[i], n);
      checks++;
      if (n == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", names[i]);
      end
    end
  endtask
endmodule
