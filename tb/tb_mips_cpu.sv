// tb_mips_cpu: self-checking test of the processor core on its own.
//
// The program and data memories are modelled in the testbench (associative
// arrays with a combinational read and a rising-edge write that follows the
// 2-bit control code), so the core's memory interface is checked directly:
// the fetch address equals the PC, stores present the expected control code,
// address and data, and loads see the modelled word. A short program runs
// arithmetic, an immediate, stores of all three sizes, sign- and
// zero-extending loads, a taken BEQ, a JAL/JR call and a halt loop, and the
// register file is compared with hand-computed values. One instruction
// completes per clock, so the halt loop must be reached after exactly the
// number of instructions executed.
module tb_mips_cpu;
  import mips_pkg::*;
  import mips_asm_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [31:0] imem_addr, imem_data, dmem_addr, dmem_wdata, dmem_rdata, pc;
  logic        dmem_en, illegal;
  mem_ctrl_e   dmem_mc;
  logic [31:0] imem [logic [29:0]];
  logic [7:0]  dmem [logic [31:0]];
  int checks = 0, failures = 0;
  int stores_seen = 0;

  mips_cpu dut (.clk, .rst, .imem_addr, .imem_data, .dmem_en, .dmem_mc, .dmem_addr,
                .dmem_wdata, .dmem_rdata, .pc, .illegal);

  always #5 clk = ~clk;

  always_comb imem_data = imem.exists(imem_addr[31:2]) ? imem[imem_addr[31:2]] : 32'h0;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      logic [31:0] a;
      a = {dmem_addr[31:2], 2'b00} + 32'(i);
      dmem_rdata[8*i +: 8] = dmem.exists(a) ? dmem[a] : 8'h00;
    end
  end

  always @(posedge clk) begin
    if (dmem_en) begin
      case (dmem_mc)
        MC_WRITE_BYTE: dmem[dmem_addr] = dmem_wdata[7:0];
        MC_WRITE_HALF: begin
          dmem[{dmem_addr[31:1], 1'b0}] = dmem_wdata[7:0];
          dmem[{dmem_addr[31:1], 1'b1}] = dmem_wdata[15:8];
        end
        MC_WRITE_WORD: for (int i = 0; i < 4; i++) dmem[{dmem_addr[31:2], 2'b00} + 32'(i)] = dmem_wdata[8*i +: 8];
        default: ;
      endcase
      if (dmem_mc != MC_READ_WORD) stores_seen++;
    end
  end

  function automatic logic [31:0] reg_val(int r);
    return (r == 0) ? 32'h0 : dut.u_rf.regs[r];
  endfunction

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Store interface check: sampled just before each rising edge.
  logic [31:0] exp_st_addr [$];
  mem_ctrl_e   exp_st_mc   [$];
  logic [31:0] exp_st_data [$];
  always @(negedge clk) begin
    if (!rst && dmem_en && dmem_mc != MC_READ_WORD) begin
      chk("store mc", 32'(dmem_mc), 32'(exp_st_mc[0]));
      chk("store addr", dmem_addr, exp_st_addr[0]);
      chk("store data", dmem_wdata, exp_st_data[0]);
      void'(exp_st_mc.pop_front()); void'(exp_st_addr.pop_front()); void'(exp_st_data.pop_front());
    end
    if (!rst) chk("fetch address is pc", imem_addr, pc);
  end

  initial begin
    logic [31:0] p [$];
    int cycles, halt_idx;
    p = {};
    p.push_back(addu(9, 0, 0));           // -2 clear the flags
    p.push_back(addu(10, 0, 0));          // -1
    p.push_back(addiu(1, 0, 16'h0100));   // 0  r1 = 0x100 (base)
    p.push_back(lui(2, 16'h8765));        // 1
    p.push_back(ori(2, 2, 16'h4321));     // 2  r2 = 0x87654321
    p.push_back(sw(2, 0, 1));             // 3  word at 0x100
    p.push_back(sb(2, 5, 1));             // 4  byte 0x21 at 0x105
    p.push_back(sh(2, 10, 1));            // 5  half 0x4321 at 0x10a
    p.push_back(lb(3, 3, 1));             // 6  0x87 -> 0xffffff87
    p.push_back(lbu(4, 3, 1));            // 7  0x00000087
    p.push_back(lh(5, 2, 1));             // 8  0x8765 -> 0xffff8765
    p.push_back(lhu(6, 10, 1));           // 9  0x4321
    p.push_back(lw(7, 0, 1));             // 10
    p.push_back(addu(8, 3, 4));           // 11 0xffffff87 + 0x87 = 0x0e
    p.push_back(beq(7, 2, 16'd1));        // 12 taken
    p.push_back(addiu(9, 0, 1));          // 13 skipped
    p.push_back(jal(32'h4 * 20));         // 14 call 18
    p.push_back(addiu(10, 0, 1));         // 15 not executed (link is PC+8)
    p.push_back(addiu(11, 0, 2));         // 16 return lands here
    p.push_back(j(32'h4 * 19));           // 17 halt
    p.push_back(subu(12, 0, 1));          // 18 r12 = -0x100
    p.push_back(jr(31));                  // 19
    halt_idx = 19;  // numbering in the comments starts after the two clears
    foreach (p[i]) imem[30'(i)] = p[i];
    exp_st_mc   = '{MC_WRITE_WORD, MC_WRITE_BYTE, MC_WRITE_HALF};
    exp_st_addr = '{32'h100, 32'h105, 32'h10a};
    exp_st_data = '{32'h8765_4321, 32'h8765_4321, 32'h8765_4321};
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    cycles = 0;
    while (pc != 32'(4 * halt_idx) && cycles < 1000) begin
      @(posedge clk); #1;
      cycles++;
    end
    // two clears, then 0..12, 14, 18, 19, 16 executed: 19 instructions.
    chk("cycles to halt", 32'(cycles), 32'd19);
    repeat (3) @(posedge clk);
    #1;
    chk("halt loop holds pc", pc, 32'(4 * halt_idx));
    chk("r2", reg_val(2), 32'h8765_4321);
    chk("r3 lb", reg_val(3), 32'hffff_ff87);
    chk("r4 lbu", reg_val(4), 32'h0000_0087);
    chk("r5 lh", reg_val(5), 32'hffff_8765);
    chk("r6 lhu", reg_val(6), 32'h0000_4321);
    chk("r7 lw", reg_val(7), 32'h8765_4321);
    chk("r8 addu", reg_val(8), 32'h0000_000e);
    chk("r9 skipped by beq", reg_val(9), 32'h0);
    chk("r10 skipped by link", reg_val(10), 32'h0);
    chk("r11", reg_val(11), 32'd2);
    chk("r12 subu", reg_val(12), 32'hffff_ff00);
    chk("r31 link", reg_val(31), 32'(4 * 16 + 8));
    chk("stores", 32'(stores_seen), 32'd3);
    chk("dmem byte 0x105", 32'(dmem[32'h105]), 32'h21);
    chk("dmem byte 0x10b", 32'(dmem[32'h10b]), 32'h43);
    chk("illegal never", 32'(illegal), 32'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
