// tb_pc_unit: self-checking test of the PC register and next-PC logic.
// After reset the PC must be 0 and advance by 4 each cycle; forward and
// backward branch offsets are added to PC+4 after shifting by 2; a jump keeps
// the top four bits of PC+4, so from 0x2FFFFFFC it lands in the 0x3 region;
// a register jump loads the register value. pc_plus8 is checked each time.
module tb_pc_unit;
  import mips_pkg::*;
  logic clk = 1'b0, rst;
  pc_sel_e sel;
  logic [15:0] offset;
  logic [25:0] target;
  logic [31:0] jr_addr, pc, pc_plus4, pc_plus8;
  int checks = 0, failures = 0;

  pc_unit dut (.clk, .rst, .sel, .offset, .target, .jr_addr, .pc, .pc_plus4, .pc_plus8);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic step(pc_sel_e s, logic [15:0] off, logic [25:0] tgt, logic [31:0] r, logic [31:0] exp);
    sel = s; offset = off; target = tgt; jr_addr = r;
    #1;
    expect_eq("pc_plus4", pc_plus4, pc + 4);
    expect_eq("pc_plus8", pc_plus8, pc + 8);
    @(posedge clk); #1;
    expect_eq($sformatf("next pc (%s)", s.name()), pc, exp);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; sel = PC_SEQ; offset = 0; target = 0; jr_addr = 0;
    @(posedge clk); @(posedge clk); #1;
    expect_eq("reset", pc, 32'h0);
    rst = 0;
    for (int i = 1; i <= 5; i++) step(PC_SEQ, 16'h0, 26'h0, 32'h0, 32'(4 * i));
    // PC = 0x14: branch forward by 3 instructions -> 0x18 + 12.
    step(PC_BRANCH, 16'd3, 26'h0, 32'h0, 32'h24);
    // Branch back by 2 -> 0x28 - 8.
    step(PC_BRANCH, 16'hfffe, 26'h0, 32'h0, 32'h20);
    // Register jump.
    step(PC_JREG, 16'h0, 26'h0, 32'h2fff_fffc, 32'h2fff_fffc);
    // Jump from 0x2FFFFFFC uses PC+4 = 0x30000000 for the top bits.
    step(PC_JUMP, 16'h0, 26'h0123456, 32'h0, 32'h3048_d158);
    step(PC_JREG, 16'h0, 26'h0, 32'habcd_1230, 32'habcd_1230);
    step(PC_JUMP, 16'h0, 26'h3ffffff, 32'h0, 32'hafff_fffc);
    // Random steps against a model.
    for (int i = 0; i < 300; i++) begin
      pc_sel_e s;
      logic [15:0] off;
      logic [25:0] tgt;
      logic [31:0] r, p4, exp;
      s = pc_sel_e'($urandom_range(0, 3));
      off = 16'($urandom); tgt = 26'($urandom); r = $urandom;
      p4 = pc + 4;
      case (s)
        PC_BRANCH: exp = p4 + 32'(signed'(off)) * 4;
        PC_JUMP:   exp = {p4[31:28], tgt, 2'b00};
        PC_JREG:   exp = r;
        default:   exp = p4;
      endcase
      step(s, off, tgt, r, exp);
    end
    rst = 1;
    @(posedge clk); #1;
    expect_eq("reset again", pc, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
