// tb_alu: self-checking test of the ALU.
// Drives every operation with directed corner values and random operands and
// compares against a reference computed here with plain SystemVerilog
// arithmetic. Directed cases include the shift examples r5 = r3 * 8 (SLL by
// 3), LUI-style shift by 16, and arithmetic vs logical right shift of a
// negative number.
module tb_alu;
  import mips_pkg::*;

  logic [31:0] a, b, y;
  logic [4:0]  shamt;
  alu_op_e     op;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .shamt, .y);

  function automatic logic [31:0] ref_y(alu_op_e o, logic [31:0] x, logic [31:0] z, logic [4:0] s);
    logic signed [31:0] zs;
    zs = z;
    case (o)
      ALU_ADD: return x + z;
      ALU_SUB: return x + ~z + 32'd1;
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_XOR: return x ^ z;
      ALU_NOR: return ~(x | z);
      ALU_SLL: return z << s;
      ALU_SRL: return z >> s;
      ALU_SRA: return zs >>> s;
      default: return 32'h0;
    endcase
  endfunction

  task automatic check(alu_op_e o, logic [31:0] x, logic [31:0] z, logic [4:0] s, logic [31:0] exp);
    op = o; a = x; b = z; shamt = s;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h sh=%0d y=%h exp=%h", o.name(), x, z, s, y, exp);
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
    check(ALU_SLL, 32'h0, 32'd5, 5'd3, 32'd40);            // r5 = r3 * 8
    check(ALU_SLL, 32'h0, 32'h0000_dead, 5'd16, 32'hdead_0000);
    check(ALU_SRA, 32'h0, 32'h8000_0000, 5'd4, 32'hf800_0000);
    check(ALU_SRL, 32'h0, 32'h8000_0000, 5'd4, 32'h0800_0000);
    check(ALU_ADD, 32'hffff_ffff, 32'h1, 5'd0, 32'h0);     // wraps, no trap
    check(ALU_SUB, 32'h0, 32'h1, 5'd0, 32'hffff_ffff);
    check(ALU_NOR, 32'h0, 32'h0, 5'd0, 32'hffff_ffff);
    check(ALU_XOR, 32'hf0f0_f0f0, 32'hff00_ff00, 5'd0, 32'h0ff0_0ff0);
    check(ALU_OR,  32'h1, 32'h2, 5'd0, 32'h3);
    check(ALU_AND, 32'hffff_ffff, 32'h0000_ffff, 5'd0, 32'h0000_ffff);
    for (int i = 0; i < 2000; i++) begin
      alu_op_e o;
      logic [31:0] x, z;
      logic [4:0] s;
      o = alu_op_e'($urandom_range(0, 8));
      x = $urandom; z = $urandom; s = 5'($urandom);
      check(o, x, z, s, ref_y(o, x, z, s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
