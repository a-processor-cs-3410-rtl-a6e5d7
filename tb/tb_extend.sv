// tb_extend: self-checking test of the immediate extender.
// Checks the document-style examples (5, -1 as 0xffff, 65535) and random
// immediates in both modes against arithmetic done in the testbench.
module tb_extend;
  logic [15:0] imm;
  logic        sign;
  logic [31:0] y;
  int checks = 0, failures = 0;

  extend dut (.imm, .sign, .y);

  task automatic check(logic [15:0] i, logic s, logic [31:0] exp);
    imm = i; sign = s; #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL imm=%h sign=%b y=%h exp=%h", i, s, y, exp);
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
    check(16'd5, 1'b1, 32'd5);
    check(16'hffff, 1'b1, 32'hffff_ffff);   // r9 = -1 via ADDIU
    check(16'hffff, 1'b0, 32'd65535);       // r9 = 65535 via ORI
    check(16'h8000, 1'b1, 32'hffff_8000);
    for (int i = 0; i < 1000; i++) begin
      logic [15:0] v;
      logic s;
      int signed sv;
      v = 16'($urandom); s = 1'($urandom);
      sv = $signed(v);
      check(v, s, s ? 32'(sv) : {16'h0, v});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
