// tb_zero_compare: self-checking test of the compare-against-zero unit used
// by BLTZ, BGEZ, BLEZ and BGTZ. Zero, +1, -1, the extreme values and random
// numbers in all four modes, checked against signed comparisons done here.
module tb_zero_compare;
  import mips_pkg::*;
  logic [31:0] a;
  cmp_mode_e   mode;
  logic        taken;
  int checks = 0, failures = 0;

  zero_compare dut (.a, .mode, .taken);

  task automatic check(logic [31:0] v, cmp_mode_e m);
    int signed s;
    logic exp;
    s = $signed(v);
    case (m)
      CMP_LTZ: exp = s < 0;
      CMP_GEZ: exp = s >= 0;
      CMP_LEZ: exp = s <= 0;
      default: exp = s > 0;
    endcase
    a = v; mode = m; #1;
    checks++;
    if (taken !== exp) begin
      failures++;
      $display("FAIL a=%h mode=%s taken=%b", v, m.name(), taken);
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
    logic [31:0] vals [5] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h7fff_ffff, 32'h8000_0000};
    for (int m = 0; m < 4; m++) begin
      foreach (vals[i]) check(vals[i], cmp_mode_e'(m));
      for (int i = 0; i < 200; i++) check($urandom, cmp_mode_e'(m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
