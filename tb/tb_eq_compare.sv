// tb_eq_compare: self-checking test of the "=?" branch comparator.
// Equal pairs, pairs differing in a single bit at every position, and random
// pairs.
module tb_eq_compare;
  logic [31:0] a, b;
  logic eq;
  int checks = 0, failures = 0;

  eq_compare dut (.a, .b, .eq);

  task automatic check(logic [31:0] x, logic [31:0] z);
    a = x; b = z; #1;
    checks++;
    if (eq !== (x == z)) begin
      failures++;
      $display("FAIL a=%h b=%h eq=%b", x, z, eq);
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
    for (int i = 0; i < 32; i++) begin
      logic [31:0] v;
      v = $urandom;
      check(v, v);
      check(v, v ^ (32'h1 << i));
    end
    for (int i = 0; i < 500; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
