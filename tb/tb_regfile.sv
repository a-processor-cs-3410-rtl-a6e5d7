// tb_regfile: self-checking test of the register file.
// Writes on the falling edge: checks a register changes only after the
// falling edge, that WE low blocks a write, that r0 stays zero, and that both
// read ports return what a shadow copy in the testbench holds after random
// writes to all 31 registers.
module tb_regfile;
  logic clk = 1'b0;
  logic we;
  logic [4:0] rw, ra, rb;
  logic [31:0] w, a, b;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .we, .rw, .ra, .rb, .w, .a, .b);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; rw = 0; ra = 0; rb = 0; w = 0;
    shadow[0] = 0;
    // Fill every register.
    for (int r = 1; r < 32; r++) begin
      @(posedge clk);
      we = 1; rw = 5'(r); w = $urandom; shadow[r] = w;
      @(negedge clk); #1;
    end
    we = 0;
    for (int r = 0; r < 32; r++) begin
      ra = 5'(r); rb = 5'(31 - r); #1;
      expect_eq("read A", a, shadow[r]);
      expect_eq("read B", b, shadow[31 - r]);
    end
    // The write lands at the falling edge, not before.
    @(posedge clk); #1;
    we = 1; rw = 5'd7; w = 32'hcafe_f00d; ra = 5'd7; #1;
    expect_eq("before falling edge", a, shadow[7]);
    @(negedge clk); #1;
    expect_eq("after falling edge", a, 32'hcafe_f00d);
    shadow[7] = 32'hcafe_f00d;
    // No write while WE is low.
    we = 0; rw = 5'd9; w = ~shadow[9];
    @(negedge clk); #1;
    ra = 5'd9; #1;
    expect_eq("WE low", a, shadow[9]);
    // r0 is wired to zero.
    we = 1; rw = 5'd0; w = 32'hffff_ffff;
    @(negedge clk); #1;
    we = 0; ra = 5'd0; rb = 5'd0; #1;
    expect_eq("r0 port A", a, 32'h0);
    expect_eq("r0 port B", b, 32'h0);
    // Random traffic.
    for (int i = 0; i < 500; i++) begin
      @(posedge clk); #1;
      we = 1'($urandom); rw = 5'($urandom); w = $urandom;
      @(negedge clk); #1;
      if (we && rw != 0) shadow[rw] = w;
      we = 0;
      ra = 5'($urandom); rb = 5'($urandom); #1;
      expect_eq("random A", a, shadow[ra]);
      expect_eq("random B", b, shadow[rb]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
