// tb_mips_memory: self-checking test of the byte-addressed memory.
// Keeps a little-endian byte-array model in the testbench and applies random
// word, halfword and byte writes (each to an aligned address) and word reads,
// comparing every read with the model. Also checks the 0x12345678 layout of
// the endianness example, that en low blocks writes and zeroes dout, that a
// read is combinational, and that addresses alias above ADDR_WIDTH bits.
module tb_mips_memory;
  import mips_pkg::*;
  localparam int unsigned AW = 16;  // the memory's default address width

  logic clk = 1'b0;
  logic en;
  mem_ctrl_e mc;
  logic [31:0] addr, din, dout;
  logic [7:0] model [logic [AW-1:0]];
  int checks = 0, failures = 0;

  mips_memory dut (.clk, .en, .mc, .addr, .din, .dout);

  always #5 clk = ~clk;

  function automatic logic [31:0] model_word(logic [31:0] a);
    logic [31:0] w;
    for (int i = 0; i < 4; i++) begin
      logic [AW-1:0] ba;
      ba = AW'({a[31:2], 2'b00} + 32'(i));
      w[8*i +: 8] = model.exists(ba) ? model[ba] : 8'h00;
    end
    return w;
  endfunction

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s addr=%h got=%h exp=%h", what, addr, got, exp);
    end
  endtask

  task automatic write(mem_ctrl_e m, logic [31:0] a, logic [31:0] d);
    @(negedge clk);
    en = 1; mc = m; addr = a; din = d;
    @(posedge clk); #1;
    en = 0;
    case (m)
      MC_WRITE_BYTE: model[AW'(a)] = d[7:0];
      MC_WRITE_HALF: begin
        model[AW'({a[31:1], 1'b0})] = d[7:0];
        model[AW'({a[31:1], 1'b1})] = d[15:8];
      end
      default: for (int i = 0; i < 4; i++) model[AW'({a[31:2], 2'b00} + 32'(i))] = d[8*i +: 8];
    endcase
  endtask

  task automatic read_check(logic [31:0] a);
    en = 1; mc = MC_READ_WORD; addr = a; #1;
    expect_eq("read", dout, model_word(a));
    en = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] base;
    en = 0; mc = MC_READ_WORD; addr = 0; din = 0;
    base = 32'd1000;
    // Endianness example: word 0x12345678 at byte address 1000.
    write(MC_WRITE_WORD, base, 32'h1234_5678);
    read_check(base);
    write(MC_WRITE_BYTE, base + 1, 32'hffff_ffaa);
    en = 1; mc = MC_READ_WORD; addr = base; #1;
    expect_eq("byte lane 1", dout, 32'h1234_aa78);
    write(MC_WRITE_HALF, base + 2, 32'h0000_beef);
    en = 1; mc = MC_READ_WORD; addr = base + 3; #1;
    expect_eq("half lane 1", dout, 32'hbeef_aa78);
    // Aliasing above the address width.
    addr = base + (32'h1 << AW); #1;
    expect_eq("alias", dout, 32'hbeef_aa78);
    // en low: no write, zero output.
    @(negedge clk);
    en = 0; mc = MC_WRITE_WORD; addr = base; din = 32'h0;
    @(posedge clk); #1;
    expect_eq("dout when disabled", dout, 32'h0);
    read_check(base);
    // Random traffic over a small window so that lanes overlap.
    for (int i = 0; i < 64; i++) write(MC_WRITE_WORD, 32'(4 * i), $urandom);
    for (int i = 0; i < 1500; i++) begin
      logic [31:0] a;
      int k;
      a = 32'($urandom_range(0, 255));
      k = $urandom_range(0, 3);
      case (k)
        0: read_check(a);
        1: write(MC_WRITE_BYTE, a, $urandom);
        2: write(MC_WRITE_HALF, {a[31:1], 1'b0}, $urandom);
        default: write(MC_WRITE_WORD, {a[31:2], 2'b00}, $urandom);
      endcase
    end
    for (int i = 0; i < 64; i++) read_check(32'(4 * i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
