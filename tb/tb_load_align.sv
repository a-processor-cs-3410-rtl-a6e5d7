// tb_load_align: self-checking test of load narrowing and extension.
// Uses the word 0x12345678 of the endianness example plus random words; for
// every byte offset and load kind the expected value is picked out and
// extended here, independently of the block.
module tb_load_align;
  import mips_pkg::*;
  logic [31:0] word, y;
  logic [1:0]  addr_lo;
  load_kind_e  kind;
  int checks = 0, failures = 0;

  load_align dut (.word, .addr_lo, .kind, .y);

  function automatic logic [31:0] ref_y(logic [31:0] w, logic [1:0] off, load_kind_e k);
    logic [7:0]  bt;
    logic [15:0] hf;
    bt = 8'(w >> (8 * off));
    hf = 16'(w >> (16 * off[1]));
    case (k)
      LD_BYTE:   return {{24{bt[7]}}, bt};
      LD_BYTE_U: return {24'h0, bt};
      LD_HALF:   return {{16{hf[15]}}, hf};
      LD_HALF_U: return {16'h0, hf};
      default:   return w;
    endcase
  endfunction

  task automatic check(logic [31:0] w, logic [1:0] off, load_kind_e k, logic [31:0] exp);
    word = w; addr_lo = off; kind = k; #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL w=%h off=%0d kind=%s y=%h exp=%h", w, off, k.name(), y, exp);
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
    // Little endian: the byte at the lowest address is 0x78.
    check(32'h1234_5678, 2'd0, LD_BYTE_U, 32'h78);
    check(32'h1234_5678, 2'd3, LD_BYTE_U, 32'h12);
    check(32'h1234_5678, 2'd2, LD_HALF_U, 32'h1234);
    check(32'h80ff_0000, 2'd2, LD_BYTE,   32'hffff_ffff);
    check(32'h80ff_0000, 2'd2, LD_HALF,   32'hffff_80ff);
    for (int i = 0; i < 1000; i++) begin
      logic [31:0] w;
      logic [1:0] off;
      load_kind_e k;
      w = $urandom; off = 2'($urandom); k = load_kind_e'($urandom_range(0, 4));
      check(w, off, k, ref_y(w, off, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
