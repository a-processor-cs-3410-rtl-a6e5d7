// mips_memory: byte-addressed memory with 32-bit data and a 2-bit control code,
// used both as program memory and as data memory.
//
// Storage is an array of 32-bit words; addr is a byte address whose bits
// above ADDR_WIDTH are ignored, so the memory repeats through the 32-bit
// address space. When en is high, mc selects the operation:
//   00 read word   (dout = aligned word containing addr; addr[1:0] ignored)
//   01 write byte  (din[7:0] into the byte lane addr[1:0])
//   10 write half  (din[15:0] into the halfword lane addr[1])
//   11 write word  (din into the word; addr[1:0] ignored)
// Bytes are little endian: byte address 4k+i is word k bits 8i+7:8i.
// The read is combinational (dout follows addr in the same cycle) and is
// driven whenever en is high, otherwise dout is zero; writes happen on the
// rising edge of clk. The control codes, the 32-bit data and byte addressing
// come from the reference lecture; the size (it allows any address width up to 32),
// combinational read, rising-edge write, byte order and behaviour for
// misaligned addresses are this design's choices. There is no reset.
// An assertion reports halfword or word writes that are not aligned (the
// lecture requires 2- and 4-byte alignment); the write itself then ignores the
// low address bits.
module mips_memory
  import mips_pkg::*;
#(
  parameter int unsigned ADDR_WIDTH = 16
) (
  input  logic        clk,
  input  logic        en,
  input  mem_ctrl_e   mc,
  input  logic [31:0] addr,
  input  logic [31:0] din,
  output logic [31:0] dout
);

  localparam int unsigned WORDS = 2 ** (ADDR_WIDTH - 2);

  logic [31:0] mem [WORDS];
  logic [ADDR_WIDTH-3:0] widx;
  logic [3:0]  be;
  logic [31:0] wdata;

  assign widx = addr[ADDR_WIDTH-1:2];

  // Byte enables and lane-aligned write data for each write code.
  always_comb begin
    be    = 4'b0000;
    wdata = din;
    unique case (mc)
      MC_WRITE_BYTE: begin
        be    = 4'b0001 << addr[1:0];
        wdata = {4{din[7:0]}};
      end
      MC_WRITE_HALF: begin
        be    = addr[1] ? 4'b1100 : 4'b0011;
        wdata = {2{din[15:0]}};
      end
      MC_WRITE_WORD: be = 4'b1111;
      default:       be = 4'b0000;
    endcase
  end

  always_ff @(posedge clk) begin
    if (en) begin
      for (int i = 0; i < 4; i++) begin
        if (be[i]) mem[widx][8*i +: 8] <= wdata[8*i +: 8];
      end
    end
  end

  assign dout = en ? mem[widx] : '0;

  // Halfword writes must be 2-byte aligned and word writes 4-byte aligned.
  always_ff @(posedge clk) begin
    if (en) begin
      assert (!(mc == MC_WRITE_HALF && addr[0]) && !(mc == MC_WRITE_WORD && addr[1:0] != 2'b00))
        else $error("mips_memory: misaligned write, mc=%b addr=%h", mc, addr);
    end
  end

endmodule
