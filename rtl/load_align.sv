// load_align: narrows the word read from data memory for byte and halfword loads.
//
// Combinational. The memory always returns the aligned 32-bit word holding the
// addressed byte. The low two address bits pick the byte (LB/LBU) or the
// halfword, by addr[1] (LH/LHU), in little-endian order (byte 0 is bits 7:0),
// and the result is sign or zero extended to 32 bits; LW passes the word.
// Which loads exist and how they extend follows the instruction table; where
// the narrowing happens (here, after the memory) and little-endian byte order
// are this design's choices.
module load_align
  import mips_pkg::*;
(
  input  logic [31:0] word,
  input  logic [1:0]  addr_lo,
  input  load_kind_e  kind,
  output logic [31:0] y
);

  logic [7:0]  byte_sel;
  logic [15:0] half_sel;

  assign byte_sel = word[8*addr_lo +: 8];
  assign half_sel = addr_lo[1] ? word[31:16] : word[15:0];

  always_comb begin
    unique case (kind)
      LD_BYTE:   y = {{24{byte_sel[7]}}, byte_sel};
      LD_BYTE_U: y = {24'b0, byte_sel};
      LD_HALF:   y = {{16{half_sel[15]}}, half_sel};
      LD_HALF_U: y = {16'b0, half_sel};
      default:   y = word;
    endcase
  end

endmodule
