// regfile: the MIPS register file, 32 registers of 32 bits with r0 wired to zero.
//
// Two combinational read ports (index ra -> a, index rb -> b) and one write
// port (index rw, data w). A write takes place on the falling edge of clk and
// only when we is high; a write to r0 is dropped, so r0 always reads zero.
// In the single-cycle core the result is stored mid-cycle, while the PC and
// data memory change on the rising edge. Register count, width, r0
// behaviour, the falling-edge write and the WE/RW/RA/RB ports follow the
// reference lecture. The registers have no reset (the lecture mentions none):
// software must write a register before reading it.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] rw,
  input  logic [$clog2(NREGS)-1:0] ra,
  input  logic [$clog2(NREGS)-1:0] rb,
  input  logic [WIDTH-1:0]         w,
  output logic [WIDTH-1:0]         a,
  output logic [WIDTH-1:0]         b
);

  logic [WIDTH-1:0] regs [1:NREGS-1];

  always_ff @(negedge clk) begin
    if (we && rw != '0) regs[rw] <= w;
  end

  assign a = (ra == '0) ? '0 : regs[ra];
  assign b = (rb == '0) ? '0 : regs[rb];

endmodule
