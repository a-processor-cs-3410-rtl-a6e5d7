// mips_system: a complete single-cycle MIPS computer in a modified Harvard
// arrangement: the mips_cpu core with its own program memory and data memory.
//
// Both memories are mips_memory instances. The core reads program memory
// with control code 00 (read word) at the PC; data memory takes the core's
// enable, 2-bit control code, address and store data.
// Loading: while rst is high the core is held (PC at the reset address, no
// register or memory writes) and the load port writes whole words:
// load_we with load_dmem low writes program memory, with load_dmem high data
// memory, at byte address load_addr. Releasing rst starts execution at
// RESET_PC. The CPU, the two memories and their connection follow the
// system drawing of the reference lecture; the load port, and reset, are this design's own.
// Memory sizes: IMEM_AW / DMEM_AW address bits (64 KiB each by default); the
// design allows any width up to 32 bits.
module mips_system
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_AW  = 16,
  parameter int unsigned DMEM_AW  = 16,
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load_we,
  input  logic        load_dmem,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  output logic [31:0] pc,
  output logic [31:0] inst,
  output logic        illegal
);

  logic [31:0] imem_addr, imem_data;
  logic        dmem_en;
  mem_ctrl_e   dmem_mc;
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata;

  mips_cpu #(.RESET_PC(RESET_PC)) u_cpu (
    .clk, .rst,
    .imem_addr, .imem_data,
    .dmem_en, .dmem_mc, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .pc, .illegal
  );

  logic      im_load, dm_load;
  assign im_load = rst && load_we && !load_dmem;
  assign dm_load = rst && load_we &&  load_dmem;

  mips_memory #(.ADDR_WIDTH(IMEM_AW)) u_imem (
    .clk,
    .en   (1'b1),
    .mc   (im_load ? MC_WRITE_WORD : MC_READ_WORD),
    .addr (im_load ? load_addr : imem_addr),
    .din  (load_data),
    .dout (imem_data)
  );

  mips_memory #(.ADDR_WIDTH(DMEM_AW)) u_dmem (
    .clk,
    .en   (dm_load || dmem_en),
    .mc   (dm_load ? MC_WRITE_WORD : dmem_mc),
    .addr (dm_load ? load_addr : dmem_addr),
    .din  (dm_load ? load_data : dmem_wdata),
    .dout (dmem_rdata)
  );

  assign inst = imem_data;

endmodule
