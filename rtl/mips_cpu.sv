// mips_cpu: single-cycle MIPS processor core (one instruction per clock).
//
// Every cycle the core fetches the instruction at PC from program memory,
// decodes it, reads up to two registers, computes in the ALU, optionally
// accesses data memory and writes one register, then moves the PC on.
// Datapath, as drawn in the reference lecture:
//   - pc_unit: PC register, +4 adder, branch adder, jump concatenation and
//     the next-PC mux (PC+4, branch, jump, register for JR).
//   - control decodes the instruction into register indices and selects;
//     regfile supplies A (rs) and B (rt).
//   - extend widens the immediate; a mux picks B or the immediate for the ALU;
//     the ALU shift amount is the shamt field or the constant 16 (LUI).
//   - the ALU result is the data-memory address; B is the store data.
//   - write-back mux: ALU result, narrowed memory word (load_align), or
//     PC+8 for JAL.
//   - eq_compare ("=?") and zero_compare ("cmp") feed branch decisions to
//     control without using the ALU.
// Timing: the PC and data memory update on the rising edge; the register file
// writes on the falling edge. Memories are external: imem_* fetches the word
// at pc (combinational), dmem_* is one access per cycle with a combinational
// read. The structure follows the reference lecture's datapath drawings; the load
// narrowing block and the decoding of unused encodings as no-ops are this
// design's own.
module mips_cpu
  import mips_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  // program memory
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_data,
  // data memory
  output logic        dmem_en,
  output mem_ctrl_e   dmem_mc,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata,
  // status
  output logic [31:0] pc,
  output logic        illegal
);

  logic [31:0] inst, pc_plus8;
  ctrl_t       ctrl;
  cmp_mode_e   cmp_mode;
  pc_sel_e     pc_sel;
  logic [31:0] reg_a, reg_b, imm_ext, alu_b, alu_y, load_val, wb_data;
  logic [4:0]  shamt;
  logic        eq, cmp_taken;

  assign imem_addr = pc;
  assign inst      = imem_data;

  pc_unit #(.RESET_PC(RESET_PC)) u_pc (
    .clk, .rst,
    .sel     (pc_sel),
    .offset  (inst[15:0]),
    .target  (inst[25:0]),
    .jr_addr (reg_a),
    .pc,
    .pc_plus4 (),
    .pc_plus8
  );

  control u_ctrl (
    .inst, .eq, .cmp_taken,
    .ctrl, .cmp_mode, .pc_sel
  );

  // Writes are held off while in reset so no stray instruction lands.
  regfile u_rf (
    .clk,
    .we (ctrl.reg_we && !rst),
    .rw (ctrl.rw),
    .ra (ctrl.ra),
    .rb (ctrl.rb),
    .w  (wb_data),
    .a  (reg_a),
    .b  (reg_b)
  );

  extend u_ext (
    .imm  (inst[15:0]),
    .sign (ctrl.ext_sign),
    .y    (imm_ext)
  );

  assign alu_b = ctrl.alu_b_imm ? imm_ext : reg_b;
  assign shamt = ctrl.shamt_16 ? 5'd16 : inst[10:6];

  alu u_alu (
    .op    (ctrl.alu_op),
    .a     (reg_a),
    .b     (alu_b),
    .shamt (shamt),
    .y     (alu_y)
  );

  eq_compare u_eq (
    .a  (reg_a),
    .b  (reg_b),
    .eq (eq)
  );

  zero_compare u_cmp (
    .a     (reg_a),
    .mode  (cmp_mode),
    .taken (cmp_taken)
  );

  assign dmem_en    = ctrl.mem_en && !rst;
  assign dmem_mc    = ctrl.mem_mc;
  assign dmem_addr  = alu_y;
  assign dmem_wdata = reg_b;

  load_align u_ld (
    .word    (dmem_rdata),
    .addr_lo (alu_y[1:0]),
    .kind    (ctrl.load_kind),
    .y       (load_val)
  );

  always_comb begin
    unique case (ctrl.wb_sel)
      WB_MEM:  wb_data = load_val;
      WB_LINK: wb_data = pc_plus8;
      default: wb_data = alu_y;
    endcase
  end

  assign illegal = ctrl.illegal;

endmodule
