// mips_pkg: shared encodings and types of the single-cycle MIPS subset.
//
// Holds the opcode and function-code numbers of every instruction the
// processor decodes, the ALU operation set, the 2-bit memory control code,
// the branch-compare modes, the load-extension kinds, the next-PC selector and
// the bundle of control signals the decoder hands to the datapath.
// The opcode, function and memory-control numbers follow the instruction
// tables of the reference lecture; the enum encodings of internal signals (ALU op,
// compare mode, load kind, PC select) are this design's own choice.
package mips_pkg;

  // Primary opcodes (instruction bits 31:26).
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_REGIMM = 6'h01;  // BLTZ / BGEZ, selected by bits 20:16
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_JAL   = 6'h03;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_BLEZ  = 6'h06;
  localparam logic [5:0] OP_BGTZ  = 6'h07;
  localparam logic [5:0] OP_ADDIU = 6'h09;
  localparam logic [5:0] OP_ANDI  = 6'h0c;
  localparam logic [5:0] OP_ORI   = 6'h0d;
  localparam logic [5:0] OP_LUI   = 6'h0f;
  localparam logic [5:0] OP_LB    = 6'h20;
  localparam logic [5:0] OP_LH    = 6'h21;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_LBU   = 6'h24;
  localparam logic [5:0] OP_LHU   = 6'h25;
  localparam logic [5:0] OP_SB    = 6'h28;
  localparam logic [5:0] OP_SH    = 6'h29;
  localparam logic [5:0] OP_SW    = 6'h2b;

  // Function codes of R-type instructions (bits 5:0).
  localparam logic [5:0] FN_SLL  = 6'h00;
  localparam logic [5:0] FN_SRL  = 6'h02;
  localparam logic [5:0] FN_SRA  = 6'h03;
  localparam logic [5:0] FN_JR   = 6'h08;
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUBU = 6'h23;
  localparam logic [5:0] FN_OR   = 6'h25;
  localparam logic [5:0] FN_XOR  = 6'h26;
  localparam logic [5:0] FN_NOR  = 6'h27;

  // Sub-opcodes of OP_REGIMM (bits 20:16).
  localparam logic [4:0] SUB_BLTZ = 5'h00;
  localparam logic [4:0] SUB_BGEZ = 5'h01;

  localparam logic [4:0] REG_LINK = 5'd31;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLL, ALU_SRL, ALU_SRA
  } alu_op_e;

  // Memory control code on the 2-bit "mc" input of a memory.
  typedef enum logic [1:0] {
    MC_READ_WORD  = 2'b00,
    MC_WRITE_BYTE = 2'b01,
    MC_WRITE_HALF = 2'b10,
    MC_WRITE_WORD = 2'b11
  } mem_ctrl_e;

  // Compare-against-zero modes of the "cmp" unit.
  typedef enum logic [1:0] {CMP_LTZ, CMP_GEZ, CMP_LEZ, CMP_GTZ} cmp_mode_e;

  // How a loaded word is narrowed and extended before write-back.
  typedef enum logic [2:0] {LD_WORD, LD_BYTE, LD_BYTE_U, LD_HALF, LD_HALF_U} load_kind_e;

  // Source of the next PC.
  typedef enum logic [1:0] {PC_SEQ, PC_BRANCH, PC_JUMP, PC_JREG} pc_sel_e;

  // Write-back source.
  typedef enum logic [1:0] {WB_ALU, WB_MEM, WB_LINK} wb_sel_e;

  typedef struct packed {
    logic [4:0] ra;          // read port A index (rs)
    logic [4:0] rb;          // read port B index (rt / "rd" field of I-type)
    logic [4:0] rw;          // write port index
    logic       reg_we;
    alu_op_e    alu_op;
    logic       alu_b_imm;   // ALU B input takes the extended immediate
    logic       ext_sign;    // extend unit: 1 = sign extend, 0 = zero extend
    logic       shamt_16;    // shift amount is the constant 16 (LUI)
    logic       mem_en;
    mem_ctrl_e  mem_mc;
    load_kind_e load_kind;
    wb_sel_e    wb_sel;
    logic       illegal;     // opcode/function not decoded: executed as a no-op
  } ctrl_t;

endpackage
