// mips_asm_pkg: instruction encoders for the testbenches.
//
// Each function returns the 32-bit machine word of one instruction of the
// subset the processor implements, built from the three formats:
//   R-type {op=0, rs, rt, rd, shamt, funct}, I-type {op, rs, rt, imm16},
//   J-type {op, target26}.
// Argument order mirrors assembly syntax (destination first; loads and
// stores as rt, offset, base). Branch offsets are in instructions, relative to
// the instruction after the branch.
package mips_asm_pkg;

  function automatic logic [31:0] enc_r(input logic [5:0] fn, input logic [4:0] rs, rt, rd,
                                        input logic [4:0] sh);
    return {6'h00, rs, rt, rd, sh, fn};
  endfunction

  function automatic logic [31:0] enc_i(input logic [5:0] op, input logic [4:0] rs, rt,
                                        input logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction

  function automatic logic [31:0] enc_j(input logic [5:0] op, input logic [25:0] tgt);
    return {op, tgt};
  endfunction

  function automatic logic [31:0] addu(input logic [4:0] rd, rs, rt); return enc_r(6'h21, rs, rt, rd, 5'd0); endfunction
  function automatic logic [31:0] subu(input logic [4:0] rd, rs, rt); return enc_r(6'h23, rs, rt, rd, 5'd0); endfunction
  function automatic logic [31:0] or_ (input logic [4:0] rd, rs, rt); return enc_r(6'h25, rs, rt, rd, 5'd0); endfunction
  function automatic logic [31:0] xor_(input logic [4:0] rd, rs, rt); return enc_r(6'h26, rs, rt, rd, 5'd0); endfunction
  function automatic logic [31:0] nor_(input logic [4:0] rd, rs, rt); return enc_r(6'h27, rs, rt, rd, 5'd0); endfunction
  function automatic logic [31:0] sll (input logic [4:0] rd, rt, sh); return enc_r(6'h00, 5'd0, rt, rd, sh); endfunction
  function automatic logic [31:0] srl (input logic [4:0] rd, rt, sh); return enc_r(6'h02, 5'd0, rt, rd, sh); endfunction
  function automatic logic [31:0] sra (input logic [4:0] rd, rt, sh); return enc_r(6'h03, 5'd0, rt, rd, sh); endfunction
  function automatic logic [31:0] jr  (input logic [4:0] rs);         return enc_r(6'h08, rs, 5'd0, 5'd0, 5'd0); endfunction

  function automatic logic [31:0] addiu(input logic [4:0] rt, rs, input logic [15:0] imm); return enc_i(6'h09, rs, rt, imm); endfunction
  function automatic logic [31:0] andi (input logic [4:0] rt, rs, input logic [15:0] imm); return enc_i(6'h0c, rs, rt, imm); endfunction
  function automatic logic [31:0] ori  (input logic [4:0] rt, rs, input logic [15:0] imm); return enc_i(6'h0d, rs, rt, imm); endfunction
  function automatic logic [31:0] lui  (input logic [4:0] rt, input logic [15:0] imm);     return enc_i(6'h0f, 5'd0, rt, imm); endfunction

  function automatic logic [31:0] lb (input logic [4:0] rt, input logic [15:0] off, input logic [4:0] rs); return enc_i(6'h20, rs, rt, off); endfunction
  function automatic logic [31:0] lh (input logic [4:0] rt, input logic [15:0] off, input logic [4:0] rs); return enc_i(6'h21, rs, rt, off); endfunction
  function automatic logic [31:0] lw (input logic [4:0] rt, input logic [15:0] off, input logic [4:0] rs); return enc_i(6'h23, rs, rt, off); endfunction
  function automatic logic [31:0] lbu(input logic [4:0] rt, input logic [15:0] off, input logic [4:0] rs); return enc_i(6'h24, rs, rt, off); endfunction
  function automatic logic [31:0] lhu(input logic [4:0] rt, input logic [15:0] off, input logic [4:0] rs); return enc_i(6'h25, rs, rt, off); endfunction
  function automatic logic [31:0] sb (input logic [4:0] rt, input logic [15:0] off, input logic [4:0] rs); return enc_i(6'h28, rs, rt, off); endfunction
  function automatic logic [31:0] sh (input logic [4:0] rt, input logic [15:0] off, input logic [4:0] rs); return enc_i(6'h29, rs, rt, off); endfunction
  function automatic logic [31:0] sw (input logic [4:0] rt, input logic [15:0] off, input logic [4:0] rs); return enc_i(6'h2b, rs, rt, off); endfunction

  function automatic logic [31:0] beq (input logic [4:0] rs, rt, input logic [15:0] off); return enc_i(6'h04, rs, rt, off); endfunction
  function automatic logic [31:0] bne (input logic [4:0] rs, rt, input logic [15:0] off); return enc_i(6'h05, rs, rt, off); endfunction
  function automatic logic [31:0] bltz(input logic [4:0] rs, input logic [15:0] off);     return enc_i(6'h01, rs, 5'd0, off); endfunction
  function automatic logic [31:0] bgez(input logic [4:0] rs, input logic [15:0] off);     return enc_i(6'h01, rs, 5'd1, off); endfunction
  function automatic logic [31:0] blez(input logic [4:0] rs, input logic [15:0] off);     return enc_i(6'h06, rs, 5'd0, off); endfunction
  function automatic logic [31:0] bgtz(input logic [4:0] rs, input logic [15:0] off);     return enc_i(6'h07, rs, 5'd0, off); endfunction

  // Absolute jumps take the byte address of the target; bits 27:2 are encoded.
  function automatic logic [31:0] j  (input logic [31:0] addr); return enc_j(6'h02, addr[27:2]); endfunction
  function automatic logic [31:0] jal(input logic [31:0] addr); return enc_j(6'h03, addr[27:2]); endfunction

endpackage
