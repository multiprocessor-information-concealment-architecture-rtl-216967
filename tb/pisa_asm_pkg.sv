// pisa_asm_pkg: a tiny assembler for the testbenches.
//
// Each function returns one 64-bit instruction in the layout of mute_pkg:
// opcode in [47:32], rs in [31:24], rt in [23:16], rd in [15:8], shamt in
// [7:0], imm16 in [15:0], jump target in [25:0]. Branch offsets count
// instructions from the one after the branch; jump targets are instruction
// (word) indices.
package pisa_asm_pkg;
  import mute_pkg::*;

  function automatic instr_t a_r(opcode_e op, int rd, int rs, int rt);
    return {16'h0, 16'(op), 8'(rs), 8'(rt), 8'(rd), 8'h0};
  endfunction

  function automatic instr_t a_sh(opcode_e op, int rd, int rt, int shamt);
    return {16'h0, 16'(op), 8'h0, 8'(rt), 8'(rd), 8'(shamt)};
  endfunction

  function automatic instr_t a_i(opcode_e op, int rt, int rs, int imm);
    return {16'h0, 16'(op), 8'(rs), 8'(rt), 16'(imm)};
  endfunction

  // loads and stores: rt, offset(rs)
  function automatic instr_t a_m(opcode_e op, int rt, int off, int rs);
    return {16'h0, 16'(op), 8'(rs), 8'(rt), 16'(off)};
  endfunction

  function automatic instr_t a_b(opcode_e op, int rs, int rt, int off);
    return {16'h0, 16'(op), 8'(rs), 8'(rt), 16'(off)};
  endfunction

  function automatic instr_t a_j(opcode_e op, int target);
    return {16'h0, 16'(op), 6'h0, 26'(target)};
  endfunction

  function automatic instr_t a_op(opcode_e op, int imm = 0);
    return {16'h0, 16'(op), 16'h0, 16'(imm)};
  endfunction

  function automatic instr_t a_nop();
    return '0;
  endfunction
endpackage
