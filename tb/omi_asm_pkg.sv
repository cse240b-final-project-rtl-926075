// omi_asm_pkg: a tiny assembler for tests, one function per instruction form.
// Register arguments are specifiers (0..15 general, then the magic registers
// of omi_pkg); "i" variants take an immediate as operand b.
package omi_asm_pkg;
  import omi_pkg::*;

  function automatic instr_t base(opcode_e op);
    instr_t x = '0;
    x.op = op;
    return x;
  endfunction

  function automatic instr_t mov(reg_idx_t src, reg_idx_t dst);
    instr_t x = base(OP_MOV); x.ra = src; x.dst = dst; return x;
  endfunction
  function automatic instr_t set(logic [31:0] imm, reg_idx_t dst);
    instr_t x = base(OP_SET); x.imm = imm; x.dst = dst; return x;
  endfunction
  // OMI function, register b
  function automatic instr_t omir(logic [7:0] f, reg_idx_t a, reg_idx_t b, reg_idx_t dst);
    instr_t x = base(OP_OMIOP); x.func = f; x.ra = a; x.rb = b; x.dst = dst; return x;
  endfunction
  // OMI function, immediate b
  function automatic instr_t omii(logic [7:0] f, reg_idx_t a, logic [31:0] imm, reg_idx_t dst);
    instr_t x = base(OP_OMIOP); x.func = f; x.ra = a; x.b_imm = 1'b1; x.imm = imm; x.dst = dst;
    return x;
  endfunction
  function automatic instr_t condr(opcode_e op, reg_idx_t a, reg_idx_t b);
    instr_t x = base(op); x.ra = a; x.rb = b; return x;
  endfunction
  function automatic instr_t condi(opcode_e op, reg_idx_t a, logic [31:0] imm);
    instr_t x = base(op); x.ra = a; x.b_imm = 1'b1; x.imm = imm; return x;
  endfunction
  // loop with immediate trip count
  function automatic instr_t loopi(opcode_e op, logic [31:0] trips, logic [7:0] len,
                                   logic [15:0] sr = '0, logic [15:0] sw = '0);
    instr_t x = base(op); x.lmode = LM_IMM; x.imm = trips; x.len = len;
    x.stride_r = sr; x.stride_w = sw; return x;
  endfunction
  // loop with register trip count
  function automatic instr_t loopr(opcode_e op, reg_idx_t r, logic [7:0] len,
                                   logic [15:0] sr = '0, logic [15:0] sw = '0);
    instr_t x = base(op); x.lmode = LM_REG; x.ra = r; x.len = len;
    x.stride_r = sr; x.stride_w = sw; return x;
  endfunction
  // loop while the condition flag holds
  function automatic instr_t loopc(opcode_e op, logic [7:0] len,
                                   logic [15:0] sr = '0, logic [15:0] sw = '0);
    instr_t x = base(op); x.lmode = LM_COND; x.len = len;
    x.stride_r = sr; x.stride_w = sw; return x;
  endfunction
  // exec/fork/wait/kill with an immediate or a register address
  function automatic instr_t flowi(opcode_e op, logic [31:0] addr);
    instr_t x = base(op); x.b_imm = 1'b1; x.imm = addr; return x;
  endfunction
  function automatic instr_t flowr(opcode_e op, reg_idx_t r);
    instr_t x = base(op); x.rb = r; return x;
  endfunction
  function automatic instr_t omi(logic [7:0] set_no);
    instr_t x = base(OP_OMI); x.imm = 32'(set_no); return x;
  endfunction
endpackage
