// ror_asm_pkg: instruction encoders for the testbenches of the ROR1200
// SIMD core. Each function returns one 32-bit instruction word in the
// format documented in ror_pkg.
package ror_asm_pkg;
  import ror_pkg::*;

  function automatic logic [31:0] enc(opcode_e op, int rd, int ra, int imm);
    return {op, 5'(rd), 5'(ra), 16'(imm)};
  endfunction
  function automatic logic [31:0] a_alu(alu_op_e f, int rd, int ra, int rb);
    return {OP_ALU, 5'(rd), 5'(ra), 5'(rb), 7'd0, f};
  endfunction
  function automatic logic [31:0] a_addi(int rd, int ra, int imm); return enc(OP_ADDI, rd, ra, imm); endfunction
  function automatic logic [31:0] a_slli(int rd, int ra, int sh);  return enc(OP_SLLI, rd, ra, sh); endfunction
  function automatic logic [31:0] a_lw(int rd, int ra, int off);   return enc(OP_LW, rd, ra, off); endfunction
  function automatic logic [31:0] a_sw(int rs, int ra, int off);   return enc(OP_SW, rs, ra, off); endfunction
  function automatic logic [31:0] a_mac(int ra, int rb);           return {OP_MAC, 5'd0, 5'(ra), 5'(rb), 11'd0}; endfunction
  function automatic logic [31:0] a_msb(int ra, int rb);           return {OP_MSB, 5'd0, 5'(ra), 5'(rb), 11'd0}; endfunction
  function automatic logic [31:0] a_macrc(int rd, mac_fmt_e f, int sh);
    return {OP_MACRC, 5'(rd), 5'd0, 6'd0, 6'(sh), 2'd0, f};
  endfunction
  // HPRC with ADD and r0: plain row shift
  function automatic logic [31:0] a_hprc(int rd, int ra, bit right); return enc(OP_HPRC, rd, ra, int'(right) << 4); endfunction
  function automatic logic [31:0] a_hprc_op(alu_op_e f, int rd, int ra, int rb, bit right);
    return {OP_HPRC, 5'(rd), 5'(ra), 5'(rb), 6'd0, right, 4'(f)};
  endfunction
  function automatic logic [31:0] a_repeat(int len, int cnt);      return {OP_REPEAT, 10'(len), 16'(cnt)}; endfunction
  function automatic logic [31:0] a_j(int tgt);                    return enc(OP_J, 0, 0, tgt); endfunction
  function automatic logic [31:0] a_beqz(int ra, int tgt);         return enc(OP_BEQZ, 0, ra, tgt); endfunction
  function automatic logic [31:0] a_bnez(int ra, int tgt);         return enc(OP_BNEZ, 0, ra, tgt); endfunction
  function automatic logic [31:0] a_mfspr(int rd, int sel);        return enc(OP_MFSPR, rd, 0, sel); endfunction
  function automatic logic [31:0] a_macm(int rd, int ra, int off);   return enc(OP_MACM, rd, ra, off); endfunction
  function automatic logic [31:0] a_halt();                        return {OP_HALT, 26'd0}; endfunction
  function automatic logic [31:0] a_nop();                         return 32'd0; endfunction
endpackage
