// tb_decoder: decodes one instruction of every kind and checks the
// control fields, then random register indices against the register
// share of 1, 2 and 4 cores, and unknown opcodes.
`timescale 1ns/1ps
module tb_decoder;
  import ror_pkg::*;
  import ror_asm_pkg::*;
  logic [31:0] ins; logic [1:0] lg = 0; ctrl_t c;
  int checks = 0, failures = 0;
  decoder dut (.instr(ins), .lg_cores(lg), .ctrl(c));
  task automatic check(string w, longint g, longint e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %0d exp %0d", w, g, e); end
  endtask
  initial begin
    ins = a_alu(ALU_SUB, 3, 4, 5); #1;
    check("alu cls", c.cls, CLS_ALU); check("alu op", c.alu_op, ALU_SUB); check("rd", c.rd, 3);
    check("ra", c.ra, 4); check("rb", c.rb, 5); check("we", c.rd_we, 1); check("imm", c.use_imm, 0);
    check("valid", c.valid, 1);
    ins = a_addi(1, 2, -3); #1;
    check("addi imm", c.imm, 32'hFFFF_FFFD); check("addi use_imm", c.use_imm, 1); check("addi uses_rb", c.uses_rb, 0);
    ins = enc(OP_ORI, 1, 2, 16'h8001); #1;
    check("ori zero-ext", c.imm, 32'h0000_8001); check("ori op", c.alu_op, ALU_OR);
    ins = enc(OP_SRAI, 1, 2, 3); #1; check("srai", c.alu_op, ALU_SRA);
    ins = enc(OP_MOVHI, 7, 0, 16'h1234); #1; check("movhi", c.alu_op, ALU_MOVHI); check("movhi ra unused", c.uses_ra, 0);
    ins = a_lw(3, 1, 8); #1; check("lw", c.cls, CLS_LOAD); check("lw we", c.rd_we, 1);
    ins = a_sw(3, 1, 8); #1; check("sw", c.cls, CLS_STORE); check("sw we", c.rd_we, 0); check("sw data", c.uses_rd, 1);
    ins = a_mac(3, 4); #1; check("mac", c.cls, CLS_MAC); check("mac op", c.mac_op, MAC_SMAC);
    ins = enc(OP_MACU, 0, 3, 0); #1; check("macu", c.mac_op, MAC_UMAC);
    ins = a_msb(3, 4); #1; check("msb", c.mac_op, MAC_SMSB);
    ins = a_macm(6, 2, -8); #1;
    check("macm cls", c.cls, CLS_LOAD); check("macm mem", c.mac_mem, 1); check("macm op", c.mac_op, MAC_SMAC);
    check("macm no write", c.rd_we, 0); check("macm uses rd", c.uses_rd, 1); check("macm imm", c.imm, 32'hFFFF_FFF8);
    ins = a_macrc(5, MACFMT_ROUND, 12); #1;
    check("macrc", c.cls, CLS_MACRC); check("fmt", c.mac_fmt, MACFMT_ROUND); check("shift", c.mac_shift, 12);
    ins = a_hprc(2, 3, 1); #1; check("hprc", c.cls, CLS_HPRC); check("dir", c.hprc_right, 1);
    check("hprc shift is add", c.alu_op, ALU_ADD); check("hprc rb", c.rb, 0);
    ins = a_hprc_op(ALU_SUB, 2, 3, 4, 0); #1; check("hprc op", c.alu_op, ALU_SUB); check("dir left", c.hprc_right, 0);
    check("hprc rb used", c.uses_rb, 1); check("hprc rb idx", c.rb, 4);
    ins = a_repeat(11, 300); #1; check("repeat", c.is_repeat, 1); check("len", c.rep_len, 11); check("cnt", c.rep_cnt, 300);
    ins = a_j(77); #1; check("j", c.is_jump, 1); check("target", c.target, 77);
    ins = a_beqz(4, 9); #1; check("beqz", c.is_beqz, 1); check("beqz ra", c.uses_ra, 1);
    ins = a_bnez(4, 9); #1; check("bnez", c.is_bnez, 1);
    ins = a_mfspr(4, 2); #1; check("mfspr", c.cls, CLS_SPR); check("sel", c.spr_sel, 2);
    ins = a_halt(); #1; check("halt", c.is_halt, 1);
    ins = a_nop(); #1; check("nop invalid", c.valid, 0); check("nop no write", c.rd_we, 0);
    for (int op = 0; op < 64; op++) begin
      ins = {6'(op), 26'd0}; #1;
      check("illegal", c.illegal, !(op <= 'h16 || op == 'h3F));
    end
    for (int i = 0; i < 300; i++) begin
      int lim, rd, ra, rb;
      lg = 2'($urandom_range(0, 2)); lim = 31 >> lg;
      rd = $urandom_range(0, 31); ra = $urandom_range(0, 31); rb = $urandom_range(0, 31);
      ins = a_alu(ALU_ADD, rd, ra, rb); #1;
      check("register range", c.bad_reg, rd > lim || ra > lim || rb > lim);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
