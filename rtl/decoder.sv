// decoder: instruction decoder.
//
// Turns the 32-bit instruction in the instruction register into the
// control word (ctrl_t) that all processing elements share: operation
// class, ALU function, immediate, register indices and which of them are
// read or written, MAC command and read-out format, memory-fed MAC (MACM:
// a load whose data go to the MAC instead of a register), HPRC direction and the
// control-flow fields (jump, branch, repeat, halt). It also flags unknown
// opcodes and register indices beyond the share of the register file that
// each core owns in the current configuration (32 >> lg_cores registers).
// The encoding is listed in ror_pkg and is this design's own.
//
// Combinational; used in the decode stage.
module decoder
  import ror_pkg::*;
(
  input  logic [31:0] instr,
  input  logic [1:0]  lg_cores,
  output ctrl_t       ctrl
);

  opcode_e     op;
  logic [31:0] simm, zimm;
  logic [4:0]  lim;

  always_comb begin
    op   = opcode_e'(instr[31:26]);
    simm = {{16{instr[15]}}, instr[15:0]};
    zimm = {16'd0, instr[15:0]};
    lim  = 5'h1F >> lg_cores;   // highest register index of a core

    ctrl            = '0;
    ctrl.valid      = 1'b1;
    ctrl.cls        = CLS_NONE;
    ctrl.alu_op     = ALU_ADD;
    ctrl.rd         = instr[25:21];
    ctrl.ra         = instr[20:16];
    ctrl.rb         = instr[15:11];
    ctrl.imm        = simm;
    ctrl.mac_op     = MAC_NONE;
    ctrl.mac_fmt    = mac_fmt_e'(instr[1:0]);
    ctrl.mac_shift  = instr[9:4];
    ctrl.hprc_right = instr[4];
    ctrl.spr_sel    = instr[1:0];
    ctrl.target     = instr[15:0];
    ctrl.rep_len    = instr[25:16];
    ctrl.rep_cnt    = instr[15:0];

    unique case (op)
      OP_NOP: ctrl.valid = 1'b0;
      OP_ALU: begin
        ctrl.cls = CLS_ALU; ctrl.alu_op = alu_op_e'(instr[3:0]);
        ctrl.rd_we = 1'b1; ctrl.uses_ra = 1'b1; ctrl.uses_rb = 1'b1;
      end
      OP_ADDI, OP_ANDI, OP_ORI, OP_XORI, OP_SLLI, OP_SRLI, OP_SRAI: begin
        ctrl.cls = CLS_ALU; ctrl.use_imm = 1'b1;
        ctrl.rd_we = 1'b1; ctrl.uses_ra = 1'b1;
        unique case (op)
          OP_ADDI: ctrl.alu_op = ALU_ADD;
          OP_ANDI: begin ctrl.alu_op = ALU_AND; ctrl.imm = zimm; end
          OP_ORI:  begin ctrl.alu_op = ALU_OR;  ctrl.imm = zimm; end
          OP_XORI: begin ctrl.alu_op = ALU_XOR; ctrl.imm = zimm; end
          OP_SLLI: ctrl.alu_op = ALU_SLL;
          OP_SRLI: ctrl.alu_op = ALU_SRL;
          default: ctrl.alu_op = ALU_SRA;
        endcase
      end
      OP_MOVHI: begin
        ctrl.cls = CLS_ALU; ctrl.alu_op = ALU_MOVHI; ctrl.use_imm = 1'b1;
        ctrl.imm = zimm; ctrl.rd_we = 1'b1;
      end
      OP_LW: begin
        ctrl.cls = CLS_LOAD; ctrl.rd_we = 1'b1; ctrl.uses_ra = 1'b1;
      end
      OP_SW: begin
        ctrl.cls = CLS_STORE; ctrl.uses_ra = 1'b1; ctrl.uses_rd = 1'b1;
      end
      OP_MAC, OP_MACU, OP_MSB: begin
        ctrl.cls = CLS_MAC; ctrl.uses_ra = 1'b1; ctrl.uses_rb = 1'b1;
        ctrl.mac_op = (op == OP_MAC) ? MAC_SMAC : (op == OP_MACU) ? MAC_UMAC : MAC_SMSB;
      end
      OP_MACM: begin
        ctrl.cls = CLS_LOAD; ctrl.uses_ra = 1'b1; ctrl.uses_rd = 1'b1;
        ctrl.mac_mem = 1'b1; ctrl.mac_op = MAC_SMAC;
      end
      OP_MACRC: begin
        ctrl.cls = CLS_MACRC; ctrl.rd_we = 1'b1;
      end
      OP_HPRC: begin
        ctrl.cls = CLS_HPRC; ctrl.alu_op = alu_op_e'(instr[3:0]);
        ctrl.rd_we = 1'b1; ctrl.uses_ra = 1'b1; ctrl.uses_rb = 1'b1;
      end
      OP_REPEAT: ctrl.is_repeat = 1'b1;
      OP_J:      ctrl.is_jump = 1'b1;
      OP_BEQZ:   begin ctrl.is_beqz = 1'b1; ctrl.uses_ra = 1'b1; end
      OP_BNEZ:   begin ctrl.is_bnez = 1'b1; ctrl.uses_ra = 1'b1; end
      OP_MFSPR:  begin ctrl.cls = CLS_SPR; ctrl.rd_we = 1'b1; end
      OP_HALT:   ctrl.is_halt = 1'b1;
      default:   ctrl.illegal = 1'b1;
    endcase

    ctrl.bad_reg = (ctrl.rd_we   && ctrl.rd > lim) || (ctrl.uses_rd && ctrl.rd > lim) ||
                   (ctrl.uses_ra && ctrl.ra > lim) || (ctrl.uses_rb && ctrl.rb > lim);
  end

endmodule
