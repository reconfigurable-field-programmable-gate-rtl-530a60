// ror_pkg: types and constants shared by the ROR1200 SIMD soft core.
//
// The core runs one 32-bit instruction stream on up to four processing
// elements (PEs). A 32-register file is split among the active PEs; the
// number of active PEs is held in the core count register (CCR).
// The register count, core count, the SPR numbers of the development
// interface (read 0x4, write 0x5) and the RRF window at SPR 1024..1055 follow
// the source description. The instruction encoding below is this design's
// own: the description names the operations (add, multiply, abs, logic,
// shifts, multiply-accumulate, repeat) but not their encoding.
//
// Instruction formats (all 32 bits):
//   [31:26] opcode  [25:21] rd  [20:16] ra  [15:11] rb  [15:0] imm16
//   ALU register form: function code in [3:0].
//   HPRC: function code in [3:0], neighbour direction in [4] (1 = right).
//   REPEAT: [25:16] number of instructions in the body, [15:0] loop count.
//   MACM: rd holds the coefficient, the other factor is read from memory at
//   ra + imm; the MAC is issued in the memory stage.
package ror_pkg;

  localparam int unsigned XLEN      = 32;  // data path width
  localparam int unsigned NREGS     = 32;  // registers in the RRF
  localparam int unsigned BANK_REGS = 8;   // registers per RRF block
  localparam int unsigned MAX_CORES = NREGS / BANK_REGS; // 4
  localparam int unsigned ACC_W     = 48;  // MAC accumulator width

  // Development interface commands (dbg_op_i)
  localparam logic [2:0] DBG_OP_READ_SPR  = 3'h4;
  localparam logic [2:0] DBG_OP_WRITE_SPR = 3'h5;

  // SPR addresses
  localparam logic [15:0] SPR_REGCNT = 16'd16;    // registers per application
  localparam logic [15:0] SPR_CCR    = 16'd17;    // core count (read only)
  localparam logic [15:0] SPR_STATUS = 16'd18;    // {.., exc, halted, running}
  localparam logic [15:0] SPR_EPCR   = 16'd19;    // PC of the excepting instruction
  localparam logic [15:0] SPR_EEAR   = 16'd20;    // exception cause
  localparam logic [15:0] SPR_RRF_LO = 16'd1024;  // RRF window 1024..1055
  localparam logic [15:0] SPR_RRF_HI = 16'd1055;

  typedef enum logic [5:0] {
    OP_NOP    = 6'h00,
    OP_ALU    = 6'h01,  // rd = ra <func> rb
    OP_ADDI   = 6'h02,  // rd = ra + sext(imm)
    OP_ANDI   = 6'h03,  // rd = ra & zext(imm)
    OP_ORI    = 6'h04,
    OP_XORI   = 6'h05,
    OP_SLLI   = 6'h06,
    OP_SRLI   = 6'h07,
    OP_SRAI   = 6'h08,
    OP_MOVHI  = 6'h09,  // rd = imm << 16
    OP_LW     = 6'h0A,  // rd = mem[ra + sext(imm)]
    OP_SW     = 6'h0B,  // mem[ra + sext(imm)] = rd
    OP_MAC    = 6'h0C,  // acc += ra * rb (signed)
    OP_MACU   = 6'h0D,  // acc += ra * rb (unsigned)
    OP_MSB    = 6'h0E,  // acc -= ra * rb (signed)
    OP_MACRC  = 6'h0F,  // rd = fmt(acc >> imm[9:4], imm[1:0]); acc = 0
    OP_HPRC   = 6'h10,  // rd = (ra of left ([4]=0) / right ([4]=1) neighbour) <func [3:0]> rb
    OP_REPEAT = 6'h11,  // hardware loop
    OP_J      = 6'h12,  // pc = imm
    OP_BEQZ   = 6'h13,  // if core 0's ra == 0: pc = imm
    OP_BNEZ   = 6'h14,
    OP_MFSPR  = 6'h15,  // rd = core id (imm 0), core count (1), regs per core (2)
    OP_MACM   = 6'h16,  // acc += mem[ra + sext(imm)] * rd (signed), MAC fed from memory
    OP_HALT   = 6'h3F
  } opcode_e;

  typedef enum logic [3:0] {
    ALU_ADD  = 4'h0, ALU_SUB  = 4'h1, ALU_AND = 4'h2, ALU_OR  = 4'h3,
    ALU_XOR  = 4'h4, ALU_SLL  = 4'h5, ALU_SRL = 4'h6, ALU_SRA = 4'h7,
    ALU_MUL  = 4'h8, ALU_ABS  = 4'h9, ALU_SLT = 4'hA, ALU_SLTU = 4'hB,
    ALU_MIN  = 4'hC, ALU_MAX  = 4'hD, ALU_MOVB = 4'hE, ALU_MOVHI = 4'hF
  } alu_op_e;

  typedef enum logic [1:0] {
    MAC_NONE = 2'd0, MAC_SMAC = 2'd1, MAC_UMAC = 2'd2, MAC_SMSB = 2'd3
  } mac_op_e;

  // MAC read formats: how the 48-bit accumulator becomes 32 bits
  typedef enum logic [1:0] {
    MACFMT_TRUNC = 2'd0,  // low 32 bits after the shift
    MACFMT_SAT   = 2'd1,  // saturate to the signed 32-bit range
    MACFMT_ROUND = 2'd2   // round to nearest, then saturate
  } mac_fmt_e;

  typedef enum logic [2:0] {
    CLS_NONE, CLS_ALU, CLS_HPRC, CLS_LOAD, CLS_STORE, CLS_MAC, CLS_MACRC, CLS_SPR
  } op_class_e;

  // Exception causes
  typedef enum logic [1:0] {
    EXC_NONE = 2'd0, EXC_ILLEGAL = 2'd1, EXC_REGRANGE = 2'd2, EXC_DADDR = 2'd3
  } exc_cause_e;

  // Decoded instruction, the same for every PE
  typedef struct packed {
    logic        valid;
    op_class_e   cls;
    alu_op_e     alu_op;
    logic        use_imm;
    logic [31:0] imm;
    logic [4:0]  rd;
    logic [4:0]  ra;
    logic [4:0]  rb;
    logic        rd_we;     // writes rd
    logic        uses_ra;
    logic        uses_rb;
    logic        uses_rd;   // store data read from rd
    mac_op_e     mac_op;
    mac_fmt_e    mac_fmt;
    logic [5:0]  mac_shift;
    logic        hprc_right;
    logic        mac_mem;   // MAC operand from the data memory (MACM)
    logic [1:0]  spr_sel;
    logic        is_jump;
    logic        is_beqz;
    logic        is_bnez;
    logic        is_repeat;
    logic        is_halt;
    logic        illegal;   // unknown opcode
    logic        bad_reg;   // register index outside this core's share
    logic [15:0] target;
    logic [9:0]  rep_len;
    logic [15:0] rep_cnt;
  } ctrl_t;

  // Event counters of one run, readable as a group
  typedef struct packed {
    logic [31:0] cycles;        // cycles in the run state
    logic [31:0] retired;       // instructions written back (no-ops excluded)
    logic [31:0] stall_load;    // load-use stall cycles
    logic [31:0] stall_mac;     // MAC read stall cycles
    logic [31:0] stall_branch;  // branch operand stall cycles
    logic [31:0] bypass;        // execute-stage operand bypasses
    logic [31:0] loop_back;     // hardware loop wrap-arounds
    logic [31:0] flush;         // fetches squashed by jumps and branches
    logic [31:0] mac_ops;       // MAC operations issued (per instruction)
    logic [31:0] hprc_ops;      // HPRC operations (per instruction)
  } perf_t;

endpackage
