// pe: processing element (PE) of one core.
//
// Each core of the SIMD array has one PE holding the integer execution
// unit (alu), the reconfigurable execution unit (hprc), the pipelined
// multiply-accumulate unit (mac_unit) and the load/store unit (lsu), as in
// the source description ("each processing element contains the MAC,
// integer execution unit with HPRC unit"). All PEs receive the same
// decoded instruction in the execute stage and work on their own operands.
// The HPRC path is the neighbour row shift (hprc) followed by a second ALU
// (u_hprc_alu), so one HPRC instruction combines a neighbour's operand with
// this core's rb, e.g. a difference of adjacent pixels; the source draws a
// second ALU in the reconfigurable zone of the execute stage. A plain shift
// is HPRC with ADD and r0.
// The result multiplexer picks ALU, HPRC, MAC read-out or a special value
// (core number, core count, registers per core) by operation class.
//
// Interface: ctrl/go carry the instruction in execute (go = valid and not
// squashed); a/b/c are the bypassed register operands (c is store data);
// nb_left/nb_right are the neighbours' a operands for the HPRC row shift.
// The memory request is not gated by go (the core gates it) so that an
// address error can itself cause the squash without a combinational loop.
// mem_issue/mem_a/mem_b issue a memory-fed MAC (MACM) one stage later, in
// the memory stage, with the word just read from the data memory; the
// source shows the MAC taking its operand from memory after address
// generation (data flow of the MAC). The hazard controller keeps it from
// colliding with a register MAC issued from execute.
// The MAC unit is the only state; everything else is combinational.
module pe
  import ror_pkg::*;
#(
  parameter int unsigned NCORES = MAX_CORES,
  parameter int unsigned DWORDS = 4096
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(NCORES+1)-1:0] lane,
  input  logic [$clog2(NCORES+1)-1:0] ncores,
  input  logic [5:0]                 regs_per_core,
  input  logic                       active,
  input  ctrl_t                      ctrl,
  input  logic                       go,
  input  logic [31:0]                a,
  input  logic [31:0]                b,
  input  logic [31:0]                c,
  input  logic [31:0]                nb_left,
  input  logic [31:0]                nb_right,
  input  logic                       mem_issue, // MACM in the memory stage
  input  logic [31:0]                mem_a,     // its operand read from memory
  input  logic [31:0]                mem_b,     // its register operand
  output logic [31:0]                result,
  output logic                       mem_req,
  output logic                       mem_we,
  output logic [$clog2(DWORDS)-1:0]  mem_addr,
  output logic [31:0]                mem_wdata,
  output logic                       daddr_err,
  output logic                       mac_busy
);

  logic [31:0] b_op, alu_y, hprc_y, hprc_alu_y, mac_y, spr_y, ea;
  logic        alu_zero;  // flag not used by this instruction set
  logic        run;

  assign run  = go && active;
  assign b_op = ctrl.use_imm ? ctrl.imm : b;

  alu u_alu (.op(ctrl.alu_op), .a(a), .b(b_op), .y(alu_y), .zero(alu_zero));

  hprc #(.NCORES(NCORES)) u_hprc (
    .lane, .ncores, .shift_right(ctrl.hprc_right),
    .from_left(nb_left), .from_right(nb_right), .y(hprc_y)
  );

  // second ALU of the reconfigurable zone: works on the shifted operand
  logic hprc_zero;  // flag not used
  alu u_hprc_alu (.op(ctrl.alu_op), .a(hprc_y), .b(b), .y(hprc_alu_y), .zero(hprc_zero));

  mac_unit u_mac (
    .clk, .rst_n,
    .issue  ((run && ctrl.cls == CLS_MAC) || (mem_issue && active)),
    .op     (mem_issue ? MAC_SMAC : ctrl.mac_op),
    .a      (mem_issue ? mem_a : a),
    .b      (mem_issue ? mem_b : b),
    .rd_clr (run && ctrl.cls == CLS_MACRC),
    .fmt    (ctrl.mac_fmt),
    .shift  (ctrl.mac_shift),
    .result (mac_y),
    .acc_o  (),
    .busy   (mac_busy)
  );

  lsu #(.WORDS(DWORDS)) u_lsu (
    .en       (ctrl.valid && active),
    .is_load  (ctrl.cls == CLS_LOAD),
    .is_store (ctrl.cls == CLS_STORE),
    .base     (a),
    .offset   (ctrl.imm),
    .st_data  (c),
    .req      (mem_req),
    .we       (mem_we),
    .addr     (mem_addr),
    .wdata    (mem_wdata),
    .err      (daddr_err),
    .ea       (ea)
  );

  always_comb begin
    unique case (ctrl.spr_sel)
      2'd0:    spr_y = 32'(lane);
      2'd1:    spr_y = 32'(ncores);
      2'd2:    spr_y = 32'(regs_per_core);
      default: spr_y = 32'd0;
    endcase
    unique case (ctrl.cls)
      CLS_HPRC:  result = hprc_alu_y;
      CLS_MACRC: result = mac_y;
      CLS_SPR:   result = spr_y;
      CLS_LOAD, CLS_STORE: result = ea;
      default:   result = alu_y;
    endcase
  end

endmodule
