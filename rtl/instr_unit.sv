// instr_unit: instruction fetch unit (program counter and instruction
// register).
//
// The fetch stage presents the program counter to the instruction memory
// (read combinationally) and loads the instruction register (IR) at the
// clock edge, together with the instruction's address. The next address
// is, in order of priority: a jump or taken branch resolved in decode
// (the instruction fetched behind it is replaced by a no-op), the start of
// the loop body when the hardware loop wraps, or PC + 1. Instruction
// addresses count 32-bit words. The PC / next-PC / IR structure follows the
// source description's pipeline figure; the priorities are this design's.
//
// Interface: stall holds PC and IR; redirect/redirect_pc come from decode;
// stop (halt or exception) turns fetching off until reset. loop_* start the
// hardware loop. ir/pc_id feed decode; loop_back pulses when the loop wraps.
module instr_unit
  import ror_pkg::*;
#(
  parameter int unsigned PCW = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  output logic [PCW-1:0] imem_addr,
  input  logic [31:0]    imem_rdata,
  input  logic           stall,
  input  logic           redirect,
  input  logic [PCW-1:0] redirect_pc,
  input  logic           stop,
  input  logic           loop_start,
  input  logic [9:0]     loop_len,
  input  logic [15:0]    loop_cnt,
  output logic [31:0]    ir,
  output logic [PCW-1:0] pc_id,
  output logic           loop_back,
  output logic           loop_active
);

  localparam logic [31:0] NOP = {OP_NOP, 26'd0};

  logic [PCW-1:0] pc, npc, loop_pc;
  logic           stopped, loop_taken, advance;

  assign advance = !stall && !stopped && !stop && !redirect;

  hw_loop #(.PCW(PCW)) u_loop (
    .clk, .rst_n,
    .start    (loop_start && !stall),
    .body_pc  (pc_id + PCW'(1)),
    .len      (loop_len),
    .count    (loop_cnt),
    .fetch_pc (pc),
    .advance  (advance),
    .taken    (loop_taken),
    .target   (loop_pc),
    .active   (loop_active)
  );

  always_comb begin
    if (loop_taken) npc = loop_pc;
    else            npc = pc + PCW'(1);
  end

  assign imem_addr = pc;
  assign loop_back = advance && loop_taken;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc      <= '0;
      pc_id   <= '0;
      ir      <= NOP;
      stopped <= 1'b0;
    end else if (stop || stopped) begin
      stopped <= 1'b1;
      ir      <= NOP;
    end else if (!stall) begin
      if (redirect) begin
        ir <= NOP;
        pc <= redirect_pc;
      end else begin
        ir    <= imem_rdata;
        pc_id <= pc;
        pc    <= npc;
      end
    end
  end

endmodule
