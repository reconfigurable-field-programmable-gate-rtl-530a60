// exc_unit: exception unit.
//
// Watches the instruction in the execute stage. An unknown opcode, a
// register index outside the share of the register file that each core
// owns in the current configuration, or a refused data address in any
// active core raises an exception: the instruction and the younger ones are
// squashed, fetching stops and the pipeline drains, which ends the run.
// The unit keeps the address of the faulting instruction (EPCR) and the
// cause for the host to read over the development interface. The
// description only names an exceptions block; what it catches and that an
// exception ends the run are this design's own (there is no handler
// vector).
//
// Interface: ex_* describe the execute stage; take pulses combinationally
// in the cycle of the exception. flag/epcr/cause hold until clear (the
// start of the next run) or reset.
module exc_unit
  import ror_pkg::*;
#(
  parameter int unsigned PCW = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           ex_valid,
  input  logic           ex_illegal,
  input  logic           ex_bad_reg,
  input  logic           ex_daddr_err,
  input  logic [PCW-1:0] ex_pc,
  output logic           take,
  output logic           flag,
  output logic [31:0]    epcr,
  output exc_cause_e     cause
);

  exc_cause_e cause_now;

  always_comb begin
    if (ex_illegal)        cause_now = EXC_ILLEGAL;
    else if (ex_bad_reg)   cause_now = EXC_REGRANGE;
    else if (ex_daddr_err) cause_now = EXC_DADDR;
    else                   cause_now = EXC_NONE;
    take = ex_valid && !flag && (cause_now != EXC_NONE);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      flag  <= 1'b0;
      epcr  <= '0;
      cause <= EXC_NONE;
    end else if (take) begin
      flag  <= 1'b1;
      epcr  <= 32'(ex_pc);
      cause <= cause_now;
    end
  end

endmodule
