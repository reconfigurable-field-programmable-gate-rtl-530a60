// hprc: high-performance reconfigurable computing unit of one PE.
//
// In the source description this unit sits in the reconfigurable (dynamic)
// zone beside the integer execution unit, executes the same instruction as
// the other cores' units at the same time and performs the row shift (left
// or right) that lets a core reach its neighbouring pixels directly,
// without a network. Here the unit takes its own operand and the operands
// of the left and right neighbour PEs and returns the neighbour's value
// (row shift by one core). A PE at the edge of the active set of cores
// gets zero, i.e. the row is zero-padded; this padding, and the choice of
// a one-core shift, are this design's own.
//
// In the PE, a second ALU follows this unit, so a HPRC instruction can
// also combine the shifted value with a register.
//
// Interface: lane is this PE's index, ncores the number of active cores
// (1, 2 or 4); from_left/from_right are the neighbours' operands.
// Combinational; the result is used in the execute stage.
module hprc
  import ror_pkg::*;
#(
  parameter int unsigned NCORES = MAX_CORES
) (
  input  logic [$clog2(NCORES+1)-1:0] lane,
  input  logic [$clog2(NCORES+1)-1:0] ncores,
  input  logic                        shift_right, // 0: value from left neighbour
  input  logic [31:0]                 from_left,
  input  logic [31:0]                 from_right,
  output logic [31:0]                 y
);

  logic has_left, has_right;

  always_comb begin
    has_left  = (lane != '0);
    has_right = ((lane + 1'b1) < ncores);
    if (shift_right) y = has_right ? from_right : 32'd0;
    else             y = has_left  ? from_left  : 32'd0;
  end

endmodule
