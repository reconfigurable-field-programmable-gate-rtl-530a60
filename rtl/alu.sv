// alu: fixed-point integer execution unit of one PE.
//
// Purely combinational. Performs the arithmetic (add, subtract, multiply
// low word, absolute value, min/max, compare), logic and shift operations
// of the integer execution pipeline on two 32-bit operands. Only
// fixed-point data are supported, signed or unsigned depending on the
// operation; there is no floating point, as in the source description.
// The exact operation list and its coding (alu_op_e) are this design's own.
//
// Interface: op selects the operation, a/b are the operands, y the result,
// zero flags a zero result. No clock: the result is valid in the same cycle
// (the execute stage of the core pipeline).
module alu
  import ror_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output logic        zero
);

  logic [63:0] prod;
  logic        lt_s;

  always_comb begin
    prod = $signed(a) * $signed(b);
    lt_s = $signed(a) < $signed(b);
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_SLL:   y = a << b[4:0];
      ALU_SRL:   y = a >> b[4:0];
      ALU_SRA:   y = $unsigned($signed(a) >>> b[4:0]);
      ALU_MUL:   y = prod[31:0];
      ALU_ABS:   y = a[31] ? (~a + 32'd1) : a;
      ALU_SLT:   y = {31'd0, lt_s};
      ALU_SLTU:  y = {31'd0, a < b};
      ALU_MIN:   y = lt_s ? a : b;
      ALU_MAX:   y = lt_s ? b : a;
      ALU_MOVB:  y = b;
      ALU_MOVHI: y = {b[15:0], 16'd0};
      default:   y = 32'd0;
    endcase
    zero = (y == 32'd0);
  end

endmodule
