// mac_unit: pipelined multiply-accumulate unit of one PE.
//
// Follows the source description: 32-bit inputs, sign- or zero-extended
// depending on the operation, 32 x 32 multiply, 48-bit accumulator, five
// pipeline stages and one new operation accepted every clock cycle. The
// 48-bit accumulator is read back as 32 bits either truncated, saturated or
// rounded and saturated. How the work is cut into stages is this design's
// own:
//   S1  operands captured, extended to 33 bits (signed or unsigned)
//   S2  two partial products (a x b[15:0], a x b[32:16])
//   S3  partial products summed to the full product
//   S4  product cut to 48 bits and negated for multiply-subtract
//   S5  accumulate: acc <= acc + addend
// An operation issued in cycle t is in the accumulator after the clock edge
// that ends cycle t+4 (5 cycles). busy is high while any stage holds an
// operation; the core does not read the accumulator before busy falls.
//
// Interface: issue/op/a/b start an operation. rd_clr reads the accumulator
// in the same cycle through fmt/shift on result, and clears it at the clock
// edge. Synchronous active-low reset clears the accumulator and the stages.
module mac_unit
  import ror_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        issue,
  input  mac_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        rd_clr,
  input  mac_fmt_e    fmt,
  input  logic [5:0]  shift,
  output logic [31:0] result,
  output logic [ACC_W-1:0] acc_o,
  output logic        busy
);

  localparam int unsigned PW = 66;

  // stage valid bits and data
  logic [3:0]               v;
  logic                     neg1, neg2, neg3;
  logic signed [32:0]       a1, b1;
  logic signed [PW-1:0]     pl2, ph2;
  logic signed [PW-1:0]     p3;     // only the low 48 bits are accumulated
  logic signed [ACC_W-1:0]  add4;
  logic signed [ACC_W-1:0]  acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v    <= '0;
      acc  <= '0;
      a1   <= '0; b1 <= '0; pl2 <= '0; ph2 <= '0; p3 <= '0; add4 <= '0;
      neg1 <= 1'b0; neg2 <= 1'b0; neg3 <= 1'b0;
    end else begin
      // S1
      v[0] <= issue && (op != MAC_NONE);
      neg1 <= (op == MAC_SMSB);
      if (op == MAC_UMAC) begin
        a1 <= $signed({1'b0, a});
        b1 <= $signed({1'b0, b});
      end else begin
        a1 <= $signed({a[31], a});
        b1 <= $signed({b[31], b});
      end
      // S2: a x low half (unsigned) and a x high part (signed)
      v[1] <= v[0];
      neg2 <= neg1;
      pl2  <= PW'(a1) * $signed({1'b0, b1[15:0]});
      ph2  <= PW'(a1) * PW'($signed(b1[32:16]));
      // S3
      v[2] <= v[1];
      neg3 <= neg2;
      p3   <= pl2 + (ph2 <<< 16);
      // S4
      v[3] <= v[2];
      add4 <= neg3 ? -p3[ACC_W-1:0] : p3[ACC_W-1:0];
      // S5
      if (rd_clr) acc <= v[3] ? add4 : '0;
      else if (v[3]) acc <= acc + add4;
    end
  end

  // read-out formatting
  logic signed [ACC_W:0] rnd, shifted;
  localparam logic signed [ACC_W:0] SMAX = (ACC_W+1)'(32'sh7FFF_FFFF);
  localparam logic signed [ACC_W:0] SMIN = -(ACC_W+1)'(33'sh0_8000_0000);

  always_comb begin
    rnd = $signed({acc[ACC_W-1], acc});
    if (fmt == MACFMT_ROUND && shift != 6'd0)
      rnd = rnd + ((ACC_W+1)'(1) <<< (shift - 6'd1));
    shifted = rnd >>> shift;
    unique case (fmt)
      MACFMT_TRUNC: result = shifted[31:0];
      default: begin
        if (shifted > SMAX)      result = 32'h7FFF_FFFF;
        else if (shifted < SMIN) result = 32'h8000_0000;
        else                     result = shifted[31:0];
      end
    endcase
  end

  // the operation that updates the accumulator at the next edge is in S4
  assign busy  = |v[3:0];
  assign acc_o = acc;

endmodule
