// hw_loop: hardware loop controller for the repeat instruction.
//
// The repeat instruction carries two arguments, as in the source
// description: the number of instructions that follow it and form the loop
// body, and the number of times the body is executed. The controller sits
// next to the program counter: when the last body instruction is fetched
// and passes remain, the next fetch address becomes the first body
// instruction again, so the loop costs no cycles beyond the repeat
// instruction itself. One loop level; jumps inside the body are not
// supported (this design's choices).
//
// Interface: start (repeat instruction leaving decode) with body_pc (the
// address after the repeat), len and count; it also acts in the cycle it
// starts, so a one-instruction body works. fetch_pc/advance describe the
// fetch stage; taken/target redirect it. active shows a loop in progress.
// A count of 0 or 1, or a length of 0, runs the body once.
module hw_loop #(
  parameter int unsigned PCW = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [PCW-1:0] body_pc,
  input  logic [9:0]     len,
  input  logic [15:0]    count,
  input  logic [PCW-1:0] fetch_pc,
  input  logic           advance,
  output logic           taken,
  output logic [PCW-1:0] target,
  output logic           active
);

  logic           act_q;
  logic [PCW-1:0] beg_q, end_q;
  logic [15:0]    rem_q;

  logic           act_e;
  logic [PCW-1:0] beg_e, end_e;
  logic [15:0]    rem_e;

  always_comb begin
    if (start) begin
      act_e = (len != 10'd0) && (count > 16'd1);
      beg_e = body_pc;
      end_e = body_pc + PCW'(len) - PCW'(1);
      rem_e = count;
    end else begin
      act_e = act_q;
      beg_e = beg_q;
      end_e = end_q;
      rem_e = rem_q;
    end
    taken  = act_e && (fetch_pc == end_e);
    target = beg_e;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      act_q <= 1'b0;
      beg_q <= '0;
      end_q <= '0;
      rem_q <= '0;
    end else begin
      act_q <= act_e;
      beg_q <= beg_e;
      end_q <= end_e;
      rem_q <= rem_e;
      if (advance && taken) begin
        rem_q <= rem_e - 16'd1;
        if (rem_e <= 16'd2) act_q <= 1'b0;  // the pass now starting is the last
      end
    end
  end

  assign active = act_q;

endmodule
