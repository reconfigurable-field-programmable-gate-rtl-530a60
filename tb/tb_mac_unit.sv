// tb_mac_unit: drives random signed/unsigned multiply-accumulate and
// multiply-subtract sequences, one per cycle, and checks the 48-bit
// accumulator, the five-cycle latency, busy, and the truncated, saturated
// and rounded read-outs against a model kept here. Also checks that nine
// MACs (a 3x3 window) issue in nine consecutive cycles.
`timescale 1ns/1ps
module tb_mac_unit;
  import ror_pkg::*;
  logic clk = 0, rst_n = 0, issue = 0, rd_clr = 0, busy;
  mac_op_e op = MAC_NONE; mac_fmt_e fmt = MACFMT_TRUNC; logic [5:0] shift = 0;
  logic [31:0] a = 0, b = 0, result; logic [47:0] acc;
  int checks = 0, failures = 0;
  mac_unit dut (.clk, .rst_n, .issue, .op, .a, .b, .rd_clr, .fmt, .shift, .result, .acc_o(acc), .busy);
  always #5 clk = ~clk;

  task automatic check(string w, longint g, longint e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask

  function automatic longint sx48(longint v); return (v <<< 16) >>> 16; endfunction
  function automatic longint fmt_ref(longint accv, int f, int sh);
    longint v;
    logic [31:0] r;
    v = accv;
    if (f == 2 && sh != 0) v = v + (64'sd1 <<< (sh - 1));
    v = v >>> sh;
    r = v[31:0];
    if (f != 0 && v > 64'sd2147483647) r = 32'h7FFFFFFF;
    if (f != 0 && v < -64'sd2147483648) r = 32'h80000000;
    return longint'({32'd0, r});
  endfunction

  longint model;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int n; int lat;
      n = 1 + $urandom_range(0, 11);
      model = 0;
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        issue = 1; op = mac_op_e'($urandom_range(1, 3));
        a = (t % 3 == 0) ? $urandom() : 32'($urandom_range(0, 2000)) - 1000;
        b = (t % 3 == 0) ? $urandom() : 32'($urandom_range(0, 2000)) - 1000;
        if (op == MAC_UMAC) model = sx48(model + longint'({32'd0, a}) * longint'({32'd0, b}));
        else if (op == MAC_SMAC) model = sx48(model + longint'($signed(a)) * longint'($signed(b)));
        else model = sx48(model - longint'($signed(a)) * longint'($signed(b)));
      end
      @(negedge clk); issue = 0; op = MAC_NONE;
      // the last operation reaches the accumulator 5 cycles after issue
      lat = 1;
      while (busy) begin @(negedge clk); lat++; end
      check("latency of last op", lat, 5);
      check("accumulator", sx48(longint'(acc)), model);
      fmt = mac_fmt_e'(t % 3); shift = 6'($urandom_range(0, 20));
      #1 check("read-out", longint'(result), fmt_ref(model, t % 3, shift));
      rd_clr = 1; @(negedge clk); rd_clr = 0;
      check("cleared", acc, 0);
    end
    // nine MACs in nine cycles, result five cycles after the last one
    begin
      int c0;
      model = 0;
      @(negedge clk);
      for (int i = 0; i < 9; i++) begin
        issue = 1; op = MAC_SMAC; a = i + 1; b = 2; model += 2 * (i + 1);
        @(negedge clk);
      end
      issue = 0; op = MAC_NONE;
      c0 = 1; while (busy) begin @(negedge clk); c0++; end
      check("3x3 window total cycles", 9 + c0 - 1, 13);
      fmt = MACFMT_SAT; shift = 0;
      #1 check("3x3 sum", result, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
