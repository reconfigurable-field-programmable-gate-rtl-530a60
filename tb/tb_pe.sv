// tb_pe: one processing element (core 1 of 4) driven with decoded
// instructions. Checks ALU results with register and immediate operands,
// the HPRC row shift from both neighbours (alone and combined with an ALU
// operation), the special values, the load/
// store request, a MAC sequence read back after the MAC pipeline, and a
// sequence of memory-fed MACs (issued from the memory stage).
`timescale 1ns/1ps
module tb_pe;
  import ror_pkg::*;
  logic clk = 0, rst_n = 0, go = 0, active = 1;
  ctrl_t c; logic [31:0] a, b, cc, nl, nr, res, mwd; logic mreq, mwe, derr, busy; logic [7:0] maddr;
  logic mi = 0; logic [31:0] ma = 0, mb = 0;
  int checks = 0, failures = 0;
  pe #(.NCORES(4), .DWORDS(256)) dut (.clk, .rst_n, .lane(3'd1), .ncores(3'd4), .regs_per_core(6'd8),
    .active, .ctrl(c), .go, .a, .b, .c(cc), .nb_left(nl), .nb_right(nr), .mem_issue(mi), .mem_a(ma), .mem_b(mb), .result(res),
    .mem_req(mreq), .mem_we(mwe), .mem_addr(maddr), .mem_wdata(mwd), .daddr_err(derr), .mac_busy(busy));
  always #5 clk = ~clk;
  task automatic check(string w, longint g, longint e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  initial begin
    longint acc;
    c = '0; a = 0; b = 0; cc = 0; nl = 0; nr = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    c.valid = 1; c.cls = CLS_ALU;
    for (int i = 0; i < 200; i++) begin
      a = $urandom(); b = $urandom(); c.imm = $urandom(); c.use_imm = i[0];
      c.alu_op = (i % 3 == 0) ? ALU_ADD : (i % 3 == 1) ? ALU_XOR : ALU_SUB;
      #1;
      begin
        logic [31:0] bo, e;
        bo = c.use_imm ? c.imm : b;
        e = (c.alu_op == ALU_ADD) ? a + bo : (c.alu_op == ALU_XOR) ? a ^ bo : a - bo;
        check("alu", res, e);
      end
    end
    c.use_imm = 0;
    c.cls = CLS_HPRC; nl = 32'h1111; nr = 32'h2222; c.alu_op = ALU_ADD; b = 0;
    c.hprc_right = 0; #1 check("hprc left", res, 32'h1111);
    c.hprc_right = 1; #1 check("hprc right", res, 32'h2222);
    c.alu_op = ALU_SUB; b = 32'h0022; #1 check("hprc right minus b", res, 32'h2200);
    c.alu_op = ALU_MAX; c.hprc_right = 0; b = 32'h5000; #1 check("hprc max(left, b)", res, 32'h5000);
    c.cls = CLS_SPR;
    c.spr_sel = 0; #1 check("core id", res, 1);
    c.spr_sel = 1; #1 check("core count", res, 4);
    c.spr_sel = 2; #1 check("regs per core", res, 8);
    c.cls = CLS_STORE; c.imm = 32'd8; a = 32'd100; cc = 32'hABCD;
    #1 check("store req", mreq, 1); check("store we", mwe, 1); check("addr", maddr, 27); check("data", mwd, 32'hABCD);
    active = 0; #1 check("inactive: no request", mreq, 0); active = 1;
    c.cls = CLS_LOAD; a = 32'd101; #1 check("misaligned", derr, 1); check("no req", mreq, 0);
    // MAC sequence
    acc = 0;
    @(negedge clk);
    c.cls = CLS_MAC; go = 1;
    for (int i = 0; i < 9; i++) begin
      c.mac_op = (i == 4) ? MAC_SMSB : MAC_SMAC;
      a = 32'($urandom_range(0, 1000)) - 500; b = 32'($urandom_range(0, 1000)) - 500;
      acc += (i == 4 ? -1 : 1) * longint'($signed(a)) * longint'($signed(b));
      @(negedge clk);
    end
    c.cls = CLS_NONE;
    while (busy) @(negedge clk);
    c.cls = CLS_MACRC; c.mac_fmt = MACFMT_SAT; c.mac_shift = 0;
    #1 check("mac result", $signed(res), acc);
    @(negedge clk); c.cls = CLS_MACRC;
    #1 check("cleared after read", res, 0);
    // memory-fed MACs issued from the memory stage
    @(negedge clk); c.cls = CLS_NONE;
    acc = 0; mi = 1;
    for (int i = 0; i < 6; i++) begin
      ma = 32'($urandom_range(0, 255)); mb = 32'($urandom_range(0, 16)) - 8;
      acc += longint'($signed(ma)) * longint'($signed(mb));
      @(negedge clk);
    end
    mi = 0;
    while (busy) @(negedge clk);
    c.cls = CLS_MACRC;
    #1 check("memory-fed mac result", $signed(res), acc);
    @(negedge clk); c.cls = CLS_NONE;
    go = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
