// tb_instr_unit: fetch unit with a small instruction memory model.
// Checks sequential fetch (IR/PC of decode), stall hold, jump redirect
// with the squashed fetch, a hardware loop started by a repeat in decode,
// and that stop turns fetching off.
`timescale 1ns/1ps
module tb_instr_unit;
  import ror_pkg::*;
  import ror_asm_pkg::*;
  logic clk = 0, rst_n = 0, stall = 0, redirect = 0, stop = 0, ls = 0, lb, la;
  logic [15:0] iaddr, rpc = 0, pc_id; logic [31:0] ir; logic [9:0] ll = 0; logic [15:0] lc = 0;
  logic [31:0] rom [64];
  int checks = 0, failures = 0;
  instr_unit #(.PCW(16)) dut (.clk, .rst_n, .imem_addr(iaddr), .imem_rdata(rom[iaddr[5:0]]),
    .stall, .redirect, .redirect_pc(rpc), .stop, .loop_start(ls), .loop_len(ll), .loop_cnt(lc),
    .ir, .pc_id, .loop_back(lb), .loop_active(la));
  always #5 clk = ~clk;
  task automatic check(string w, longint g, longint e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %0d exp %0d", w, g, e); end
  endtask
  // rom[i] = addi r1, r0, i so the IR tells which address was fetched
  initial begin
    int seen [$];
    for (int i = 0; i < 64; i++) rom[i] = a_addi(1, 0, i);
    repeat (2) @(negedge clk);
    check("IR is a no-op after reset", ir, 0);
    rst_n = 1;
    for (int i = 0; i < 5; i++) begin @(negedge clk); check("sequential IR", ir[15:0], i); check("pc_id", pc_id, i); end
    stall = 1; @(negedge clk); @(negedge clk); check("stall holds IR", ir[15:0], 4); stall = 0;
    @(negedge clk); check("after stall", ir[15:0], 5);
    // jump in decode to 20: the fetch behind it is squashed
    redirect = 1; rpc = 20; @(negedge clk); redirect = 0;
    check("squashed fetch", ir, 0);
    @(negedge clk); check("jump target", ir[15:0], 20);
    // repeat in decode at 20: body 21..22, three passes
    ls = 1; ll = 2; lc = 3; @(negedge clk); ls = 0;
    seen.delete();
    for (int i = 0; i < 8; i++) begin seen.push_back(ir[15:0]); @(negedge clk); end
    checks++;
    if (seen != '{21, 22, 21, 22, 21, 22, 23, 24}) begin failures++; $display("FAIL loop %p", seen); end
    stop = 1; @(negedge clk); stop = 0;
    repeat (3) begin @(negedge clk); check("stopped", ir, 0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
