// tb_reconfig_ctrl: checks the core count chosen for register counts
// 0..40 (8 registers give 32/8 = 4 cores), that the count cannot change
// while running, and the IDLE -> CONFIG -> RUN -> DONE -> IDLE sequence
// with core reset and the one-cycle reconfiguration pulse.
`timescale 1ns/1ps
module tb_reconfig_ctrl;
  logic clk = 0, rst_n = 0, we = 0, run = 0, halted = 0;
  logic [31:0] wd = 0, regcnt; logic [2:0] ccr; logic [1:0] lg;
  logic core_rst, running, done, reconf;
  int checks = 0, failures = 0;
  reconfig_ctrl dut (.clk, .rst_n, .regcnt_we(we), .regcnt_wdata(wd), .run, .halted,
    .regcnt, .ccr, .lg_cores(lg), .core_rst, .running, .done, .reconfigured(reconf));
  always #5 clk = ~clk;
  task automatic check(string w, longint g, longint e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %0d exp %0d", w, g, e); end
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    check("reset count", regcnt, 32);
    check("reset cores", ccr, 1);
    for (int n = 0; n <= 40; n++) begin
      int exp;
      exp = (n == 0 || n > 16) ? 1 : (n > 8) ? 2 : 4;
      @(negedge clk); we = 1; wd = n; @(negedge clk); we = 0;
      check("count stored", regcnt, n);
      check("cores held in reset", core_rst, 1);
      run = 1;
      @(negedge clk); // CONFIG
      check("not yet running", running, 0);
      @(negedge clk);
      check("pulse", reconf, 1);
      check("running", running, 1);
      check("core reset released", core_rst, 0);
      check($sformatf("CCR for %0d registers", n), ccr, exp);
      check("lg", lg, $clog2(exp));
      // count may not change while running
      we = 1; wd = 3; @(negedge clk); we = 0;
      check("count locked", regcnt, n);
      halted = 1; @(negedge clk); halted = 0;
      check("done", done, 1);
      check("CCR kept after the run", ccr, exp);
      run = 0; @(negedge clk);
      check("idle", done, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
