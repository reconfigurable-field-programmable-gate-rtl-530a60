// tb_exc_unit: raises each cause, checks take, EPCR and cause, the cause
// priority, that only the first exception is kept, and clear.
`timescale 1ns/1ps
module tb_exc_unit;
  import ror_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, v = 0, ill = 0, br = 0, de = 0, take, flag;
  logic [15:0] pc = 0; logic [31:0] epcr; exc_cause_e cause;
  int checks = 0, failures = 0;
  exc_unit #(.PCW(16)) dut (.clk, .rst_n, .clear(clr), .ex_valid(v), .ex_illegal(ill), .ex_bad_reg(br),
    .ex_daddr_err(de), .ex_pc(pc), .take, .flag, .epcr, .cause);
  always #5 clk = ~clk;
  task automatic check(string w, longint g, longint e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %0d exp %0d", w, g, e); end
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int c; exc_cause_e e;
      c = $urandom_range(1, 7);
      @(negedge clk);
      v = 0; {ill, br, de} = 3'(c); pc = 16'($urandom());
      #1 check("no take when invalid", take, 0);
      v = 1; #1 check("take", take, 1);
      e = ill ? EXC_ILLEGAL : br ? EXC_REGRANGE : EXC_DADDR;
      @(negedge clk);
      check("flag", flag, 1); check("epcr", epcr, pc); check("cause", cause, e);
      pc = pc + 1; ill = 1; #1 check("second not taken", take, 0);
      @(negedge clk); check("first kept", epcr, pc - 1);
      v = 0; ill = 0; br = 0; de = 0;
      clr = 1; @(negedge clk); clr = 0;
      check("cleared", flag, 0); check("cause cleared", cause, EXC_NONE);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
