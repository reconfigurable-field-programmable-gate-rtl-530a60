// tb_hw_loop: runs the loop controller beside a model fetch stage for
// random body lengths and counts, with random fetch stalls, and compares
// the sequence of fetch addresses with the expected one (the repeat
// instruction, then the body count times, then what follows).
`timescale 1ns/1ps
module tb_hw_loop;
  logic clk = 0, rst_n = 0, start = 0, advance, taken, active;
  logic [15:0] body_pc = 0, fetch_pc = 0, target; logic [9:0] len = 0; logic [15:0] count = 0;
  int checks = 0, failures = 0;
  hw_loop #(.PCW(16)) dut (.clk, .rst_n, .start, .body_pc, .len, .count, .fetch_pc, .advance,
    .taken, .target, .active);
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int L, C, base, n, exp_n; logic [15:0] nxt; int seq [$]; int exp [$];
      seq.delete(); exp.delete();
      L = $urandom_range(1, 6); C = $urandom_range(0, 5);
      if (t % 20 == 0) L = 0;
      base = $urandom_range(10, 1000);
      // expected fetch sequence after the repeat instruction at base
      exp_n = (L == 0) ? 1 : ((C <= 1) ? 1 : C);
      for (int k = 0; k < exp_n; k++) for (int i = 0; i < ((L == 0) ? 1 : L); i++) exp.push_back(base + 1 + i);
      for (int i = 0; i < 3; i++) exp.push_back(base + ((L == 0) ? 1 : L) + 1 + i);
      // decode holds the repeat while fetch holds base+1
      fetch_pc = 16'(base + 1);
      start = 1; body_pc = 16'(base + 1); len = 10'(L); count = 16'(C);
      n = 0;
      while (seq.size() < exp.size()) begin
        advance = ($urandom_range(0, 3) != 0);
        #1;
        if (advance) seq.push_back(fetch_pc);
        nxt = taken ? target : fetch_pc + 1;
        @(negedge clk);
        start = 0;
        if (advance) fetch_pc = nxt;
      end
      checks++;
      if (seq != exp) begin
        failures++;
        if (failures < 5) $display("FAIL L=%0d C=%0d got %p exp %p", L, C, seq, exp);
      end
      checks++;
      if (active) begin failures++; $display("FAIL loop still active"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
