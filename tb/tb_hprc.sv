// tb_hprc: checks the HPRC row shift for every core position and active
// core count, including the zero padding at the edges.
`timescale 1ns/1ps
module tb_hprc;
  logic [2:0] lane, ncores; logic right; logic [31:0] l, r, y;
  int checks = 0, failures = 0;
  hprc #(.NCORES(4)) dut (.lane, .ncores, .shift_right(right), .from_left(l), .from_right(r), .y);
  initial begin
    for (int n = 1; n <= 4; n *= 2)
      for (int k = 0; k < n; k++)
        for (int d = 0; d < 2; d++) begin
          lane = 3'(k); ncores = 3'(n); right = d[0]; l = $urandom(); r = $urandom();
          #1; checks++;
          if (y !== (d ? ((k < n-1) ? r : 0) : ((k > 0) ? l : 0))) begin
            failures++; $display("FAIL k=%0d n=%0d d=%0d y=%h", k, n, d, y);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
