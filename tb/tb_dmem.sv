// tb_dmem: random writes from the four core ports and the host port
// (distinct addresses, plus same-address collisions) checked against a
// model, with reads from all ports.
`timescale 1ns/1ps
module tb_dmem;
  localparam int W = 128, P = 4;
  logic clk = 0; logic [P-1:0] we; logic [P-1:0][6:0] addr; logic [P-1:0][31:0] wd, rd;
  logic hwe; logic [6:0] ha; logic [31:0] hwd, hrd;
  logic [31:0] m [W];
  int checks = 0, failures = 0;
  dmem #(.WORDS(W), .NPORTS(P)) dut (.clk, .we, .addr, .wdata(wd), .rdata(rd), .host_we(hwe),
    .host_addr(ha), .host_wdata(hwd), .host_rdata(hrd));
  always #5 clk = ~clk;
  initial begin
    we = '0; hwe = 0; addr = '0; wd = '0; ha = 0; hwd = 0;
    for (int i = 0; i < W; i++) begin @(negedge clk); hwe = 1; ha = 7'(i); hwd = 32'(i); m[i] = i; end
    @(negedge clk); hwe = 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      for (int p = 0; p < P; p++) begin
        we[p] = $urandom_range(0, 1); addr[p] = 7'($urandom_range(0, W - 1)); wd[p] = $urandom();
      end
      hwe = $urandom_range(0, 3) == 0; ha = 7'($urandom_range(0, W - 1)); hwd = $urandom();
      if (k % 4 == 0) begin addr[1] = addr[0]; addr[3] = addr[0]; ha = addr[0]; end
      #1;
      for (int p = 0; p < P; p++) begin checks++; if (rd[p] !== m[addr[p]]) begin failures++; $display("FAIL read port %0d", p); end end
      checks++; if (hrd !== m[ha]) begin failures++; $display("FAIL host read"); end
      for (int p = 0; p < P; p++) if (we[p]) m[addr[p]] = wd[p];
      if (hwe) m[ha] = hwd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
