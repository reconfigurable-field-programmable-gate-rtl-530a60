// tb_imem: writes random words through the load port and reads them back
// through the fetch port.
`timescale 1ns/1ps
module tb_imem;
  logic clk = 0, we = 0; logic [5:0] ra = 0, wa = 0; logic [31:0] rd, wd = 0;
  logic [31:0] m [64];
  int checks = 0, failures = 0;
  imem #(.WORDS(64)) dut (.clk, .rd_addr(ra), .rd_data(rd), .we, .wr_addr(wa), .wr_data(wd));
  always #5 clk = ~clk;
  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; wa = 6'(i); wd = $urandom(); m[i] = wd;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 300; k++) begin
      ra = 6'($urandom_range(0, 63)); #1;
      checks++; if (rd !== m[ra]) begin failures++; $display("FAIL %0d", ra); end
      if (k % 10 == 0) begin @(negedge clk); we = 1; wa = 6'($urandom_range(0, 63)); wd = $urandom(); m[wa] = wd; @(negedge clk); we = 0; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
