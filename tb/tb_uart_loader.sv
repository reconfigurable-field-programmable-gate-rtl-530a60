// tb_uart_loader: sends random words as serial characters (LSB first,
// least significant byte first) with a short bit time, and checks the
// words and addresses written, the word count, that a character with a
// low stop bit is dropped and flagged, and clear.
`timescale 1ns/1ps
module tb_uart_loader;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0, rxd = 1, clear = 0, we, ferr;
  logic [9:0] addr; logic [31:0] data; logic [10:0] words;
  logic [31:0] got [int];
  int checks = 0, failures = 0;
  uart_loader #(.CLKS_PER_BIT(CPB), .AW(10)) dut (.clk, .rst_n, .rxd, .clear, .prog_we(we),
    .prog_addr(addr), .prog_data(data), .words, .frame_err(ferr));
  always #5 clk = ~clk;
  always @(posedge clk) if (we) got[addr] = data;
  task automatic check(string w, longint g, longint e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  task automatic send(logic [7:0] b, bit stop = 1);
    rxd = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(negedge clk); end
    rxd = stop; repeat (CPB) @(negedge clk);
    rxd = 1; repeat ($urandom_range(0, 5)) @(negedge clk);
  endtask
  initial begin
    logic [31:0] w [16];
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      w[i] = $urandom();
      for (int k = 0; k < 4; k++) send(w[i][8*k +: 8]);
    end
    repeat (4) @(negedge clk);
    check("word count", words, 16);
    for (int i = 0; i < 16; i++) check($sformatf("word %0d", i), got.exists(i) ? got[i] : 32'hDEAD, w[i]);
    check("no frame error", ferr, 0);
    // a bad character is dropped
    send(8'h55, 0);
    repeat (4) @(negedge clk);
    check("frame error", ferr, 1);
    check("bad byte not counted", words, 16);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check("cleared", words, 0);
    got.delete();
    for (int k = 0; k < 4; k++) send(8'(k + 1));
    repeat (4) @(negedge clk);
    check("after clear, address 0", got.exists(0) ? got[0] : 0, 32'h04030201);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
