// tb_spr_dbg: checks the development interface: command 0x5 writes the
// register count and the register file window 1024..1055, command 0x4
// reads every SPR, the one-cycle acknowledge, and that register-file
// writes are refused while the cores run.
`timescale 1ns/1ps
module tb_spr_dbg;
  import ror_pkg::*;
  logic clk = 0, rst_n = 0, stb = 0; logic [2:0] op = 0; logic [31:0] adr = 0, din = 0, dout; logic ack;
  logic regcnt_we; logic [31:0] regcnt_wdata, regcnt = 32'd8, epcr = 32'h55;
  logic [2:0] ccr = 3'd4; logic running = 0, done = 0, exc = 0;
  logic rrf_we; logic [4:0] rrf_addr; logic [31:0] rrf_wdata;
  logic [31:0] rf [32];
  int checks = 0, failures = 0, n_regcnt_w = 0, n_rrf_w = 0;
  spr_dbg dut (.clk, .rst_n, .dbg_stb_i(stb), .dbg_op_i(op), .dbg_adr_i(adr), .dbg_dat_i(din),
    .dbg_dat_o(dout), .dbg_ack_o(ack), .regcnt_we, .regcnt_wdata, .regcnt, .ccr, .running, .done,
    .exc_flag(exc), .epcr, .eear(32'd3), .rrf_we, .rrf_addr, .rrf_wdata, .rrf_rdata(rf[rrf_addr]));
  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    if (rrf_we) begin rf[rrf_addr] <= rrf_wdata; n_rrf_w++; end
    if (regcnt_we) begin regcnt <= regcnt_wdata; n_regcnt_w++; end
  end
  task automatic check(string w, longint g, longint e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  task automatic xfer(logic [2:0] o, logic [31:0] a, logic [31:0] d, output logic [31:0] q);
    @(negedge clk); stb = 1; op = o; adr = a; din = d;
    @(negedge clk); stb = 0;
    check("ack", ack, 1);
    q = dout;
    @(negedge clk); check("ack one cycle", ack, 0);
  endtask
  initial begin
    logic [31:0] q;
    for (int i = 0; i < 32; i++) rf[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    xfer(3'h5, 32'd16, 32'd8, q);
    xfer(3'h4, 32'd16, 0, q); check("regcnt", q, 8);
    xfer(3'h4, 32'd17, 0, q); check("ccr", q, 4);
    done = 1; exc = 1;
    xfer(3'h4, 32'd18, 0, q); check("status", q, 6);
    done = 0; exc = 0;
    xfer(3'h4, 32'd19, 0, q); check("epcr", q, 32'h55);
    xfer(3'h4, 32'd20, 0, q); check("cause", q, 3);
    for (int i = 0; i < 32; i++) xfer(3'h5, 32'd1024 + i, 32'hA000 + i, q);
    for (int i = 0; i < 32; i++) begin xfer(3'h4, 32'd1024 + i, 0, q); check("rrf window", q, 32'hA000 + i); end
    xfer(3'h4, 32'd1056, 0, q); check("outside window", q, 0);
    xfer(3'h5, 32'd1056, 32'h1, q);
    check("no write beyond 1055", rf[0], 32'hA000);
    running = 1;
    xfer(3'h5, 32'd1030, 32'hBAD, q);
    check("no register write while running", rf[6], 32'hA006);
    running = 0;
    check("register-count writes", n_regcnt_w, 1);
    check("register-file writes", n_rrf_w, 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
