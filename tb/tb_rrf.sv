// tb_rrf: checks the partitioning of the reconfigurable register file.
// For 1, 2 and 4 cores each core writes its registers; the test then
// reads them back per core and through the debug port (physical index
// core*32/n + r), and checks register 0, write-through forwarding and
// debug writes, against a model array kept here.
`timescale 1ns/1ps
module tb_rrf;
  localparam int NC = 4;
  logic clk = 0, rst_n = 0;
  logic [1:0] lg;
  logic [NC-1:0][4:0] ra, rb, rc, widx;
  logic [NC-1:0][31:0] da, db, dc, wd;
  logic [NC-1:0] we;
  logic dwe = 0; logic [4:0] dad = 0; logic [31:0] dwd = 0, drd;
  int checks = 0, failures = 0;
  logic [31:0] model [32];
  rrf #(.NCORES(NC)) dut (.clk, .rst_n, .lg_cores(lg), .ra_idx(ra), .rb_idx(rb), .rc_idx(rc),
    .ra_data(da), .rb_data(db), .rc_data(dc), .we, .wr_idx(widx), .wdata(wd),
    .dbg_we(dwe), .dbg_addr(dad), .dbg_wdata(dwd), .dbg_rdata(drd));
  always #5 clk = ~clk;
  task automatic check(string w, longint g, longint e);
    checks++; if (g !== e) begin failures++; if (failures < 10) $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  initial begin
    we = '0; ra = '0; rb = '0; rc = '0; widx = '0; wd = '0; lg = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 32; i++) model[i] = 0;
    for (int l = 0; l < 3; l++) begin
      int n, rpc;
      lg = 2'(l); n = 1 << l; rpc = 32 / n;
      // all active cores write all their registers
      for (int r = 0; r < rpc; r++) begin
        @(negedge clk);
        for (int c = 0; c < NC; c++) begin
          we[c] = (c < n); widx[c] = 5'(r); wd[c] = $urandom();
          if (c < n && r != 0) model[c * rpc + r] = wd[c];
          // write-through: reading the register being written
          ra[c] = 5'(r);
        end
        #1;
        for (int c = 0; c < n; c++) check("write-through", da[c], r == 0 ? 0 : wd[c]);
      end
      @(negedge clk); we = '0;
      for (int r = 0; r < rpc; r++) begin
        for (int c = 0; c < n; c++) begin ra[c] = 5'(r); rb[c] = 5'(rpc - 1 - r); rc[c] = 5'((r * 3) % rpc); end
        #1;
        for (int c = 0; c < n; c++) begin
          check("port a", da[c], r == 0 ? 0 : model[c * rpc + r]);
          check("port b", db[c], (rpc - 1 - r) == 0 ? 0 : model[c * rpc + rpc - 1 - r]);
          check("port c", dc[c], ((r * 3) % rpc) == 0 ? 0 : model[c * rpc + (r * 3) % rpc]);
        end
      end
      for (int p = 0; p < 32; p++) begin dad = 5'(p); #1 check("debug read", drd, model[p]); end
    end
    // debug write
    @(negedge clk); dwe = 1; dad = 5'd17; dwd = 32'h1234_5678; model[17] = dwd;
    @(negedge clk); dwe = 0; lg = 2; ra[2] = 5'd1; #1 check("debug write seen by core 2 r1", da[2], 32'h1234_5678);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
