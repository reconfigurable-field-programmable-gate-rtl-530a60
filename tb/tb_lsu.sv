// tb_lsu: random addresses; checks effective address, word index, the
// request and write enables, and the alignment and range errors.
`timescale 1ns/1ps
module tb_lsu;
  localparam int WORDS = 256;
  logic en, ld, st, req, we, err; logic [31:0] base, off, sd, wd, ea; logic [7:0] addr;
  int checks = 0, failures = 0;
  lsu #(.WORDS(WORDS)) dut (.en, .is_load(ld), .is_store(st), .base, .offset(off), .st_data(sd),
    .req, .we, .addr, .wdata(wd), .err, .ea);
  task automatic check(string w, longint g, longint e);
    checks++; if (g !== e) begin failures++; if (failures < 10) $display("FAIL %s got %0d exp %0d", w, g, e); end
  endtask
  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] e; logic acc, bad;
      en = $urandom_range(0, 3) != 0; ld = $urandom_range(0, 1); st = !ld && $urandom_range(0, 1);
      base = $urandom_range(0, 1200); off = 32'($urandom_range(0, 200)) - 100; sd = $urandom();
      if (i % 5 == 0) base[1:0] = 2'b01;
      #1;
      e = base + off; acc = en && (ld || st);
      bad = acc && (e[1:0] != 0 || e >= 4 * WORDS);
      check("ea", ea, e); check("err", err, bad); check("req", req, acc && !bad);
      check("we", we, acc && !bad && st);
      if (acc && !bad) check("word index", addr, e / 4);
      check("data", wd, sd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
