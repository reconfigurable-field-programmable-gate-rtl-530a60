// tb_fir_sharing: the shared-sample filter scheme behind the memory read
// count (2M + n - 1) / n, run on the full ROR1200 top at its default size.
//
// n cores compute n neighbouring outputs y[g+k] = sum_m h[m] * s[g+k+m] of an
// M-tap filter at once. Core k loads its first sample s[g+k] once; after each
// tap every core takes its right neighbour's sample through one HPRC.ADD
// (row shift plus add), and the sample that enters at the right edge,
// s[g+n+m], is loaded at the same address by all cores and masked to zero
// everywhere but on the last core. Coefficients are loaded at one address by
// all cores too. So a group of n outputs needs n + (M-1) sample words and M
// coefficient words: 2M + n - 1 distinct words, (2M + n - 1) / n per output.
// Following the document, n comes from the register count per application
// (8, 16, 32 registers give 4, 2, 1 cores); the tap counts 3 and 15 are the
// document's kernel widths, the signal length (256 outputs) is this test's.
// The read-count formula is the document's; the program (edge mask,
// HPRC.ADD, register use) and the broadcast count are this design's own.
//
// The testbench watches the memory stage of the core: for every load it
// counts the distinct word addresses of the active cores (what one shared
// memory read with broadcast would fetch) and the per-core reads. Checks:
// every output against a reference computed here, both read counts against
// the formula, the core count, the MAC count and an exception-free end.
`timescale 1ns/1ps
module tb_fir_sharing;
  import ror_pkg::*;
  import ror_asm_pkg::*;

  localparam int NOUT = 256;
  localparam int SIG = 'h0100, COEF = 'h1000, OUTA = 'h2000;  // byte addresses

  logic        clk = 0, rst_n = 0, run = 0;
  logic        dbg_stb = 0;
  logic [2:0]  dbg_op = 0;
  logic [31:0] dbg_adr = 0, dbg_dat_i = 0, dbg_dat_o;
  logic        dbg_ack;
  logic        uart_rxd = 1, uart_clear = 0, uart_ferr;
  logic [10:0] uart_words;
  logic        prog_we = 0;
  logic [9:0]  prog_addr = 0;
  logic [31:0] prog_data = 0;
  logic        host_we = 0;
  logic [11:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic        running, done;
  logic [2:0]  ccr;
  perf_t       perf;

  ror1200_top dut (
    .clk, .rst_n, .run,
    .dbg_stb_i(dbg_stb), .dbg_op_i(dbg_op), .dbg_adr_i(dbg_adr), .dbg_dat_i(dbg_dat_i),
    .dbg_dat_o(dbg_dat_o), .dbg_ack_o(dbg_ack),
    .uart_rxd, .uart_clear, .uart_words, .uart_frame_err(uart_ferr),
    .prog_we, .prog_addr, .prog_data,
    .host_we, .host_addr, .host_wdata, .host_rdata,
    .running, .done, .ccr, .perf
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  // Read counting at the memory stage: one cycle per load instruction.
  longint words_read = 0, lane_reads = 0;
  int     nc = 1;
  always @(posedge clk) if (run && dut.u_core.em_load) begin
    int d;
    d = 0;
    for (int l = 0; l < nc; l++) begin
      bit seen;
      seen = 0;
      for (int j = 0; j < l; j++)
        if (dut.u_core.em_addr[j] == dut.u_core.em_addr[l]) seen = 1;
      if (!seen) d++;
    end
    words_read += d;
    lane_reads += nc;
  end

  task automatic dbg(input logic [2:0] op, input logic [31:0] adr, input logic [31:0] d,
                     output logic [31:0] q);
    @(negedge clk);
    dbg_stb = 1; dbg_op = op; dbg_adr = adr; dbg_dat_i = d;
    @(negedge clk);
    dbg_stb = 0;
    q = dbg_dat_o;
  endtask

  task automatic host_wr(int word, logic [31:0] d);
    @(negedge clk); host_we = 1; host_addr = 12'(word); host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask

  task automatic host_rd(int word, output logic [31:0] d);
    @(negedge clk); host_addr = 12'(word); #1 d = host_rdata;
  endtask

  logic [31:0] prog [$];

  // Registers (8 per core suffice): r1 = 4*(g+k), r2 = edge mask, r3 = the
  // core's sample, r4 = entering sample / result, r5 = coefficient / test,
  // r6 = 4*g, r7 = 4*NOUT.
  task automatic build_fir(int m, int n);
    int loop_at;
    prog.delete();
    prog.push_back(a_mfspr(1, 0));                 // r1 = core id
    prog.push_back(a_mfspr(4, 1));                 // mask: -1 on the last core
    prog.push_back(a_addi(4, 4, -1));
    prog.push_back(a_alu(ALU_XOR, 2, 1, 4));
    prog.push_back(a_alu(ALU_SLTU, 2, 0, 2));
    prog.push_back(a_addi(2, 2, -1));
    prog.push_back(a_slli(1, 1, 2));
    prog.push_back(a_addi(6, 0, 0));
    prog.push_back(a_addi(7, 0, 4 * NOUT));
    loop_at = prog.size();
    prog.push_back(a_lw(3, 1, SIG));               // own first sample
    for (int t = 0; t < m; t++) begin
      prog.push_back(a_lw(5, 0, COEF + 4 * t));    // same word on every core
      prog.push_back(a_mac(3, 5));
      if (t + 1 < m) begin
        prog.push_back(a_lw(4, 6, SIG + 4 * (n + t)));  // sample entering at the edge
        prog.push_back(a_alu(ALU_AND, 4, 4, 2));
        prog.push_back(a_hprc_op(ALU_ADD, 3, 3, 4, 1)); // take the right neighbour's
      end
    end
    prog.push_back(a_macrc(4, MACFMT_SAT, 0));
    prog.push_back(a_sw(4, 1, OUTA));
    prog.push_back(a_addi(1, 1, 4 * n));
    prog.push_back(a_addi(6, 6, 4 * n));
    prog.push_back(a_alu(ALU_SLT, 5, 6, 7));
    prog.push_back(a_bnez(5, loop_at));
    prog.push_back(a_halt());
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
    end
    @(negedge clk); prog_we = 0;
  endtask

  task automatic fir_run(int m, int regcnt, int n);
    int s [NOUT + 16];
    int h [16];
    logic [31:0] q;
    longint acc;
    perf_t p0;
    build_fir(m, n);
    for (int i = 0; i < NOUT + m - 1; i++) begin
      s[i] = int'($urandom_range(0, 1023)) - 512;
      host_wr(SIG/4 + i, s[i]);
    end
    for (int t = 0; t < m; t++) begin
      h[t] = int'($urandom_range(0, 30)) - 15;
      host_wr(COEF/4 + t, h[t]);
    end
    dbg(DBG_OP_WRITE_SPR, 32'(SPR_REGCNT), 32'(regcnt), q);
    nc = n;
    words_read = 0;
    lane_reads = 0;
    @(negedge clk); run = 1;
    while (!done) @(posedge clk);
    p0 = perf;
    check($sformatf("M=%0d: core count", m), ccr, n);
    dbg(DBG_OP_READ_SPR, 32'(SPR_STATUS), 0, q);
    check($sformatf("M=%0d n=%0d: done without exception", m, n), q, 2);
    check($sformatf("M=%0d n=%0d: MAC instructions", m, n), p0.mac_ops, longint'(NOUT / n) * m);
    for (int x = 0; x < NOUT; x++) begin
      acc = 0;
      for (int t = 0; t < m; t++) acc += longint'(s[x + t]) * h[t];
      host_rd(OUTA/4 + x, q);
      check($sformatf("M=%0d n=%0d y[%0d]", m, n, x), $signed(q), acc);
    end
    // equation: (2M + n - 1) / n distinct words per output
    check($sformatf("M=%0d n=%0d: distinct words read", m, n), words_read,
          longint'(NOUT / n) * (2 * m + n - 1));
    check($sformatf("M=%0d n=%0d: per-core reads", m, n), lane_reads, longint'(NOUT) * 2 * m);
    $display("%0d-tap filter on %0d core(s): %0d outputs, %0d cycles (%0.1f per output), %0.2f words read per output (formula %0.2f), %0.1f per-core reads per output",
             m, n, NOUT, p0.cycles, real'(p0.cycles) / NOUT, real'(words_read) / NOUT,
             real'(2 * m + n - 1) / n, real'(lane_reads) / NOUT);
    @(negedge clk); run = 0;
    @(negedge clk); @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    fir_run(3, 8, 4);
    fir_run(15, 8, 4);
    fir_run(15, 16, 2);
    fir_run(15, 32, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
