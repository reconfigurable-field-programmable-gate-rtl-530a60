// tb_ror1200_core: the five-stage SIMD pipeline with instruction and data
// memories modelled here.
//  1. Timing: N independent instructions retire at cycles 5 .. 5+(N-1)
//     after the core is released (no branches), for 4 cores.
//  2. A directed program with back-to-back dependences (bypass from the
//     memory and write-back stages), a load-use stall, MAC / multiply-
//     subtract / read-and-clear through the MAC pipeline, a taken branch
//     that must skip an instruction, per-core stores and loads, MACs fed
//     from the data memory mixed with a register MAC; results
//     are read back through the debug port for every core and for 1, 2
//     and 4 cores.
`timescale 1ns/1ps
module tb_ror1200_core;
  import ror_pkg::*;
  import ror_asm_pkg::*;
  localparam int NC = 4, DW = 256;
  logic clk = 0, rst_n = 0, core_rst = 1; logic [1:0] lg = 2;
  logic [15:0] iaddr; logic [31:0] ird;
  logic [NC-1:0] dwe; logic [NC-1:0][7:0] dad; logic [NC-1:0][31:0] dwd, drd;
  logic dbg_we = 0; logic [4:0] dbg_addr = 0; logic [31:0] dbg_wd = 0, dbg_rd;
  logic halted, exc_flag; logic [31:0] epcr; exc_cause_e cause; perf_t perf;
  logic [31:0] rom [128]; logic [31:0] ram [DW];
  int checks = 0, failures = 0;

  ror1200_core #(.NCORES(NC), .PCW(16), .DWORDS(DW)) dut (
    .clk, .rst_n, .core_rst, .lg_cores(lg), .imem_addr(iaddr), .imem_rdata(ird),
    .dmem_we(dwe), .dmem_addr(dad), .dmem_wdata(dwd), .dmem_rdata(drd),
    .dbg_rrf_we(dbg_we), .dbg_rrf_addr(dbg_addr), .dbg_rrf_wdata(dbg_wd), .dbg_rrf_rdata(dbg_rd),
    .exc_clear(1'b0), .halted, .exc_flag, .epcr, .exc_cause(cause), .perf);

  assign ird = rom[iaddr[6:0]];
  always_comb for (int l = 0; l < NC; l++) drd[l] = ram[dad[l]];
  always_ff @(posedge clk) for (int l = 0; l < NC; l++) if (dwe[l]) ram[dad[l]] <= dwd[l];
  always #5 clk = ~clk;

  task automatic check(string w, longint g, longint e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %0d exp %0d", w, g, e); end
  endtask

  task automatic start();
    @(negedge clk); core_rst = 1; @(negedge clk); core_rst = 0;
  endtask

  initial begin
    int n;
    repeat (2) @(negedge clk); rst_n = 1;
    // 1. timing of N instructions
    n = 12;
    for (int i = 0; i < 128; i++) rom[i] = a_nop();
    for (int i = 0; i < n; i++) rom[i] = a_addi(1 + i % 7, 0, i);
    rom[n] = a_halt();
    lg = 2;
    start();
    for (int cyc = 1; cyc <= 5 + n; cyc++) begin
      @(negedge clk);
      // after cycle c, instructions retired = max(0, c - 4); the halt
      // instruction retires last
      check($sformatf("retired after cycle %0d", cyc), perf.retired, (cyc >= 5) ? ((cyc - 4 > n + 1) ? n + 1 : cyc - 4) : 0);
    end
    // 2. directed program
    for (int l = 0; l <= 2; l++) begin
      int nc, rpc;
      lg = 2'(l); nc = 1 << l; rpc = 32 >> l;
      for (int i = 0; i < 128; i++) rom[i] = a_nop();
      for (int i = 0; i < DW; i++) ram[i] = 0;
      rom[0]  = a_addi(1, 0, 5);               // r1 = 5
      rom[1]  = a_addi(2, 1, 3);               // r2 = 8   (bypass from memory stage)
      rom[2]  = a_alu(ALU_MUL, 3, 2, 1);       // r3 = 40
      rom[3]  = a_alu(ALU_SUB, 4, 3, 1);       // r4 = 35
      rom[4]  = a_nop();
      rom[5]  = a_slli(5, 4, 2);               // r5 = 140 (bypass from write-back)
      rom[6]  = a_mfspr(6, 0);                 // r6 = core id
      rom[7]  = a_slli(6, 6, 2);               // r6 = 4 * id
      rom[8]  = a_alu(ALU_ADD, 5, 5, 6);       // r5 = 140 + 4 id
      rom[9]  = a_sw(5, 6, 64);                // mem[16 + id] = r5
      rom[10] = a_lw(7, 6, 64);                // r7 = r5
      rom[11] = a_addi(7, 7, 1);               // load-use: r7 = 141 + 4 id
      rom[12] = a_mac(1, 2);                   // acc = 40
      rom[13] = a_msb(1, 1);                   // acc = 15
      rom[14] = a_mac(6, 1);                   // acc = 15 + 20 id
      rom[15] = a_macrc(3, MACFMT_TRUNC, 0);   // r3 = 15 + 20 id (waits for the MAC pipe)
      rom[16] = a_bnez(3, 18);                 // taken (r3 just written: stall)
      rom[17] = a_addi(4, 0, 77);              // skipped
      rom[18] = a_beqz(0, 20);                 // always taken
      rom[19] = a_addi(3, 0, 99);              // skipped
      rom[20] = a_macm(1, 6, 64);              // acc = 5 * mem[16 + id]
      rom[21] = a_mac(1, 2);                   // acc += 40, waits behind the MACM
      rom[22] = a_macm(2, 6, 64);              // acc += 8 * mem[16 + id]
      rom[23] = a_macrc(1, MACFMT_TRUNC, 0);   // r1 = 13 * (140 + 4 id) + 40
      rom[24] = a_halt();
      start();
      begin int w = 0; while (!halted && w < 200) begin @(negedge clk); w++; end end
      check("halted", halted, 1);
      check("no exception", exc_flag, 0);
      for (int k = 0; k < nc; k++) begin
        dbg_addr = 5'(k * rpc + 3); #1 check($sformatf("core %0d r3 (mac)", k), dbg_rd, 15 + 20 * k);
        dbg_addr = 5'(k * rpc + 4); #1 check("r4", dbg_rd, 35);
        dbg_addr = 5'(k * rpc + 5); #1 check("r5", dbg_rd, 140 + 4 * k);
        dbg_addr = 5'(k * rpc + 7); #1 check("r7 (load-use)", dbg_rd, 141 + 4 * k);
        dbg_addr = 5'(k * rpc + 2); #1 check("r2", dbg_rd, 8);
        dbg_addr = 5'(k * rpc + 1); #1 check("r1 (memory-fed MAC)", dbg_rd, 13 * (140 + 4 * k) + 40);
        check("stored word", ram[16 + k], 140 + 4 * k);
      end
      for (int k = nc; k < NC; k++) check("inactive core stores nothing", ram[16 + k], 0);
      check("load-use stall seen", perf.stall_load > 0, 1);
      check("mac stall seen", perf.stall_mac > 0, 1);
      check("branch stall seen", perf.stall_branch > 0, 1);
      check("two taken branches", perf.flush, 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
