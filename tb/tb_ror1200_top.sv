// tb_ror1200_top: end-to-end test of the ROR1200 SIMD core at its default
// size (four cores, 1024-word instruction memory, 4096-word data memory).
//
// A 3x3 convolution program runs on the 8x6 test image and kernel
// (5 0 0 / 0 0 0 / 0 0 5), whose first output is 5, with 8 registers per
// application (four cores), and on random signed images and kernels with
// 16 and 32 registers (two cores, one core). Each core computes the output
// columns k, k+n, ... of all rows; the innermost loop over the kernel rows
// is a hardware loop of three MAC instructions per row. At the end each
// core fetches its neighbours' final column index through the HPRC row
// shift, and the difference to its right neighbour with one HPRC SUB. A last run, loaded over the serial line, executes an illegal instruction. The expected values
// are computed here from the images. The test also counts that every
// mechanism happened: reconfiguration to 4, 2 and 1 cores, MAC issue, MAC
// read stall, load-use stall, branch stall, operand bypass, hardware loop,
// jump/branch flush, HPRC shift, debug register access, an exception and
// a program loaded over the serial line (at the default bit time).
`timescale 1ns/1ps
module tb_ror1200_top;
  import ror_pkg::*;
  import ror_asm_pkg::*;

  localparam int W = 6, H = 8, OW = W - 2, OH = H - 2;
  localparam int IMG = 'h100, KER = 'h400, OUT = 'h800, HPL = 'hC00, HPR = 'hC40, HPD = 'hC80; // byte addresses

  logic        clk = 0, rst_n = 0, run = 0;
  logic        dbg_stb = 0;
  logic [2:0]  dbg_op = 0;
  logic [31:0] dbg_adr = 0, dbg_dat_i = 0, dbg_dat_o;
  logic        dbg_ack;
  localparam int CPB = 1302;  // default serial bit time of the top
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
    .dbg_dat_o, .dbg_ack_o(dbg_ack),
    .uart_rxd, .uart_clear, .uart_words, .uart_frame_err(uart_ferr),
    .prog_we, .prog_addr, .prog_data,
    .host_we, .host_addr, .host_wdata, .host_rdata,
    .running, .done, .ccr, .perf
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_reconf[3] = '{0, 0, 0};
  int n_mac = 0, n_stall_mac = 0, n_stall_load = 0, n_stall_br = 0, n_bypass = 0;
  int n_loop = 0, n_flush = 0, n_hprc = 0, n_dbg = 0, n_exc = 0, n_uart = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic dbg(input logic [2:0] op, input logic [31:0] adr, input logic [31:0] d,
                     output logic [31:0] q);
    @(negedge clk);
    dbg_stb = 1; dbg_op = op; dbg_adr = adr; dbg_dat_i = d;
    @(negedge clk);
    dbg_stb = 0;
    q = dbg_dat_o;
    n_dbg++;
  endtask

  task automatic host_wr(int word, logic [31:0] d);
    @(negedge clk); host_we = 1; host_addr = 12'(word); host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask

  task automatic host_rd(int word, output logic [31:0] d);
    @(negedge clk); host_addr = 12'(word); #1 d = host_rdata;
  endtask

  logic [31:0] prog [$];

  task automatic build_conv();
    prog.delete();
    prog.push_back(a_mfspr(6, 0));                       // 0  x = core id
    prog.push_back(a_addi(7, 0, OW));                    // 1  colloop
    prog.push_back(a_alu(ALU_SLT, 7, 6, 7));             // 2  x < OW
    prog.push_back(a_beqz(7, 30));                       // 3
    prog.push_back(a_slli(1, 6, 2));                     // 4
    prog.push_back(a_addi(5, 1, OUT));                   // 5
    prog.push_back(a_addi(1, 1, IMG));                   // 6
    prog.push_back(a_addi(7, 0, OH));                    // 7
    prog.push_back(a_addi(2, 0, KER));                   // 8  rowloop
    prog.push_back(a_repeat(11, 3));                     // 9
    for (int j = 0; j < 3; j++) begin                    // 10..18
      prog.push_back(a_lw(3, 1, 4*j));
      prog.push_back(a_lw(4, 2, 4*j));
      prog.push_back(a_mac(3, 4));
    end
    prog.push_back(a_addi(1, 1, 4*W));                   // 19
    prog.push_back(a_addi(2, 2, 12));                    // 20
    prog.push_back(a_macrc(3, MACFMT_SAT, 0));           // 21
    prog.push_back(a_sw(3, 5, 0));                       // 22
    prog.push_back(a_addi(5, 5, 4*OW));                  // 23
    prog.push_back(a_addi(1, 1, -8*W));                  // 24
    prog.push_back(a_addi(7, 7, -1));                    // 25
    prog.push_back(a_bnez(7, 8));                        // 26
    prog.push_back(a_mfspr(3, 1));                       // 27
    prog.push_back(a_alu(ALU_ADD, 6, 6, 3));             // 28
    prog.push_back(a_j(1));                              // 29
    prog.push_back(a_hprc(3, 6, 0));                     // 30 done
    prog.push_back(a_hprc(4, 6, 1));                     // 31
    prog.push_back(a_mfspr(1, 0));                       // 32
    prog.push_back(a_slli(1, 1, 2));                     // 33
    prog.push_back(a_sw(3, 1, HPL));                     // 34
    prog.push_back(a_sw(4, 1, HPR));                     // 35
    prog.push_back(a_hprc_op(ALU_SUB, 3, 6, 6, 1));      // 36 right neighbour - own
    prog.push_back(a_sw(3, 1, HPD));                     // 37
    prog.push_back(a_halt());                            // 38
  endtask

  // serial load: 8N1, LSB first, least significant byte of a word first
  task automatic uart_load();
    @(negedge clk); uart_clear = 1; @(negedge clk); uart_clear = 0;
    for (int i = 0; i < prog.size(); i++)
      for (int k = 0; k < 4; k++) begin
        logic [7:0] b;
        b = prog[i][8*k +: 8];
        uart_rxd = 0; repeat (CPB) @(negedge clk);
        for (int j = 0; j < 8; j++) begin uart_rxd = b[j]; repeat (CPB) @(negedge clk); end
        uart_rxd = 1; repeat (CPB) @(negedge clk);
      end
    repeat (4) @(negedge clk);
    check("words received over the serial line", uart_words, prog.size());
    check("no framing error", uart_ferr, 0);
    n_uart++;
  endtask

  task automatic load_prog();
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
    end
    @(negedge clk); prog_we = 0;
  endtask

  logic [31:0] last_status;

  task automatic do_run(input int regcnt, input int exp_cores);
    logic [31:0] q;
    perf_t p0;
    dbg(DBG_OP_WRITE_SPR, 32'(SPR_REGCNT), 32'(regcnt), q);
    dbg(DBG_OP_READ_SPR, 32'(SPR_REGCNT), 0, q);
    check("regcnt readback", q, regcnt);
    @(negedge clk); run = 1;
    while (!done) @(posedge clk);
    p0 = perf;
    check("core count", ccr, exp_cores);
    dbg(DBG_OP_READ_SPR, 32'(SPR_CCR), 0, q);
    check("CCR SPR", q, exp_cores);
    dbg(DBG_OP_READ_SPR, 32'(SPR_STATUS), 0, last_status);
    if (exp_cores == 4) n_reconf[2]++;
    else if (exp_cores == 2) n_reconf[1]++;
    else if (exp_cores == 1) n_reconf[0]++;
    n_mac += p0.mac_ops; n_stall_mac += p0.stall_mac; n_stall_load += p0.stall_load;
    n_stall_br += p0.stall_branch; n_bypass += p0.bypass; n_loop += p0.loop_back;
    n_flush += p0.flush; n_hprc += p0.hprc_ops;
    $display("run regcnt=%0d cores=%0d cycles=%0d retired=%0d", regcnt, exp_cores, p0.cycles, p0.retired);
    @(negedge clk); run = 0;
    @(negedge clk); @(negedge clk);
  endtask

  int img [H][W];
  int ker [3][3];

  task automatic conv_test(input int regcnt, input int ncores, input bit fig);
    logic [31:0] q;
    longint s;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        if (fig) img[y][x] = 0;
        else     img[y][x] = int'($urandom_range(0, 511)) - 256;
      end
    if (fig) begin
      int f [8][6] = '{'{0,0,1,0,0,1}, '{0,2,1,0,1,1}, '{0,0,1,0,0,1}, '{0,1,2,2,2,1},
                       '{0,0,1,0,0,1}, '{0,2,1,1,2,1}, '{0,0,1,0,0,1}, '{0,1,2,0,1,1}};
      img = f;
      ker = '{'{5,0,0}, '{0,0,0}, '{0,0,5}};
    end else
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
        ker[i][j] = int'($urandom_range(0, 63)) - 32;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) host_wr(IMG/4 + y*W + x, img[y][x]);
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) host_wr(KER/4 + i*3 + j, ker[i][j]);
    do_run(regcnt, ncores);
    check("status done, no exception", last_status, 2);
    for (int y = 0; y < OH; y++)
      for (int x = 0; x < OW; x++) begin
        s = 0;
        for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) s += longint'(img[y+i][x+j]) * ker[i][j];
        host_rd(OUT/4 + y*OW + x, q);
        check($sformatf("conv out(%0d,%0d)", y, x), $signed(q), s);
      end
    if (fig) begin
      host_rd(OUT/4, q);
      check("first output of the test image", q, 5);
    end
    // HPRC: each core read its neighbours' final column index (k + OW)
    for (int k = 0; k < ncores; k++) begin
      host_rd(HPL/4 + k, q);
      check("hprc from left", q, (k > 0) ? k - 1 + OW : 0);
      host_rd(HPR/4 + k, q);
      check("hprc from right", q, (k < ncores - 1) ? k + 1 + OW : 0);
      host_rd(HPD/4 + k, q);
      check("hprc right minus own", $signed(q), (k < ncores - 1) ? 1 : -(k + OW));
      // register r6 of core k through the debug window
      dbg(DBG_OP_READ_SPR, 32'(SPR_RRF_LO) + 32'(k * (32 / ncores) + 6), 0, q);
      check("r6 via SPR window", q, k + OW);
    end
  endtask

  initial begin
    logic [31:0] q;
    repeat (3) @(negedge clk);
    rst_n = 1;
    build_conv();
    load_prog();
    // debug write and read of a register through the SPR window
    dbg(DBG_OP_WRITE_SPR, 32'd1024 + 32'd9, 32'hCAFE_0009, q);
    dbg(DBG_OP_READ_SPR, 32'd1024 + 32'd9, 0, q);
    check("RRF write/read via SPR", q, 32'hCAFE_0009);
    conv_test(8, 4, 1);
    conv_test(16, 2, 0);
    conv_test(32, 1, 0);
    conv_test(5, 4, 0);
    // exception: illegal opcode at address 3
    prog.delete();
    prog.push_back(a_addi(1, 0, 1));
    prog.push_back(a_addi(2, 0, 2));
    prog.push_back(a_nop());
    prog.push_back({6'h2A, 26'd0});
    prog.push_back(a_addi(3, 0, 3));
    prog.push_back(a_halt());
    uart_load();
    dbg(DBG_OP_WRITE_SPR, 32'd1024 + 32'd3, 0, q);  // r3 of core 0 cleared
    do_run(8, 4);
    check("status exception", last_status, 6);
    if (last_status[2]) n_exc++;
    dbg(DBG_OP_READ_SPR, 32'(SPR_EPCR), 0, q);
    check("EPCR", q, 3);
    dbg(DBG_OP_READ_SPR, 32'(SPR_EEAR), 0, q);
    check("cause illegal", q, 1);
    dbg(DBG_OP_READ_SPR, 32'd1024 + 32'd2, 0, q);
    check("older instruction completed", q, 2);
    dbg(DBG_OP_READ_SPR, 32'd1024 + 32'd3, 0, q);
    check("younger instruction squashed", q, 0);

    // every mechanism must have happened
    check("reconfigured to 4 cores", n_reconf[2] > 0, 1);
    check("reconfigured to 2 cores", n_reconf[1] > 0, 1);
    check("reconfigured to 1 core",  n_reconf[0] > 0, 1);
    check("MAC issued",         n_mac > 0, 1);
    check("MAC read stall",     n_stall_mac > 0, 1);
    check("load-use stall",     n_stall_load > 0, 1);
    check("branch stall",       n_stall_br > 0, 1);
    check("bypass",             n_bypass > 0, 1);
    check("hardware loop",      n_loop > 0, 1);
    check("flush",              n_flush > 0, 1);
    check("HPRC shift",         n_hprc > 0, 1);
    check("debug access",       n_dbg > 0, 1);
    check("exception",          n_exc > 0, 1);
    check("serial program load", n_uart > 0, 1);
    $display("events: mac=%0d stall_mac=%0d stall_load=%0d stall_branch=%0d bypass=%0d loop=%0d flush=%0d hprc=%0d dbg=%0d exc=%0d",
             n_mac, n_stall_mac, n_stall_load, n_stall_br, n_bypass, n_loop, n_flush, n_hprc, n_dbg, n_exc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
