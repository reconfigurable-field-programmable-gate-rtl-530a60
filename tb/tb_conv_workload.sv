// tb_conv_workload: the two convolution workloads (3x3 and 15x15 kernels)
// run on the full ROR1200 top at its default size.
//
// The source evaluates 3x3 and 15x15 convolutions of 1024 x 1024 frames of
// 32-bit pixels. Such a frame does not fit the 4096-word data memory, so
// this test runs one tile of 66 x 18 pixels (1188 words) that the host
// would stream in; the kernel sizes are the document's. With 8 registers
// per application the top configures four cores; core k computes output
// columns k, k+4, k+8, ... of every output row. Two programs are run:
//  * loop form: each kernel row is one hardware loop (REPEAT 5, K) of:
//    load pixel, load coefficient, advance both pointers, MAC;
//  * memory-fed form: fully unrolled; each tap is one MACM, whose pixel
//    goes from the data memory straight into the MAC, plus the load of a
//    coefficient two taps ahead (registers r3 / r4 alternate).
// After all taps the accumulator is read out saturated and stored. The 3x3
// loop form is also run on one core (32 registers) to show the gain from
// four cores. Last, one full-width band of the document's 1024-pixel rows
// is convolved with the coefficients held in registers (see band_run).
//
// Checks: every output against a reference computed here, the number of
// MAC instructions issued, the core count, and that the run ends without
// an exception. Cycles per output pixel are printed for comparison with
// the source's figure of 9 MAC cycles per 3x3 output.
`timescale 1ns/1ps
module tb_conv_workload;
  import ror_pkg::*;
  import ror_asm_pkg::*;

  localparam int W = 66, H = 18;
  localparam int IMG = 'h0100, KER = 'h1400, OUT = 'h1800; // byte addresses

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
    repeat (3000000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
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

  // Registers: r1 pixel pointer, r2 coefficient pointer, r3 pixel / result,
  // r4 coefficient, r5 output pointer, r6 column x, r7 row counter / test.
  task automatic build_conv(int k, bit macm);
    int ow, oh, done_at, row_at;
    ow = W - k + 1;
    oh = H - k + 1;
    prog.delete();
    prog.push_back(a_mfspr(6, 0));                 // x = core id
    prog.push_back(a_addi(7, 0, ow));              // 1: column loop
    prog.push_back(a_alu(ALU_SLT, 7, 6, 7));
    done_at = prog.size();
    prog.push_back(32'd0);                         // BEQZ r7, done (patched)
    prog.push_back(a_slli(1, 6, 2));
    prog.push_back(a_addi(5, 1, OUT));
    prog.push_back(a_addi(1, 1, IMG));
    prog.push_back(a_addi(7, 0, oh));
    row_at = prog.size();
    if (!macm) begin
      prog.push_back(a_addi(2, 0, KER));           // row loop
      for (int i = 0; i < k; i++) begin
        prog.push_back(a_repeat(5, k));
        prog.push_back(a_lw(3, 1, 0));
        prog.push_back(a_lw(4, 2, 0));
        prog.push_back(a_addi(1, 1, 4));
        prog.push_back(a_addi(2, 2, 4));
        prog.push_back(a_mac(3, 4));
        prog.push_back(a_addi(1, 1, 4 * (W - k))); // next image row of the window
      end
      prog.push_back(a_addi(1, 1, -4 * W * (k - 1))); // window down by one row
    end else begin
      // unrolled: coefficient t is loaded two taps ahead into r3 / r4,
      // the pixel goes straight from memory into the MAC
      prog.push_back(a_lw(3, 0, KER));             // row loop
      prog.push_back(a_lw(4, 0, KER + 4));
      for (int t = 0; t < k * k; t++) begin
        prog.push_back(a_macm(3 + t % 2, 1, 4 * ((t / k) * W + t % k)));
        if (t + 2 < k * k) prog.push_back(a_lw(3 + t % 2, 0, KER + 4 * (t + 2)));
      end
      prog.push_back(a_addi(1, 1, 4 * W));         // window down by one row
    end
    prog.push_back(a_macrc(3, MACFMT_SAT, 0));
    prog.push_back(a_sw(3, 5, 0));
    prog.push_back(a_addi(5, 5, 4 * ow));
    prog.push_back(a_addi(7, 7, -1));
    prog.push_back(a_bnez(7, row_at));
    prog.push_back(a_mfspr(3, 1));                 // x += core count
    prog.push_back(a_alu(ALU_ADD, 6, 6, 3));
    prog.push_back(a_j(1));
    prog[done_at] = a_beqz(7, prog.size());
    prog.push_back(a_halt());
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
    end
    @(negedge clk); prog_we = 0;
  endtask

  int img [H][W];
  int ker [15][15];

  task automatic conv_run(int k, bit macm, int regcnt, int exp_cores);
    int ow, oh;
    logic [31:0] q;
    longint s;
    perf_t p0;
    ow = W - k + 1;
    oh = H - k + 1;
    build_conv(k, macm);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        img[y][x] = int'($urandom_range(0, 255));
        host_wr(IMG/4 + y*W + x, img[y][x]);
      end
    for (int i = 0; i < k; i++)
      for (int j = 0; j < k; j++) begin
        ker[i][j] = int'($urandom_range(0, 16)) - 8;
        host_wr(KER/4 + i*k + j, ker[i][j]);
      end
    dbg(DBG_OP_WRITE_SPR, 32'(SPR_REGCNT), 32'(regcnt), q);
    @(negedge clk); run = 1;
    while (!done) @(posedge clk);
    p0 = perf;
    check("core count", ccr, exp_cores);
    dbg(DBG_OP_READ_SPR, 32'(SPR_STATUS), 0, q);
    check("done without exception", q, 2);
    check("MAC instructions", p0.mac_ops, longint'(ow / exp_cores) * oh * k * k);
    for (int y = 0; y < oh; y++)
      for (int x = 0; x < ow; x++) begin
        s = 0;
        for (int i = 0; i < k; i++)
          for (int j = 0; j < k; j++) s += longint'(img[y+i][x+j]) * ker[i][j];
        host_rd(OUT/4 + y*ow + x, q);
        check($sformatf("%0dx%0d out(%0d,%0d)", k, k, y, x), $signed(q), s);
      end
    $display("%0dx%0d convolution (%s), %0d cores: %0d outputs, %0d cycles, %0.1f cycles per output, %0.1f cycles per output per core, MAC issue %0.0f%% of cycles",
             k, k, macm ? "MACM, unrolled" : "LW+MAC loop", exp_cores, ow * oh, p0.cycles, real'(p0.cycles) / (ow * oh),
             real'(p0.cycles) * exp_cores / (ow * oh), 100.0 * p0.mac_ops / p0.cycles);
    @(negedge clk); run = 0;
    @(negedge clk); @(negedge clk);
  endtask

  // One full-width band of a 1024-pixel-wide frame: 3 rows of 1024 pixels
  // (3072 words) and one output row (1022 words) fill 4094 of the 4096
  // data words, so the nine coefficients are written by the host straight
  // into each core's registers r5..r13 through the register window. With
  // 16 registers per application (two cores) each output is nine MACMs.
  localparam int BW = 1024, BOUT = 4 * 3 * BW;  // byte address of the output row

  task automatic band_run();
    int bimg [3][BW];
    int bker [9];
    logic [31:0] q;
    longint s;
    perf_t p0;
    int row_at;
    prog.delete();
    prog.push_back(a_mfspr(1, 0));                 // r1 = 4 * core id
    prog.push_back(a_slli(1, 1, 2));
    prog.push_back(a_mfspr(2, 1));                 // r2 = 4 * core count
    prog.push_back(a_slli(2, 2, 2));
    prog.push_back(a_addi(14, 0, 4 * (BW - 2)));   // r14 = end of the output row
    row_at = prog.size();
    for (int t = 0; t < 9; t++) prog.push_back(a_macm(5 + t, 1, 4 * ((t / 3) * BW + t % 3)));
    prog.push_back(a_macrc(4, MACFMT_SAT, 0));
    prog.push_back(a_sw(4, 1, BOUT));
    prog.push_back(a_alu(ALU_ADD, 1, 1, 2));
    prog.push_back(a_alu(ALU_SLT, 15, 1, 14));
    prog.push_back(a_bnez(15, row_at));
    prog.push_back(a_halt());
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
    end
    @(negedge clk); prog_we = 0;
    for (int y = 0; y < 3; y++)
      for (int x = 0; x < BW; x++) begin
        bimg[y][x] = int'($urandom_range(0, 255));
        host_wr(y*BW + x, bimg[y][x]);
      end
    for (int t = 0; t < 9; t++) begin
      bker[t] = int'($urandom_range(0, 16)) - 8;
      for (int k = 0; k < 2; k++) dbg(DBG_OP_WRITE_SPR, 32'(SPR_RRF_LO) + 32'(16 * k + 5 + t), bker[t], q);
    end
    dbg(DBG_OP_WRITE_SPR, 32'(SPR_REGCNT), 32'd16, q);
    @(negedge clk); run = 1;
    while (!done) @(posedge clk);
    p0 = perf;
    check("band: core count", ccr, 2);
    dbg(DBG_OP_READ_SPR, 32'(SPR_STATUS), 0, q);
    check("band: done without exception", q, 2);
    check("band: MAC instructions", p0.mac_ops, (BW - 2) / 2 * 9);
    for (int x = 0; x < BW - 2; x++) begin
      s = 0;
      for (int t = 0; t < 9; t++) s += longint'(bimg[t / 3][x + t % 3]) * bker[t];
      host_rd(BOUT/4 + x, q);
      check($sformatf("band out(%0d)", x), $signed(q), s);
    end
    $display("3x3 convolution of a %0d-pixel band (MACM, coefficients in registers), 2 cores: %0d outputs, %0d cycles, %0.1f cycles per output, %0.1f cycles per output per core",
             BW, BW - 2, p0.cycles, real'(p0.cycles) / (BW - 2), real'(p0.cycles) * 2 / (BW - 2));
    @(negedge clk); run = 0;
    @(negedge clk); @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    conv_run(3, 0, 8, 4);
    conv_run(3, 0, 32, 1);
    conv_run(15, 0, 8, 4);
    conv_run(3, 1, 8, 4);
    conv_run(15, 1, 8, 4);
    band_run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
