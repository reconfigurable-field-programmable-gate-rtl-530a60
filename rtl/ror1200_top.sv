// ror1200_top: reconfigurable OR1200-style SIMD soft core (ROR1200).
//
// The idea of the design: a program declares how many registers it needs.
// The 32-entry register file is then cut into equal shares, and every
// share not needed by one core becomes the register set of another core,
// so a program that needs eight registers runs on four cores at once,
// all executing the same instruction stream on different data (SIMD).
// Each core's processing element has an integer unit, a reconfigurable
// execution unit (HPRC) that reads the neighbouring core's operand for
// row shifts, and a 48-bit pipelined multiply-accumulate unit for
// convolution.
//
// Blocks: spr_dbg (host access to SPRs: dbg_op_i 0x4 read, 0x5 write;
// register file at SPR 1024..1055), reconfig_ctrl (register count SPR,
// core count register, run control), ror1200_core (the five-stage SIMD
// pipeline), imem and dmem (separate instruction and data memories),
// uart_loader (program image received over a serial line).
//
// Use: while idle, the host loads the program (serially on uart_rxd, or
// word by word on prog_*), the data (host_*),
// writes the register count (SPR 16) and, if wanted, initial register
// values; then it raises run. The controller fixes the core count, the
// cores run from address 0 until a halt instruction or an exception, and
// done rises; the host reads results from the data memory, the register
// file or the status SPRs and lowers run. Sending results back over the
// serial line is left to the host side (host_* port).
module ror1200_top
  import ror_pkg::*;
#(
  parameter int unsigned NCORES = MAX_CORES,
  parameter int unsigned IWORDS = 1024,
  parameter int unsigned DWORDS = 4096,
  parameter int unsigned CLKS_PER_BIT = 1302
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       run,
  // development interface
  input  logic                       dbg_stb_i,
  input  logic [2:0]                 dbg_op_i,
  input  logic [31:0]                dbg_adr_i,
  input  logic [31:0]                dbg_dat_i,
  output logic [31:0]                dbg_dat_o,
  output logic                       dbg_ack_o,
  // program load: serial line, or word-parallel port
  input  logic                       uart_rxd,
  input  logic                       uart_clear,
  output logic [$clog2(IWORDS):0]    uart_words,
  output logic                       uart_frame_err,
  input  logic                       prog_we,
  input  logic [$clog2(IWORDS)-1:0]  prog_addr,
  input  logic [31:0]                prog_data,
  // host access to the data memory
  input  logic                       host_we,
  input  logic [$clog2(DWORDS)-1:0]  host_addr,
  input  logic [31:0]                host_wdata,
  output logic [31:0]                host_rdata,
  // status
  output logic                       running,
  output logic                       done,
  output logic [2:0]                 ccr,
  output perf_t                      perf
);

  localparam int unsigned PCW = 16;
  localparam int unsigned AW  = $clog2(DWORDS);

  logic        regcnt_we, core_rst, halted, exc_flag, reconfigured;
  logic [31:0] regcnt_wdata, regcnt, epcr;
  logic [1:0]  lg_cores;
  exc_cause_e  exc_cause;
  logic        rrf_we;
  logic [4:0]  rrf_addr;
  logic [31:0] rrf_wdata, rrf_rdata;

  reconfig_ctrl u_rcfg (
    .clk, .rst_n,
    .regcnt_we, .regcnt_wdata, .run, .halted,
    .regcnt, .ccr, .lg_cores, .core_rst, .running, .done, .reconfigured
  );

  spr_dbg u_spr (
    .clk, .rst_n,
    .dbg_stb_i, .dbg_op_i, .dbg_adr_i, .dbg_dat_i, .dbg_dat_o, .dbg_ack_o,
    .regcnt_we, .regcnt_wdata, .regcnt, .ccr, .running, .done,
    .exc_flag, .epcr, .eear(32'(exc_cause)),
    .rrf_we, .rrf_addr, .rrf_wdata, .rrf_rdata
  );

  logic [PCW-1:0]                imem_addr;
  logic [31:0]                   imem_rdata;
  logic [NCORES-1:0]             dm_we;
  logic [NCORES-1:0][AW-1:0]     dm_addr;
  logic [NCORES-1:0][31:0]       dm_wdata, dm_rdata;

  ror1200_core #(.NCORES(NCORES), .PCW(PCW), .DWORDS(DWORDS)) u_core (
    .clk, .rst_n, .core_rst, .lg_cores,
    .imem_addr, .imem_rdata,
    .dmem_we(dm_we), .dmem_addr(dm_addr), .dmem_wdata(dm_wdata), .dmem_rdata(dm_rdata),
    .dbg_rrf_we(rrf_we), .dbg_rrf_addr(rrf_addr), .dbg_rrf_wdata(rrf_wdata),
    .dbg_rrf_rdata(rrf_rdata),
    .exc_clear(reconfigured),
    .halted, .exc_flag, .epcr, .exc_cause, .perf
  );

  // program image over the serial line
  logic                      ul_we;
  logic [$clog2(IWORDS)-1:0] ul_addr;
  logic [31:0]               ul_data;

  uart_loader #(.CLKS_PER_BIT(CLKS_PER_BIT), .AW($clog2(IWORDS))) u_uart (
    .clk, .rst_n,
    .rxd       (uart_rxd),
    .clear     (uart_clear),
    .prog_we   (ul_we),
    .prog_addr (ul_addr),
    .prog_data (ul_data),
    .words     (uart_words),
    .frame_err (uart_frame_err)
  );

  // the serial loader has priority over the parallel port
  imem #(.WORDS(IWORDS)) u_imem (
    .clk,
    .rd_addr (imem_addr[$clog2(IWORDS)-1:0]),
    .rd_data (imem_rdata),
    .we      ((ul_we || prog_we) && !running),
    .wr_addr (ul_we ? ul_addr : prog_addr),
    .wr_data (ul_we ? ul_data : prog_data)
  );

  dmem #(.WORDS(DWORDS), .NPORTS(NCORES)) u_dmem (
    .clk,
    .we(dm_we), .addr(dm_addr), .wdata(dm_wdata), .rdata(dm_rdata),
    .host_we, .host_addr, .host_wdata, .host_rdata
  );

endmodule
