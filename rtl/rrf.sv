// rrf: reconfigurable register file (RRF).
//
// 32 registers of 32 bits, organised as four blocks RRF1..RRF4 of eight
// registers (0:7, 8:15, 16:23, 24:31), as in the source description. The
// file is shared out among the active cores: with 1, 2 or 4 cores each
// core owns 32, 16 or 8 consecutive registers, and a core's register
// index r maps to physical register core*(32/cores) + (r mod 32/cores).
// So with eight registers per application, core k works in block RRF(k+1).
// Register 0 of every core reads as zero and ignores writes (OpenRISC
// convention; this design's choice). The development interface reads and
// writes physical registers 0..31 (SPR 1024..1055).
//
// Interface: per core three asynchronous read ports (a, b and the store
// data c) and one write port; a write in the same cycle is forwarded to the
// reads. lg_cores is log2 of the active core count (0, 1 or 2). Writes
// happen at the rising clock edge; reset clears all registers.
module rrf
  import ror_pkg::*;
#(
  parameter int unsigned NCORES = MAX_CORES,
  parameter int unsigned N      = NREGS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [1:0]          lg_cores,
  input  logic [NCORES-1:0][4:0]  ra_idx,
  input  logic [NCORES-1:0][4:0]  rb_idx,
  input  logic [NCORES-1:0][4:0]  rc_idx,
  output logic [NCORES-1:0][31:0] ra_data,
  output logic [NCORES-1:0][31:0] rb_data,
  output logic [NCORES-1:0][31:0] rc_data,
  input  logic [NCORES-1:0]       we,
  input  logic [NCORES-1:0][4:0]  wr_idx,
  input  logic [NCORES-1:0][31:0] wdata,
  input  logic                dbg_we,
  input  logic [4:0]          dbg_addr,
  input  logic [31:0]         dbg_wdata,
  output logic [31:0]         dbg_rdata
);

  logic [31:0] regs [N];

  // physical register of core c, logical index r
  function automatic logic [4:0] phys(input int unsigned c, input logic [4:0] r,
                                      input logic [1:0] lg);
    logic [4:0] mask;
    mask = 5'h1F >> lg;
    return (5'(c << (5 - lg)) & ~mask) | (r & mask);
  endfunction

  function automatic logic [31:0] rd_port(input int unsigned c, input logic [4:0] r,
                                          input logic [NCORES-1:0] w_en,
                                          input logic [NCORES-1:0][4:0] w_idx,
                                          input logic [NCORES-1:0][31:0] w_dat,
                                          input logic [31:0] cur);
    logic [31:0] v;
    v = cur;
    if (w_en[c] && w_idx[c] == r) v = w_dat[c];
    if (r == 5'd0) v = 32'd0;
    return v;
  endfunction

  always_comb begin
    for (int c = 0; c < NCORES; c++) begin
      ra_data[c] = rd_port(c, ra_idx[c], we, wr_idx, wdata, regs[phys(c, ra_idx[c], lg_cores)]);
      rb_data[c] = rd_port(c, rb_idx[c], we, wr_idx, wdata, regs[phys(c, rb_idx[c], lg_cores)]);
      rc_data[c] = rd_port(c, rc_idx[c], we, wr_idx, wdata, regs[phys(c, rc_idx[c], lg_cores)]);
    end
    dbg_rdata = regs[dbg_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else begin
      if (dbg_we) regs[dbg_addr] <= dbg_wdata;
      for (int c = 0; c < NCORES; c++)
        if (we[c] && wr_idx[c] != 5'd0) regs[phys(c, wr_idx[c], lg_cores)] <= wdata[c];
    end
  end

endmodule
