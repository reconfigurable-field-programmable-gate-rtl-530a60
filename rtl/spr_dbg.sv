// spr_dbg: development interface to the special purpose registers (SPRs).
//
// A host (the PC side) reads and writes SPRs with the command codes of the
// source description: dbg_op_i = 0x4 reads the SPR at dbg_adr_i, 0x5
// writes dbg_dat_i to it. The register file is visible at SPR addresses
// 1024..1055 (physical registers 0..31). The other SPR numbers are this
// design's own: 16 register count (read/write), 17 core count (read only),
// 18 status {exception, done, running}, 19 exception PC, 20 exception cause.
//
// Timing: the host raises dbg_stb_i for one cycle with op, address and
// data; one cycle later dbg_ack_o pulses with the read data on dbg_dat_o.
// Writes to the register count and to the register file are passed on in
// the strobe cycle; the reconfiguration controller ignores count writes
// while the cores run, and this unit drops register-file writes then.
// An unknown command is acknowledged with zero data and does nothing.
module spr_dbg
  import ror_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        dbg_stb_i,
  input  logic [2:0]  dbg_op_i,
  input  logic [31:0] dbg_adr_i,
  input  logic [31:0] dbg_dat_i,
  output logic [31:0] dbg_dat_o,
  output logic        dbg_ack_o,
  // register count SPR (held by the reconfiguration controller)
  output logic        regcnt_we,
  output logic [31:0] regcnt_wdata,
  input  logic [31:0] regcnt,
  input  logic [2:0]  ccr,
  input  logic        running,
  input  logic        done,
  input  logic        exc_flag,
  input  logic [31:0] epcr,
  input  logic [31:0] eear,
  // register file window
  output logic        rrf_we,
  output logic [4:0]  rrf_addr,
  output logic [31:0] rrf_wdata,
  input  logic [31:0] rrf_rdata
);

  logic is_rd, is_wr, in_rrf;
  logic [31:0] rdata;

  always_comb begin
    is_rd  = dbg_stb_i && (dbg_op_i == DBG_OP_READ_SPR);
    is_wr  = dbg_stb_i && (dbg_op_i == DBG_OP_WRITE_SPR);
    in_rrf = (dbg_adr_i >= 32'(SPR_RRF_LO)) && (dbg_adr_i <= 32'(SPR_RRF_HI));
    rrf_addr     = dbg_adr_i[4:0];   // 1024 is a multiple of 32
    rrf_wdata    = dbg_dat_i;
    rrf_we       = is_wr && in_rrf && !running;
    regcnt_we    = is_wr && (dbg_adr_i == 32'(SPR_REGCNT));
    regcnt_wdata = dbg_dat_i;
    if (in_rrf)                              rdata = rrf_rdata;
    else if (dbg_adr_i == 32'(SPR_REGCNT))   rdata = regcnt;
    else if (dbg_adr_i == 32'(SPR_CCR))      rdata = 32'(ccr);
    else if (dbg_adr_i == 32'(SPR_STATUS))   rdata = {29'd0, exc_flag, done, running};
    else if (dbg_adr_i == 32'(SPR_EPCR))     rdata = epcr;
    else if (dbg_adr_i == 32'(SPR_EEAR))     rdata = eear;
    else                                     rdata = 32'd0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dbg_ack_o <= 1'b0;
      dbg_dat_o <= 32'd0;
    end else begin
      dbg_ack_o <= dbg_stb_i;
      dbg_dat_o <= is_rd ? rdata : 32'd0;
    end
  end

  // only the two commands of the interface are defined
  a_known_op: assert property (@(posedge clk) disable iff (!rst_n)
    dbg_stb_i |-> (dbg_op_i == DBG_OP_READ_SPR || dbg_op_i == DBG_OP_WRITE_SPR));

endmodule
