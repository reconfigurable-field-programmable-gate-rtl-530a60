// ror1200_core: five-stage SIMD pipeline of the reconfigurable OR1200.
//
// One instruction stream drives up to four processing elements (PEs) in
// lock step: single instruction, multiple data. The stages follow the
// description: fetch (instr_unit, with the hardware loop), decode with
// the register-file read (decoder, rrf), execute (per PE: integer unit,
// HPRC, MAC issue, address generation), memory (data memory access) and
// write back into the reconfigurable register file. With no branches,
// the first instruction is written back in the fifth cycle and N
// instructions take 5 + (N - 1) cycles, as the description states.
//
// The number of active cores comes from the core count register
// (lg_cores = log2 of 1, 2 or 4); core k works in its share of the
// register file and runs only when k < core count. Control flow is scalar:
// jumps and branches are decided in decode on core 0's register value and
// cost one squashed fetch. A memory-fed MAC (MACM) computes its address
// in execute and enters the MAC units from the memory stage with the word
// read there. hazard_ctrl supplies bypasses and stalls,
// exc_unit stops the run on a fault. The core counts events (perf_t).
//
// Interface: rst_n resets everything, core_rst (from the reconfiguration
// controller) holds the pipeline, and releases it to start at address 0.
// The instruction memory is read combinationally; the data memory ports
// are per core (combinational read in the memory stage, write at the clock
// edge). The debug port reaches the register file directly.
module ror1200_core
  import ror_pkg::*;
#(
  parameter int unsigned NCORES = MAX_CORES,
  parameter int unsigned PCW    = 16,
  parameter int unsigned DWORDS = 4096
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  core_rst,
  input  logic [1:0]                            lg_cores,
  output logic [PCW-1:0]                        imem_addr,
  input  logic [31:0]                           imem_rdata,
  output logic [NCORES-1:0]                     dmem_we,
  output logic [NCORES-1:0][$clog2(DWORDS)-1:0] dmem_addr,
  output logic [NCORES-1:0][31:0]               dmem_wdata,
  input  logic [NCORES-1:0][31:0]               dmem_rdata,
  input  logic                                  dbg_rrf_we,
  input  logic [4:0]                            dbg_rrf_addr,
  input  logic [31:0]                           dbg_rrf_wdata,
  output logic [31:0]                           dbg_rrf_rdata,
  input  logic                                  exc_clear,
  output logic                                  halted,
  output logic                                  exc_flag,
  output logic [31:0]                           epcr,
  output exc_cause_e                            exc_cause,
  output perf_t                                 perf
);

  localparam int unsigned LW = $clog2(NCORES + 1);
  localparam int unsigned AW = $clog2(DWORDS);

  logic prst_n;
  assign prst_n = rst_n && !core_rst;

  logic [LW-1:0]      ncores;
  logic [5:0]         rpc;
  logic [NCORES-1:0]  active;
  always_comb begin
    ncores = LW'(3'(1) << lg_cores);
    rpc    = 6'd32 >> lg_cores;
    for (int l = 0; l < NCORES; l++) active[l] = (l < int'(ncores));
  end

  // ---------------------------------------------------------------- fetch
  logic [31:0]    ir;
  logic [PCW-1:0] pc_id, redirect_pc;
  logic           stall, redirect, stop, loop_back, loop_active, exc_take;
  ctrl_t          ctrl_id;

  instr_unit #(.PCW(PCW)) u_if (
    .clk, .rst_n(prst_n),
    .imem_addr, .imem_rdata,
    .stall, .redirect, .redirect_pc, .stop,
    .loop_start (ctrl_id.is_repeat),
    .loop_len   (ctrl_id.rep_len),
    .loop_cnt   (ctrl_id.rep_cnt),
    .ir, .pc_id, .loop_back, .loop_active
  );

  // --------------------------------------------------------------- decode
  decoder u_dec (.instr(ir), .lg_cores, .ctrl(ctrl_id));

  logic [NCORES-1:0][4:0]  ra_idx, rb_idx, rc_idx, wr_idx;
  logic [NCORES-1:0][31:0] ra_data, rb_data, rc_data, wr_data;
  logic [NCORES-1:0]       rf_we;

  always_comb
    for (int l = 0; l < NCORES; l++) begin
      ra_idx[l] = ctrl_id.ra;
      rb_idx[l] = ctrl_id.rb;
      rc_idx[l] = ctrl_id.rd;
    end

  rrf #(.NCORES(NCORES)) u_rrf (
    .clk, .rst_n, .lg_cores,
    .ra_idx, .rb_idx, .rc_idx, .ra_data, .rb_data, .rc_data,
    .we(rf_we), .wr_idx, .wdata(wr_data),
    .dbg_we(dbg_rrf_we), .dbg_addr(dbg_rrf_addr),
    .dbg_wdata(dbg_rrf_wdata), .dbg_rdata(dbg_rrf_rdata)
  );

  // pipeline registers
  ctrl_t                   ctrl_ex;
  logic [PCW-1:0]          pc_ex;
  logic [NCORES-1:0][31:0] a_ex, b_ex, c_ex;

  logic                    em_valid, em_we, em_load, em_halt;
  logic [4:0]              em_rd;
  logic [NCORES-1:0][31:0] em_res;
  logic [NCORES-1:0]       em_mwe;
  logic [NCORES-1:0][AW-1:0] em_addr;
  logic [NCORES-1:0][31:0] em_wdata;

  logic                    wb_valid, wb_we, wb_halt;
  logic [4:0]              wb_rd;
  logic [NCORES-1:0][31:0] wb_res;

  // branch decision on core 0
  logic [1:0]  fwd_a, fwd_b, fwd_c;
  logic        br_fwd_mem, stall_load, stall_mac, stall_branch, mac_busy;
  logic [31:0] br_val;
  logic        br_taken;

  always_comb begin
    br_val   = br_fwd_mem ? em_res[0] : ra_data[0];
    br_taken = ctrl_id.is_jump || (ctrl_id.is_beqz && br_val == 32'd0) ||
               (ctrl_id.is_bnez && br_val != 32'd0);
    redirect    = br_taken && !stall && !exc_take;
    redirect_pc = PCW'(ctrl_id.target);
    stop        = (ctrl_id.is_halt && !stall) || exc_take;
  end

  logic [NCORES-1:0] busy_l;
  logic                    em_macm;  // MACM in the memory stage
  logic [NCORES-1:0][31:0] em_c;     // its register operand
  assign mac_busy = (|busy_l) || em_macm;

  hazard_ctrl u_hz (
    .id_valid   (ctrl_id.valid),
    .id_uses_ra (ctrl_id.uses_ra), .id_uses_rb(ctrl_id.uses_rb), .id_uses_rd(ctrl_id.uses_rd),
    .id_ra      (ctrl_id.ra), .id_rb(ctrl_id.rb), .id_rd(ctrl_id.rd),
    .id_branch  (ctrl_id.is_beqz || ctrl_id.is_bnez),
    .id_macrc   (ctrl_id.cls == CLS_MACRC),
    .id_mac     (ctrl_id.cls == CLS_MAC),
    .ex_valid   (ctrl_ex.valid), .ex_we(ctrl_ex.rd_we), .ex_rd(ctrl_ex.rd),
    .ex_load    (ctrl_ex.cls == CLS_LOAD), .ex_mac(ctrl_ex.cls == CLS_MAC || ctrl_ex.mac_mem),
    .ex_macm    (ctrl_ex.mac_mem),
    .ex_src_a   (ctrl_ex.uses_ra ? ctrl_ex.ra : 5'd0),
    .ex_src_b   (ctrl_ex.uses_rb ? ctrl_ex.rb : 5'd0),
    .ex_src_c   (ctrl_ex.uses_rd ? ctrl_ex.rd : 5'd0),
    .mem_valid  (em_valid), .mem_we(em_we), .mem_rd(em_rd), .mem_load(em_load),
    .wb_valid   (wb_valid), .wb_we(wb_we), .wb_rd(wb_rd),
    .mac_busy,
    .fwd_a, .fwd_b, .fwd_c, .br_fwd_mem, .stall, .stall_load, .stall_mac, .stall_branch
  );

  always_ff @(posedge clk) begin
    if (!prst_n) begin
      ctrl_ex <= '0;
      pc_ex   <= '0;
      a_ex    <= '0; b_ex <= '0; c_ex <= '0;
    end else begin
      if (stall || exc_take) ctrl_ex <= '0;   // bubble
      else                   ctrl_ex <= ctrl_id;
      pc_ex <= pc_id;
      a_ex  <= ra_data;
      b_ex  <= rb_data;
      c_ex  <= rc_data;
    end
  end

  // -------------------------------------------------------------- execute
  logic [NCORES-1:0][31:0] a_f, b_f, c_f, res;
  logic [NCORES-1:0]       mreq, mwe, derr;
  logic [NCORES-1:0][AW-1:0] maddr;
  logic [NCORES-1:0][31:0] mwdata;
  logic                    go;

  function automatic logic [31:0] pick(input logic [1:0] s, input logic [31:0] d,
                                       input logic [31:0] m, input logic [31:0] w);
    unique case (s)
      2'd1:    return m;
      2'd2:    return w;
      default: return d;
    endcase
  endfunction

  always_comb
    for (int l = 0; l < NCORES; l++) begin
      a_f[l] = pick(fwd_a, a_ex[l], em_res[l], wb_res[l]);
      b_f[l] = pick(fwd_b, b_ex[l], em_res[l], wb_res[l]);
      c_f[l] = pick(fwd_c, c_ex[l], em_res[l], wb_res[l]);
    end

  assign go = ctrl_ex.valid && !exc_take;

  for (genvar l = 0; l < NCORES; l++) begin : g_pe
    pe #(.NCORES(NCORES), .DWORDS(DWORDS)) u_pe (
      .clk, .rst_n(prst_n),
      .lane          (LW'(l)),
      .ncores,
      .regs_per_core (rpc),
      .active        (active[l]),
      .ctrl          (ctrl_ex),
      .go,
      .a             (a_f[l]),
      .b             (b_f[l]),
      .c             (c_f[l]),
      .nb_left       ((l > 0) ? a_f[(l > 0) ? l - 1 : 0] : 32'd0),
      .nb_right      ((l < NCORES - 1) ? a_f[(l < NCORES - 1) ? l + 1 : l] : 32'd0),
      .mem_issue     (em_macm),
      .mem_a         (dmem_rdata[l]),
      .mem_b         (em_c[l]),
      .result        (res[l]),
      .mem_req       (mreq[l]),
      .mem_we        (mwe[l]),
      .mem_addr      (maddr[l]),
      .mem_wdata     (mwdata[l]),
      .daddr_err     (derr[l]),
      .mac_busy      (busy_l[l])
    );
  end

  exc_unit #(.PCW(PCW)) u_exc (
    .clk, .rst_n, .clear(exc_clear),
    .ex_valid     (ctrl_ex.valid),
    .ex_illegal   (ctrl_ex.illegal),
    .ex_bad_reg   (ctrl_ex.bad_reg),
    .ex_daddr_err (|derr),
    .ex_pc        (pc_ex),
    .take         (exc_take),
    .flag         (exc_flag),
    .epcr,
    .cause        (exc_cause)
  );

  always_ff @(posedge clk) begin
    if (!prst_n) begin
      em_valid <= 1'b0; em_we <= 1'b0; em_load <= 1'b0; em_halt <= 1'b0;
      em_rd    <= '0;   em_res <= '0; em_mwe <= '0; em_addr <= '0; em_wdata <= '0;
      em_macm  <= 1'b0; em_c <= '0;
    end else begin
      em_valid <= go;
      em_we    <= go && ctrl_ex.rd_we;
      em_load  <= go && ctrl_ex.cls == CLS_LOAD;
      em_halt  <= (ctrl_ex.valid && ctrl_ex.is_halt) || exc_take;
      em_rd    <= ctrl_ex.rd;
      em_res   <= res;
      em_mwe   <= go ? (mwe & mreq) : '0;
      em_addr  <= maddr;
      em_wdata <= mwdata;
      em_macm  <= go && ctrl_ex.mac_mem;
      em_c     <= c_f;
    end
  end

  // --------------------------------------------------------------- memory
  logic [NCORES-1:0][31:0] mem_res;

  always_comb begin
    dmem_we    = em_mwe;
    dmem_addr  = em_addr;
    dmem_wdata = em_wdata;
    for (int l = 0; l < NCORES; l++) mem_res[l] = em_load ? dmem_rdata[l] : em_res[l];
  end

  always_ff @(posedge clk) begin
    if (!prst_n) begin
      wb_valid <= 1'b0; wb_we <= 1'b0; wb_halt <= 1'b0; wb_rd <= '0; wb_res <= '0;
    end else begin
      wb_valid <= em_valid;
      wb_we    <= em_we;
      wb_halt  <= em_halt;
      wb_rd    <= em_rd;
      wb_res   <= mem_res;
    end
  end

  // ----------------------------------------------------------- write back
  always_comb
    for (int l = 0; l < NCORES; l++) begin
      rf_we[l]   = wb_valid && wb_we && active[l];
      wr_idx[l]  = wb_rd;
      wr_data[l] = wb_res[l];
    end

  always_ff @(posedge clk) begin
    if (!prst_n) halted <= 1'b0;
    else if (wb_halt) halted <= 1'b1;
  end

  // --------------------------------------------------------------- events
  always_ff @(posedge clk) begin
    if (!prst_n) perf <= '0;
    else if (!halted) begin
      perf.cycles       <= perf.cycles + 32'd1;
      perf.retired      <= perf.retired + 32'(wb_valid);
      perf.stall_load   <= perf.stall_load + 32'(stall_load);
      perf.stall_mac    <= perf.stall_mac + 32'(stall_mac);
      perf.stall_branch <= perf.stall_branch + 32'(stall_branch);
      perf.bypass       <= perf.bypass + 32'(ctrl_ex.valid &&
                           (fwd_a != 2'd0 || fwd_b != 2'd0 || fwd_c != 2'd0));
      perf.loop_back    <= perf.loop_back + 32'(loop_back);
      perf.flush        <= perf.flush + 32'(redirect);
      perf.mac_ops      <= perf.mac_ops + 32'(go && (ctrl_ex.cls == CLS_MAC || ctrl_ex.mac_mem));
      perf.hprc_ops     <= perf.hprc_ops + 32'(go && ctrl_ex.cls == CLS_HPRC);
    end
  end

endmodule
