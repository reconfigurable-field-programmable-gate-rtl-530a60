// reconfig_ctrl: reconfiguration controller and core count register (CCR).
//
// The application's register count is written into an SPR through the
// development interface. When the run signal rises, the controller
// reconfigures the register file for that count: it sets the core count
// register to 32 / (registers per core), so a count of eight gives four
// cores (32/8 = 4), as in the source description, and then starts the
// cores. Counts are rounded up to a whole number of 8-register RRF blocks
// per core that divides the file evenly (8, 16 or 32), giving 4, 2 or 1
// cores; a count of 0 or above 32 selects one core with all 32 registers.
// This rounding is this design's own: the description gives only 32/8 = 4.
//
// States: IDLE (register count may be changed) -> CONFIG (one cycle: CCR
// loaded, cores held in reset) -> RUN (cores execute) -> DONE (the program
// halted; results can be read) -> IDLE when run falls.
//
// Interface: regcnt_we/regcnt_wdata write the SPR (ignored outside IDLE);
// run is the level run signal; halted comes from the core. ccr is the core
// count (1, 2, 4), lg_cores its log2, core_rst holds the cores in reset,
// running is high in RUN.
module reconfig_ctrl
  import ror_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        regcnt_we,
  input  logic [31:0] regcnt_wdata,
  input  logic        run,
  input  logic        halted,
  output logic [31:0] regcnt,
  output logic [2:0]  ccr,
  output logic [1:0]  lg_cores,
  output logic        core_rst,
  output logic        running,
  output logic        done,
  output logic        reconfigured   // pulse: a new configuration was applied
);

  typedef enum logic [1:0] {S_IDLE, S_CONFIG, S_RUN, S_DONE} state_e;
  state_e state;

  function automatic logic [1:0] lg_for(input logic [31:0] n);
    if (n == 32'd0 || n > 32'd16) return 2'd0;  // 32 registers, 1 core
    else if (n > 32'd8)           return 2'd1;  // 16 registers, 2 cores
    else                          return 2'd2;  // 8 registers, 4 cores
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      regcnt       <= 32'd32;
      lg_cores     <= 2'd0;
      reconfigured <= 1'b0;
    end else begin
      reconfigured <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (regcnt_we) regcnt <= regcnt_wdata;
          if (run) state <= S_CONFIG;
        end
        S_CONFIG: begin
          lg_cores     <= lg_for(regcnt);
          reconfigured <= 1'b1;
          state        <= S_RUN;
        end
        S_RUN:  if (halted) state <= S_DONE;
        S_DONE: if (!run)   state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ccr      = 3'(1) << lg_cores;
  assign core_rst = (state != S_RUN);
  assign running  = (state == S_RUN);
  assign done     = (state == S_DONE);

endmodule
