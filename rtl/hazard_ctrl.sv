// hazard_ctrl: pipeline hazard controller.
//
// The same instruction runs in every processing element, so one scalar
// controller serves all of them. It decides
//   * operand bypass for the execute stage: a source register written by
//     the instruction in the memory stage (not a load) or in the write-back
//     stage is taken from there instead of the value read in decode;
//   * the bypass of a branch operand in decode from the memory stage;
//   * stalls of the decode stage (fetch and decode hold, a bubble enters
//     execute):
//       - load-use: the instruction in execute loads a register decode reads;
//       - MAC read: a MAC read-and-clear waits until the MAC pipeline has
//         no operation in flight (also one entering it from execute);
//       - MAC port: a register MAC waits one cycle behind a memory-fed MAC
//         (MACM) in execute, which issues from the memory stage, so that
//         the two never enter the MAC unit in the same cycle;
//       - branch: a branch operand is still being computed in execute or
//         loaded in the memory stage.
// The description names the hazard controller and draws the bypass from
// the memory result back to the operand multiplexer; the rules above are
// this design's own, in the usual form for a five-stage pipeline.
//
// Combinational. Register 0 reads as zero and is never bypassed.
module hazard_ctrl (
  // decode stage
  input  logic       id_valid,
  input  logic       id_uses_ra,
  input  logic       id_uses_rb,
  input  logic       id_uses_rd,
  input  logic [4:0] id_ra,
  input  logic [4:0] id_rb,
  input  logic [4:0] id_rd,
  input  logic       id_branch,
  input  logic       id_macrc,
  input  logic       id_mac,      // MAC issued from execute
  // execute stage
  input  logic       ex_valid,
  input  logic       ex_we,
  input  logic [4:0] ex_rd,
  input  logic       ex_load,
  input  logic       ex_mac,
  input  logic       ex_macm,     // MAC fed from memory, issues in the memory stage
  input  logic [4:0] ex_src_a,
  input  logic [4:0] ex_src_b,
  input  logic [4:0] ex_src_c,
  // memory stage
  input  logic       mem_valid,
  input  logic       mem_we,
  input  logic [4:0] mem_rd,
  input  logic       mem_load,
  // write-back stage
  input  logic       wb_valid,
  input  logic       wb_we,
  input  logic [4:0] wb_rd,
  input  logic       mac_busy,
  output logic [1:0] fwd_a,       // 0: decode value, 1: memory stage, 2: write-back
  output logic [1:0] fwd_b,
  output logic [1:0] fwd_c,
  output logic       br_fwd_mem,  // branch operand from the memory stage
  output logic       stall,
  output logic       stall_load,
  output logic       stall_mac,
  output logic       stall_branch
);

  function automatic logic [1:0] sel(input logic [4:0] src,
                                     input logic mv, input logic mw, input logic [4:0] mr, input logic ml,
                                     input logic wv, input logic ww, input logic [4:0] wr);
    if (src == 5'd0)                            return 2'd0;
    else if (mv && mw && !ml && mr == src)      return 2'd1;
    else if (wv && ww && wr == src)             return 2'd2;
    else                                        return 2'd0;
  endfunction

  logic ex_w, mem_w, hit_a, hit_b, hit_d;

  always_comb begin
    fwd_a = sel(ex_src_a, mem_valid, mem_we, mem_rd, mem_load, wb_valid, wb_we, wb_rd);
    fwd_b = sel(ex_src_b, mem_valid, mem_we, mem_rd, mem_load, wb_valid, wb_we, wb_rd);
    fwd_c = sel(ex_src_c, mem_valid, mem_we, mem_rd, mem_load, wb_valid, wb_we, wb_rd);

    ex_w  = ex_valid && ex_we && ex_rd != 5'd0;
    mem_w = mem_valid && mem_we && mem_rd != 5'd0;
    hit_a = id_uses_ra && id_ra == ex_rd;
    hit_b = id_uses_rb && id_rb == ex_rd;
    hit_d = id_uses_rd && id_rd == ex_rd;

    stall_load   = id_valid && ex_w && ex_load && (hit_a || hit_b || hit_d);
    stall_mac    = id_valid && ((id_macrc && ((ex_valid && ex_mac) || mac_busy)) ||
                                (id_mac && ex_valid && ex_macm));
    stall_branch = id_valid && id_branch &&
                   ((ex_w && id_ra == ex_rd) || (mem_w && mem_load && id_ra == mem_rd));
    br_fwd_mem   = mem_w && !mem_load && id_ra == mem_rd;
    stall        = stall_load || stall_mac || stall_branch;
  end

endmodule
