// lsu: load/store unit of one processing element.
//
// Generates the data address of a load or store (base register plus
// sign-extended offset, in bytes, as on OpenRISC) in the execute stage and
// forms the request to the data memory, which is accessed in the memory
// stage. Accesses are 32-bit words: an address that is not word aligned or
// lies beyond the data memory is refused and reported (err) so the core
// raises a data address exception. Word-only access and the error rule
// are this design's own; the description gives the unit only its name and
// the "generate address" step.
//
// Combinational. Interface: en (this core is active), is_load/is_store,
// base/offset/wdata in; req/we/addr (word index)/wdata out.
module lsu #(
  parameter int unsigned WORDS = 4096
) (
  input  logic                      en,
  input  logic                      is_load,
  input  logic                      is_store,
  input  logic [31:0]               base,
  input  logic [31:0]               offset,
  input  logic [31:0]               st_data,
  output logic                      req,
  output logic                      we,
  output logic [$clog2(WORDS)-1:0]  addr,
  output logic [31:0]               wdata,
  output logic                      err,
  output logic [31:0]               ea
);

  logic access;

  always_comb begin
    access = en && (is_load || is_store);
    ea     = base + offset;
    err    = access && ((ea[1:0] != 2'b00) || (ea[31:2] >= 30'(WORDS)));
    req    = access && !err;
    we     = req && is_store;
    addr   = ea[$clog2(WORDS)+1:2];
    wdata  = st_data;
  end

endmodule
