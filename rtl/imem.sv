// imem: instruction memory (the instruction side of the Harvard memory
// organisation).
//
// One array of 32-bit words. The fetch stage reads it combinationally;
// the host writes the program through the load port before a run (the
// description transfers executable images from a PC). The size is this
// design's choice; the description gives none.
//
// Interface: rd_addr/rd_data for fetch; we/wr_addr/wr_data written at the
// rising clock edge. Reset clears nothing (contents come from the host);
// words never written read as whatever the array holds.
module imem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic                      clk,
  input  logic [$clog2(WORDS)-1:0]  rd_addr,
  output logic [31:0]               rd_data,
  input  logic                      we,
  input  logic [$clog2(WORDS)-1:0]  wr_addr,
  input  logic [31:0]               wr_data
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk)
    if (we) mem[wr_addr] <= wr_data;

  assign rd_data = mem[rd_addr];

endmodule
