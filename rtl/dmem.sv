// dmem: data memory shared by the cores.
//
// One array of 32-bit words with one read/write port per core (each core
// of the description has its own path to the data cache) plus a host port
// through which the image is loaded and the results are read back. Reads
// are combinational, writes happen at the rising clock edge; if two ports
// write the same word in one cycle, the host port wins, then the
// highest-numbered core. The size and the port arbitration are this
// design's own; the description gives neither.
//
// Interface: per core req/we/addr/wdata/rdata; host_we/host_addr/
// host_wdata/host_rdata.
module dmem #(
  parameter int unsigned WORDS  = 4096,
  parameter int unsigned NPORTS = 4
) (
  input  logic                                  clk,
  input  logic [NPORTS-1:0]                     we,
  input  logic [NPORTS-1:0][$clog2(WORDS)-1:0]  addr,
  input  logic [NPORTS-1:0][31:0]               wdata,
  output logic [NPORTS-1:0][31:0]               rdata,
  input  logic                                  host_we,
  input  logic [$clog2(WORDS)-1:0]              host_addr,
  input  logic [31:0]                           host_wdata,
  output logic [31:0]                           host_rdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++)
      if (we[p]) mem[addr[p]] <= wdata[p];
    if (host_we) mem[host_addr] <= host_wdata;
  end

  always_comb begin
    for (int p = 0; p < NPORTS; p++) rdata[p] = mem[addr[p]];
    host_rdata = mem[host_addr];
  end

endmodule
