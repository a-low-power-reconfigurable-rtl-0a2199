// acs_memory: data memory shared by the host controller and the ACS core.
//
// Holds the codebook-search inputs the host prepares: the backward-filtered
// target dn[], the impulse-response correlation matrix rr[][] and the code
// vector, as 16-bit words. One synchronous write port for the host and NRD
// synchronous read ports, whose data appear one clock after the address, feed
// the datapath's "host data" inputs so that all operands of one datapath
// configuration can be fetched in the same cycle. The document only names this
// memory; its depth (2048 words, enough for 40 + 40*40 + 40 words), the number
// of read ports and the one-cycle read latency are this design's choices.
module acs_memory #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned W     = 16,
  parameter int unsigned NRD   = 10,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic                   we,
  input  logic [AW-1:0]          waddr,
  input  logic [W-1:0]           wdata,
  input  logic [NRD-1:0][AW-1:0] raddr,
  output logic [NRD-1:0][W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NRD; p++) rdata[p] <= mem[raddr[p]];
  end
endmodule
