// acs_top: the ACS subsystem - data memory plus reconfigurable datapath.
//
// The host controller (a DSP or other processor outside this design) writes the
// search data (dn[], rr[][], code vector) into the memory through the write port,
// then steps the datapath one configuration per clock: in cycle t it drives the
// read addresses of all ports together with a configuration word, cfg_valid and
// any operands it supplies directly (host_data);
// at the edge ending cycle t the memory outputs the words and the core loads the
// configuration; the edge ending cycle t+1 writes the results into REG1..REG3 and
// o_CMP, which the host reads from cycle t+2 on. A new configuration may be issued
// every cycle (the two stages overlap).
//
// The split into host, memory and ACS core follows the document's overall
// architecture; the port-level protocol above is this design's own.
module acs_top
  import acs_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 2048,
  parameter int unsigned AW        = $clog2(MEM_DEPTH)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host write port into the data memory
  input  logic                     mem_we,
  input  logic [AW-1:0]            mem_waddr,
  input  logic [15:0]              mem_wdata,
  // host address generator: one address per datapath data input
  input  logic [NUM_RD-1:0][AW-1:0] mem_raddr,
  // configuration bits and direct host data for the same cycle
  input  logic                     cfg_valid,
  input  logic [NUM_HD-1:0][15:0]  host_data,
  input  acs_cfg_t                 cfg,
  // results back to the host
  output logic [31:0]              reg1,
  output logic [31:0]              reg2,
  output logic [15:0]              reg3,
  output logic                     o_cmp
);
  logic [NUM_RD-1:0][15:0] rdata;

  acs_memory #(.DEPTH(MEM_DEPTH), .W(16), .NRD(NUM_RD)) u_mem (
    .clk   (clk),
    .we    (mem_we),
    .waddr (mem_waddr),
    .wdata (mem_wdata),
    .raddr (mem_raddr),
    .rdata (rdata)
  );

  acs_core u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg_valid (cfg_valid),
    .cfg       (cfg),
    .h         (rdata),
    .hd        (host_data),
    .reg1      (reg1),
    .reg2      (reg2),
    .reg3      (reg3),
    .o_cmp     (o_cmp)
  );
endmodule
