// tx_top: TX processor with its program and data memories.
//
// Connects the core (tx_cpu) to a PMEM_DEPTH x 16 program memory and a
// DMEM_DEPTH x 8 data memory, 2048 words each by default. A host loads the
// program through prog_* and reads or writes data memory through host_*,
// normally while rst holds the core. pc, acc, flag and retire (one pulse
// per completed instruction) show the core's progress.
// Memory sizes follow the processor's architecture diagram; the load and
// host ports are this design's.
module tx_top
  import tx_pkg::*;
#(
  parameter int unsigned PMEM_DEPTH = 2048,
  parameter int unsigned DMEM_DEPTH = 2048
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          prog_we,
  input  logic [AW-1:0] prog_addr,
  input  logic [IW-1:0] prog_data,
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  logic [DW-1:0] host_wdata,
  output logic [DW-1:0] host_rdata,
  output logic [AW-1:0] pc,
  output logic [DW-1:0] acc,
  output logic          flag,
  output logic          retire
);

  logic [AW-1:0] pmem_addr, dmem_addr;
  logic [IW-1:0] pmem_rdata;
  logic          dmem_we;
  logic [DW-1:0] dmem_wdata, dmem_rdata;

  tx_cpu u_cpu (
    .clk, .rst, .pmem_addr, .pmem_rdata, .dmem_addr, .dmem_we, .dmem_wdata,
    // ir and state are for debugging only
    .dmem_rdata, .pc, .acc, .flag, .ir(), .state(), .retire
  );

  tx_pmem #(.DEPTH(PMEM_DEPTH)) u_pmem (
    .clk, .addr(pmem_addr), .rdata(pmem_rdata),
    .ld_we(prog_we), .ld_addr(prog_addr), .ld_data(prog_data)
  );

  tx_dmem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk, .addr(dmem_addr), .we(dmem_we), .wdata(dmem_wdata), .rdata(dmem_rdata),
    .h_addr(host_addr), .h_we(host_we), .h_wdata(host_wdata), .h_rdata(host_rdata)
  );

endmodule
