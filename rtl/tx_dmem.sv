// tx_dmem: data memory of TX, DEPTH x 8 bits (2048 by default).
//
// Port A belongs to the processor: it reads M[addr] combinationally and
// writes wdata at the rising edge when we = 1. Since addr comes straight
// from the D-AR register, the read behaves like a block RAM whose address
// register is the D-AR. Port B is a host port for loading and inspecting
// data; a host write in the same cycle as a processor write to the same
// word wins. Addresses are 12 bits; with a smaller DEPTH the upper address
// bits are ignored. The memory is not reset.
// The 2048 x 8 size is the processor's; the host port is this design's.
module tx_dmem
  import tx_pkg::*;
#(
  parameter int unsigned DEPTH = 2048
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  input  logic [AW-1:0] h_addr,
  input  logic          h_we,
  input  logic [DW-1:0] h_wdata,
  output logic [DW-1:0] h_rdata
);

  localparam int unsigned IDXW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)   mem[addr[IDXW-1:0]]   <= wdata;
    if (h_we) mem[h_addr[IDXW-1:0]] <= h_wdata;
  end

  assign rdata   = mem[addr[IDXW-1:0]];
  assign h_rdata = mem[h_addr[IDXW-1:0]];

endmodule
