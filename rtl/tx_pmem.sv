// tx_pmem: program memory of TX, DEPTH x 16 bits (2048 by default).
//
// The processor reads the instruction word at addr (the PC)
// combinationally; it is latched into the IR at the end of the fetch cycle,
// so the read behaves like a block RAM whose address register is the PC.
// A load port writes ld_data at ld_addr on the rising edge when ld_we = 1.
// With a smaller DEPTH the upper address bits are ignored. Not reset.
// The 2048 x 16 size is the processor's; the load port is this design's.
module tx_pmem
  import tx_pkg::*;
#(
  parameter int unsigned DEPTH = 2048
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [IW-1:0] rdata,
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  logic [IW-1:0] ld_data
);

  localparam int unsigned IDXW = $clog2(DEPTH);

  logic [IW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr[IDXW-1:0]] <= ld_data;
  end

  assign rdata = mem[addr[IDXW-1:0]];

endmodule
