// tx_dar: data address cluster of TX (D-AR, its adders and DAMux1).
//
// The 12-bit data address register D-AR addresses the data memory. It is
// loaded either with the 12-bit address field of an lda/sta instruction
// (sel = DA_ADS, taken from the instruction word as it enters the IR at the
// end of the fetch cycle) or with the indexed address of ldx/stx
// (sel = DA_IDX). The indexed address is built in two steps, one per cycle:
// the 8-bit adder forms BP + R[r2] with its carry (latched in ea when
// ea_we = 1), and the 12-bit adder adds that to DS * 16. With BP holding a
// base and DS = 0 this gives M[BP + R[r2]] over the first 512 bytes; DS moves
// the window in steps of 16 bytes. The sum wraps at 4096.
// The adders, the DS input of the 12-bit adder and DAMux1 follow the data
// address diagram; splitting the chain over two cycles, placing DS in bits
// 11:4 and keeping the 8-bit adder's carry are this design's choices.
module tx_dar
  import tx_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  dar_sel_e      sel,
  input  logic          ea_we,
  input  logic [AW-1:0] ads,
  input  logic [DW-1:0] bp,
  input  logic [DW-1:0] r_bus,
  input  logic [DW-1:0] ds,
  output logic [AW-1:0] dar
);

  logic [DW:0]   ea_lo;      // latched BP + R[r2], with carry
  logic [DW:0]   sum8;
  logic [AW-1:0] sum12;

  assign sum8  = {1'b0, bp} + {1'b0, r_bus};
  assign sum12 = {ds, 4'b0000} + {{(AW-DW-1){1'b0}}, ea_lo};

  always_ff @(posedge clk) begin
    if (rst) begin
      ea_lo <= '0;
      dar   <= '0;
    end else begin
      if (ea_we) ea_lo <= sum8;
      unique case (sel)
        DA_ADS:  dar <= ads;
        DA_IDX:  dar <= sum12;
        default: dar <= dar;
      endcase
    end
  end

endmodule
