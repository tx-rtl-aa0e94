// tx_rotate: bit rotation / bypass unit of the TX ALU.
//
// Passes the left operand (the accumulator) unchanged, or rotates it by one
// bit to the left (msb into bit 0) or to the right (bit 0 into the msb).
// Combinational. The unit and its rotate-left/right function are part of
// the processor's ALU; the one-bit rotate distance is this design's choice.
// The bypass carries the accumulator to the ALU output for "mov" and for the
// data memory write of "sta"/"stx". No instruction of the listed set
// rotates, so ALU_ROL/ALU_ROR are reachable only from the ALU's own op input.
module tx_rotate
  import tx_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  rot_fn_e          fn,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    unique case (fn)
      RT_ROL:  y = {a[WIDTH-2:0], a[WIDTH-1]};
      RT_ROR:  y = {a[0], a[WIDTH-1:1]};
      default: y = a;
    endcase
  end

endmodule
