// tx_logic: logic function block of the TX ALU.
//
// Bitwise and, or, xor of the two operands, the complement of a (the
// accumulator, for "not"), a pass of b (the register or immediate operand,
// for "mva" and "lca") and a constant zero (for "clr"). Combinational.
// The operations and, or, xor and not are the instruction set's; routing the
// operand pass and the zero through this block is this design's choice.
module tx_logic
  import tx_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic_fn_e        fn,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    unique case (fn)
      LG_AND:   y = a & b;
      LG_OR:    y = a | b;
      LG_XOR:   y = a ^ b;
      LG_NOT:   y = ~a;
      LG_PASSB: y = b;
      default:  y = '0;
    endcase
  end

endmodule
