// tx_cla_adder: carry look-ahead adder/subtractor of the TX ALU.
//
// Computes a + b + 0 (sub = 0) or a - b = a + ~b + 1 (sub = 1). Each bit
// produces generate g = a & b' and propagate p = a ^ b'; the carry into bit
// i+1 is c[i+1] = g[i] | p[i] & c[i], written out as a sum of products over
// the generates and propagates below it so that no carry ripples through
// the bits. carry_out is the carry out of the top bit: for a subtraction it
// is 1 when a >= b (no borrow), which the compare instructions use.
// Purely combinational. That the ALU adder is a carry look-ahead adder
// follows the processor's resource breakdown; the width parameter and the
// flattened look-ahead form are this design's choices.
module tx_cla_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sub,
  output logic [WIDTH-1:0] sum,
  output logic             carry_out
);

  logic [WIDTH-1:0] bx, g, p;
  logic [WIDTH:0]   c;

  assign bx = sub ? ~b : b;
  assign g  = a & bx;
  assign p  = a ^ bx;

  // c[i] = g[i-1] | p[i-1]g[i-2] | ... | p[i-1]..p[0]c[0]
  always_comb begin
    c[0] = sub;
    for (int i = 1; i <= WIDTH; i++) begin
      logic term;
      logic acc;
      acc  = 1'b0;
      for (int j = 0; j < i; j++) begin
        // generate at bit j propagated through bits j+1 .. i-1
        term = g[j];
        for (int k = j + 1; k < i; k++) term = term & p[k];
        acc = acc | term;
      end
      // carry in propagated through bits 0 .. i-1
      term = c[0];
      for (int k = 0; k < i; k++) term = term & p[k];
      c[i] = acc | term;
    end
  end

  assign sum       = p ^ c[WIDTH-1:0];
  assign carry_out = c[WIDTH];

endmodule
