// tx_alu: the TX arithmetic and logic unit.
//
// Three units work side by side on the left operand (the accumulator) and
// the right operand (a register or the 8-bit immediate, chosen outside by
// the REG/INT mux): the carry look-ahead ADD/SUB unit, the logic block and
// the bit rotation/bypass unit. MUX ALU picks the result of the unit that
// op names. The compare instructions run a subtraction left - right; from
// its carry and zero the ALU also forms the compare result f for the
// condition cmp: eq, lt, le, gt, ge. Combinational.
// The three units and the output mux follow the processor's ALU block
// diagram; comparing as unsigned numbers is this design's choice, since the
// instruction set does not say whether operands are signed.
module tx_alu
  import tx_pkg::*;
(
  input  logic [DW-1:0] left,
  input  logic [DW-1:0] right,
  input  alu_op_e       op,
  input  cmp_xop_e      cmp,
  output logic [DW-1:0] y,
  output logic          f
);

  logic [DW-1:0] y_add, y_log, y_rot;
  logic          carry;
  logic          is_sub;
  logic_fn_e     lfn;
  rot_fn_e       rfn;

  // compares need the subtraction, so the adder subtracts unless adding
  assign is_sub = (op != ALU_ADD);

  tx_cla_adder #(.WIDTH(DW)) u_addsub (
    .a(left), .b(right), .sub(is_sub), .sum(y_add), .carry_out(carry)
  );

  always_comb begin
    unique case (op)
      ALU_AND:   lfn = LG_AND;
      ALU_OR:    lfn = LG_OR;
      ALU_XOR:   lfn = LG_XOR;
      ALU_NOT:   lfn = LG_NOT;
      ALU_PASSR: lfn = LG_PASSB;
      default:   lfn = LG_ZERO;
    endcase
    unique case (op)
      ALU_ROL: rfn = RT_ROL;
      ALU_ROR: rfn = RT_ROR;
      default: rfn = RT_PASS;
    endcase
  end

  tx_logic #(.WIDTH(DW)) u_logic (.a(left), .b(right), .fn(lfn), .y(y_log));
  tx_rotate #(.WIDTH(DW)) u_rot (.a(left), .fn(rfn), .y(y_rot));

  // MUX ALU
  always_comb begin
    unique case (op)
      ALU_ADD, ALU_SUB:                     y = y_add;
      ALU_PASSL, ALU_ROL, ALU_ROR:          y = y_rot;
      default:                              y = y_log;
    endcase
  end

  // compare result from left - right: carry = no borrow = (left >= right)
  logic eq, ge;
  assign eq = (y_add == '0);
  assign ge = carry;

  always_comb begin
    unique case (cmp)
      CX_EQ:   f = eq;
      CX_LT:   f = ~ge;
      CX_LE:   f = ~ge | eq;
      CX_GT:   f = ge & ~eq;
      CX_GE:   f = ge;
      default: f = 1'b0;
    endcase
  end

endmodule
