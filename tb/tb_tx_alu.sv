// tb_tx_alu: random operands for every ALU operation and every compare
// condition, with results worked out in integer arithmetic (unsigned
// compares), plus the corner operands 0, 1, 127, 128, 255.
module tb_tx_alu;
  import tx_pkg::*;
  logic [7:0] left, right, y;
  alu_op_e    op;
  cmp_xop_e   cmp;
  logic       f;
  int checks = 0, failures = 0;

  tx_alu dut (.left, .right, .op, .cmp, .y, .f);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pick();
    int c = $urandom_range(0, 7);
    case (c)
      0: return 8'd0;
      1: return 8'd1;
      2: return 8'd127;
      3: return 8'd128;
      4: return 8'd255;
      default: return 8'($urandom);
    endcase
  endfunction

  initial begin
    int l, r, e;
    bit ef;
    for (int n = 0; n < 20000; n++) begin
      left = pick(); right = pick();
      op  = alu_op_e'($urandom_range(0, 10));
      cmp = cmp_xop_e'($urandom_range(0, 4));
      #1;
      l = int'(left); r = int'(right);
      case (op)
        ALU_ADD:   e = l + r;
        ALU_SUB:   e = l - r;
        ALU_AND:   e = l & r;
        ALU_OR:    e = l | r;
        ALU_XOR:   e = l ^ r;
        ALU_NOT:   e = ~l;
        ALU_PASSR: e = r;
        ALU_ZERO:  e = 0;
        ALU_PASSL: e = l;
        ALU_ROL:   e = (l << 1) | (l >> 7);
        default:   e = (l >> 1) | (l << 7);
      endcase
      checks++;
      if (y !== 8'(e)) begin
        failures++;
        $display("FAIL op=%s l=%0d r=%0d y=%0d exp %0d", op.name(), l, r, y, e & 255);
      end
      if (op == ALU_SUB) begin
        case (cmp)
          CX_EQ: ef = (l == r);
          CX_LT: ef = (l < r);
          CX_LE: ef = (l <= r);
          CX_GT: ef = (l > r);
          default: ef = (l >= r);
        endcase
        checks++;
        if (f !== ef) begin
          failures++;
          $display("FAIL cmp=%s l=%0d r=%0d f=%0d exp %0d", cmp.name(), l, r, f, ef);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
