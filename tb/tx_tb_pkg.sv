// tx_tb_pkg: testbench helpers for TX: an assembler of single instructions
// and an instruction-level reference model (tx_iss) that executes a
// program one instruction at a time, written from the instruction set
// table and independent of the RTL's control unit and datapath.
package tx_tb_pkg;
  import tx_pkg::*;

  // ---- assembler ----
  function automatic logic [15:0] L(opcode_e op, int ads);
    return {op, 12'(ads)};
  endfunction
  function automatic logic [15:0] R(opcode_e op, int xop, int r2);
    return {op, 4'(xop), 4'h0, 4'(r2)};
  endfunction
  function automatic logic [15:0] I(opcode_e op, int xop, int d);
    return {op, 4'(xop), 8'(d)};
  endfunction
  function automatic logic [15:0] lda(int a);  return L(OP_LDA, a);  endfunction
  function automatic logic [15:0] sta(int a);  return L(OP_STA, a);  endfunction
  function automatic logic [15:0] jmp(int a);  return L(OP_JMP, a);  endfunction
  function automatic logic [15:0] jt(int a);   return L(OP_JT, a);   endfunction
  function automatic logic [15:0] jf(int a);   return L(OP_JF, a);   endfunction
  function automatic logic [15:0] call(int a); return L(OP_CALL, a); endfunction
  function automatic logic [15:0] ret();       return R(OP_MISC, MX_RET, 0); endfunction
  function automatic logic [15:0] lca(int d);  return I(OP_LCA, 0, d); endfunction
  function automatic logic [15:0] ldx(int r);  return R(OP_MISC, MX_LDX, r); endfunction
  function automatic logic [15:0] stx(int r);  return R(OP_MISC, MX_STX, r); endfunction
  function automatic logic [15:0] add(int r);  return R(OP_RALU, AX_ADD, r); endfunction
  function automatic logic [15:0] sub(int r);  return R(OP_RALU, AX_SUB, r); endfunction
  function automatic logic [15:0] and_(int r); return R(OP_RALU, AX_AND, r); endfunction
  function automatic logic [15:0] or_(int r);  return R(OP_RALU, AX_OR, r);  endfunction
  function automatic logic [15:0] xor_(int r); return R(OP_RALU, AX_XOR, r); endfunction
  function automatic logic [15:0] addi(int d); return I(OP_IALU, AX_ADD, d); endfunction
  function automatic logic [15:0] subi(int d); return I(OP_IALU, AX_SUB, d); endfunction
  function automatic logic [15:0] andi(int d); return I(OP_IALU, AX_AND, d); endfunction
  function automatic logic [15:0] ori(int d);  return I(OP_IALU, AX_OR, d);  endfunction
  function automatic logic [15:0] xori(int d); return I(OP_IALU, AX_XOR, d); endfunction
  function automatic logic [15:0] eq(int r);   return R(OP_RCMP, CX_EQ, r); endfunction
  function automatic logic [15:0] lt(int r);   return R(OP_RCMP, CX_LT, r); endfunction
  function automatic logic [15:0] le(int r);   return R(OP_RCMP, CX_LE, r); endfunction
  function automatic logic [15:0] gt(int r);   return R(OP_RCMP, CX_GT, r); endfunction
  function automatic logic [15:0] ge(int r);   return R(OP_RCMP, CX_GE, r); endfunction
  function automatic logic [15:0] eqi(int d);  return I(OP_ICMP, CX_EQ, d); endfunction
  function automatic logic [15:0] lti(int d);  return I(OP_ICMP, CX_LT, d); endfunction
  function automatic logic [15:0] lei(int d);  return I(OP_ICMP, CX_LE, d); endfunction
  function automatic logic [15:0] gti(int d);  return I(OP_ICMP, CX_GT, d); endfunction
  function automatic logic [15:0] gei(int d);  return I(OP_ICMP, CX_GE, d); endfunction
  function automatic logic [15:0] mov(int r);  return R(OP_MISC, MX_MOV, r); endfunction
  function automatic logic [15:0] mva(int r);  return R(OP_MISC, MX_MVA, r); endfunction
  function automatic logic [15:0] not_();      return R(OP_MISC, MX_NOT, 0); endfunction
  function automatic logic [15:0] clr(int r);  return R(OP_MISC, MX_CLR, r); endfunction

  // ---- reference model ----
  class tx_iss;
    int unsigned dmask;             // data memory index mask (depth - 1)
    int unsigned pmask;             // program memory index mask
    logic [15:0] pmem [4096];
    logic [7:0]  dmem [4096];
    logic [7:0]  r [16];
    logic        f;
    logic [11:0] pc, retads;
    // last instruction's effects
    logic        wrote_mem;
    logic [11:0] wr_addr;
    logic [7:0]  wr_data;
    bit          was_idx, was_taken, was_call, was_ret;

    function new(int unsigned ddepth, int unsigned pdepth);
      dmask = ddepth - 1;
      pmask = pdepth - 1;
      foreach (pmem[i]) pmem[i] = '0;
      foreach (dmem[i]) dmem[i] = '0;
      reset();
    endfunction

    function void reset();
      foreach (r[i]) r[i] = '0;
      f = 0; pc = 0; retads = 0;
    endfunction

    function logic [11:0] idx_addr(logic [3:0] r2);
      int unsigned s;
      s = int'(r[11]) + int'(r[r2]) + 16 * int'(r[13]);
      return 12'(s);
    endfunction

    function bit cmp(int x, logic [7:0] a, logic [7:0] b);
      case (x)
        0: return a == b;
        1: return a < b;
        2: return a <= b;
        3: return a > b;
        4: return a >= b;
        default: return f;
      endcase
    endfunction

    // executes one instruction, returns the number of cycles it takes
    function int step();
      logic [15:0] w;
      logic [3:0] op, x, r2;
      logic [7:0] d, ac, opnd;
      logic [11:0] ads;
      int cyc;
      w = pmem[pc & pmask];
      op = w[15:12]; x = w[11:8]; r2 = w[3:0]; d = w[7:0]; ads = w[11:0];
      ac = r[15];
      pc = pc + 1;
      cyc = 2;
      wrote_mem = 0; was_idx = 0; was_taken = 0; was_call = 0; was_ret = 0;
      case (op)
        4'h0: r[15] = dmem[ads & dmask];
        4'h1: begin dmem[ads & dmask] = ac; wrote_mem = 1; wr_addr = ads; wr_data = ac; end
        4'h2: begin pc = ads; was_taken = 1; end
        4'h3: if (f)  begin pc = ads; was_taken = 1; end
        4'h4: if (!f) begin pc = ads; was_taken = 1; end
        4'h5: begin retads = pc; pc = ads; was_call = 1; end
        4'h6, 4'h7: begin
          opnd = (op == 4'h7) ? d : r[r2];
          case (x)
            0: r[15] = ac + opnd;
            1: r[15] = ac - opnd;
            2: r[15] = ac & opnd;
            3: r[15] = ac | opnd;
            4: r[15] = ac ^ opnd;
            default: ;
          endcase
        end
        4'h8, 4'h9: begin
          opnd = (op == 4'h9) ? d : r[r2];
          f = cmp(int'(x), ac, opnd);
        end
        4'hA: case (x)
          0: begin pc = retads; was_ret = 1; end
          1: begin r[15] = dmem[idx_addr(r2) & dmask]; cyc = 4; was_idx = 1; end
          2: begin
            wr_addr = idx_addr(r2);
            dmem[wr_addr & dmask] = ac; wrote_mem = 1; wr_data = ac;
            cyc = 4; was_idx = 1;
          end
          3: r[r2] = ac;
          4: r[15] = r[r2];
          5: r[15] = ~ac;
          6: r[r2] = 0;
          default: ;
        endcase
        4'hB: r[15] = d;
        default: ;
      endcase
      return cyc;
    endfunction

  endclass

endpackage
