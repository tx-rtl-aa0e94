// tx_cu: control unit of TX, holding the 16-bit instruction register.
//
// TX is not pipelined: each instruction takes a fetch cycle and an execute
// cycle, except the indexed load/store ldx and stx, which take four.
//   FETCH  IR <= instr (the word at PC); PC <= PC + 1; D-AR <= instr[11:0]
//   IDX1   (ldx/stx) latch BP + R[r2]
//   IDX2   (ldx/stx) D-AR <= DS*16 + (BP + R[r2])
//   EXEC   carry out the instruction in the IR, write back, retire
// The unit is a Moore-style sequencer plus a decoder that turns the state
// and the IR (and F, for jt/jf) into the control word ctrl for the
// datapath; ctrl.retire marks the last cycle of every instruction. The
// decision whether ldx/stx follows is taken from instr during FETCH.
// Opcodes without a meaning execute as two-cycle no-operations.
// Synchronous active-high reset to FETCH with a cleared IR.
// The cycle counts (2, and 4 for ldx/stx) and the IR are the processor's;
// how the two extra ldx/stx cycles are used and all encodings are this
// design's choices.
module tx_cu
  import tx_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic [IW-1:0] instr,
  input  logic          flag,
  output logic [IW-1:0] ir,
  output cu_state_e     state,
  output ctrl_t         ctrl
);

  cu_state_e state_n;
  opcode_e   op;
  logic [3:0] xop;
  logic      instr_idx;

  assign op  = opcode_e'(ir[15:12]);
  assign xop = ir[11:8];

  // ldx/stx seen on the program bus during FETCH
  assign instr_idx = (instr[15:12] == OP_MISC) &&
                     ((instr[11:8] == MX_LDX) || (instr[11:8] == MX_STX));

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ST_FETCH;
      ir    <= '0;
    end else begin
      state <= state_n;
      if (ctrl.ir_we) ir <= instr;
    end
  end

  always_comb begin
    unique case (state)
      ST_FETCH: state_n = instr_idx ? ST_IDX1 : ST_EXEC;
      ST_IDX1:  state_n = ST_IDX2;
      ST_IDX2:  state_n = ST_EXEC;
      default:  state_n = ST_FETCH;
    endcase
  end

  function automatic alu_op_e alu_of_xop(input logic [3:0] x);
    unique case (x)
      AX_ADD:  return ALU_ADD;
      AX_SUB:  return ALU_SUB;
      AX_AND:  return ALU_AND;
      AX_OR:   return ALU_OR;
      AX_XOR:  return ALU_XOR;
      default: return ALU_PASSL;
    endcase
  endfunction

  always_comb begin
    ctrl         = '0;
    ctrl.alu_op  = ALU_PASSL;
    ctrl.wb_sel  = WB_ALU;
    ctrl.cmp     = CX_EQ;
    ctrl.pc_sel  = PC_HOLD;
    ctrl.dar_sel = DA_HOLD;
    unique case (state)
      ST_FETCH: begin
        ctrl.ir_we   = 1'b1;
        ctrl.pc_sel  = PC_INC;
        ctrl.dar_sel = DA_ADS;
      end
      ST_IDX1: ctrl.ea_we = 1'b1;
      ST_IDX2: ctrl.dar_sel = DA_IDX;
      default: begin  // ST_EXEC
        ctrl.retire = 1'b1;
        unique case (op)
          OP_LDA: begin
            ctrl.reg_we = 1'b1;
            ctrl.wb_sel = WB_MEM;
          end
          OP_STA:  ctrl.mem_we = 1'b1;
          OP_JMP:  ctrl.pc_sel = PC_ADS;
          OP_JT:   if (flag)  ctrl.pc_sel = PC_ADS;
          OP_JF:   if (!flag) ctrl.pc_sel = PC_ADS;
          OP_CALL: begin
            ctrl.ret_we = 1'b1;
            ctrl.pc_sel = PC_ADS;
          end
          OP_RALU, OP_IALU: begin
            ctrl.use_imm = (op == OP_IALU);
            ctrl.alu_op  = alu_of_xop(xop);
            ctrl.reg_we  = (xop <= 4'(AX_XOR));
          end
          OP_RCMP, OP_ICMP: begin
            ctrl.use_imm = (op == OP_ICMP);
            ctrl.alu_op  = ALU_SUB;
            ctrl.cmp     = cmp_xop_e'(xop);
            ctrl.flag_we = (xop <= 4'(CX_GE));
          end
          OP_LCA: begin
            ctrl.use_imm = 1'b1;
            ctrl.alu_op  = ALU_PASSR;
            ctrl.reg_we  = 1'b1;
          end
          OP_MISC: begin
            unique case (xop)
              MX_RET: ctrl.pc_sel = PC_RET;
              MX_LDX: begin
                ctrl.reg_we = 1'b1;
                ctrl.wb_sel = WB_MEM;
              end
              MX_STX: ctrl.mem_we = 1'b1;
              MX_MOV: begin
                ctrl.reg_we = 1'b1;
                ctrl.wa_r2  = 1'b1;
              end
              MX_MVA: begin
                ctrl.alu_op = ALU_PASSR;
                ctrl.reg_we = 1'b1;
              end
              MX_NOT: begin
                ctrl.alu_op = ALU_NOT;
                ctrl.reg_we = 1'b1;
              end
              MX_CLR: begin
                ctrl.alu_op = ALU_ZERO;
                ctrl.reg_we = 1'b1;
                ctrl.wa_r2  = 1'b1;
              end
              default: ;
            endcase
          end
          default: ;
        endcase
      end
    endcase
  end

  // memory writes and register writes only happen in the execute cycle
  a_we_exec: assert property (@(posedge clk) disable iff (rst)
    (ctrl.mem_we || ctrl.reg_we) |-> state == ST_EXEC);

endmodule
