// tb_tx_cu: presents each of the 34 instructions to the control unit (with
// F = 0 and F = 1), counts the cycles from fetch to retire (2, or 4 for
// ldx/stx) and checks the control word of the execute cycle against a
// table of expected effects written from the instruction set. The program
// bus is scrambled after the fetch cycle, so the decode must come from IR.
module tb_tx_cu;
  import tx_pkg::*;
  import tx_tb_pkg::*;
  logic clk = 0, rst, flag;
  logic [15:0] instr, ir;
  cu_state_e state;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  tx_cu dut (.clk, .rst, .instr, .flag, .ir, .state, .ctrl);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  // expected effects of one instruction
  typedef struct {
    string       name;
    logic [15:0] w;
    int cycles, reg_we, wa_r2, wb_mem, mem_we, flag_we, ret_we, use_imm;
    int pc_sel;  // for F = 0; jt/jf handled below
    int alu_op;  // -1: don't care
  } exp_t;

  exp_t t[$];

  function automatic exp_t e(string n, logic [15:0] w, int cyc, int rwe, int war2, int wbm,
                             int mwe, int fwe, int rtwe, int imm, int pcs, int aop);
    exp_t x;
    x.name = n; x.w = w; x.cycles = cyc; x.reg_we = rwe; x.wa_r2 = war2; x.wb_mem = wbm;
    x.mem_we = mwe; x.flag_we = fwe; x.ret_we = rtwe; x.use_imm = imm; x.pc_sel = pcs;
    x.alu_op = aop;
    return x;
  endfunction

  initial begin
    //            name   word        cyc rwe wa2 wbm mwe fwe rtw imm pcs alu
    t.push_back(e("lda",  lda(12'h123), 2, 1, 0, 1, 0, 0, 0, 0, 0, -1));
    t.push_back(e("sta",  sta(12'h456), 2, 0, 0, 0, 1, 0, 0, 0, 0, ALU_PASSL));
    t.push_back(e("jmp",  jmp(12'h789), 2, 0, 0, 0, 0, 0, 0, 0, 2, -1));
    t.push_back(e("jt",   jt(12'h0AB),  2, 0, 0, 0, 0, 0, 0, 0, -2, -1));
    t.push_back(e("jf",   jf(12'h0CD),  2, 0, 0, 0, 0, 0, 0, 0, -3, -1));
    t.push_back(e("call", call(12'hEF0),2, 0, 0, 0, 0, 0, 1, 0, 2, -1));
    t.push_back(e("ret",  ret(),        2, 0, 0, 0, 0, 0, 0, 0, 3, -1));
    t.push_back(e("lca",  lca(8'h5A),   2, 1, 0, 0, 0, 0, 0, 1, 0, ALU_PASSR));
    t.push_back(e("ldx",  ldx(3),       4, 1, 0, 1, 0, 0, 0, 0, 0, -1));
    t.push_back(e("stx",  stx(4),       4, 0, 0, 0, 1, 0, 0, 0, 0, ALU_PASSL));
    t.push_back(e("add",  add(1),       2, 1, 0, 0, 0, 0, 0, 0, 0, ALU_ADD));
    t.push_back(e("sub",  sub(2),       2, 1, 0, 0, 0, 0, 0, 0, 0, ALU_SUB));
    t.push_back(e("and",  and_(3),      2, 1, 0, 0, 0, 0, 0, 0, 0, ALU_AND));
    t.push_back(e("or",   or_(4),       2, 1, 0, 0, 0, 0, 0, 0, 0, ALU_OR));
    t.push_back(e("xor",  xor_(5),      2, 1, 0, 0, 0, 0, 0, 0, 0, ALU_XOR));
    t.push_back(e("addi", addi(1),      2, 1, 0, 0, 0, 0, 0, 1, 0, ALU_ADD));
    t.push_back(e("subi", subi(2),      2, 1, 0, 0, 0, 0, 0, 1, 0, ALU_SUB));
    t.push_back(e("andi", andi(3),      2, 1, 0, 0, 0, 0, 0, 1, 0, ALU_AND));
    t.push_back(e("ori",  ori(4),       2, 1, 0, 0, 0, 0, 0, 1, 0, ALU_OR));
    t.push_back(e("xori", xori(5),      2, 1, 0, 0, 0, 0, 0, 1, 0, ALU_XOR));
    t.push_back(e("eq",   eq(6),        2, 0, 0, 0, 0, 1, 0, 0, 0, ALU_SUB));
    t.push_back(e("lt",   lt(6),        2, 0, 0, 0, 0, 1, 0, 0, 0, ALU_SUB));
    t.push_back(e("le",   le(6),        2, 0, 0, 0, 0, 1, 0, 0, 0, ALU_SUB));
    t.push_back(e("gt",   gt(6),        2, 0, 0, 0, 0, 1, 0, 0, 0, ALU_SUB));
    t.push_back(e("ge",   ge(6),        2, 0, 0, 0, 0, 1, 0, 0, 0, ALU_SUB));
    t.push_back(e("eqi",  eqi(7),       2, 0, 0, 0, 0, 1, 0, 1, 0, ALU_SUB));
    t.push_back(e("lti",  lti(7),       2, 0, 0, 0, 0, 1, 0, 1, 0, ALU_SUB));
    t.push_back(e("lei",  lei(7),       2, 0, 0, 0, 0, 1, 0, 1, 0, ALU_SUB));
    t.push_back(e("gti",  gti(7),       2, 0, 0, 0, 0, 1, 0, 1, 0, ALU_SUB));
    t.push_back(e("gei",  gei(7),       2, 0, 0, 0, 0, 1, 0, 1, 0, ALU_SUB));
    t.push_back(e("mov",  mov(9),       2, 1, 1, 0, 0, 0, 0, 0, 0, ALU_PASSL));
    t.push_back(e("mva",  mva(9),       2, 1, 0, 0, 0, 0, 0, 0, 0, ALU_PASSR));
    t.push_back(e("not",  not_(),       2, 1, 0, 0, 0, 0, 0, 0, 0, ALU_NOT));
    t.push_back(e("clr",  clr(9),       2, 1, 1, 0, 0, 0, 0, 0, 0, ALU_ZERO));

    rst = 1; flag = 0; instr = '0;
    @(posedge clk); #1 rst = 0;
    for (int fl = 0; fl < 2; fl++)
      foreach (t[i]) begin
        int cyc, pcs;
        flag = fl[0];
        instr = t[i].w;
        #1;
        check({t[i].name, " fetch state"}, int'(state), int'(ST_FETCH));
        check({t[i].name, " fetch ir_we"}, int'(ctrl.ir_we), 1);
        check({t[i].name, " fetch pc_sel"}, int'(ctrl.pc_sel), int'(PC_INC));
        cyc = 1;
        @(posedge clk); #1;
        instr = 16'($urandom);
        while (!ctrl.retire && cyc < 10) begin
          check({t[i].name, " no write before execute"},
                int'(ctrl.reg_we | ctrl.mem_we | ctrl.flag_we), 0);
          @(posedge clk); #1;
          cyc++;
        end
        cyc++;
        check({t[i].name, " ir"}, int'(ir), int'(t[i].w));
        check({t[i].name, " cycles"}, cyc, t[i].cycles);
        check({t[i].name, " reg_we"}, int'(ctrl.reg_we), t[i].reg_we);
        if (t[i].reg_we) begin
          check({t[i].name, " wa_r2"}, int'(ctrl.wa_r2), t[i].wa_r2);
          check({t[i].name, " wb_sel"}, int'(ctrl.wb_sel), t[i].wb_mem);
        end
        check({t[i].name, " mem_we"}, int'(ctrl.mem_we), t[i].mem_we);
        check({t[i].name, " flag_we"}, int'(ctrl.flag_we), t[i].flag_we);
        check({t[i].name, " ret_we"}, int'(ctrl.ret_we), t[i].ret_we);
        if (t[i].reg_we || t[i].mem_we || t[i].flag_we)
          check({t[i].name, " use_imm"}, int'(ctrl.use_imm), t[i].use_imm);
        pcs = t[i].pc_sel;
        if (pcs == -2) pcs = fl ? 2 : 0;   // jt taken when F = 1
        if (pcs == -3) pcs = fl ? 0 : 2;   // jf taken when F = 0
        check({t[i].name, " pc_sel"}, int'(ctrl.pc_sel), pcs);
        if (t[i].alu_op >= 0 && (t[i].reg_we || t[i].mem_we || t[i].flag_we))
          check({t[i].name, " alu_op"}, int'(ctrl.alu_op), t[i].alu_op);
        if (t[i].flag_we)
          check({t[i].name, " cmp"}, int'(ctrl.cmp), int'(t[i].w[11:8]));
        @(posedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
