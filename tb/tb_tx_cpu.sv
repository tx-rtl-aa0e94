// tb_tx_cpu: runs random programs on the TX core and compares it, one
// instruction at a time, with the instruction-level reference model:
// after each retire the PC, all 16 registers and F must match, every data
// memory write must have the model's address and data, and the number of
// cycles per instruction must be 2 (4 for ldx/stx). Program and data
// memories are plain arrays in this testbench. Programs are re-drawn and
// the core reset every 1500 instructions.
module tb_tx_cpu;
  import tx_pkg::*;
  import tx_tb_pkg::*;

  localparam int DEPTH = 2048;

  logic clk = 0, rst;
  logic [11:0] pmem_addr, dmem_addr, pc;
  logic [15:0] pmem_rdata, ir;
  logic        dmem_we, flag, retire;
  logic [7:0]  dmem_wdata, dmem_rdata, acc;
  cu_state_e   state;

  logic [15:0] pm [DEPTH];
  logic [7:0]  dm [DEPTH];

  tx_cpu dut (.clk, .rst, .pmem_addr, .pmem_rdata, .dmem_addr, .dmem_we, .dmem_wdata,
              .dmem_rdata, .pc, .acc, .flag, .ir, .state, .retire);

  assign pmem_rdata = pm[pmem_addr[10:0]];
  assign dmem_rdata = dm[dmem_addr[10:0]];
  always_ff @(posedge clk) if (dmem_we) dm[dmem_addr[10:0]] <= dmem_wdata;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_idx = 0, n_taken = 0, n_call = 0, n_ret = 0, n_wr = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h exp %h (pc %h)", what, got, exp, pc);
    end
  endtask

  // one random instruction of the 34, jumps kept within the first 256 words
  function automatic logic [15:0] rand_instr();
    int k = $urandom_range(0, 33);
    int a = $urandom_range(0, 255);
    int ad = $urandom_range(0, 4095);
    int r2 = $urandom_range(0, 15);
    int d = $urandom_range(0, 255);
    case (k)
      0: return lda(ad);   1: return sta(ad);   2: return jmp(a);
      3: return jt(a);     4: return jf(a);     5: return call(a);
      6: return ret();     7: return lca(d);    8: return ldx(r2);
      9: return stx(r2);   10: return add(r2);  11: return sub(r2);
      12: return and_(r2); 13: return or_(r2);  14: return xor_(r2);
      15: return addi(d);  16: return subi(d);  17: return andi(d);
      18: return ori(d);   19: return xori(d);  20: return eq(r2);
      21: return lt(r2);   22: return le(r2);   23: return gt(r2);
      24: return ge(r2);   25: return eqi(d);   26: return lti(d);
      27: return lei(d);   28: return gti(d);   29: return gei(d);
      30: return mov(r2);  31: return mva(r2);  32: return not_();
      default: return clr(r2);
    endcase
  endfunction

  tx_iss iss;

  initial begin
    iss = new(DEPTH, DEPTH);
    for (int prog = 0; prog < 12; prog++) begin
      rst = 1;
      for (int i = 0; i < DEPTH; i++) begin
        pm[i] = rand_instr();
        dm[i] = 8'($urandom);
        iss.pmem[i] = pm[i];
        iss.dmem[i] = dm[i];
      end
      iss.reset();
      @(posedge clk); #1 rst = 0;
      for (int n = 0; n < 1500; n++) begin
        int cyc, ecyc;
        logic        saw_wr, last;
        logic [11:0] wa;
        logic [7:0]  wd;
        cyc = 0; saw_wr = 0;
        do begin
          last = retire;
          if (dmem_we) begin saw_wr = 1; wa = dmem_addr; wd = dmem_wdata; end
          @(posedge clk); #1;
          cyc++;
        end while (!last);
        ecyc = iss.step();
        check("cycles", cyc, ecyc);
        check("pc", int'(pc), int'(iss.pc));
        for (int r = 0; r < 16; r++) check($sformatf("R%0d", r), int'(dut.u_rb.regs[r]), int'(iss.r[r]));
        check("F", int'(flag), int'(iss.f));
        check("mem write", int'(saw_wr), int'(iss.wrote_mem));
        if (saw_wr && iss.wrote_mem) begin
          check("write addr", int'(wa[10:0]), int'(iss.wr_addr[10:0]));
          check("write data", int'(wd), int'(iss.wr_data));
          n_wr++;
        end
        n_idx += iss.was_idx; n_taken += iss.was_taken; n_call += iss.was_call; n_ret += iss.was_ret;
      end
    end
    $display("indexed=%0d taken=%0d call=%0d ret=%0d writes=%0d", n_idx, n_taken, n_call, n_ret, n_wr);
    check("mechanisms seen", int'(n_idx > 0 && n_taken > 0 && n_call > 0 && n_ret > 0 && n_wr > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
