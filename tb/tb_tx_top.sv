// tb_tx_top: end-to-end test of the TX processor with its memories at the
// default sizes (2048 x 16 program, 2048 x 8 data).
//
// Program 1 sums a 10-element byte array with an indexed loop (ldx through
// BP, compare, conditional jump). Array data is random; the expected sum
// and the exact cycle count (2 cycles per instruction, 4 per ldx: 234
// cycles from reset to the exit) are worked out here.
// Program 2 exercises the remaining mechanisms: stx/ldx with a non-zero
// data segment and a carry out of BP + R, lda/sta at the top of memory,
// call/ret, jt and jf both taken and not taken, every compare, wrap-around
// in the subtractor and "not".
// In both programs every retired instruction is compared with the
// instruction-level reference model (PC, accumulator, F, cycle count), the
// final memory contents are read back through the host port, and the test
// counts how often each mechanism occurred; one that never did is a
// failure.
module tb_tx_top;
  import tx_pkg::*;
  import tx_tb_pkg::*;

  logic clk = 0, rst;
  logic prog_we, host_we, flag, retire;
  logic [11:0] prog_addr, host_addr, pc;
  logic [15:0] prog_data;
  logic [7:0] host_wdata, host_rdata, acc;

  tx_top dut (.clk, .rst, .prog_we, .prog_addr, .prog_data, .host_we, .host_addr,
              .host_wdata, .host_rdata, .pc, .acc, .flag, .retire);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_two = 0, n_four = 0, n_call = 0, n_ret = 0, n_jt_t = 0, n_jt_n = 0;
  int n_jf_t = 0, n_jf_n = 0, n_ds = 0, n_idx_carry = 0, n_wr = 0, n_f1 = 0, n_f0 = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h exp %0h", what, got, exp);
    end
  endtask

  tx_iss iss;
  logic [15:0] prog [$];

  task automatic load(int base);
    rst = 1;
    foreach (prog[i]) begin
      prog_we = 1; prog_addr = 12'(base + i); prog_data = prog[i];
      iss.pmem[base + i] = prog[i];
      @(posedge clk); #1;
    end
    prog_we = 0;
  endtask

  task automatic host_write(int a, logic [7:0] d);
    host_we = 1; host_addr = 12'(a); host_wdata = d;
    iss.dmem[a & 2047] = d;
    @(posedge clk); #1 host_we = 0;
  endtask

  // run until the PC reaches stop_pc after a retire; returns cycles used
  task automatic run(int stop_pc, int max_instr, output int total);
    int cyc, ecyc;
    logic last;
    logic [15:0] w;
    logic [11:0] ea;
    iss.reset();
    total = 0;
    @(posedge clk); #1 rst = 0;
    for (int n = 0; n < max_instr; n++) begin
      w = iss.pmem[iss.pc];
      ea = iss.idx_addr(w[3:0]);
      cyc = 0;
      do begin
        last = retire;
        @(posedge clk); #1;
        cyc++;
      end while (!last);
      // classify from the model state before the step
      if (w[15:12] == 4'h3) begin if (iss.f) n_jt_t++; else n_jt_n++; end
      if (w[15:12] == 4'h4) begin if (!iss.f) n_jf_t++; else n_jf_n++; end
      if (w[15:12] == 4'hA && (w[11:8] == 1 || w[11:8] == 2)) begin
        if (iss.r[13] != 0) n_ds++;
        if (int'(iss.r[11]) + int'(iss.r[w[3:0]]) > 255) n_idx_carry++;
      end
      ecyc = iss.step();
      total += cyc;
      check("cycles", cyc, ecyc);
      if (cyc == 2) n_two++;
      if (cyc == 4) n_four++;
      n_call += iss.was_call; n_ret += iss.was_ret; n_wr += iss.wrote_mem;
      if (w[15:12] == 4'h8 || w[15:12] == 4'h9) begin if (iss.f) n_f1++; else n_f0++; end
      check("pc", int'(pc), int'(iss.pc));
      check("acc", int'(acc), int'(iss.r[15]));
      check("F", int'(flag), int'(iss.f));
      if (int'(pc) == stop_pc) break;
    end
  endtask

  initial begin
    int total, sum;
    logic [7:0] ax [10];
    iss = new(2048, 2048);
    rst = 1; prog_we = 0; host_we = 0; prog_addr = 0; prog_data = 0;
    host_addr = 0; host_wdata = 0;

    // ---- program 1: array sum ----
    prog = '{
      clr(1),      // 0  index
      clr(2),      // 1  sum
      lca(8'h40),  // 2  base address of ax
      mov(11),     // 3  BP
      lca(10),     // 4  loop: array size
      gt(1),       // 5  F = 10 > index
      jf(14),      // 6  exit when index reaches 10
      ldx(1),      // 7  ac = ax[index]
      add(2),      // 8
      mov(2),      // 9  sum
      mva(1),      // 10
      addi(1),     // 11 index + 1
      mov(1),      // 12
      jmp(4),      // 13
      jmp(14)      // 14 exit
    };
    load(0);
    sum = 0;
    for (int i = 0; i < 10; i++) begin
      ax[i] = 8'($urandom);
      host_write(8'h40 + i, ax[i]);
      sum += ax[i];
    end
    run(14, 200, total);
    check("sum in R2", int'(dut.u_cpu.u_rb.regs[2]), sum & 255);
    check("index in R1", int'(dut.u_cpu.u_rb.regs[1]), 10);
    check("program 1 cycles", total, 234);
    $display("array sum %0d, %0d cycles", sum & 255, total);

    // ---- program 2: remaining mechanisms ----
    prog = '{
      lca(8'h30),  // 0
      mov(13),     // 1  DS = 0x30 -> segment base 0x300
      lca(8'hF0),  // 2
      mov(11),     // 3  BP = 0xF0
      lca(8'h20),  // 4
      mov(3),      // 5  BP + R3 = 0x110
      lca(8'hA5),  // 6
      stx(3),      // 7  M[0x410] = 0xA5
      lca(0),      // 8
      ldx(3),      // 9  ac = 0xA5
      sta(12'h7FF),// 10
      call(20),    // 11
      eqi(8'h5A),  // 12 F = 1
      jt(15),      // 13 taken
      jmp(14),     // 14 trap
      lti(8'h10),  // 15 F = 0
      jt(14),      // 16 not taken
      jf(19),      // 17 taken
      jmp(18),     // 18 trap
      jmp(30),     // 19
      not_(),      // 20 subroutine: ac = 0x5A
      ret(),       // 21
      0, 0, 0, 0, 0, 0, 0, 0, // 22-29
      clr(3),      // 30
      mva(3),      // 31 ac = 0
      subi(1),     // 32 ac = 0xFF
      gei(8'hFF),  // 33 F = 1
      jf(18),      // 34 not taken
      eq(3),       // 35 F = 0 (0xFF vs 0)
      lt(3),       // 36 F = 0
      le(11),      // 37 F = 0 (0xFF <= 0xF0)
      ge(11),      // 38 F = 1
      xor_(11),    // 39 ac = 0x0F
      ori(8'h30),  // 40 ac = 0x3F
      andi(8'hF3), // 41 ac = 0x33
      sub(11),     // 42 ac = 0x33 - 0xF0 = 0x43
      and_(13),    // 43 ac = 0x43 & 0x30 = 0x00
      or_(11),     // 44 ac = 0xF0
      xori(8'hFF), // 45 ac = 0x0F
      lda(12'h7FF),// 46 ac = 0xA5
      lei(8'hA5),  // 47 F = 1
      gti(8'hA4),  // 48 F = 1
      jmp(49)      // 49 done
    };
    load(0);
    run(49, 200, total);
    check("ac", int'(acc), 8'hA5);
    check("F", int'(flag), 1);
    host_addr = 12'h410; #1 check("M[0x410]", int'(host_rdata), 8'hA5);
    host_addr = 12'h7FF; #1 check("M[0x7FF]", int'(host_rdata), 8'hA5);

    $display("2-cycle=%0d 4-cycle=%0d call=%0d ret=%0d jt taken/not=%0d/%0d jf taken/not=%0d/%0d",
             n_two, n_four, n_call, n_ret, n_jt_t, n_jt_n, n_jf_t, n_jf_n);
    $display("DS-relative=%0d BP+R carry=%0d mem writes=%0d compare true/false=%0d/%0d",
             n_ds, n_idx_carry, n_wr, n_f1, n_f0);
    check("2-cycle seen", int'(n_two > 0), 1);
    check("4-cycle seen", int'(n_four > 0), 1);
    check("call seen", int'(n_call > 0), 1);
    check("ret seen", int'(n_ret > 0), 1);
    check("jt taken seen", int'(n_jt_t > 0), 1);
    check("jt not taken seen", int'(n_jt_n > 0), 1);
    check("jf taken seen", int'(n_jf_t > 0), 1);
    check("jf not taken seen", int'(n_jf_n > 0), 1);
    check("DS offset seen", int'(n_ds > 0), 1);
    check("index carry seen", int'(n_idx_carry > 0), 1);
    check("memory write seen", int'(n_wr > 0), 1);
    check("compare true seen", int'(n_f1 > 0), 1);
    check("compare false seen", int'(n_f0 > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
