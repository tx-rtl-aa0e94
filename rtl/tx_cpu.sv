// tx_cpu: the TX processor core, without its memories.
//
// An 8-bit accumulator machine: every ALU instruction has the form
// AC = AC op R, where R is a register R[r2] or the 8-bit immediate d of the
// instruction (the REG/INT mux), and the ALU result goes back to the
// accumulator (R15 of the register bank). Compares set the one-bit flag F
// instead, which jt and jf test. The R/M mux chooses what the register bank
// writes: the ALU result or the word read from data memory. Data memory
// writes always store the accumulator, passed through the ALU bypass.
// Program and data memory are separate (Harvard); both use 12-bit
// addresses, from the PC and from the D-AR register.
// Timing: two cycles per instruction (fetch, execute), four for ldx/stx;
// retire pulses in the last cycle of each instruction. Synchronous
// active-high reset: PC = 0, registers, F and D-AR cleared.
// The structure follows the processor's architecture diagram; the port
// list and the debug outputs are this design's.
module tx_cpu
  import tx_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  // program memory
  output logic [AW-1:0] pmem_addr,
  input  logic [IW-1:0] pmem_rdata,
  // data memory
  output logic [AW-1:0] dmem_addr,
  output logic          dmem_we,
  output logic [DW-1:0] dmem_wdata,
  input  logic [DW-1:0] dmem_rdata,
  // status
  output logic [AW-1:0] pc,
  output logic [DW-1:0] acc,
  output logic          flag,
  output logic [IW-1:0] ir,
  output cu_state_e     state,
  output logic          retire
);

  ctrl_t         ctrl;
  logic [DW-1:0] r_data, bp, ds, right, alu_y, wb_data;
  logic [3:0]    w_addr;
  logic          alu_f;

  tx_cu u_cu (
    .clk, .rst, .instr(pmem_rdata), .flag, .ir, .state, .ctrl
  );

  // REG/INT mux
  assign right = ctrl.use_imm ? ir[7:0] : r_data;

  tx_alu u_alu (
    .left(acc), .right, .op(ctrl.alu_op), .cmp(ctrl.cmp), .y(alu_y), .f(alu_f)
  );

  // R/M mux and write address
  assign wb_data = (ctrl.wb_sel == WB_MEM) ? dmem_rdata : alu_y;
  assign w_addr  = ctrl.wa_r2 ? ir[3:0] : REG_ACC;

  tx_regbank u_rb (
    .clk, .rst, .we(ctrl.reg_we), .w_addr, .w_data(wb_data),
    .r_addr(ir[3:0]), .r_data, .acc, .bp, .ds
  );

  tx_dar u_dar (
    .clk, .rst, .sel(ctrl.dar_sel), .ea_we(ctrl.ea_we),
    .ads(pmem_rdata[AW-1:0]), .bp, .r_bus(r_data), .ds, .dar(dmem_addr)
  );

  tx_par u_par (
    .clk, .rst, .sel(ctrl.pc_sel), .ret_we(ctrl.ret_we),
    .ads(ir[AW-1:0]), .pc, .retads()
  );

  // flag F
  always_ff @(posedge clk) begin
    if (rst)               flag <= 1'b0;
    else if (ctrl.flag_we) flag <= alu_f;
  end

  assign pmem_addr  = pc;
  assign dmem_we    = ctrl.mem_we;
  assign dmem_wdata = alu_y;
  assign retire     = ctrl.retire;

endmodule
