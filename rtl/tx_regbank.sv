// tx_regbank: the 16 x 8-bit register bank of TX.
//
// R0-R10 are general purpose; R11-R15 are special: R11 = BP (base pointer
// of ldx/stx), R12 = SP, R13 = DS (data segment of ldx/stx), R14 = CS and
// R15 = the accumulator. The bank has one write port and several read taps:
// r_data = R[r_addr] feeds the REG/INT mux and the index adder, and the
// accumulator, BP and DS are always visible on their own outputs. Writes
// take effect at the rising clock edge; reads are combinational. A
// synchronous active-high reset clears every register.
// Sixteen 8-bit registers, R0-R10 general, R11-R15 special, and the
// accumulator, BP and R[] outputs follow the processor's description; which
// special register has which number, the DS tap and the reset are this
// design's choices.
module tx_regbank
  import tx_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic [3:0]    w_addr,
  input  logic [DW-1:0] w_data,
  input  logic [3:0]    r_addr,
  output logic [DW-1:0] r_data,
  output logic [DW-1:0] acc,
  output logic [DW-1:0] bp,
  output logic [DW-1:0] ds
);

  logic [DW-1:0] regs [16];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 16; i++) regs[i] <= '0;
    end else if (we) begin
      regs[w_addr] <= w_data;
    end
  end

  assign r_data = regs[r_addr];
  assign acc    = regs[REG_ACC];
  assign bp     = regs[REG_BP];
  assign ds     = regs[REG_DS];

endmodule
