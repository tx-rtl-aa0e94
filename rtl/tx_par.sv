// tx_par: program address cluster of TX (12-bit PC, incrementer, PAMux).
//
// The program counter addresses the program memory. sel picks its next
// value: hold, PC + 1 from the incrementer (every fetch), the 12-bit address
// field of the instruction (jmp, taken jt/jf, call) or the saved return
// address (ret). With ret_we = 1 the current PC, which already points past
// the call, is saved as the return address; there is one such register, so
// calls do not nest. Synchronous active-high reset to address 0.
// The incrementer, the address-field input and the chain of muxes in front
// of the PC follow the program counter diagram, which also shows CS and a
// register output entering the first mux; as no listed instruction loads
// the PC from registers, this design keeps a dedicated return-address
// register on that input instead.
module tx_par
  import tx_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  pc_sel_e       sel,
  input  logic          ret_we,
  input  logic [AW-1:0] ads,
  output logic [AW-1:0] pc,
  output logic [AW-1:0] retads
);

  logic [AW-1:0] pc_inc, mux0, mux1, mux2;

  assign pc_inc = pc + AW'(1);
  assign mux0   = retads;                          // PAMux0
  assign mux1   = (sel == PC_ADS) ? ads : mux0;    // PAMux1
  assign mux2   = (sel == PC_INC) ? pc_inc : mux1; // PAMux2

  always_ff @(posedge clk) begin
    if (rst) begin
      pc     <= '0;
      retads <= '0;
    end else begin
      if (ret_we) retads <= pc;
      if (sel != PC_HOLD) pc <= mux2;
    end
  end

endmodule
