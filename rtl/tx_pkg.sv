// tx_pkg: types and constants shared by the TX processor.
//
// TX is an 8-bit, non-pipelined accumulator processor with a 16-bit
// instruction word and 12-bit program and data addresses. Instructions come
// in three formats, each with a 4-bit major opcode in bits 15:12:
//   L  op[15:12] ads[11:0]
//   R  op[15:12] xop[11:8] r1[7:4] r2[3:0]
//   I  op[15:12] xop[11:8] d[7:0]
// The formats and the 34 instructions follow the processor's definition.
// The numeric values of the opcodes and extended opcodes, the assignment of
// the special registers to R11-R15 and the ALU operation codes are this
// design's own choices; the assembler that goes with the RTL must use the
// same values.
package tx_pkg;

  localparam int unsigned DW = 8;   // data path width
  localparam int unsigned AW = 12;  // program and data address width
  localparam int unsigned IW = 16;  // instruction width

  // Major opcodes, instruction bits 15:12.
  typedef enum logic [3:0] {
    OP_LDA  = 4'h0,  // L: ac = M[ads]
    OP_STA  = 4'h1,  // L: M[ads] = ac
    OP_JMP  = 4'h2,  // L: PC = ads
    OP_JT   = 4'h3,  // L: if F != 0 PC = ads
    OP_JF   = 4'h4,  // L: if F == 0 PC = ads
    OP_CALL = 4'h5,  // L: save return address, PC = ads
    OP_RALU = 4'h6,  // R: ac = ac op R[r2]      (xop: alu_xop_e)
    OP_IALU = 4'h7,  // I: ac = ac op d          (xop: alu_xop_e)
    OP_RCMP = 4'h8,  // R: F = ac cmp R[r2]      (xop: cmp_xop_e)
    OP_ICMP = 4'h9,  // I: F = ac cmp d          (xop: cmp_xop_e)
    OP_MISC = 4'hA,  // R: ret ldx stx mov mva not clr (xop: misc_xop_e)
    OP_LCA  = 4'hB   // I: ac = d
  } opcode_e;

  // Extended opcodes of OP_RALU / OP_IALU.
  typedef enum logic [3:0] {
    AX_ADD = 4'h0,
    AX_SUB = 4'h1,
    AX_AND = 4'h2,
    AX_OR  = 4'h3,
    AX_XOR = 4'h4
  } alu_xop_e;

  // Extended opcodes of OP_RCMP / OP_ICMP.
  typedef enum logic [3:0] {
    CX_EQ = 4'h0,
    CX_LT = 4'h1,
    CX_LE = 4'h2,
    CX_GT = 4'h3,
    CX_GE = 4'h4
  } cmp_xop_e;

  // Extended opcodes of OP_MISC.
  typedef enum logic [3:0] {
    MX_RET = 4'h0,
    MX_LDX = 4'h1,
    MX_STX = 4'h2,
    MX_MOV = 4'h3,
    MX_MVA = 4'h4,
    MX_NOT = 4'h5,
    MX_CLR = 4'h6
  } misc_xop_e;

  // ALU operations (MUX ALU select plus the unit's own function code).
  typedef enum logic [3:0] {
    ALU_ADD   = 4'h0,  // ADD/SUB unit: left + right
    ALU_SUB   = 4'h1,  // ADD/SUB unit: left - right
    ALU_AND   = 4'h2,  // logic block
    ALU_OR    = 4'h3,
    ALU_XOR   = 4'h4,
    ALU_NOT   = 4'h5,  // ~left
    ALU_PASSR = 4'h6,  // right operand unchanged
    ALU_ZERO  = 4'h7,  // constant 0
    ALU_PASSL = 4'h8,  // rotation/bypass unit: left unchanged
    ALU_ROL   = 4'h9,  // rotate left by one
    ALU_ROR   = 4'hA   // rotate right by one
  } alu_op_e;

  // Logic block function codes.
  typedef enum logic [2:0] {
    LG_AND, LG_OR, LG_XOR, LG_NOT, LG_PASSB, LG_ZERO
  } logic_fn_e;

  // Rotation/bypass function codes.
  typedef enum logic [1:0] {
    RT_PASS, RT_ROL, RT_ROR
  } rot_fn_e;

  // Special purpose registers among R11-R15.
  localparam logic [3:0] REG_BP  = 4'd11;  // base pointer for ldx/stx
  localparam logic [3:0] REG_SP  = 4'd12;  // SP, no hardware role here
  localparam logic [3:0] REG_DS  = 4'd13;  // data segment for ldx/stx
  localparam logic [3:0] REG_CS  = 4'd14;  // CS, no hardware role here
  localparam logic [3:0] REG_ACC = 4'd15;  // accumulator

  // Control unit cycles.
  typedef enum logic [1:0] {
    ST_FETCH = 2'd0,  // IR <= PGM[PC], PC <= PC + 1
    ST_IDX1  = 2'd1,  // ldx/stx: BP + R[r2]
    ST_IDX2  = 2'd2,  // ldx/stx: D-AR <= DS*16 + (BP + R[r2])
    ST_EXEC  = 2'd3   // execute and write back
  } cu_state_e;

  // Register bank write source (R/M mux).
  typedef enum logic {
    WB_ALU = 1'b0,
    WB_MEM = 1'b1
  } wb_sel_e;

  // Program counter load source (PAMux0-2).
  typedef enum logic [1:0] {
    PC_HOLD = 2'd0,
    PC_INC  = 2'd1,
    PC_ADS  = 2'd2,
    PC_RET  = 2'd3
  } pc_sel_e;

  // D-AR load source (DAMux1).
  typedef enum logic [1:0] {
    DA_HOLD = 2'd0,
    DA_ADS  = 2'd1,   // 12 bits of the instruction word
    DA_IDX  = 2'd2    // indexed address from the two adders
  } dar_sel_e;

  // Control word from the control unit to the datapath.
  typedef struct packed {
    alu_op_e   alu_op;
    logic      use_imm;    // REG/INT mux: 1 selects d from the IR
    logic      reg_we;     // register bank write enable
    logic      wa_r2;      // write address: 1 = r2, 0 = accumulator
    wb_sel_e   wb_sel;
    logic      mem_we;     // data memory write
    logic      flag_we;    // F <= compare result
    cmp_xop_e  cmp;
    pc_sel_e   pc_sel;
    logic      ret_we;     // save return address
    dar_sel_e  dar_sel;
    logic      ea_we;      // latch BP + R[r2]
    logic      ir_we;      // load instruction register
    logic      retire;     // last cycle of an instruction
  } ctrl_t;

endpackage
