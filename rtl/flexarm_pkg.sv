// flexarm_pkg - types and constants shared by the FlexARM1 pipeline.
//
// The FlexARM1 executes a subset of the 32-bit ARM instruction set, so the
// opcode, condition and shift encodings below are the ARM ones. The decoded
// control word (ctrl_t) and the event strobes (stat_t) are this design's own
// layout: the ID stage fills a ctrl_t, which then travels down the pipeline.
package flexarm_pkg;

  // ARM data-processing opcodes, instruction bits 24:21.
  typedef enum logic [3:0] {
    OP_AND = 4'h0, OP_EOR = 4'h1, OP_SUB = 4'h2, OP_RSB = 4'h3,
    OP_ADD = 4'h4, OP_ADC = 4'h5, OP_SBC = 4'h6, OP_RSC = 4'h7,
    OP_TST = 4'h8, OP_TEQ = 4'h9, OP_CMP = 4'hA, OP_CMN = 4'hB,
    OP_ORR = 4'hC, OP_MOV = 4'hD, OP_BIC = 4'hE, OP_MVN = 4'hF
  } alu_op_e;

  // ARM condition field, instruction bits 31:28.
  typedef enum logic [3:0] {
    C_EQ = 4'h0, C_NE = 4'h1, C_CS = 4'h2, C_CC = 4'h3,
    C_MI = 4'h4, C_PL = 4'h5, C_VS = 4'h6, C_VC = 4'h7,
    C_HI = 4'h8, C_LS = 4'h9, C_GE = 4'hA, C_LT = 4'hB,
    C_GT = 4'hC, C_LE = 4'hD, C_AL = 4'hE, C_NV = 4'hF
  } cond_e;

  // ARM shift types, instruction bits 6:5.
  typedef enum logic [1:0] {
    SH_LSL = 2'd0, SH_LSR = 2'd1, SH_ASR = 2'd2, SH_ROR = 2'd3
  } shift_e;

  // Forwarding source of one EX operand.
  typedef enum logic [1:0] {
    FWD_RF  = 2'd0,   // value read from the register file in ID
    FWD_MEM = 2'd1,   // result held in EX/MEM
    FWD_WB  = 2'd2    // result held in MEM/WB
  } fwd_e;

  typedef struct packed {
    logic n, z, c, v;
  } flags_t;

  // Decoded control word. Operand A is always register rn; operand 2 is
  // either the immediate unit's constant or register rm through the barrel
  // shifter; rc is the shift-amount register (Rs) or the store data (Rd).
  typedef struct packed {
    logic       valid;      // a supported instruction (else a no-op)
    alu_op_e    alu_op;
    logic       set_flags;  // updates NZCV
    logic       reg_write;  // writes rd
    logic [3:0] rd;
    logic       use_rn, use_rm, use_rc;
    logic [3:0] rn, rm, rc;
    logic       op2_imm;    // operand 2 is the immediate
    logic       imm_dp;     // immediate is a rotated data-processing constant
    logic       shift_reg;  // shift amount comes from rc
    shift_e     shift_type;
    logic [4:0] shift_imm;
    logic       mem_read, mem_write, mem_byte;
    logic       branch, link;
  } ctrl_t;

  // One-cycle event strobes, brought out for observation and test.
  typedef struct packed {
    logic retire;       // an instruction passed its condition in EX
    logic cond_fail;    // an instruction was squashed by its condition
    logic stall;        // load-use stall
    logic flush;        // taken branch or write to R15
    logic fwd_mem;      // an operand was forwarded from EX/MEM
    logic fwd_wb;       // an operand was forwarded from MEM/WB
    logic shift_by_reg; // register-specified shift executed
    logic io_access;    // data access went to the I/O ports
  } stat_t;

  localparam logic [31:0] NOP_INSTR = 32'hE1A0_0000;  // MOV r0, r0

endpackage
