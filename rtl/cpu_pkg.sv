// cpu_pkg: types and constants shared by the blocks of the event-driven
// 8-bit processor.
//
// The processor has an 8-bit opcode ("256 instruction set"), 8-bit data,
// a 10-bit program address and a 32-entry register bank. Every instruction
// runs through the same four clock phases (fetch, read B, read A, write),
// which is what the phase enum names. The opcode layout is:
//
//   00 0 nnnnn   MOV R0,Rn    R0 <- Rn
//   00 1 nnnnn   MOV Rn,R0    Rn <- R0
//   01 sss nnn   ALU          R0 <- R0 (op sss) Rn, loads C and Z
//   10 kkk ccc   control      JMP/CALL on condition ccc, RET, RETI, EI, DI, NOP
//   11 0 aaaaa   LDA a        R0 <- program memory word a
//   11 1 nnnnn   CMP R0,Rn    loads EQ, GT, LT
//
// MOV R0,R2 = 8'b0000_0010 and LDA 01H = 8'b1100_0001 follow the source
// document's waveforms; the rest of the layout is this design's own.
// Jump and call targets are {R3[1:0], R2}.
package cpu_pkg;

  localparam int unsigned DW = 8;   // data width
  localparam int unsigned AW = 10;  // program address width
  localparam int unsigned RW = 5;   // register bank address width

  // ALU select codes (the ALU's sel input)
  typedef enum logic [2:0] {
    ALU_ADD  = 3'b000,  // x + y + cin
    ALU_INC  = 3'b001,  // y + 1
    ALU_SUB  = 3'b010,  // x - y - cin
    ALU_DEC  = 3'b011,  // y - 1
    ALU_AND  = 3'b100,
    ALU_OR   = 3'b101,
    ALU_NOT  = 3'b110,  // ~y
    ALU_XOR  = 3'b111
  } alu_op_e;

  // Instruction classes, opcode bits [7:6]
  typedef enum logic [1:0] {
    CLS_MOV = 2'b00,
    CLS_ALU = 2'b01,
    CLS_CTL = 2'b10,
    CLS_MEM = 2'b11   // LDA (bit 5 = 0) or CMP (bit 5 = 1)
  } op_class_e;

  // Control functions, opcode bits [5:3] of class CLS_CTL
  typedef enum logic [2:0] {
    CTL_JMP  = 3'b000,
    CTL_CALL = 3'b001,
    CTL_RET  = 3'b010,
    CTL_RETI = 3'b011,
    CTL_EI   = 3'b100,
    CTL_DI   = 3'b101,
    CTL_NOP  = 3'b110,
    CTL_NOP2 = 3'b111
  } ctl_fn_e;

  // Jump/call conditions, opcode bits [2:0] of JMP and CALL
  typedef enum logic [2:0] {
    CC_AL = 3'b000,  // always
    CC_Z  = 3'b001,
    CC_NZ = 3'b010,
    CC_C  = 3'b011,
    CC_NC = 3'b100,
    CC_EQ = 3'b101,
    CC_GT = 3'b110,
    CC_LT = 3'b111
  } cond_e;

  // Flag register bit positions (fin)
  localparam int unsigned F_C  = 0;
  localparam int unsigned F_Z  = 1;
  localparam int unsigned F_EQ = 2;
  localparam int unsigned F_GT = 3;
  localparam int unsigned F_LT = 4;
  localparam int unsigned F_IE = 5;
  localparam int unsigned F_IP = 6;

  // Phases of one instruction cycle
  typedef enum logic [1:0] {
    PH_FETCH = 2'd0,  // pmr: opcode read at the PC
    PH_RDB   = 2'd1,  // dmr (or pmr for LDA): second operand / jump target low
    PH_RDA   = 2'd2,  // dmr: R0 / jump target high
    PH_WR    = 2'd3   // dmw, flag loads, PC step
  } phase_e;

  // Target registers of JMP and CALL
  localparam logic [RW-1:0] R_TGT_LO = 5'd2;
  localparam logic [RW-1:0] R_TGT_HI = 5'd3;

endpackage
