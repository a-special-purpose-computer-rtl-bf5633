// sparc_pkg: types and constants shared by the SPARC Arabic-text processor.
//
// The machine is a 16-bit, PDP-11-like computer with sixteen registers
// (R15 = program counter, R14 = stack pointer), four addressing modes and
// extra instructions that work on the fields of a 14-bit Arabic character
// code: character code in bits 13..7, shape code in bits 6..5 and vowel
// code in bits 4..0.
//
// Instruction formats (bit 15 is the most significant bit). The field
// layout of the two-operand format and the PUTS/PUTV format follows the
// description of the machine; the opcode values are this design's own.
//   two operand  : [15:12] op (1..14) [11:10] src mode [9:6] src reg
//                  [5:4] dst mode [3:0] dst reg
//   branch       : [15:12] = 4'hF, [11:8] condition, [7:0] signed word offset
//   group 0      : [15:12] = 4'h0, [11:9] group
//       misc     : group 0, [8:4] function, [3:0] register or flag mask
//       PUTS     : group 1, [8:4] immediate, [3:0] register
//       PUTV     : group 2, [8:4] immediate, [3:0] register
//       one-op A : group 3, [8:6] function, [5:4] mode, [3:0] register
//       one-op B : group 4, [8:6] function, [5:4] mode, [3:0] register
//       I/O      : group 6, [8:6] function, [5:4] mode, [3:0] register
// Addressing modes: 0 Rn, 1 @Rn, 2 (Rn)+, 3 -(Rn); autoincrement and
// autodecrement step by 2 (byte addresses, word accesses).
package sparc_pkg;

  typedef logic [15:0] word_t;

  // Fields of the 14-bit Arabic character code.
  localparam int unsigned CHR_HI = 13;
  localparam int unsigned CHR_LO = 7;
  localparam int unsigned SHC_HI = 6;
  localparam int unsigned SHC_LO = 5;
  localparam int unsigned VOW_HI = 4;
  localparam int unsigned VOW_LO = 0;

  // Shape codes (S1 S2).
  typedef enum logic [1:0] {
    SHAPE_ISOLATED = 2'b00,
    SHAPE_RIGHT    = 2'b01,
    SHAPE_LEFT     = 2'b10,
    SHAPE_BOTH     = 2'b11
  } shape_e;

  // Condition codes.
  typedef struct packed {
    logic n;
    logic z;
    logic v;
    logic c;
  } flags_t;

  // Register numbers with a fixed role.
  localparam logic [3:0] REG_SP = 4'd14;
  localparam logic [3:0] REG_PC = 4'd15;

  // Addressing modes.
  typedef enum logic [1:0] {
    AM_REG     = 2'b00,
    AM_INDIR   = 2'b01,
    AM_AUTOINC = 2'b10,
    AM_AUTODEC = 2'b11
  } amode_e;

  // Two-operand opcodes, instruction bits [15:12].
  typedef enum logic [3:0] {
    OP_GRP0 = 4'h0,
    OP_MOV  = 4'h1,
    OP_CMP  = 4'h2,
    OP_BIT  = 4'h3,
    OP_BIC  = 4'h4,
    OP_BIS  = 4'h5,
    OP_ADD  = 4'h6,
    OP_SUB  = 4'h7,
    OP_XOR  = 4'h8,
    OP_ADDC = 4'h9,
    OP_SUBC = 4'hA,
    OP_MOVS = 4'hB,
    OP_MOVV = 4'hC,
    OP_CMPS = 4'hD,
    OP_CMPV = 4'hE,
    OP_BR   = 4'hF
  } op_e;

  // Groups of opcode 0, instruction bits [11:9].
  typedef enum logic [2:0] {
    G_MISC = 3'd0,
    G_PUTS = 3'd1,
    G_PUTV = 3'd2,
    G_ONEA = 3'd3,
    G_ONEB = 3'd4,
    G_RSV5 = 3'd5,
    G_IO   = 3'd6,
    G_RSV7 = 3'd7
  } grp_e;

  // Miscellaneous functions, instruction bits [8:4].
  typedef enum logic [4:0] {
    M_HALT  = 5'd0,
    M_NOP   = 5'd1,
    M_RTI   = 5'd2,
    M_RTS   = 5'd3,
    M_CLCC  = 5'd4,   // clear the flags selected by [3:0] = {N,Z,V,C}
    M_SECC  = 5'd5,   // set the flags selected by [3:0]
    M_EI    = 5'd6,   // enable interrupts
    M_DI    = 5'd7,   // disable interrupts
    M_MTMSR = 5'd8    // interrupt mask register <- R[3:0]
  } misc_e;

  // One-operand functions, group A and group B, instruction bits [8:6].
  typedef enum logic [2:0] {
    A_CLR = 3'd0, A_COM = 3'd1, A_INC = 3'd2, A_DEC = 3'd3,
    A_NEG = 3'd4, A_TST = 3'd5, A_ADC = 3'd6, A_SBC = 3'd7
  } onea_e;
  typedef enum logic [2:0] {
    B_LSR = 3'd0, B_ASR = 3'd1, B_ASL = 3'd2, B_ROR = 3'd3,
    B_ROL = 3'd4, B_SWAB = 3'd5, B_JMP = 3'd6, B_CALL = 3'd7
  } oneb_e;

  // I/O functions, instruction bits [8:6].
  typedef enum logic [2:0] {
    IO_OUTW = 3'd0, IO_OUTB = 3'd1, IO_OUTC = 3'd2, IO_RSV3 = 3'd3,
    IO_INW  = 3'd4, IO_INB  = 3'd5, IO_INS  = 3'd6, IO_RSV7 = 3'd7
  } io_e;

  // Branch conditions, instruction bits [11:8].
  typedef enum logic [3:0] {
    BC_BR  = 4'h0, BC_BNE = 4'h1, BC_BEQ = 4'h2, BC_BGE = 4'h3,
    BC_BLT = 4'h4, BC_BGT = 4'h5, BC_BLE = 4'h6, BC_BPL = 4'h7,
    BC_BMI = 4'h8, BC_BHI = 4'h9, BC_BLOS = 4'hA, BC_BVC = 4'hB,
    BC_BVS = 4'hC, BC_BCC = 4'hD, BC_BCS = 4'hE, BC_NEVER = 4'hF
  } bcond_e;

  // Operations of the 16-bit ALU. a is the destination operand, b the source.
  typedef enum logic [4:0] {
    ALU_PASSB, ALU_CMP,  ALU_AND,  ALU_BIC,  ALU_OR,   ALU_ADD,
    ALU_SUB,   ALU_XOR,  ALU_ADDC, ALU_SUBC, ALU_CLR,  ALU_COM,
    ALU_INC,   ALU_DEC,  ALU_NEG,  ALU_TST,  ALU_ADC,  ALU_SBC,
    ALU_LSR,   ALU_ASR,  ALU_ASL,  ALU_ROR,  ALU_ROL,  ALU_SWAB
  } alu_op_e;

  // Operations of the character field unit.
  typedef enum logic [2:0] {
    CH_MOVS, CH_MOVV, CH_CMPS, CH_CMPV, CH_PUTS, CH_PUTV
  } chr_op_e;

  // DMA commands on the command bus: [15:13] = DMA_SEL, [12:11] register,
  // [10:0] payload.
  localparam logic [2:0] DMA_SEL = 3'b111;
  typedef enum logic [1:0] {
    DMA_ADDR_LO = 2'd0,  // address[7:0]  <- payload[7:0]
    DMA_ADDR_HI = 2'd1,  // address[15:8] <- payload[7:0]
    DMA_COUNT   = 2'd2,  // word count    <- payload[10:0]
    DMA_START   = 2'd3   // start; payload[0] = 1 device to memory, 0 memory to device
  } dma_reg_e;

  // Condition evaluation for the conditional branches.
  function automatic logic branch_taken(input logic [3:0] cond, input flags_t f);
    unique case (cond)
      BC_BR:    return 1'b1;
      BC_BNE:   return !f.z;
      BC_BEQ:   return f.z;
      BC_BGE:   return !(f.n ^ f.v);
      BC_BLT:   return f.n ^ f.v;
      BC_BGT:   return !(f.z | (f.n ^ f.v));
      BC_BLE:   return f.z | (f.n ^ f.v);
      BC_BPL:   return !f.n;
      BC_BMI:   return f.n;
      BC_BHI:   return !(f.c | f.z);
      BC_BLOS:  return f.c | f.z;
      BC_BVC:   return !f.v;
      BC_BVS:   return f.v;
      BC_BCC:   return !f.c;
      BC_BCS:   return f.c;
      default:  return 1'b0;
    endcase
  endfunction

endpackage
