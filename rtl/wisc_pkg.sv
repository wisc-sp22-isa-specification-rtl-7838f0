// wisc_pkg: types and constants shared by the WISC-SP22 processor.
//
// WISC-SP22 is a 16-bit load/store ISA with eight general-purpose registers,
// 16-bit instructions and byte addresses (the PC advances by 2). Every
// instruction starts with a 5-bit opcode; the R-format ALU and shift groups
// add a 2-bit extension in bits [1:0]. The opcode values, the field positions
// of the four formats and the meaning of every operation below are those of
// the ISA. The control word (ctrl_t) and the enumerations that encode the ALU
// operation, write-back source and next-PC kind are this design's own.
package wisc_pkg;

  localparam int unsigned XLEN = 16;          // data and address width
  localparam int unsigned NREGS = 8;          // R0..R7
  localparam logic [2:0]  LINK_REG = 3'd7;    // JAL / JALR write R7
  localparam logic [15:0] EXC_VECTOR = 16'h0002;  // SIIC handler address
  localparam logic [15:0] RESET_PC = 16'h0000;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [2:0]      reg_addr_t;

  // 5-bit primary opcodes, bits [15:11] of every instruction.
  typedef enum logic [4:0] {
    OP_HALT  = 5'b00000,
    OP_NOP   = 5'b00001,
    OP_SIIC  = 5'b00010,
    OP_RTI   = 5'b00011,
    OP_J     = 5'b00100,
    OP_JR    = 5'b00101,
    OP_JAL   = 5'b00110,
    OP_JALR  = 5'b00111,
    OP_ADDI  = 5'b01000,
    OP_SUBI  = 5'b01001,
    OP_XORI  = 5'b01010,
    OP_ANDNI = 5'b01011,
    OP_BEQZ  = 5'b01100,
    OP_BNEZ  = 5'b01101,
    OP_BLTZ  = 5'b01110,
    OP_BGEZ  = 5'b01111,
    OP_ST    = 5'b10000,
    OP_LD    = 5'b10001,
    OP_SLBI  = 5'b10010,
    OP_STU   = 5'b10011,
    OP_ROLI  = 5'b10100,
    OP_SLLI  = 5'b10101,
    OP_RORI  = 5'b10110,
    OP_SRLI  = 5'b10111,
    OP_LBI   = 5'b11000,
    OP_BTR   = 5'b11001,
    OP_SHR   = 5'b11010,   // ROL/SLL/ROR/SRL, selected by bits [1:0]
    OP_ALUR  = 5'b11011,   // ADD/SUB/XOR/ANDN, selected by bits [1:0]
    OP_SEQ   = 5'b11100,
    OP_SLT   = 5'b11101,
    OP_SLE   = 5'b11110,
    OP_SCO   = 5'b11111
  } opcode_e;

  // Shift kinds; the encoding equals the R-format extension of OP_SHR and
  // the low two opcode bits of the immediate shifts (ROLI..SRLI).
  typedef enum logic [1:0] {
    SH_ROL = 2'b00,
    SH_SLL = 2'b01,
    SH_ROR = 2'b10,
    SH_SRL = 2'b11
  } shift_e;

  // Operations of the ALU. Operand A is always Rs; operand B is Rt or the
  // extended immediate.
  typedef enum logic [3:0] {
    ALU_ADD   = 4'd0,   // A + B
    ALU_RSUB  = 4'd1,   // B - A  (SUB and SUBI subtract Rs)
    ALU_XOR   = 4'd2,   // A ^ B
    ALU_ANDN  = 4'd3,   // A & ~B
    ALU_SHIFT = 4'd4,   // shifter, kind in ctrl_t.shift
    ALU_SEQ   = 4'd5,   // A == B
    ALU_SLT   = 4'd6,   // A <  B, two's complement
    ALU_SLE   = 4'd7,   // A <= B, two's complement
    ALU_SCO   = 4'd8,   // carry out of A + B
    ALU_BTR   = 4'd9,   // bit reverse of A
    ALU_PASSB = 4'd10,  // B            (LBI)
    ALU_SLBI  = 4'd11   // (A << 8) | B (SLBI)
  } alu_op_e;

  // Which value is written back to the register file.
  typedef enum logic [1:0] {
    WB_ALU = 2'd0,
    WB_MEM = 2'd1,
    WB_PC2 = 2'd2      // link value PC + 2
  } wb_sel_e;

  // How the next PC is formed.
  typedef enum logic [2:0] {
    NPC_SEQ    = 3'd0, // PC + 2
    NPC_BRANCH = 3'd1, // PC + 2 + imm if the branch condition holds
    NPC_JUMP   = 3'd2, // PC + 2 + imm            (J, JAL)
    NPC_JREG   = 3'd3, // Rs + imm                (JR, JALR)
    NPC_EXC    = 3'd4, // EXC_VECTOR, EPC <- PC+2 (SIIC)
    NPC_RTI    = 3'd5, // EPC                     (RTI)
    NPC_HALT   = 3'd6  // PC + 2, then stop issuing
  } npc_sel_e;

  // Branch conditions tested on Rs.
  typedef enum logic [1:0] {
    BR_EQZ = 2'b00,
    BR_NEZ = 2'b01,
    BR_LTZ = 2'b10,
    BR_GEZ = 2'b11
  } br_cond_e;

  // Control word produced by the decoder for one instruction.
  typedef struct packed {
    reg_addr_t rs;        // read port A
    reg_addr_t rt;        // read port B (Rt, or Rd as store data)
    reg_addr_t rd;        // write address
    logic      rf_we;     // register write enable
    word_t     imm;       // extended immediate
    logic      b_imm;     // ALU operand B is imm (else port B)
    alu_op_e   alu_op;
    shift_e    shift;
    wb_sel_e   wb_sel;
    logic      mem_we;    // store
    logic      mem_re;    // load
    npc_sel_e  npc_sel;
    br_cond_e  br_cond;
  } ctrl_t;

endpackage
