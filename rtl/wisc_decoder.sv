// wisc_decoder: instruction decoder of the WISC-SP22 processor.
//
// Turns one 16-bit instruction into the control word wisc_pkg::ctrl_t.
// Field positions follow the four formats of the ISA:
//   J-format        [15:11] opcode, [10:0] displacement (sign-extended)
//   I-format 1      [15:11] opcode, [10:8] Rs, [7:5] Rd, [4:0] immediate
//   I-format 2      [15:11] opcode, [10:8] Rs, [7:0] immediate
//   R-format        [15:11] opcode, [10:8] Rs, [7:5] Rt, [4:2] Rd, [1:0] ext
// Read port A always gets bits [10:8] and read port B always bits [7:5], so a
// store reads its data register (the I-format 1 "Rd") through port B. The
// write address is chosen per format: [4:2] for R-format, [7:5] for
// I-format 1, [10:8] for LBI/SLBI and STU's base update, R7 for JAL/JALR.
// Immediates: arithmetic and memory instructions sign-extend, logical and
// shift instructions zero-extend (only the low four bits of a shift amount
// matter), SLBI zero-extends its 8 bits, branches, LBI, JR and JALR
// sign-extend 8 bits, J and JAL sign-extend 11 bits.
// HALT, NOP, SIIC and RTI write nothing; they only steer the next PC.
// The control word's encoding is this design's own.
//
// Interface: instr in, ctrl out. Purely combinational.
module wisc_decoder
  import wisc_pkg::*;
(
  input  word_t instr,
  output ctrl_t ctrl
);

  opcode_e    op;
  logic [1:0] ext;
  word_t      imm5_s, imm5_z, imm8_s, imm8_z, imm11_s;

  always_comb begin
    op      = opcode_e'(instr[15:11]);
    ext     = instr[1:0];
    imm5_s  = {{11{instr[4]}}, instr[4:0]};
    imm5_z  = {11'b0, instr[4:0]};
    imm8_s  = {{8{instr[7]}}, instr[7:0]};
    imm8_z  = {8'b0, instr[7:0]};
    imm11_s = {{5{instr[10]}}, instr[10:0]};

    ctrl         = '0;
    ctrl.rs      = instr[10:8];
    ctrl.rt      = instr[7:5];
    ctrl.rd      = instr[7:5];
    ctrl.alu_op  = ALU_ADD;
    ctrl.shift   = shift_e'(instr[12:11]);
    ctrl.wb_sel  = WB_ALU;
    ctrl.npc_sel = NPC_SEQ;
    ctrl.br_cond = br_cond_e'(instr[12:11]);

    unique case (op)
      OP_HALT: ctrl.npc_sel = NPC_HALT;
      OP_NOP:  ;
      OP_SIIC: ctrl.npc_sel = NPC_EXC;
      OP_RTI:  ctrl.npc_sel = NPC_RTI;
      OP_J: begin
        ctrl.imm     = imm11_s;
        ctrl.npc_sel = NPC_JUMP;
      end
      OP_JAL: begin
        ctrl.imm     = imm11_s;
        ctrl.npc_sel = NPC_JUMP;
        ctrl.rf_we   = 1'b1;
        ctrl.rd      = LINK_REG;
        ctrl.wb_sel  = WB_PC2;
      end
      OP_JR: begin
        ctrl.imm     = imm8_s;
        ctrl.npc_sel = NPC_JREG;
      end
      OP_JALR: begin
        ctrl.imm     = imm8_s;
        ctrl.npc_sel = NPC_JREG;
        ctrl.rf_we   = 1'b1;
        ctrl.rd      = LINK_REG;
        ctrl.wb_sel  = WB_PC2;
      end
      OP_ADDI, OP_SUBI: begin
        ctrl.imm    = imm5_s;
        ctrl.b_imm  = 1'b1;
        ctrl.alu_op = (op == OP_ADDI) ? ALU_ADD : ALU_RSUB;
        ctrl.rf_we  = 1'b1;
      end
      OP_XORI, OP_ANDNI: begin
        ctrl.imm    = imm5_z;
        ctrl.b_imm  = 1'b1;
        ctrl.alu_op = (op == OP_XORI) ? ALU_XOR : ALU_ANDN;
        ctrl.rf_we  = 1'b1;
      end
      OP_ROLI, OP_SLLI, OP_RORI, OP_SRLI: begin
        ctrl.imm    = imm5_z;
        ctrl.b_imm  = 1'b1;
        ctrl.alu_op = ALU_SHIFT;
        ctrl.rf_we  = 1'b1;
      end
      OP_BEQZ, OP_BNEZ, OP_BLTZ, OP_BGEZ: begin
        ctrl.imm     = imm8_s;
        ctrl.npc_sel = NPC_BRANCH;
      end
      OP_ST: begin
        ctrl.imm    = imm5_s;
        ctrl.b_imm  = 1'b1;
        ctrl.mem_we = 1'b1;
      end
      OP_STU: begin
        ctrl.imm    = imm5_s;
        ctrl.b_imm  = 1'b1;
        ctrl.mem_we = 1'b1;
        ctrl.rf_we  = 1'b1;
        ctrl.rd     = instr[10:8];
      end
      OP_LD: begin
        ctrl.imm    = imm5_s;
        ctrl.b_imm  = 1'b1;
        ctrl.mem_re = 1'b1;
        ctrl.rf_we  = 1'b1;
        ctrl.wb_sel = WB_MEM;
      end
      OP_LBI: begin
        ctrl.imm    = imm8_s;
        ctrl.b_imm  = 1'b1;
        ctrl.alu_op = ALU_PASSB;
        ctrl.rf_we  = 1'b1;
        ctrl.rd     = instr[10:8];
      end
      OP_SLBI: begin
        ctrl.imm    = imm8_z;
        ctrl.b_imm  = 1'b1;
        ctrl.alu_op = ALU_SLBI;
        ctrl.rf_we  = 1'b1;
        ctrl.rd     = instr[10:8];
      end
      OP_BTR: begin
        ctrl.alu_op = ALU_BTR;
        ctrl.rf_we  = 1'b1;
        ctrl.rd     = instr[4:2];
      end
      OP_SHR: begin
        ctrl.alu_op = ALU_SHIFT;
        ctrl.shift  = shift_e'(ext);
        ctrl.rf_we  = 1'b1;
        ctrl.rd     = instr[4:2];
      end
      OP_ALUR: begin
        unique case (ext)
          2'b00: ctrl.alu_op = ALU_ADD;
          2'b01: ctrl.alu_op = ALU_RSUB;
          2'b10: ctrl.alu_op = ALU_XOR;
          default: ctrl.alu_op = ALU_ANDN;
        endcase
        ctrl.rf_we = 1'b1;
        ctrl.rd    = instr[4:2];
      end
      OP_SEQ, OP_SLT, OP_SLE, OP_SCO: begin
        unique case (op)
          OP_SEQ:  ctrl.alu_op = ALU_SEQ;
          OP_SLT:  ctrl.alu_op = ALU_SLT;
          OP_SLE:  ctrl.alu_op = ALU_SLE;
          default: ctrl.alu_op = ALU_SCO;
        endcase
        ctrl.rf_we = 1'b1;
        ctrl.rd    = instr[4:2];
      end
      default: ;
    endcase
  end

endmodule
