// wisc_pc_unit: program counter, EPC and next-PC logic of WISC-SP22.
//
// Holds the PC and the exception PC (EPC) and picks the next PC for the
// instruction now executing:
//   sequential           PC + 2
//   BEQZ/BNEZ/BLTZ/BGEZ  PC + 2 + imm if the test on Rs holds, else PC + 2
//   J/JAL                PC + 2 + imm
//   JR/JALR              Rs + imm
//   SIIC                 the handler at 0x0002, with EPC <- PC + 2
//   RTI                  EPC
//   HALT                 PC + 2, and issue stops for good
// These rules are the ISA's. The PC is a byte address, so instructions are
// two bytes apart. pc_plus2 is also the link value for JAL/JALR. Reset
// (PC = 0, EPC = 0, not halted) and the halted flag as a register that
// freezes the PC are this design's choices.
//
// Interface: clk, rst_n; npc_sel, br_cond, imm, rs_val from the decoder
// and register file; pc, pc_plus2, epc, halted, taken (the instruction
// redirects the PC away from PC + 2) out. The next PC is loaded on the
// rising edge whenever the unit is not halted.
module wisc_pc_unit
  import wisc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  npc_sel_e npc_sel,
  input  br_cond_e br_cond,
  input  word_t    imm,
  input  word_t    rs_val,
  output word_t    pc,
  output word_t    pc_plus2,
  output word_t    epc,
  output logic     halted,
  output logic     taken
);

  word_t next_pc;
  logic  cond;

  always_comb begin
    pc_plus2 = pc + 16'd2;
    unique case (br_cond)
      BR_EQZ: cond = (rs_val == '0);
      BR_NEZ: cond = (rs_val != '0);
      BR_LTZ: cond = rs_val[XLEN-1];
      default: cond = !rs_val[XLEN-1];
    endcase

    taken = 1'b0;
    unique case (npc_sel)
      NPC_BRANCH: begin
        next_pc = cond ? pc_plus2 + imm : pc_plus2;
        taken   = cond;
      end
      NPC_JUMP: begin
        next_pc = pc_plus2 + imm;
        taken   = 1'b1;
      end
      NPC_JREG: begin
        next_pc = rs_val + imm;
        taken   = 1'b1;
      end
      NPC_EXC: begin
        next_pc = EXC_VECTOR;
        taken   = 1'b1;
      end
      NPC_RTI: begin
        next_pc = epc;
        taken   = 1'b1;
      end
      default: next_pc = pc_plus2;   // NPC_SEQ, NPC_HALT
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc     <= RESET_PC;
      epc    <= '0;
      halted <= 1'b0;
    end else if (!halted) begin
      pc <= next_pc;
      if (npc_sel == NPC_EXC)  epc    <= pc_plus2;
      if (npc_sel == NPC_HALT) halted <= 1'b1;
    end
  end

endmodule
