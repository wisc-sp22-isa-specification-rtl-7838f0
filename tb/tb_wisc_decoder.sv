// tb_wisc_decoder: self-checking test of wisc_decoder.
// For every one of the 32 opcodes and every R-format extension, random
// instruction words are decoded and compared field by field with an
// expectation table written from the ISA: which register is written (none,
// [4:2], [7:5], [10:8] or R7), how the immediate is extended, the ALU
// operation, the write-back source, load/store, and the next-PC kind.
module tb_wisc_decoder;
  import wisc_pkg::*;

  word_t instr;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  wisc_decoder dut (.instr(instr), .ctrl(ctrl));

  // write-register kinds and immediate kinds of the expectation table
  typedef enum {W_NONE, W_42, W_75, W_108, W_R7} wr_e;
  typedef enum {I_NONE, I_5S, I_5Z, I_8S, I_8Z, I_11S} im_e;

  typedef struct {
    wr_e      wr;
    im_e      im;
    alu_op_e  alu;
    wb_sel_e  wb;
    logic     st;
    logic     ld;
    npc_sel_e npc;
  } exp_t;

  function automatic exp_t expect_for(logic [4:0] op, logic [1:0] ext);
    exp_t e;
    e = '{W_NONE, I_NONE, ALU_ADD, WB_ALU, 1'b0, 1'b0, NPC_SEQ};
    case (op)
      5'b00000: e.npc = NPC_HALT;
      5'b00001: ;
      5'b00010: e.npc = NPC_EXC;
      5'b00011: e.npc = NPC_RTI;
      5'b00100: begin e.im = I_11S; e.npc = NPC_JUMP; end
      5'b00110: begin e.im = I_11S; e.npc = NPC_JUMP; e.wr = W_R7; e.wb = WB_PC2; end
      5'b00101: begin e.im = I_8S; e.npc = NPC_JREG; end
      5'b00111: begin e.im = I_8S; e.npc = NPC_JREG; e.wr = W_R7; e.wb = WB_PC2; end
      5'b01000: begin e.im = I_5S; e.wr = W_75; e.alu = ALU_ADD; end
      5'b01001: begin e.im = I_5S; e.wr = W_75; e.alu = ALU_RSUB; end
      5'b01010: begin e.im = I_5Z; e.wr = W_75; e.alu = ALU_XOR; end
      5'b01011: begin e.im = I_5Z; e.wr = W_75; e.alu = ALU_ANDN; end
      5'b01100, 5'b01101, 5'b01110, 5'b01111: begin e.im = I_8S; e.npc = NPC_BRANCH; end
      5'b10000: begin e.im = I_5S; e.st = 1; end
      5'b10001: begin e.im = I_5S; e.ld = 1; e.wr = W_75; e.wb = WB_MEM; end
      5'b10010: begin e.im = I_8Z; e.wr = W_108; e.alu = ALU_SLBI; end
      5'b10011: begin e.im = I_5S; e.st = 1; e.wr = W_108; end
      5'b10100, 5'b10101, 5'b10110, 5'b10111: begin e.im = I_5Z; e.wr = W_75; e.alu = ALU_SHIFT; end
      5'b11000: begin e.im = I_8S; e.wr = W_108; e.alu = ALU_PASSB; end
      5'b11001: begin e.wr = W_42; e.alu = ALU_BTR; end
      5'b11010: begin e.wr = W_42; e.alu = ALU_SHIFT; end
      5'b11011: begin
        e.wr = W_42;
        e.alu = (ext == 0) ? ALU_ADD : (ext == 1) ? ALU_RSUB : (ext == 2) ? ALU_XOR : ALU_ANDN;
      end
      5'b11100: begin e.wr = W_42; e.alu = ALU_SEQ; end
      5'b11101: begin e.wr = W_42; e.alu = ALU_SLT; end
      5'b11110: begin e.wr = W_42; e.alu = ALU_SLE; end
      default:  begin e.wr = W_42; e.alu = ALU_SCO; end
    endcase
    return e;
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL instr=%h: %s", instr, what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 32; op++) begin
      for (int t = 0; t < 64; t++) begin
        exp_t  e;
        int    exp_imm;
        instr = {5'(op), 11'($urandom)};
        #1;
        e = expect_for(5'(op), instr[1:0]);
        // register addresses of the read ports are fixed fields
        check(ctrl.rs == instr[10:8], "rs field");
        check(ctrl.rt == instr[7:5], "rt field");
        // write enable and destination
        check(ctrl.rf_we == (e.wr != W_NONE), "rf_we");
        case (e.wr)
          W_42:  check(ctrl.rd == instr[4:2], "rd [4:2]");
          W_75:  check(ctrl.rd == instr[7:5], "rd [7:5]");
          W_108: check(ctrl.rd == instr[10:8], "rd [10:8]");
          W_R7:  check(ctrl.rd == 3'd7, "rd R7");
          default: ;
        endcase
        // immediate and operand-B selection
        case (e.im)
          I_5S:  exp_imm = $signed(instr[4:0]);
          I_5Z:  exp_imm = int'(instr[4:0]);
          I_8S:  exp_imm = $signed(instr[7:0]);
          I_8Z:  exp_imm = int'(instr[7:0]);
          I_11S: exp_imm = $signed(instr[10:0]);
          default: exp_imm = 0;
        endcase
        if (e.im != I_NONE) check(ctrl.imm == word_t'(exp_imm), "immediate");
        if (e.wr != W_NONE && e.wb == WB_ALU || e.st)
          check(ctrl.b_imm == (e.im != I_NONE), "operand B select");
        if (e.wr != W_NONE && e.wb == WB_ALU || e.st)
          check(ctrl.alu_op == e.alu, "alu op");
        if (e.alu == ALU_SHIFT)
          check(ctrl.shift == ((op == 5'b11010) ? shift_e'(instr[1:0]) : shift_e'(op[1:0])),
                "shift kind");
        if (e.wr != W_NONE) check(ctrl.wb_sel == e.wb, "write-back source");
        check(ctrl.mem_we == e.st, "mem_we");
        check(ctrl.mem_re == e.ld, "mem_re");
        check(ctrl.npc_sel == e.npc, "next-PC kind");
        if (e.npc == NPC_BRANCH) check(ctrl.br_cond == br_cond_e'(op[1:0]), "branch condition");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
