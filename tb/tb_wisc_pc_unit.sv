// tb_wisc_pc_unit: self-checking test of wisc_pc_unit.
// Each cycle a random next-PC kind, branch condition, immediate and Rs value
// are applied; the test computes the expected next PC, EPC and taken flag
// from the ISA rules and checks them after the clock edge. Rs values are
// biased towards 0, 0x7fff, 0x8000 and 0xffff so each branch condition is
// both met and missed. HALT must freeze the PC at the instruction after it;
// a reset then restarts at 0.
module tb_wisc_pc_unit;
  import wisc_pkg::*;

  logic     clk = 0, rst_n = 0;
  npc_sel_e npc_sel;
  br_cond_e br_cond;
  word_t    imm, rs_val, pc, pc_plus2, epc;
  logic     halted, taken;
  int checks = 0, failures = 0;
  int n_taken = 0, n_not_taken = 0, n_halt = 0;

  wisc_pc_unit dut (.clk(clk), .rst_n(rst_n), .npc_sel(npc_sel), .br_cond(br_cond),
    .imm(imm), .rs_val(rs_val), .pc(pc), .pc_plus2(pc_plus2), .epc(epc),
    .halted(halted), .taken(taken));

  always #5 clk = ~clk;

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h (sel=%s)", what, got, exp, npc_sel.name());
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t exp_pc, exp_epc, cur_pc, cur_epc;
    logic  cond, exp_taken;
    npc_sel = NPC_SEQ; br_cond = BR_EQZ; imm = 0; rs_val = 0;
    for (int run = 0; run < 20; run++) begin
      rst_n = 0;
      @(negedge clk);
      rst_n = 1;
      #1;
      expect_eq(pc, 0, "reset PC");
      expect_eq(epc, 0, "reset EPC");
      expect_eq(halted, 0, "reset halted");
      for (int t = 0; t < 500; t++) begin
        int k;
        k = $urandom_range(0, 99);
        // HALT rarely, so runs are long
        npc_sel = (k == 0) ? NPC_HALT : npc_sel_e'($urandom_range(0, 5));
        br_cond = br_cond_e'($urandom);
        imm     = word_t'($signed(8'($urandom)));
        case ($urandom_range(0, 5))
          0: rs_val = 16'h0000;
          1: rs_val = 16'h7fff;
          2: rs_val = 16'h8000;
          3: rs_val = 16'hffff;
          default: rs_val = word_t'($urandom);
        endcase
        cur_pc  = pc;
        cur_epc = epc;
        case (br_cond)
          BR_EQZ: cond = (rs_val == 0);
          BR_NEZ: cond = (rs_val != 0);
          BR_LTZ: cond = ($signed(rs_val) < 0);
          default: cond = ($signed(rs_val) >= 0);
        endcase
        exp_epc   = cur_epc;
        exp_taken = 1'b1;
        case (npc_sel)
          NPC_BRANCH: begin
            exp_pc = cond ? cur_pc + 2 + imm : cur_pc + 2;
            exp_taken = cond;
            if (cond) n_taken++; else n_not_taken++;
          end
          NPC_JUMP: exp_pc = cur_pc + 2 + imm;
          NPC_JREG: exp_pc = rs_val + imm;
          NPC_EXC: begin exp_pc = 16'h0002; exp_epc = cur_pc + 2; end
          NPC_RTI: exp_pc = cur_epc;
          default: begin exp_pc = cur_pc + 2; exp_taken = 1'b0; end
        endcase
        #1;
        expect_eq(pc_plus2, word_t'(cur_pc + 16'd2), "pc_plus2");
        expect_eq(taken, exp_taken, "taken");
        @(negedge clk);
        expect_eq(pc, exp_pc, "next PC");
        expect_eq(epc, exp_epc, "EPC");
        if (npc_sel == NPC_HALT) begin
          n_halt++;
          expect_eq(halted, 1, "halted");
          npc_sel = NPC_JUMP;
          repeat (3) @(negedge clk);
          expect_eq(pc, exp_pc, "PC frozen after HALT");
          break;
        end
      end
    end
    checks++;
    if (n_taken == 0 || n_not_taken == 0 || n_halt == 0) begin
      failures++;
      $display("FAIL coverage taken=%0d not_taken=%0d halt=%0d", n_taken, n_not_taken, n_halt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
