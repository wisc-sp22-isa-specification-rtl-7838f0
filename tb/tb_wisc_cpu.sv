// tb_wisc_cpu: end-to-end test of the WISC-SP22 processor at its default size.
//
// A reference instruction-set model written in this testbench runs the same
// program in lockstep with the processor. Every cycle the processor's trace
// (PC, instruction, register write, store, redirect) is compared with what
// the model says the instruction at that PC must do; after HALT the whole
// data memory is read back through the dump port and compared with the
// model's, the PC must rest just after the HALT, and the cycle count must
// equal the number of instructions retired (one per clock).
//
// Programs: a directed program that uses every instruction, every branch
// condition both taken and not taken, SIIC with its handler at 0x0002 and
// RTI back, JAL/JALR links, STU, and hand-computed results written to
// memory; then random programs of arithmetic, logic, shift, set, load,
// store, LBI/SLBI, BTR, SIIC (to a handler that returns at once) and
// forward branch/jump instructions ending in HALT.
// Each mechanism is counted and one that never happened counts a failure.
module tb_wisc_cpu;
  import wisc_pkg::*;

  localparam int unsigned MEM_WORDS = 32768;  // the processor's default
  localparam int NUM_RANDOM = 40;
  localparam int RANDOM_LEN = 300;

  logic      clk = 0, rst_n = 0;
  logic      load_we = 0;
  word_t     load_addr = 0, load_data = 0, dump_addr = 0, dump_data;
  logic      halted;
  logic      trace_valid, trace_rf_we, trace_mem_we, trace_redirect;
  word_t     trace_pc, trace_instr, trace_rf_wdata, trace_mem_addr, trace_mem_wdata, trace_epc;
  reg_addr_t trace_rf_waddr;

  wisc_cpu dut (
    .clk(clk), .rst_n(rst_n),
    .load_we(load_we), .load_addr(load_addr), .load_data(load_data),
    .dump_addr(dump_addr), .dump_data(dump_data),
    .halted(halted),
    .trace_valid(trace_valid), .trace_pc(trace_pc), .trace_instr(trace_instr),
    .trace_rf_we(trace_rf_we), .trace_rf_waddr(trace_rf_waddr), .trace_rf_wdata(trace_rf_wdata),
    .trace_mem_we(trace_mem_we), .trace_mem_addr(trace_mem_addr),
    .trace_mem_wdata(trace_mem_wdata), .trace_redirect(trace_redirect), .trace_epc(trace_epc)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ encoders
  function automatic word_t enc_r(logic [4:0] op, int rs, int rt, int rd, logic [1:0] ext);
    return {op, 3'(rs), 3'(rt), 3'(rd), ext};
  endfunction
  function automatic word_t enc_i1(logic [4:0] op, int rd, int rs, int imm);
    return {op, 3'(rs), 3'(rd), 5'(imm)};
  endfunction
  function automatic word_t enc_i2(logic [4:0] op, int rs, int imm);
    return {op, 3'(rs), 8'(imm)};
  endfunction
  function automatic word_t enc_j(logic [4:0] op, int disp);
    return {op, 11'(disp)};
  endfunction

  // -------------------------------------------------- reference ISA model
  word_t m_reg [8];
  word_t m_imem [MEM_WORDS];
  word_t m_dmem [MEM_WORDS];
  word_t m_pc, m_epc;
  logic  m_halted;
  int    m_retired;

  // mechanism counters
  int c_op [32];
  int c_br_taken [4], c_br_not [4];
  int c_exc, c_rti, c_halt, c_link, c_stu, c_load, c_store, c_sco1, c_rot_wrap;

  typedef struct {
    logic      rf_we;
    reg_addr_t waddr;
    word_t     wdata;
    logic      mem_we;
    word_t     maddr;
    word_t     mdata;
    logic      redirect;
  } step_t;

  function automatic int widx(word_t a);
    return int'(a >> 1) % MEM_WORDS;
  endfunction

  // Execute one instruction in the model; return what it did.
  function automatic step_t model_step();
    step_t  s;
    word_t  ins, rs, rt, rdv, npc, pc2, i5s, i5z, i8s, i8z, i11s, ea;
    logic [4:0] op;
    int     a, b, d;
    int     sh;
    logic [31:0] w;
    s   = '{default: '0};
    ins = m_imem[widx(m_pc)];
    op  = ins[15:11];
    a   = ins[10:8];
    b   = ins[7:5];
    d   = ins[4:2];
    rs  = m_reg[a];
    rt  = m_reg[b];
    rdv = m_reg[b];
    pc2 = m_pc + 16'd2;
    npc = pc2;
    i5s = word_t'($signed(ins[4:0]));
    i5z = word_t'(ins[4:0]);
    i8s = word_t'($signed(ins[7:0]));
    i8z = word_t'(ins[7:0]);
    i11s = word_t'($signed(ins[10:0]));
    c_op[op]++;
    case (op)
      5'b00000: begin m_halted = 1; c_halt++; end
      5'b00001: ;
      5'b00010: begin m_epc = pc2; npc = 16'h0002; s.redirect = 1; c_exc++; end
      5'b00011: begin npc = m_epc; s.redirect = 1; c_rti++; end
      5'b00100: begin npc = pc2 + i11s; s.redirect = 1; end
      5'b00110: begin npc = pc2 + i11s; s.redirect = 1;
                      s.rf_we = 1; s.waddr = 7; s.wdata = pc2; c_link++; end
      5'b00101: begin npc = rs + i8s; s.redirect = 1; end
      5'b00111: begin npc = rs + i8s; s.redirect = 1;
                      s.rf_we = 1; s.waddr = 7; s.wdata = pc2; c_link++; end
      5'b01000: begin s.rf_we = 1; s.waddr = 3'(b); s.wdata = rs + i5s; end
      5'b01001: begin s.rf_we = 1; s.waddr = 3'(b); s.wdata = i5s - rs; end
      5'b01010: begin s.rf_we = 1; s.waddr = 3'(b); s.wdata = rs ^ i5z; end
      5'b01011: begin s.rf_we = 1; s.waddr = 3'(b); s.wdata = rs & ~i5z; end
      5'b01100, 5'b01101, 5'b01110, 5'b01111: begin
        logic c;
        case (op[1:0])
          2'd0: c = (rs == 0);
          2'd1: c = (rs != 0);
          2'd2: c = ($signed(rs) < 0);
          default: c = ($signed(rs) >= 0);
        endcase
        if (c) begin npc = pc2 + i8s; s.redirect = 1; c_br_taken[op[1:0]]++; end
        else c_br_not[op[1:0]]++;
      end
      5'b10000, 5'b10011: begin
        ea = rs + i5s;
        s.mem_we = 1; s.maddr = ea; s.mdata = rdv;
        c_store++;
        if (op == 5'b10011) begin s.rf_we = 1; s.waddr = 3'(a); s.wdata = ea; c_stu++; end
      end
      5'b10001: begin
        ea = rs + i5s;
        s.rf_we = 1; s.waddr = 3'(b); s.wdata = m_dmem[widx(ea)]; c_load++;
      end
      5'b10010: begin s.rf_we = 1; s.waddr = 3'(a); s.wdata = {rs[7:0], i8z[7:0]}; end
      5'b11000: begin s.rf_we = 1; s.waddr = 3'(a); s.wdata = i8s; end
      5'b11001: begin
        s.rf_we = 1; s.waddr = 3'(d);
        for (int i = 0; i < 16; i++) s.wdata[i] = rs[15 - i];
      end
      5'b10100, 5'b10101, 5'b10110, 5'b10111, 5'b11010: begin
        logic [1:0] k;
        k  = (op == 5'b11010) ? ins[1:0] : op[1:0];
        sh = (op == 5'b11010) ? int'(rt[3:0]) : int'(ins[3:0]);
        w  = {rs, rs};
        s.rf_we = 1;
        s.waddr = (op == 5'b11010) ? 3'(d) : 3'(b);
        case (k)
          2'd0: s.wdata = w[31 - sh -: 16];      // rotate left
          2'd1: s.wdata = rs << sh;
          2'd2: s.wdata = w[15 + sh -: 16];      // rotate right
          default: s.wdata = rs >> sh;
        endcase
        if ((k == 0 || k == 2) && sh != 0) c_rot_wrap++;
      end
      5'b11011: begin
        s.rf_we = 1; s.waddr = 3'(d);
        case (ins[1:0])
          2'd0: s.wdata = rs + rt;
          2'd1: s.wdata = rt - rs;
          2'd2: s.wdata = rs ^ rt;
          default: s.wdata = rs & ~rt;
        endcase
      end
      5'b11100: begin s.rf_we = 1; s.waddr = 3'(d); s.wdata = word_t'(rs == rt); end
      5'b11101: begin s.rf_we = 1; s.waddr = 3'(d); s.wdata = word_t'($signed(rs) < $signed(rt)); end
      5'b11110: begin s.rf_we = 1; s.waddr = 3'(d); s.wdata = word_t'($signed(rs) <= $signed(rt)); end
      default: begin
        s.rf_we = 1; s.waddr = 3'(d);
        s.wdata = word_t'((32'(rs) + 32'(rt)) >> 16);
        if (s.wdata == 1) c_sco1++;
      end
    endcase
    if (s.rf_we) m_reg[s.waddr] = s.wdata;
    if (s.mem_we) m_dmem[widx(s.maddr)] = s.mdata;
    m_pc = npc;
    m_retired++;
    return s;
  endfunction

  // ---------------------------------------------------------- utilities
  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  word_t prog [$];

  // Load prog into the processor (in reset) and into the model.
  task automatic load_program();
    rst_n = 0;
    for (int i = 0; i < MEM_WORDS; i++) begin
      m_imem[i] = (i < prog.size()) ? prog[i] : 16'h0000;
      m_dmem[i] = m_imem[i];
    end
    // clear what an earlier program left in both memories
    for (int i = 0; i < MEM_WORDS; i++) begin
      if (i < prog.size() || i < 2 * RANDOM_LEN + 64 || dut_dmem_dirty[i]) begin
        @(negedge clk);
        load_we   = 1;
        load_addr = word_t'(2 * i);
        load_data = m_imem[i];
      end
    end
    @(negedge clk);
    load_we = 0;
    for (int i = 0; i < 8; i++) m_reg[i] = '0;
    m_pc = 0; m_epc = 0; m_halted = 0; m_retired = 0;
  endtask

  bit dut_dmem_dirty [MEM_WORDS];

  // Run the loaded program to HALT in lockstep; return cycles used.
  task automatic run_program(string name, int max_cycles);
    step_t e;
    int cycles;
    cycles = 0;
    @(negedge clk);
    rst_n = 1;
    #1;
    while (!m_halted && cycles < max_cycles) begin
      check(trace_valid, {name, ": processor idle while the model runs"});
      check(trace_pc == m_pc, $sformatf("%s: PC %h, model %h", name, trace_pc, m_pc));
      e = model_step();
      check(trace_instr == m_imem[widx(trace_pc)], {name, ": fetched word"});
      check(trace_rf_we == e.rf_we, $sformatf("%s: rf_we at PC %h", name, trace_pc));
      if (e.rf_we) begin
        check(trace_rf_waddr == e.waddr, $sformatf("%s: write register at PC %h", name, trace_pc));
        check(trace_rf_wdata == e.wdata,
              $sformatf("%s: write data %h, model %h at PC %h (instr %h)", name,
                        trace_rf_wdata, e.wdata, trace_pc, trace_instr));
      end
      check(trace_mem_we == e.mem_we, $sformatf("%s: store at PC %h", name, trace_pc));
      if (e.mem_we) begin
        check(trace_mem_addr == e.maddr, $sformatf("%s: store address at PC %h", name, trace_pc));
        check(trace_mem_wdata == e.mdata, $sformatf("%s: store data at PC %h", name, trace_pc));
        dut_dmem_dirty[widx(e.maddr)] = 1;
      end
      check(trace_redirect == e.redirect, $sformatf("%s: redirect at PC %h", name, trace_pc));
      @(negedge clk);
      cycles++;
    end
    check(m_halted, {name, ": model reached HALT"});
    // one instruction per cycle, then the processor stays halted
    check(halted, {name, ": processor halted"});
    check(cycles == m_retired, $sformatf("%s: %0d cycles for %0d instructions", name, cycles, m_retired));
    repeat (3) @(negedge clk);
    check(!trace_valid && trace_pc == m_pc,
          $sformatf("%s: PC after HALT %h, expected %h", name, trace_pc, m_pc));
    check(trace_epc == m_epc, {name, ": EPC"});
    // memory dump after HALT
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < MEM_WORDS; i++) begin
        dump_addr = word_t'(2 * i);
        #1;
        if (dump_data != m_dmem[i]) bad++;
      end
      check(bad == 0, $sformatf("%s: %0d data-memory words differ after HALT", name, bad));
    end
  endtask

  function automatic word_t dump_word(word_t addr);
    return m_dmem[widx(addr)];
  endfunction

  // ---------------------------------------------------- directed program
  // Layout: 0x00 J main; 0x02 exception handler; main builds values and
  // stores hand-checked results at 0x0100..
  task automatic build_directed();
    prog.delete();
    prog.push_back(enc_j(5'b00100, 4));                 // 00: J +4 -> 0x06
    prog.push_back(enc_i1(5'b01000, 6, 6, 1));          // 02: handler: ADDI R6,R6,1
    prog.push_back(16'b00011_00000000000);              // 04: RTI
    // main at 0x06
    prog.push_back(enc_i2(5'b11000, 1, 5));             // LBI R1,5
    prog.push_back(enc_i2(5'b11000, 2, 3));             // LBI R2,3
    prog.push_back(enc_r(5'b11011, 1, 2, 3, 2'b01));    // SUB R3,R1,R2 : 3-5 = -2
    prog.push_back(enc_i2(5'b11000, 5, 8'h01));         // LBI R5,1
    prog.push_back(enc_i2(5'b10010, 5, 8'h00));         // SLBI R5,0x00 : 0x0100
    prog.push_back(enc_i1(5'b10000, 3, 5, 0));          // ST R3,R5,0   : [0x100] = 0xfffe
    prog.push_back(enc_i1(5'b01001, 4, 1, 2));          // SUBI R4,R1,2 : 2-5 = -3
    prog.push_back(enc_i1(5'b10011, 4, 5, 2));          // STU R4,R5,2  : [0x102]=0xfffd, R5=0x102
    prog.push_back(enc_i1(5'b10001, 0, 5, -2));         // LD R0,R5,-2  : R0 = 0xfffe
    prog.push_back(enc_r(5'b11001, 0, 0, 4, 2'b00));    // BTR R4,R0    : 0x7fff
    prog.push_back(enc_i1(5'b10000, 4, 5, 2));          // ST R4,R5,2   : [0x104]=0x7fff
    prog.push_back(enc_r(5'b11111, 4, 0, 2, 2'b00));    // SCO R2,R4,R0 : 0x7fff+0xfffe carries -> 1
    prog.push_back(enc_r(5'b11101, 0, 4, 1, 2'b00));    // SLT R1,R0,R4 : -2 < 0x7fff -> 1
    prog.push_back(enc_r(5'b11011, 2, 1, 1, 2'b00));    // ADD R1,R2,R1 : 2
    prog.push_back(enc_i1(5'b10100, 1, 1, 15));         // ROLI R1,R1,15 : 0x0001
    prog.push_back(enc_i1(5'b10110, 1, 1, 1));          // RORI R1,R1,1 : 0x8000
    prog.push_back(enc_i1(5'b10000, 1, 5, 4));          // ST R1,R5,4   : [0x106]=0x8000
    prog.push_back(enc_i2(5'b01110, 1, 2));             // BLTZ R1,+2 (taken, skips next)
    prog.push_back(enc_i2(5'b11000, 6, 8'h55));         //   skipped
    prog.push_back(enc_i2(5'b01111, 1, 2));             // BGEZ R1,+2 (not taken)
    prog.push_back(enc_i2(5'b01100, 1, 2));             // BEQZ R1,+2 (not taken)
    prog.push_back(enc_i2(5'b01101, 1, 2));             // BNEZ R1,+2 (taken)
    prog.push_back(enc_i2(5'b11000, 6, 8'h66));         //   skipped
    prog.push_back(16'b00010_000_00000000);             // SIIC R0 -> handler, R6 = 1
    prog.push_back(enc_i2(5'b11000, 2, 0));             // LBI R2,0
    prog.push_back(enc_i2(5'b01100, 2, 2));             // BEQZ R2,+2 (taken)
    prog.push_back(16'h0000);                           //   skipped HALT
    prog.push_back(enc_i2(5'b01111, 2, 2));             // BGEZ R2,+2 (taken)
    prog.push_back(16'h0000);                           //   skipped HALT
    prog.push_back(enc_i2(5'b01101, 2, 2));             // BNEZ R2,+2 (not taken)
    prog.push_back(enc_i2(5'b01110, 2, 2));             // BLTZ R2,+2 (not taken)
    prog.push_back(enc_j(5'b00110, 4));                 // JAL +4 -> sub, R7 = return
    prog.push_back(enc_i1(5'b10000, 6, 5, 6));          // ST R6,R5,6   : [0x108]=1 (SIIC count)
    prog.push_back(enc_j(5'b00100, 6));                 // J +6 -> tail
    // sub: R3 = 0x10
    prog.push_back(enc_i2(5'b11000, 3, 8'h10));         // LBI R3,0x10
    prog.push_back(enc_i2(5'b00101, 7, 0));             // JR R7,0 -> return
    prog.push_back(16'b00001_00000000000);              // NOP (never reached)
    // tail
    prog.push_back(enc_i2(5'b11000, 2, 0));             // LBI R2,0
    prog.push_back(enc_i2(5'b10010, 2, 0));             // SLBI R2,0
    begin
      int here;
      here = prog.size() * 2;                           // address of next word
      // JALR R2, here+4 -> lands two words on, R7 = here+2
      prog.push_back(enc_i2(5'b00111, 2, here + 4));
    end
    prog.push_back(16'h0000);                           //   skipped HALT
    prog.push_back(enc_i1(5'b10000, 7, 5, 8));          // ST R7,R5,8   : [0x10a] = link
    prog.push_back(enc_i1(5'b01010, 3, 3, 5'h1f));      // XORI R3,R3,0x1f : 0x0f
    prog.push_back(enc_i1(5'b01011, 3, 3, 5'h03));      // ANDNI R3,R3,3  : 0x0c
    prog.push_back(enc_i1(5'b10101, 3, 3, 2));          // SLLI R3,R3,2   : 0x30
    prog.push_back(enc_i1(5'b10111, 3, 3, 4));          // SRLI R3,R3,4   : 0x03
    prog.push_back(enc_i1(5'b10000, 3, 5, 10));         // ST R3,R5,10  : [0x10c] = 3
    prog.push_back(16'h0000);                           // HALT
  endtask

  // ------------------------------------------------------ random program
  task automatic build_random(int len);
    logic [4:0] ops [$];
    ops = '{5'b01000, 5'b01001, 5'b01010, 5'b01011, 5'b10100, 5'b10101, 5'b10110, 5'b10111,
            5'b10000, 5'b10001, 5'b10010, 5'b10011, 5'b11000, 5'b11001, 5'b11010, 5'b11011,
            5'b11100, 5'b11101, 5'b11110, 5'b11111, 5'b01100, 5'b01101, 5'b01110, 5'b01111,
            5'b00100, 5'b00110, 5'b00001, 5'b00010};
    prog.delete();
    // 0x00: J over the handler; 0x02: handler that only returns
    prog.push_back(enc_j(5'b00100, 2));
    prog.push_back(16'b00011_00000000000);
    for (int i = 0; i < len; i++) begin
      logic [4:0] op;
      word_t w;
      op = ops[$urandom_range(0, ops.size() - 1)];
      w  = {op, 11'($urandom)};
      // control transfers only go forward by an even, short distance
      if (op[4:2] == 3'b011) w[7:0] = 8'(2 * $urandom_range(0, 6));
      if (op == 5'b00100 || op == 5'b00110) w[10:0] = 11'(2 * $urandom_range(0, 6));
      prog.push_back(w);
    end
    prog.push_back(16'h0000);
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (c_op[i]) c_op[i] = 0;
    foreach (c_br_taken[i]) begin c_br_taken[i] = 0; c_br_not[i] = 0; end
    foreach (dut_dmem_dirty[i]) dut_dmem_dirty[i] = 0;
    {c_exc, c_rti, c_halt, c_link, c_stu, c_load, c_store, c_sco1, c_rot_wrap} = '0;

    build_directed();
    load_program();
    run_program("directed", 1000);
    // hand-computed results of the directed program
    check(dump_word(16'h0100) == 16'hfffe, "SUB is Rt - Rs");
    check(dump_word(16'h0102) == 16'hfffd, "SUBI is imm - Rs, stored by STU");
    check(dump_word(16'h0104) == 16'h7fff, "LD after STU base update, then BTR");
    check(dump_word(16'h0106) == 16'h8000, "SCO, SLT, ADD, ROLI, RORI");
    check(dump_word(16'h0108) == 16'h0001, "SIIC handler ran once and RTI returned");
    check(dump_word(16'h010c) == 16'h0003, "XORI, ANDNI, SLLI, SRLI");
    check(m_reg[3] == 16'h0003 && m_reg[6] == 16'h0001, "model registers");

    for (int p = 0; p < NUM_RANDOM; p++) begin
      build_random(RANDOM_LEN);
      load_program();
      run_program($sformatf("random%0d", p), 10 * RANDOM_LEN);
    end

    // every mechanism must have happened at least once
    for (int i = 0; i < 32; i++)
      check(c_op[i] > 0, $sformatf("opcode %b never executed", 5'(i)));
    for (int i = 0; i < 4; i++) begin
      check(c_br_taken[i] > 0, $sformatf("branch kind %0d never taken", i));
      check(c_br_not[i] > 0, $sformatf("branch kind %0d never fell through", i));
    end
    check(c_exc > 0 && c_rti > 0, "exception entry/return");
    check(c_halt == NUM_RANDOM + 1, "halts");
    check(c_link > 0 && c_stu > 0 && c_load > 0 && c_store > 0, "link, STU, load, store");
    check(c_sco1 > 0 && c_rot_wrap > 0, "carry out, rotate wrap");
    $display("mechanisms: exceptions=%0d rti=%0d halts=%0d links=%0d stu=%0d loads=%0d stores=%0d",
             c_exc, c_rti, c_halt, c_link, c_stu, c_load, c_store);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
