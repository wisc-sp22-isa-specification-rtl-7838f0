// wisc_cpu: WISC-SP22 processor, one instruction per clock cycle.
//
// Each rising clock edge retires one instruction: the instruction memory is
// read at PC, the decoder forms the control word, the register file supplies
// Rs (port A) and Rt/store data (port B), the ALU computes the result or the
// effective address, the data memory is read or written, the result is
// written back and the PC unit loads the next PC. The instruction set, its
// encodings and its semantics (including the reversed subtraction of
// SUB/SUBI, STU's base update, PC+2 link values, the SIIC exception to
// address 0x0002 with EPC <- PC + 2, RTI returning to EPC, and HALT leaving
// the PC just after itself) are the ISA's. The single-cycle organisation
// with separate instruction and data memories that both hold the program
// image is this design's choice: it gives CPI = 1 and needs no stalls,
// forwarding or branch prediction.
//
// Interface:
//   clk, rst_n            clock; asynchronous active-low reset (PC = 0,
//                         registers and EPC cleared)
//   load_we/addr/data     write one word of the program image into both
//                         memories (byte address); use while rst_n is low
//   dump_addr/dump_data   read the data memory, e.g. after halt
//   halted                set once HALT has executed; nothing more issues
//   trace_*               what the instruction of this cycle does: valid,
//                         its PC and encoding, its register write and its
//                         store (all qualified by trace_valid); the state
//                         changes at the next rising edge. trace_redirect
//                         marks a taken branch, jump, SIIC or RTI;
//                         trace_epc is the current EPC.
module wisc_cpu
  import wisc_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 32768
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      load_we,
  input  word_t     load_addr,
  input  word_t     load_data,
  input  word_t     dump_addr,
  output word_t     dump_data,
  output logic      halted,
  output logic      trace_valid,
  output word_t     trace_pc,
  output word_t     trace_instr,
  output logic      trace_rf_we,
  output reg_addr_t trace_rf_waddr,
  output word_t     trace_rf_wdata,
  output logic      trace_mem_we,
  output word_t     trace_mem_addr,
  output word_t     trace_mem_wdata,
  output logic      trace_redirect,
  output word_t     trace_epc
);

  word_t pc, pc_plus2, epc, instr;
  word_t rs_val, rt_val, alu_b, alu_res, mem_rdata, wb_data;
  word_t imem_addr, dmem_addr, dmem_wdata, imem_unused;
  logic  taken, active, rf_we, dmem_we;
  ctrl_t ctrl;

  // an instruction executes in every cycle out of reset until HALT retires
  assign active = rst_n && !halted;

  // ---------------------------------------------------------------- fetch
  assign imem_addr = load_we ? load_addr : pc;

  wisc_mem #(.WORDS(MEM_WORDS)) u_imem (
    .clk    (clk),
    .addr_a (imem_addr),
    .we_a   (load_we),
    .wdata_a(load_data),
    .rdata_a(instr),
    .addr_b ('0),
    .rdata_b(imem_unused)
  );

  // --------------------------------------------------------------- decode
  wisc_decoder u_dec (
    .instr(instr),
    .ctrl (ctrl)
  );

  wisc_regfile u_rf (
    .clk    (clk),
    .rst_n  (rst_n),
    .raddr_a(ctrl.rs),
    .rdata_a(rs_val),
    .raddr_b(ctrl.rt),
    .rdata_b(rt_val),
    .we     (rf_we),
    .waddr  (ctrl.rd),
    .wdata  (wb_data)
  );

  // -------------------------------------------------------------- execute
  assign alu_b = ctrl.b_imm ? ctrl.imm : rt_val;

  wisc_alu u_alu (
    .a     (rs_val),
    .b     (alu_b),
    .op    (ctrl.alu_op),
    .shift (ctrl.shift),
    .result(alu_res)
  );

  wisc_pc_unit u_pc (
    .clk     (clk),
    .rst_n   (rst_n),
    .npc_sel (ctrl.npc_sel),
    .br_cond (ctrl.br_cond),
    .imm     (ctrl.imm),
    .rs_val  (rs_val),
    .pc      (pc),
    .pc_plus2(pc_plus2),
    .epc     (epc),
    .halted  (halted),
    .taken   (taken)
  );

  // --------------------------------------------------------------- memory
  assign dmem_we    = load_we || (active && ctrl.mem_we);
  assign dmem_addr  = load_we ? load_addr : alu_res;
  assign dmem_wdata = load_we ? load_data : rt_val;

  wisc_mem #(.WORDS(MEM_WORDS)) u_dmem (
    .clk    (clk),
    .addr_a (dmem_addr),
    .we_a   (dmem_we),
    .wdata_a(dmem_wdata),
    .rdata_a(mem_rdata),
    .addr_b (dump_addr),
    .rdata_b(dump_data)
  );

  // ----------------------------------------------------------- write back
  always_comb begin
    unique case (ctrl.wb_sel)
      WB_MEM:  wb_data = mem_rdata;
      WB_PC2:  wb_data = pc_plus2;
      default: wb_data = alu_res;
    endcase
  end

  assign rf_we = active && ctrl.rf_we;

  // ---------------------------------------------------------------- trace
  assign trace_valid     = active;
  assign trace_pc        = pc;
  assign trace_instr     = instr;
  assign trace_rf_we     = rf_we;
  assign trace_rf_waddr  = ctrl.rd;
  assign trace_rf_wdata  = wb_data;
  assign trace_mem_we    = active && ctrl.mem_we;
  assign trace_mem_addr  = alu_res;
  assign trace_mem_wdata = rt_val;
  assign trace_redirect  = active && taken;
  assign trace_epc       = epc;

  // the program image must only be loaded while the processor is in reset
  a_load_in_reset: assert property (@(posedge clk) load_we |-> !rst_n)
    else $error("wisc_cpu: load_we asserted out of reset");

endmodule
