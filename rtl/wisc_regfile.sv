// wisc_regfile: the eight 16-bit general-purpose registers R0..R7.
//
// Two asynchronous read ports (A for Rs, B for Rt or store data) and one
// write port written on the rising clock edge. R0 is an ordinary register
// (the ISA gives it no special meaning); R7 is the link register only by
// convention of JAL/JALR, which the decoder handles. All registers clear to
// zero on reset; the reset value is this design's choice. A read of the
// register being written in the same cycle returns the old value, which is
// what a one-instruction-per-cycle processor needs.
//
// Interface: clk, rst_n (asynchronous, active low), raddr_a/rdata_a,
// raddr_b/rdata_b, we/waddr/wdata.
module wisc_regfile
  import wisc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  reg_addr_t raddr_a,
  output word_t     rdata_a,
  input  reg_addr_t raddr_b,
  output word_t     rdata_b,
  input  logic      we,
  input  reg_addr_t waddr,
  input  word_t     wdata
);

  word_t regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata_a = regs[raddr_a];
  assign rdata_b = regs[raddr_b];

endmodule
