// wisc_mem: 16-bit word memory of the WISC-SP22 processor.
//
// Addressed by byte address, like every WISC-SP22 address; a word sits at an
// even address, and bit 0 of the address is ignored (accesses are taken as
// aligned). The processor uses two instances: one as instruction memory
// and one as data memory, both holding the same program image. Port A is
// the processor's: a read returns the addressed word in the same cycle
// (combinational read, needed for one instruction per clock), and a write
// happens on the rising edge when we_a is set. Port B is a second,
// read-only port with the same timing, used to dump or inspect the memory,
// for instance after HALT. The ISA gives neither the size nor the ports: a
// full 16-bit byte address space (32768 words), zero contents at start and
// the second read port are this design's choices.
//
// Interface: clk; addr_a, we_a, wdata_a, rdata_a; addr_b, rdata_b.
module wisc_mem
  import wisc_pkg::*;
#(
  parameter int unsigned WORDS = 32768
) (
  input  logic  clk,
  input  word_t addr_a,
  input  logic  we_a,
  input  word_t wdata_a,
  output word_t rdata_a,
  input  word_t addr_b,
  output word_t rdata_b
);

  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  word_t mem [WORDS];

  logic [AW-1:0] idx_a, idx_b;

  assign idx_a = AW'(addr_a[XLEN-1:1]);
  assign idx_b = AW'(addr_b[XLEN-1:1]);

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we_a) mem[idx_a] <= wdata_a;
  end

  assign rdata_a = mem[idx_a];
  assign rdata_b = mem[idx_b];

endmodule
