// wisc_alu: execution unit of the WISC-SP22 processor.
//
// Operand A is always Rs; operand B is Rt or the extended immediate chosen
// by the decoder. The operations follow the ISA exactly:
//   ADD   A + B                 (ADD, ADDI, and the address of LD/ST/STU)
//   RSUB  B - A                 (SUB is Rt - Rs, SUBI is imm - Rs)
//   XOR   A ^ B, ANDN A & ~B    (immediate forms get a zero-extended imm)
//   SHIFT rotate/shift of A by B[3:0] through wisc_shifter
//   SEQ/SLT/SLE  1 or 0 from a two's-complement compare of A with B
//   SCO   1 if A + B carries out of bit 15, else 0
//   BTR   A with its bits reversed
//   PASSB B (LBI), SLBI (A << 8) | B
// The compares and the carry are taken from one shared 17-bit adder
// computing A - B / A + B; sharing one adder is this design's choice.
//
// Interface: a, b, op (wisc_pkg::alu_op_e), shift (wisc_pkg::shift_e),
// result. Purely combinational.
module wisc_alu
  import wisc_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  alu_op_e op,
  input  shift_e  shift,
  output word_t   result
);

  word_t          sh_out;
  logic [XLEN:0]  sum;      // A + B with carry out
  logic [XLEN:0]  diff;     // A - B, bit XLEN is the borrow
  logic           lt;       // signed A < B
  logic           eq;
  word_t          rev;

  wisc_shifter u_shifter (
    .in  (a),
    .amt (b[3:0]),
    .kind(shift),
    .out (sh_out)
  );

  always_comb begin
    sum  = {1'b0, a} + {1'b0, b};
    diff = {1'b0, a} - {1'b0, b};
    eq   = (diff[XLEN-1:0] == '0);
    // signed less-than: sign of the difference, corrected on overflow
    lt   = (a[XLEN-1] != b[XLEN-1]) ? a[XLEN-1] : diff[XLEN-1];
    for (int i = 0; i < XLEN; i++) rev[i] = a[XLEN-1-i];

    unique case (op)
      ALU_ADD:   result = sum[XLEN-1:0];
      ALU_RSUB:  result = b - a;
      ALU_XOR:   result = a ^ b;
      ALU_ANDN:  result = a & ~b;
      ALU_SHIFT: result = sh_out;
      ALU_SEQ:   result = word_t'(eq);
      ALU_SLT:   result = word_t'(lt);
      ALU_SLE:   result = word_t'(lt || eq);
      ALU_SCO:   result = word_t'(sum[XLEN]);
      ALU_BTR:   result = rev;
      ALU_PASSB: result = b;
      ALU_SLBI:  result = {a[7:0], b[7:0]};
      default:   result = '0;
    endcase
  end

endmodule
