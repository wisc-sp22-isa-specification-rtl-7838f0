// wisc_shifter: 16-bit barrel shifter/rotator of the WISC-SP22 processor.
//
// Performs the four shift kinds of the ISA on a 16-bit operand: rotate left
// (ROL/ROLI), shift left logical (SLL/SLLI), rotate right (ROR/RORI) and
// shift right logical (SRL/SRLI). Only the four least significant bits of the
// amount are used, as the ISA requires; vacated bits of the logical shifts
// are filled with zeros. It is built as four log-steps (by 1, 2, 4, 8), each
// a 2:1 multiplexer per bit; the staged structure is this design's choice,
// the ISA only gives the function.
//
// Interface: in (operand), amt (4-bit amount), kind (wisc_pkg::shift_e),
// out. Purely combinational.
module wisc_shifter
  import wisc_pkg::*;
(
  input  word_t      in,
  input  logic [3:0] amt,
  input  shift_e     kind,
  output word_t      out
);

  word_t stage [5];

  always_comb begin
    stage[0] = in;
    for (int s = 0; s < 4; s++) begin
      automatic int unsigned n = 1 << s;
      if (amt[s]) begin
        unique case (kind)
          SH_ROL: stage[s+1] = (stage[s] << n) | (stage[s] >> (XLEN - n));
          SH_SLL: stage[s+1] = stage[s] << n;
          SH_ROR: stage[s+1] = (stage[s] >> n) | (stage[s] << (XLEN - n));
          SH_SRL: stage[s+1] = stage[s] >> n;
          default: stage[s+1] = stage[s];
        endcase
      end else begin
        stage[s+1] = stage[s];
      end
    end
    out = stage[4];
  end

endmodule
