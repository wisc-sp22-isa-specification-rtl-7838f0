// tb_wisc_shifter: self-checking test of wisc_shifter.
// Drives every shift kind with every amount 0..15 on random operands and
// compares with a reference built from a 32-bit doubled operand (rotates)
// and plain shifts; purely combinational, so results are sampled after 1 ns.
module tb_wisc_shifter;
  import wisc_pkg::*;

  word_t  in, out;
  logic [3:0] amt;
  shift_e kind;
  int checks = 0, failures = 0;

  wisc_shifter dut (.in(in), .amt(amt), .kind(kind), .out(out));

  function automatic word_t ref_shift(word_t v, int n, int k);
    logic [31:0] dbl;
    dbl = {v, v};
    case (k)
      0: return word_t'(dbl >> (16 - n));          // rotate left
      1: return word_t'({16'b0, v} << n);          // shift left logical
      2: return dbl[15 + n -: 16];                 // rotate right
      default: return v >> n;                      // shift right logical
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < 4; k++) begin
        for (int n = 0; n < 16; n++) begin
          in   = (t == 0) ? 16'h8001 : word_t'($urandom);
          amt  = 4'(n);
          kind = shift_e'(k);
          #1;
          checks++;
          if (out !== ref_shift(in, n, k)) begin
            failures++;
            if (failures < 10)
              $display("FAIL kind=%0d in=%h amt=%0d got=%h exp=%h", k, in, n, out,
                       ref_shift(in, n, k));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
