// tb_wisc_alu: self-checking test of wisc_alu.
// Applies every ALU operation to random operands plus corner values
// (0, 1, 0x7fff, 0x8000, 0xffff) and compares with a reference model written
// with 32-bit signed and unsigned integer arithmetic.
module tb_wisc_alu;
  import wisc_pkg::*;

  word_t   a, b, result;
  alu_op_e op;
  shift_e  shift;
  int checks = 0, failures = 0;

  wisc_alu dut (.a(a), .b(b), .op(op), .shift(shift), .result(result));

  localparam word_t CORNER[5] = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff};

  function automatic word_t model(word_t x, word_t y, alu_op_e o, shift_e s);
    int sx, sy;
    int unsigned ux, uy;
    word_t r;
    int n;
    sx = int'($signed(x)); sy = int'($signed(y));
    ux = x; uy = y;
    n  = y[3:0];
    case (o)
      ALU_ADD:  return word_t'(ux + uy);
      ALU_RSUB: return word_t'(uy - ux);
      ALU_XOR:  return x ^ y;
      ALU_ANDN: return x & ~y;
      ALU_SHIFT: begin
        case (s)
          SH_ROL: r = word_t'((ux << n) | (ux >> (16 - n)));
          SH_SLL: r = word_t'(ux << n);
          SH_ROR: r = word_t'((ux >> n) | (ux << (16 - n)));
          default: r = word_t'(ux >> n);
        endcase
        return r;
      end
      ALU_SEQ:  return (sx == sy) ? 16'd1 : 16'd0;
      ALU_SLT:  return (sx <  sy) ? 16'd1 : 16'd0;
      ALU_SLE:  return (sx <= sy) ? 16'd1 : 16'd0;
      ALU_SCO:  return ((ux + uy) > 32'hffff) ? 16'd1 : 16'd0;
      ALU_BTR: begin
        for (int i = 0; i < 16; i++) r[15 - i] = x[i];
        return r;
      end
      ALU_PASSB: return y;
      default:   return word_t'((ux << 8) | (uy & 32'hff));   // ALU_SLBI
    endcase
  endfunction

  task automatic check_one(word_t x, word_t y, alu_op_e o, shift_e s);
    word_t exp;
    a = x; b = y; op = o; shift = s;
    #1;
    exp = model(x, y, o, s);
    checks++;
    if (result !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%s sh=%s a=%h b=%h got=%h exp=%h", o.name(), s.name(), x, y, result, exp);
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
    for (int o = 0; o <= int'(ALU_SLBI); o++) begin
      for (int s = 0; s < 4; s++) begin
        foreach (CORNER[i]) foreach (CORNER[j])
          check_one(CORNER[i], CORNER[j], alu_op_e'(o), shift_e'(s));
        for (int t = 0; t < 300; t++)
          check_one(word_t'($urandom), word_t'($urandom), alu_op_e'(o), shift_e'(s));
        // operands close together exercise the compare boundaries
        for (int t = 0; t < 100; t++) begin
          word_t x;
          x = word_t'($urandom);
          check_one(x, x + word_t'($urandom_range(0, 2)) - 16'd1, alu_op_e'(o), shift_e'(s));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
