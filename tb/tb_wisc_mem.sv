// tb_wisc_mem: self-checking test of wisc_mem, at a reduced size.
// Checks that the memory starts at zero, then writes random words at random
// byte addresses through port A while reading both ports against a shadow
// array. Addresses wrap to the memory size and bit 0 is ignored.
module tb_wisc_mem;
  import wisc_pkg::*;

  localparam int unsigned WORDS = 256;

  logic  clk = 0;
  word_t addr_a, wdata_a, rdata_a, addr_b, rdata_b;
  logic  we_a;
  word_t shadow [WORDS];
  int checks = 0, failures = 0;

  wisc_mem #(.WORDS(WORDS)) dut (.clk(clk), .addr_a(addr_a), .we_a(we_a),
    .wdata_a(wdata_a), .rdata_a(rdata_a), .addr_b(addr_b), .rdata_b(rdata_b));

  always #5 clk = ~clk;

  function automatic int idx(word_t addr);
    return int'(addr >> 1) % WORDS;
  endfunction

  task automatic expect_eq(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we_a = 0; addr_a = 0; wdata_a = 0; addr_b = 0;
    for (int i = 0; i < WORDS; i++) begin
      shadow[i] = '0;
      addr_b = word_t'(2 * i);
      #1 expect_eq(rdata_b, 16'h0, "initial contents");
    end
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      we_a    = ($urandom_range(0, 1) == 1);
      addr_a  = word_t'($urandom);
      wdata_a = word_t'($urandom);
      addr_b  = word_t'($urandom);
      #1;
      expect_eq(rdata_a, shadow[idx(addr_a)], "port A read");
      expect_eq(rdata_b, shadow[idx(addr_b)], "port B read");
      @(posedge clk);
      if (we_a) shadow[idx(addr_a)] = wdata_a;
      #1;
      if (we_a) expect_eq(rdata_a, wdata_a, "read after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
