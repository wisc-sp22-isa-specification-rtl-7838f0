// tb_wisc_regfile: self-checking test of wisc_regfile.
// After reset every register must read zero. Then random writes and random
// reads on both ports run for many cycles against a shadow array; the test
// also checks that a read of the register written in the same cycle still
// returns the old value until the clock edge.
module tb_wisc_regfile;
  import wisc_pkg::*;

  logic      clk = 0, rst_n = 0;
  reg_addr_t raddr_a, raddr_b, waddr;
  word_t     rdata_a, rdata_b, wdata;
  logic      we;
  word_t     shadow [8];
  int checks = 0, failures = 0;

  wisc_regfile dut (.clk(clk), .rst_n(rst_n), .raddr_a(raddr_a), .rdata_a(rdata_a),
                    .raddr_b(raddr_b), .rdata_b(rdata_b), .we(we), .waddr(waddr),
                    .wdata(wdata));

  always #5 clk = ~clk;

  task automatic expect_eq(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr_a = 0; raddr_b = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      shadow[i] = '0;
      raddr_a = 3'(i); raddr_b = 3'(7 - i);
      #1;
      expect_eq(rdata_a, 16'h0, "reset port A");
      expect_eq(rdata_b, 16'h0, "reset port B");
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we      = ($urandom_range(0, 3) != 0);
      waddr   = 3'($urandom);
      wdata   = word_t'($urandom);
      raddr_a = (t % 4 == 0) ? waddr : 3'($urandom);
      raddr_b = 3'($urandom);
      #1;
      expect_eq(rdata_a, shadow[raddr_a], "port A");
      expect_eq(rdata_b, shadow[raddr_b], "port B");
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
