// Self-checking testbench for ppa_core_stage in both carry polarities:
// 4-bit stages over all operands and carries, 16-bit stages with random and
// propagate-heavy operands. The sum must equal (a + b + carry) mod 2^W, the
// carry-out (true after undoing the polarity) the carry of a + b + carry,
// and p must flag a + b == 2^W - 1.
module tb_ppa_core_stage;
  logic [3:0]  a4, b4, s4_t, s4_i;
  logic        c4, co4_t, co4_i, p4_t, p4_i;
  logic [15:0] a16, b16, s16_t, s16_i;
  logic        c16, co16_t, co16_i, p16_t, p16_i;
  int checks = 0, failures = 0;

  ppa_core_stage #(.WIDTH(4),  .CI_INVERTED(1'b0)) dut4_t  (.a(a4),  .b(b4),  .c_in(c4),   .s(s4_t),  .c_out(co4_t),  .p(p4_t));
  ppa_core_stage #(.WIDTH(4),  .CI_INVERTED(1'b1)) dut4_i  (.a(a4),  .b(b4),  .c_in(~c4),  .s(s4_i),  .c_out(co4_i),  .p(p4_i));
  ppa_core_stage #(.WIDTH(16), .CI_INVERTED(1'b0)) dut16_t (.a(a16), .b(b16), .c_in(c16),  .s(s16_t), .c_out(co16_t), .p(p16_t));
  ppa_core_stage #(.WIDTH(16), .CI_INVERTED(1'b1)) dut16_i (.a(a16), .b(b16), .c_in(~c16), .s(s16_i), .c_out(co16_i), .p(p16_i));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string tag, int w, int a, int b, int c,
                       int s, logic co_true, logic p);
    int full = a + b + c;
    int mask = (1 << w) - 1;
    checks++;
    if (s != (full & mask) || co_true != (full > mask) || p != ((a + b) == mask)) begin
      failures++;
      $display("FAIL %s a=%h b=%h c=%0d -> s=%h co=%b p=%b", tag, a, b, c, s, co_true, p);
    end
  endtask

  initial begin
    for (int v = 0; v < 512; v++) begin
      {a4, b4, c4} = 9'(v);
      #1;
      check("w4 true-in",     4, int'(a4), int'(b4), int'(c4), int'(s4_t), ~co4_t, p4_t);
      check("w4 inverted-in", 4, int'(a4), int'(b4), int'(c4), int'(s4_i),  co4_i, p4_i);
    end
    for (int n = 0; n < 4000; n++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); c16 = 1'($urandom);
      if (n % 3 == 1) b16 = ~a16 ^ (16'h1 << ($urandom % 16));
      if (n % 3 == 2) b16 = ~a16;
      #1;
      check("w16 true-in",     16, int'(a16), int'(b16), int'(c16), int'(s16_t), ~co16_t, p16_t);
      check("w16 inverted-in", 16, int'(a16), int'(b16), int'(c16), int'(s16_i),  co16_i, p16_i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
