// Self-checking testbench for ci_cska_stage in both carry polarities.
// 4-bit stages are tested over all operands and carries, 6-bit stages with
// random operands. The sum must equal (a + b + carry) mod 2^W, the carry-out
// the carry of a + b + carry (inverted for the true-polarity-in stage), and
// p must flag a + b == 2^W - 1.
module tb_ci_cska_stage;
  logic [3:0] a4, b4, s4_t, s4_i;
  logic       c4, co4_t, co4_i, p4_t, p4_i;
  logic [5:0] a6, b6, s6_t, s6_i;
  logic       c6, co6_t, co6_i, p6_t, p6_i;
  int checks = 0, failures = 0;

  // _t: carry arrives true (AOI). _i: carry arrives inverted (OAI).
  ci_cska_stage #(.WIDTH(4), .CI_INVERTED(1'b0)) dut4_t (.a(a4), .b(b4), .c_in(c4),  .s(s4_t), .c_out(co4_t), .p(p4_t));
  ci_cska_stage #(.WIDTH(4), .CI_INVERTED(1'b1)) dut4_i (.a(a4), .b(b4), .c_in(~c4), .s(s4_i), .c_out(co4_i), .p(p4_i));
  ci_cska_stage #(.WIDTH(6), .CI_INVERTED(1'b0)) dut6_t (.a(a6), .b(b6), .c_in(c6),  .s(s6_t), .c_out(co6_t), .p(p6_t));
  ci_cska_stage #(.WIDTH(6), .CI_INVERTED(1'b1)) dut6_i (.a(a6), .b(b6), .c_in(~c6), .s(s6_i), .c_out(co6_i), .p(p6_i));

  initial begin : watchdog
    #1000000;
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
    for (int n = 0; n < 2000; n++) begin
      a6 = 6'($urandom); b6 = 6'($urandom); c6 = 1'($urandom);
      if (n % 4 == 0) b6 = ~a6;
      #1;
      check("w6 true-in",     6, int'(a6), int'(b6), int'(c6), int'(s6_t), ~co6_t, p6_t);
      check("w6 inverted-in", 6, int'(a6), int'(b6), int'(c6), int'(s6_i),  co6_i, p6_i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
