// Self-checking testbench for bk_prefix at 16 and 8 bits. The reference is
// a serial scan: G[i:0] = g[i] | p[i] & G[i-1:0], P[i:0] = p[i] & P[i-1:0].
// Inputs are drawn both as independent random g, p and as real operand
// pairs (g = a & b, p = a ^ b).
module tb_bk_prefix;
  logic [15:0] g16, p16, gg16, pp16;
  logic [7:0]  g8, p8, gg8, pp8;
  int checks = 0, failures = 0;

  bk_prefix #(.WIDTH(16)) dut16 (.g(g16), .p(p16), .gg(gg16), .pp(pp16));
  bk_prefix #(.WIDTH(8))  dut8  (.g(g8),  .p(p8),  .gg(gg8),  .pp(pp8));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] scan(logic [15:0] g, logic [15:0] p, int w);
    logic [15:0] gr = '0, pr = '0;
    logic gc = 1'b0, pc = 1'b1;
    for (int i = 0; i < w; i++) begin
      gc = g[i] | (p[i] & gc);
      pc = p[i] & pc;
      gr[i] = gc;
      pr[i] = pc;
    end
    return {gr, pr};
  endfunction

  initial begin
    logic [15:0] a, b;
    for (int n = 0; n < 4000; n++) begin
      if (n % 2 == 0) begin
        g16 = 16'($urandom); p16 = 16'($urandom);
      end else begin
        a = 16'($urandom); b = 16'($urandom);
        if (n % 4 == 1) b = ~a ^ (16'h1 << ($urandom % 16));
        g16 = a & b; p16 = a ^ b;
      end
      g8 = g16[7:0]; p8 = p16[15:8];
      #1;
      checks++;
      if ({gg16, pp16} != scan(g16, p16, 16)) begin
        failures++;
        $display("FAIL w16 g=%h p=%h -> gg=%h pp=%h", g16, p16, gg16, pp16);
      end
      checks++;
      if ({gg8, pp8} != {scan({8'h0, g8}, {8'h0, p8}, 8)[23:16], scan({8'h0, g8}, {8'h0, p8}, 8)[7:0]}) begin
        failures++;
        $display("FAIL w8 g=%h p=%h -> gg=%h pp=%h", g8, p8, gg8, pp8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
