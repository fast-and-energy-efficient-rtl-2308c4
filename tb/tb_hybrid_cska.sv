// Self-checking testbench for hybrid_cska. Two instances: the default
// (32 bits, stages {2,3,4,[16],4,3}) and a second arrangement with an
// 8-bit core and an even stage count, {4,4,[8],4,4,4,4}, so the core
// stage sees both carry polarities. {cout, sum} is compared with the 33-bit
// sum; stage_p with each slice's propagate worked out in the testbench.
module tb_hybrid_cska;
  import cska_pkg::*;
  localparam int unsigned W = ADDER_WIDTH;
  localparam int unsigned ALT_PRE  [2] = '{4, 4};
  localparam int unsigned ALT_POST [4] = '{4, 4, 4, 4};
  localparam int unsigned DEF_ALL  [6] = '{2, 3, 4, 16, 4, 3};
  localparam int unsigned ALT_ALL  [7] = '{4, 4, 8, 4, 4, 4, 4};

  logic [W-1:0] a, b, sum_d, sum_a;
  logic         cin, cout_d, cout_a;
  logic [5:0]   sp_d;
  logic [6:0]   sp_a;
  int checks = 0, failures = 0;

  hybrid_cska dut_def (.a(a), .b(b), .cin(cin), .sum(sum_d), .cout(cout_d), .stage_p(sp_d));
  hybrid_cska #(.NPRE(2), .PRE_SIZES(ALT_PRE), .CORE_WIDTH(8), .NPOST(4), .POST_SIZES(ALT_POST)) dut_alt (
    .a(a), .b(b), .cin(cin), .sum(sum_a), .cout(cout_a), .stage_p(sp_a));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] slice_p(logic [W-1:0] x, logic [W-1:0] y,
                                         int unsigned sizes [], int n);
    logic [W-1:0] pv = x ^ y;
    int unsigned lsb = 0;
    logic [7:0] r = '0;
    for (int k = 0; k < n; k++) begin
      r[k] = 1'b1;
      for (int unsigned i = lsb; i < lsb + sizes[k]; i++) r[k] &= pv[i];
      lsb += sizes[k];
    end
    return r;
  endfunction

  task automatic apply_and_check();
    logic [W:0] ref_sum;
    int unsigned s_def [] = DEF_ALL;
    int unsigned s_alt [] = ALT_ALL;
    #1;
    ref_sum = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
    checks++;
    if ({cout_d, sum_d} != ref_sum || {2'b0, sp_d} != slice_p(a, b, s_def, 6)) begin
      failures++;
      $display("FAIL default a=%h b=%h cin=%b -> %b_%h p=%b (want %h)", a, b, cin, cout_d, sum_d, sp_d, ref_sum);
    end
    checks++;
    if ({cout_a, sum_a} != ref_sum || {1'b0, sp_a} != slice_p(a, b, s_alt, 7)) begin
      failures++;
      $display("FAIL alt a=%h b=%h cin=%b -> %b_%h p=%b (want %h)", a, b, cin, cout_a, sum_a, sp_a, ref_sum);
    end
  endtask

  initial begin
    a = '1; b = '0; cin = 1'b1; apply_and_check();
    a = '1; b = '0; cin = 1'b0; apply_and_check();
    a = '1; b = '1; cin = 1'b1; apply_and_check();
    a = '0; b = '0; cin = 1'b0; apply_and_check();
    a = 32'h0000_01ff; b = 32'h0000_0001; cin = 1'b0; apply_and_check();
    a = 32'h01ff_fe00; b = 32'h0000_0200; cin = 1'b0; apply_and_check();
    for (int n = 0; n < 20000; n++) begin
      a = $urandom; b = $urandom; cin = 1'($urandom);
      if (n % 3 == 1) b = ~a ^ (32'h1 << ($urandom % W));
      if (n % 3 == 2) b = ~a;
      apply_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
