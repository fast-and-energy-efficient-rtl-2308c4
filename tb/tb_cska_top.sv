// End-to-end testbench for cska_top at its default parameters: both 32-bit
// adders, CI-CSKA and hybrid, are driven with the same kind of stimulus but
// through their own ports. The main load is 10000 uniformly random operand
// pairs with random carry-in per adder, followed by directed and
// propagate-heavy vectors. Every result is compared with the 33-bit sum.
// The testbench also works out, from the operands alone, which carry
// mechanisms each vector exercised and counts them; a mechanism that never
// occurred counts as a failure:
//   skip      a carry enters a CI stage whose slice propagates, and leaves
//             through the skip gate
//   generate  a stage's own slice produces a carry-out
//   increment the arriving carry changes more than one sum bit of a stage
//   fullskip  a carry crosses every stage above stage 0
//   overflow  cout = 1
//   core_skip / core_gen / core_inc: the same three events in the hybrid
//             adder's Brent-Kung core stage
module tb_cska_top;
  import cska_pkg::*;
  localparam int unsigned W = ADDER_WIDTH;
  localparam int unsigned HYB_SIZES [6] = '{2, 3, 4, 16, 4, 3};

  logic [W-1:0] ci_a, ci_b, ci_sum, hy_a, hy_b, hy_sum;
  logic         ci_cin, ci_cout, hy_cin, hy_cout;
  logic [VSS_NSTAGES-1:0]       ci_stage_p;
  logic [HYB_NPRE+HYB_NPOST:0]  hy_stage_p;
  int checks = 0, failures = 0;

  typedef enum int {M_SKIP, M_GEN, M_INC, M_FULLSKIP, M_OVF,
                    M_CORE_SKIP, M_CORE_GEN, M_CORE_INC, M_NUM} mech_e;
  int ci_count [M_NUM];
  int hy_count [M_NUM];

  cska_top dut (
    .ci_a(ci_a), .ci_b(ci_b), .ci_cin(ci_cin),
    .ci_sum(ci_sum), .ci_cout(ci_cout), .ci_stage_p(ci_stage_p),
    .hy_a(hy_a), .hy_b(hy_b), .hy_cin(hy_cin),
    .hy_sum(hy_sum), .hy_cout(hy_cout), .hy_stage_p(hy_stage_p)
  );

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Classify one addition on a given stage layout and update the counters.
  // core < 0 means the layout has no core stage.
  task automatic classify(logic [W-1:0] a, logic [W-1:0] b, logic cin,
                          int unsigned sizes [], int n, int core,
                          ref int cnt [M_NUM]);
    logic [W:0]   full = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
    logic [W:0]   cvec = full ^ {1'b0, a} ^ {1'b0, b};   // carry into each bit
    int unsigned  lsb = 0;
    bit           all_skip = 1'b1;
    for (int k = 0; k < n; k++) begin
      int unsigned w    = sizes[k];
      logic [W-1:0] mask = (w >= W) ? '1 : ((W'(1) << w) - 1);
      logic [W-1:0] as  = (a >> lsb) & mask;
      logic [W-1:0] bs  = (b >> lsb) & mask;
      logic [W:0]   raw = {1'b0, as} + {1'b0, bs};
      bit prop = (raw[W-1:0] == mask);
      bit gen  = raw[w];
      bit cin_k = cvec[lsb];
      bit inc  = cin_k && (raw[0] == 1'b1);   // +1 ripples past bit 0
      if (k > 0) begin
        if (prop && cin_k) cnt[M_SKIP]++;
        if (gen)           cnt[M_GEN]++;
        if (inc)           cnt[M_INC]++;
        if (!(prop && cin_k)) all_skip = 1'b0;
        if (k == core) begin
          if (prop && cin_k) cnt[M_CORE_SKIP]++;
          if (gen)           cnt[M_CORE_GEN]++;
          if (inc)           cnt[M_CORE_INC]++;
        end
      end
      lsb += w;
    end
    if (all_skip) cnt[M_FULLSKIP]++;
    if (full[W])  cnt[M_OVF]++;
  endtask

  task automatic run_vector();
    logic [W:0] ref_ci, ref_hy;
    int unsigned ci_sizes [] = VSS_SIZES;
    int unsigned hy_sizes [] = HYB_SIZES;
    #1;
    ref_ci = {1'b0, ci_a} + {1'b0, ci_b} + {{W{1'b0}}, ci_cin};
    ref_hy = {1'b0, hy_a} + {1'b0, hy_b} + {{W{1'b0}}, hy_cin};
    checks++;
    if ({ci_cout, ci_sum} != ref_ci) begin
      failures++;
      $display("FAIL CI-CSKA a=%h b=%h cin=%b -> %b_%h want %h", ci_a, ci_b, ci_cin, ci_cout, ci_sum, ref_ci);
    end
    checks++;
    if ({hy_cout, hy_sum} != ref_hy) begin
      failures++;
      $display("FAIL hybrid a=%h b=%h cin=%b -> %b_%h want %h", hy_a, hy_b, hy_cin, hy_cout, hy_sum, ref_hy);
    end
    checks++;
    if (ci_stage_p[VSS_NSTAGES-1] != ((ci_a[W-1:W-3] ^ ci_b[W-1:W-3]) == 3'b111) ||
        hy_stage_p[HYB_NPRE] != ((hy_a[24:9] ^ hy_b[24:9]) == 16'hffff)) begin
      failures++;
      $display("FAIL stage propagate: ci=%b hy=%b", ci_stage_p, hy_stage_p);
    end
    classify(ci_a, ci_b, ci_cin, ci_sizes, VSS_NSTAGES, -1, ci_count);
    classify(hy_a, hy_b, hy_cin, hy_sizes, 6, HYB_NPRE, hy_count);
  endtask

  function automatic logic [W-1:0] near_inverse(logic [W-1:0] x);
    return (($urandom % 2) == 0) ? ~x : ~x ^ (W'(1) << ($urandom % W));
  endfunction

  initial begin
    // 10000 uniform random operand pairs per adder.
    for (int n = 0; n < 10000; n++) begin
      ci_a = $urandom; ci_b = $urandom; ci_cin = 1'($urandom);
      hy_a = $urandom; hy_b = $urandom; hy_cin = 1'($urandom);
      run_vector();
    end
    // Directed: carry from bit 0 across the whole adder, and its opposite.
    ci_a = '1; ci_b = '0; ci_cin = 1'b1; hy_a = '1; hy_b = '0; hy_cin = 1'b1; run_vector();
    ci_a = 32'h0000_0003; ci_b = 32'hffff_fffc; ci_cin = 1'b0;
    hy_a = 32'h0000_0003; hy_b = 32'hffff_fffd; hy_cin = 1'b0; run_vector();
    // Propagate-heavy vectors: long skip chains.
    for (int n = 0; n < 2000; n++) begin
      ci_a = $urandom; ci_b = near_inverse(ci_a); ci_cin = 1'($urandom);
      hy_a = $urandom; hy_b = near_inverse(hy_a); hy_cin = 1'($urandom);
      run_vector();
    end

    $display("CI-CSKA: skip=%0d generate=%0d increment=%0d fullskip=%0d overflow=%0d",
             ci_count[M_SKIP], ci_count[M_GEN], ci_count[M_INC], ci_count[M_FULLSKIP], ci_count[M_OVF]);
    $display("hybrid : skip=%0d generate=%0d increment=%0d fullskip=%0d overflow=%0d core_skip=%0d core_gen=%0d core_inc=%0d",
             hy_count[M_SKIP], hy_count[M_GEN], hy_count[M_INC], hy_count[M_FULLSKIP], hy_count[M_OVF],
             hy_count[M_CORE_SKIP], hy_count[M_CORE_GEN], hy_count[M_CORE_INC]);
    for (int m = 0; m < int'(M_NUM); m++) begin
      checks++;
      if (hy_count[m] == 0) begin
        failures++;
        $display("FAIL hybrid mechanism %s never occurred", mech_e'(m));
      end
      if (m < int'(M_CORE_SKIP)) begin
        checks++;
        if (ci_count[m] == 0) begin
          failures++;
          $display("FAIL CI-CSKA mechanism %s never occurred", mech_e'(m));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
