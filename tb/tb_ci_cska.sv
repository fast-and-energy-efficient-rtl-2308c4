// Self-checking testbench for ci_cska. Two instances: the default variable
// stage size adder (32 bits, stages {2,3,4,5,6,5,4,3}) and a fixed stage
// size form (32 bits, eight 4-bit stages). Operands are uniform random,
// random with b near ~a (long propagate runs, so carries skip across many
// stages) and fixed corner values. {cout, sum} is compared with the 33-bit
// sum of the operands; stage_p with the propagate of each operand slice
// worked out in the testbench.
module tb_ci_cska;
  import cska_pkg::*;
  localparam int unsigned W = ADDER_WIDTH;
  localparam int unsigned FSS_SIZES [8] = '{4, 4, 4, 4, 4, 4, 4, 4};

  logic [W-1:0] a, b, sum_v, sum_f;
  logic         cin, cout_v, cout_f;
  logic [7:0]   sp_v, sp_f;
  int checks = 0, failures = 0;

  ci_cska dut_vss (.a(a), .b(b), .cin(cin), .sum(sum_v), .cout(cout_v), .stage_p(sp_v));
  ci_cska #(.NSTAGES(8), .STAGE_SIZES(FSS_SIZES)) dut_fss (
    .a(a), .b(b), .cin(cin), .sum(sum_f), .cout(cout_f), .stage_p(sp_f));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] slice_p(logic [W-1:0] x, logic [W-1:0] y,
                                         int unsigned sizes [8]);
    logic [W-1:0] pv = x ^ y;
    int unsigned lsb = 0;
    logic [7:0] r;
    for (int k = 0; k < 8; k++) begin
      r[k] = 1'b1;
      for (int unsigned i = lsb; i < lsb + sizes[k]; i++) r[k] &= pv[i];
      lsb += sizes[k];
    end
    return r;
  endfunction

  task automatic apply_and_check();
    logic [W:0] ref_sum;
    #1;
    ref_sum = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
    checks++;
    if ({cout_v, sum_v} != ref_sum || sp_v != slice_p(a, b, VSS_SIZES)) begin
      failures++;
      $display("FAIL VSS a=%h b=%h cin=%b -> %b_%h p=%b (want %h)", a, b, cin, cout_v, sum_v, sp_v, ref_sum);
    end
    checks++;
    if ({cout_f, sum_f} != ref_sum || sp_f != slice_p(a, b, FSS_SIZES)) begin
      failures++;
      $display("FAIL FSS a=%h b=%h cin=%b -> %b_%h p=%b (want %h)", a, b, cin, cout_f, sum_f, sp_f, ref_sum);
    end
  endtask

  initial begin
    // Corners: carry rippling the full width, no carry at all, maximum.
    a = '1; b = '0; cin = 1'b1; apply_and_check();
    a = '1; b = '0; cin = 1'b0; apply_and_check();
    a = '1; b = '1; cin = 1'b1; apply_and_check();
    a = '0; b = '0; cin = 1'b0; apply_and_check();
    a = 32'h8000_0000; b = 32'h8000_0000; cin = 1'b0; apply_and_check();
    a = 32'h0000_0001; b = 32'hffff_fffe; cin = 1'b1; apply_and_check();
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
