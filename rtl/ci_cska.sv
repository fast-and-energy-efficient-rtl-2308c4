// Concatenation-incrementation carry skip adder (CI-CSKA):
//   {cout, sum} = a + b + cin.
// Stage 0 is a plain ripple-carry block fed by cin. Every further stage is a
// ci_cska_stage: its RCA block adds with carry-in 0 while lower stages are
// still working, its incrementer adds the arriving carry, and a single
// compound skip gate passes the carry on. The critical path is therefore
// stage 0's ripple, one skip gate per middle stage, and the last stage's
// incrementer, instead of a multiplexer plus ripple in every stage.
// Skip gates alternate AOI (stages 1, 3, ...: true carry in, inverted out)
// and OAI (stages 2, 4, ...: inverted in, true out); cout is restored to true
// polarity at the top. stage_p gives every stage's block propagate
// (stage 0's is the propagate of its RCA block) for observation.
// Stage sizes are a parameter: STAGE_SIZES[k] is the width of stage k and
// must add up to WIDTH. The default is a variable stage size (VSS) profile;
// equal entries give the fixed stage size (FSS) form.
// Combinational, no clock. The structure follows the adder's description;
// the default stage sizes and the first-stage arrangement are this design's
// choices.
module ci_cska
  import cska_pkg::*;
#(
  parameter int unsigned WIDTH   = ADDER_WIDTH,
  parameter int unsigned NSTAGES = VSS_NSTAGES,
  parameter int unsigned STAGE_SIZES [NSTAGES] = VSS_SIZES
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic               cin,
  output logic [WIDTH-1:0]   sum,
  output logic               cout,
  output logic [NSTAGES-1:0] stage_p
);
  // Least significant bit of stage k.
  function automatic int unsigned stage_lsb(int unsigned k);
    int unsigned acc = 0;
    for (int unsigned j = 0; j < k; j++) acc += STAGE_SIZES[j];
    return acc;
  endfunction

  if (stage_lsb(NSTAGES) != WIDTH) begin : g_size_check
    $error("ci_cska: STAGE_SIZES must add up to WIDTH");
  end

  // c[k]: carry into stage k, inverted when k is even and k >= 2.
  logic [NSTAGES:0] c;

  for (genvar k = 0; k < NSTAGES; k++) begin : g_stage
    localparam int unsigned LSB = stage_lsb(k);
    localparam int unsigned W   = STAGE_SIZES[k];
    if (k == 0) begin : g_rca
      assign c[0] = cin;
      rca_block #(.WIDTH(W)) u_rca (
        .a(a[LSB +: W]), .b(b[LSB +: W]), .ci(c[0]),
        .s(sum[LSB +: W]), .co(c[1]), .p(stage_p[0])
      );
    end else begin : g_ci
      ci_cska_stage #(.WIDTH(W), .CI_INVERTED(k % 2 == 0)) u_stage (
        .a(a[LSB +: W]), .b(b[LSB +: W]), .c_in(c[k]),
        .s(sum[LSB +: W]), .c_out(c[k+1]), .p(stage_p[k])
      );
    end
  end

  // Carry out of the last stage is inverted when that stage used AOI.
  assign cout = (NSTAGES % 2 == 0) ? ~c[NSTAGES] : c[NSTAGES];
endmodule
