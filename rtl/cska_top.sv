// Top level holding the two proposed 32-bit adders side by side.
//   ci_*  : concatenation-incrementation carry skip adder, variable stage
//           sizes {2,3,4,5,6,5,4,3}.
//   hy_*  : hybrid carry skip adder, stages {2,3,4,[16-bit Brent-Kung
//           core],4,3}.
// Each adder has its own operands, carry-in, sum, carry-out and per-stage
// block propagate outputs. The hybrid adder's propagates are where a
// variable-latency controller, which would decide when a result may take a
// second cycle, would connect; that controller is not part of this design.
// Both adders are combinational: results follow the operands after the
// adders' propagation delay, with no clock or reset.
// Holding both adders follows the adder's description, which proposes both;
// keeping them independent rather than selectable is this design's choice.
module cska_top
  import cska_pkg::*;
(
  input  logic [ADDER_WIDTH-1:0]           ci_a,
  input  logic [ADDER_WIDTH-1:0]           ci_b,
  input  logic                             ci_cin,
  output logic [ADDER_WIDTH-1:0]           ci_sum,
  output logic                             ci_cout,
  output logic [VSS_NSTAGES-1:0]           ci_stage_p,
  input  logic [ADDER_WIDTH-1:0]           hy_a,
  input  logic [ADDER_WIDTH-1:0]           hy_b,
  input  logic                             hy_cin,
  output logic [ADDER_WIDTH-1:0]           hy_sum,
  output logic                             hy_cout,
  output logic [HYB_NPRE+HYB_NPOST:0]      hy_stage_p
);
  ci_cska u_ci_cska (
    .a(ci_a), .b(ci_b), .cin(ci_cin),
    .sum(ci_sum), .cout(ci_cout), .stage_p(ci_stage_p)
  );

  hybrid_cska u_hybrid (
    .a(hy_a), .b(hy_b), .cin(hy_cin),
    .sum(hy_sum), .cout(hy_cout), .stage_p(hy_stage_p)
  );
endmodule
