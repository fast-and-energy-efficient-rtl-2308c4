// Constants shared by the carry skip adders and their testbenches.
// ADDER_WIDTH is the operand width of both proposed adders (32 bits, as in
// the adder's evaluation). The stage-size tables are this design's own
// choice: the variable stage sizes grow toward the middle of the adder and
// shrink toward its top, and the hybrid adder replaces the three middle
// stages (5, 6 and 5 bits) by one 16-bit Brent-Kung core stage.
package cska_pkg;
  localparam int unsigned ADDER_WIDTH = 32;

  // CI-CSKA, variable stage size (stage 0 = least significant).
  localparam int unsigned VSS_NSTAGES = 8;
  localparam int unsigned VSS_SIZES [VSS_NSTAGES] = '{2, 3, 4, 5, 6, 5, 4, 3};

  // Hybrid CSKA: CI stages below the core, the core stage, CI stages above.
  localparam int unsigned HYB_NPRE       = 3;
  localparam int unsigned HYB_PRE_SIZES  [HYB_NPRE]  = '{2, 3, 4};
  localparam int unsigned HYB_CORE_WIDTH = 16;
  localparam int unsigned HYB_NPOST      = 2;
  localparam int unsigned HYB_POST_SIZES [HYB_NPOST] = '{4, 3};
endpackage
