// Hybrid carry skip adder: {cout, sum} = a + b + cin.
// It is the CI-CSKA with its middle stages replaced by one Brent-Kung core
// stage (ppa_core_stage). Stage 0 is a ripple-carry block fed by cin;
// stages 1..NPRE-1 are CI stages of PRE_SIZES[1..]; stage NPRE is the core
// stage of CORE_WIDTH bits; the last NPOST stages are CI stages of
// POST_SIZES. The core stage's prefix network runs in parallel with the
// lower stages and the carry crosses it through one skip gate, so the
// adder's critical path is shorter than that of the plain CI-CSKA of the
// same width, leaving slack that allows a lower supply voltage.
// All inter-stage skip gates alternate AOI and OAI exactly as in ci_cska;
// cout is restored to true polarity. stage_p gives each stage's block
// propagate, the core stage at index NPRE.
// Combinational, no clock. The variable-latency control that would use
// this adder's slack is not part of this module. The stage arrangement
// follows the adder's description; the stage sizes are this design's.
module hybrid_cska
  import cska_pkg::*;
#(
  parameter int unsigned WIDTH      = ADDER_WIDTH,
  parameter int unsigned NPRE       = HYB_NPRE,
  parameter int unsigned PRE_SIZES  [NPRE]  = HYB_PRE_SIZES,
  parameter int unsigned CORE_WIDTH = HYB_CORE_WIDTH,
  parameter int unsigned NPOST      = HYB_NPOST,
  parameter int unsigned POST_SIZES [NPOST] = HYB_POST_SIZES
) (
  input  logic [WIDTH-1:0]          a,
  input  logic [WIDTH-1:0]          b,
  input  logic                      cin,
  output logic [WIDTH-1:0]          sum,
  output logic                      cout,
  output logic [NPRE+NPOST:0]       stage_p
);
  localparam int unsigned NSTAGES = NPRE + 1 + NPOST;

  // Width of stage k.
  function automatic int unsigned stage_width(int unsigned k);
    if (k < NPRE)       return PRE_SIZES[k];
    else if (k == NPRE) return CORE_WIDTH;
    else                return POST_SIZES[k-NPRE-1];
  endfunction

  // Least significant bit of stage k.
  function automatic int unsigned stage_lsb(int unsigned k);
    int unsigned acc = 0;
    for (int unsigned j = 0; j < k; j++) acc += stage_width(j);
    return acc;
  endfunction

  if (stage_lsb(NSTAGES) != WIDTH || NPRE < 1) begin : g_size_check
    $error("hybrid_cska: stage sizes must add up to WIDTH, NPRE at least 1");
  end

  // c[k]: carry into stage k, inverted when k is even and k >= 2.
  logic [NSTAGES:0] c;

  for (genvar k = 0; k < NSTAGES; k++) begin : g_stage
    localparam int unsigned LSB = stage_lsb(k);
    localparam int unsigned W   = stage_width(k);
    if (k == 0) begin : g_rca
      assign c[0] = cin;
      rca_block #(.WIDTH(W)) u_rca (
        .a(a[LSB +: W]), .b(b[LSB +: W]), .ci(c[0]),
        .s(sum[LSB +: W]), .co(c[1]), .p(stage_p[0])
      );
    end else if (k == NPRE) begin : g_core
      ppa_core_stage #(.WIDTH(W), .CI_INVERTED(k % 2 == 0)) u_core (
        .a(a[LSB +: W]), .b(b[LSB +: W]), .c_in(c[k]),
        .s(sum[LSB +: W]), .c_out(c[k+1]), .p(stage_p[k])
      );
    end else begin : g_ci
      ci_cska_stage #(.WIDTH(W), .CI_INVERTED(k % 2 == 0)) u_stage (
        .a(a[LSB +: W]), .b(b[LSB +: W]), .c_in(c[k]),
        .s(sum[LSB +: W]), .c_out(c[k+1]), .p(stage_p[k])
      );
    end
  end

  assign cout = (NSTAGES % 2 == 0) ? ~c[NSTAGES] : c[NSTAGES];
endmodule
