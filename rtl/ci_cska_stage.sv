// One concatenation-incrementation (CI) stage of the carry skip adder.
//   1. An RCA block adds the operand slices with carry-in 0. It does not
//      wait for the stage carry, so all stages ripple at the same time.
//   2. An incrementation block adds the arriving carry to that sum.
//   3. An AOI or OAI skip gate forms the carry-out G | P & Cin from the RCA
//      carry-out G, the block propagate P and the arriving carry.
// The carry alternates polarity from stage to stage. CI_INVERTED = 0: c_in is
// true, the gate is AOI and c_out is inverted. CI_INVERTED = 1: c_in is
// inverted, the gate is OAI and c_out is true. Only the skip gate lies on
// the carry path from c_in to c_out.
// Combinational. The three-part stage follows the adder's description; the
// polarity scheme and the gate structure inside each part are this design's.
module ci_cska_stage #(
  parameter int unsigned WIDTH       = 4,
  parameter bit          CI_INVERTED = 1'b0
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c_in,
  output logic [WIDTH-1:0] s,
  output logic             c_out,
  output logic             p
);
  logic [WIDTH-1:0] s_rca;
  logic             g_rca;
  logic             c_true;

  rca_block #(.WIDTH(WIDTH)) u_rca (
    .a(a), .b(b), .ci(1'b0), .s(s_rca), .co(g_rca), .p(p)
  );

  assign c_true = CI_INVERTED ? ~c_in : c_in;

  incrementer #(.WIDTH(WIDTH)) u_inc (.x(s_rca), .inc(c_true), .y(s));

  if (CI_INVERTED) begin : g_oai
    skip_logic #(.USE_OAI(1'b1)) u_skip (.g(~g_rca), .p(~p), .ci(c_in), .co(c_out));
  end else begin : g_aoi
    skip_logic #(.USE_OAI(1'b0)) u_skip (.g(g_rca), .p(p), .ci(c_in), .co(c_out));
  end
endmodule
