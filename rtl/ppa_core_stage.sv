// Core stage of the hybrid carry skip adder: a Brent-Kung parallel-prefix
// adder slice with the same carry-skip interface as a CI stage.
// The prefix network works on the operand slices alone (no carry-in), so it
// finishes while the carry is still coming up from the lower stages. The
// arriving carry then enters every bit in one step,
//   carry into bit i = G[i-1:0] | P[i-1:0] & c_in,   s[i] = p[i] ^ carry,
// and the stage carry-out is formed by the AOI/OAI skip gate from the
// block generate G[W-1:0] and block propagate P[W-1:0]. Polarity follows the
// CI stages: CI_INVERTED = 0 means true c_in, AOI gate, inverted c_out;
// CI_INVERTED = 1 means inverted c_in, OAI gate, true c_out.
// WIDTH must be a power of two. Combinational.
// A Brent-Kung based core stage with skip logic follows the adder's
// description; entering the carry after the prefix network is this design's
// reading of the modified prefix adder.
module ppa_core_stage #(
  parameter int unsigned WIDTH       = 16,
  parameter bit          CI_INVERTED = 1'b0
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c_in,
  output logic [WIDTH-1:0] s,
  output logic             c_out,
  output logic             p
);
  logic [WIDTH-1:0] gb, pb;      // bit generate / propagate
  logic [WIDTH-1:0] gg, pp;      // group signals of bits [i:0]
  logic [WIDTH-1:0] carry;       // carry into bit i
  logic             c_true;

  assign gb = a & b;
  assign pb = a ^ b;

  bk_prefix #(.WIDTH(WIDTH)) u_prefix (.g(gb), .p(pb), .gg(gg), .pp(pp));

  assign c_true = CI_INVERTED ? ~c_in : c_in;
  assign carry  = {gg[WIDTH-2:0] | (pp[WIDTH-2:0] & {(WIDTH-1){c_true}}), c_true};
  assign s      = pb ^ carry;
  assign p      = pp[WIDTH-1];

  if (CI_INVERTED) begin : g_oai
    skip_logic #(.USE_OAI(1'b1)) u_skip (.g(~gg[WIDTH-1]), .p(~p), .ci(c_in), .co(c_out));
  end else begin : g_aoi
    skip_logic #(.USE_OAI(1'b0)) u_skip (.g(gg[WIDTH-1]), .p(p), .ci(c_in), .co(c_out));
  end
endmodule
