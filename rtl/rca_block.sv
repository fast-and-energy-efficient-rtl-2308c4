// Ripple-carry block: WIDTH full adders chained from bit 0 upward.
// It forms the first stage of a carry skip adder (fed by the adder's carry-in)
// and the concatenation part of every concatenation-incrementation stage
// (fed by a constant 0, so it works before the stage's carry arrives).
// Besides sum and carry-out it gives the block propagate p = &(a ^ b), the
// condition under which a carry entering the block leaves it unchanged.
// Combinational; delay grows linearly with WIDTH.
// The chain of full adders follows the adder's description; the propagate
// output is the usual carry-skip condition.
module rca_block #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co,
  output logic             p
);
  logic [WIDTH:0] c;

  assign c[0] = ci;
  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end
  assign co = c[WIDTH];
  assign p  = &(a ^ b);
endmodule
