// Incrementation block of a concatenation-incrementation stage.
// The stage's RCA block adds its operand slices with carry-in 0; this block
// then adds the carry that arrives from the lower stages:
//   y = x + inc (modulo 2^WIDTH),  y[i] = x[i] ^ (inc & x[i-1:0] all ones).
// The all-ones prefix is a serial AND chain (t[i] = t[i-1] & x[i-1]) that
// settles while the carry is still travelling, so the carry itself only
// passes one AND and one XOR. No carry-out: the stage carry-out comes from
// the skip gate, which gives the same value.
// Combinational. The block's purpose follows the adder's description; its
// gate structure is this design's choice.
module incrementer #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] x,
  input  logic             inc,
  output logic [WIDTH-1:0] y
);
  logic [WIDTH-1:0] t;   // t[i]: bits x[i-1:0] are all ones

  assign t[0] = 1'b1;
  for (genvar i = 1; i < WIDTH; i++) begin : g_chain
    assign t[i] = t[i-1] & x[i-1];
  end
  assign y = x ^ ({WIDTH{inc}} & t);
endmodule
