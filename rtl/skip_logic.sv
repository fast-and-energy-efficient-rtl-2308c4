// Carry-skip gate between two adder stages, a single compound gate in place
// of the 2:1 multiplexer of a conventional carry skip adder.
//   USE_OAI = 0 (AOI): inputs in true polarity,  co = ~(g | (p & ci))
//   USE_OAI = 1 (OAI): inputs in inverted form,  co = ~(g & (p | ci))
// With g the block carry-out for carry-in 0 and p the block propagate, both
// forms compute the stage carry G | P & Cin, the AOI form delivering it
// inverted and the OAI form turning an inverted carry back to true polarity.
// Stages therefore alternate AOI and OAI and the carry needs no inverter.
// Combinational. The AOI/OAI skip gate follows the adder's description; the
// alternation of polarities is this design's reading of it.
module skip_logic #(
  parameter bit USE_OAI = 1'b0
) (
  input  logic g,
  input  logic p,
  input  logic ci,
  output logic co
);
  if (USE_OAI) begin : g_oai
    assign co = ~(g & (p | ci));
  end else begin : g_aoi
    assign co = ~(g | (p & ci));
  end
endmodule
