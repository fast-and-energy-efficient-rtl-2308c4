// One-bit full adder: the cell from which every ripple-carry (RCA) block of
// the carry skip adders is chained.
// s = a ^ b ^ ci, co = majority(a, b, ci). Purely combinational, no clock.
// The full adder as the RCA cell follows the adder's description; the
// gate-level form (XOR pair plus AND-OR majority) is the textbook one.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;
  assign p  = a ^ b;
  assign s  = p ^ ci;
  assign co = (a & b) | (p & ci);
endmodule
