// One-bit full adder: a + b + ci = s + 2*co.
// Building cell of the 4:2 compressor of the first kind, the 7:2 compressor and
// the final carry-propagate adder of the Urdhwa multiplier. Combinational.
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
