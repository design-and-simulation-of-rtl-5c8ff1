// One-bit half adder: a + b = s + 2*co. Used at the low end of the final
// carry-propagate adder of the Urdhwa multiplier. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
