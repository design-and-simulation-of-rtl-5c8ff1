// 4:2 compressor, first kind: two full adders in series.
//
// Adds four bits of one column and a carry-in from the next lower column:
//   x[1] + x[2] + x[3] + x[4] + cin = sum + 2*(carry + cout).
// The first full adder takes x[1], x[2], x[3]; its carry leaves as cout and
// its sum goes, with x[4] and cin, into the second full adder, which gives
// carry and sum. cout does not depend on cin, so a row of these compressors
// does not ripple. Critical path: four XOR delays. Combinational.
module compressor42_fa (
  input  logic [4:1] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);
  logic s1;

  full_adder u_fa1 (.a(x[1]), .b(x[2]), .ci(x[3]), .s(s1),  .co(cout));
  full_adder u_fa2 (.a(s1),   .b(x[4]), .ci(cin),  .s(sum), .co(carry));
endmodule
