// 4:2 compressor, second kind: XOR gates and multiplexers.
//
//   x[1] + x[2] + x[3] + x[4] + cin = sum + 2*(carry + cout)
// with t = x1^x2^x3^x4:
//   sum   = t ^ cin
//   cout  = (x1 ^ x2) ? x3 : x1      (a multiplexer selected by x1^x2)
//   carry = t ? cin : x4             (a multiplexer selected by t)
// The multiplexers replace the AND-OR carry logic of the full adders, and the
// select of each one is ready before its data inputs settle. cout does not
// depend on cin. Combinational.
module compressor42_xor_mux (
  input  logic [4:1] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);
  logic x12, x34, t;

  assign x12   = x[1] ^ x[2];
  assign x34   = x[3] ^ x[4];
  assign t     = x12 ^ x34;
  assign cout  = x12 ? x[3] : x[1];
  assign carry = t ? cin : x[4];
  assign sum   = t ^ cin;
endmodule
