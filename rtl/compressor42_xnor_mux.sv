// 4:2 compressor, third kind: XOR-XNOR gates and multiplexers only.
//
//   x[1] + x[2] + x[3] + x[4] + cin = sum + 2*(carry + cout)
// Two XOR-XNOR gates give x1^x2 and x3^x4 together with their complements.
// Every further XOR is a multiplexer that picks the true or the complemented
// signal, so no stage has to wait for an inverter:
//   t     = (x1 ^ x2) ? ~(x3 ^ x4) : (x3 ^ x4)
//   cout  = (x1 ^ x2) ? x3 : x1
//   carry = t ? cin : x4
//   sum   = t ? ~cin : cin
// The fastest and largest of the three kinds, and the default of the design.
// cout does not depend on cin. Combinational.
module compressor42_xnor_mux (
  input  logic [4:1] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);
  logic x12, x34, x34_n, t;

  // XOR-XNOR gates; only the XOR half of the x1/x2 gate is needed
  assign x12   = x[1] ^ x[2];
  assign x34   = x[3] ^ x[4];
  assign x34_n = ~x34;

  assign t     = x12 ? x34_n : x34;
  assign cout  = x12 ? x[3] : x[1];
  assign carry = t ? cin : x[4];
  assign sum   = t ? ~cin : cin;
endmodule
