// 4:2 compressor of a selectable kind.
//
// Instantiates one of the three 4:2 compressors according to STYLE
// (see dht_pkg::cmp_style_e); all three compute the same function
//   x[1] + x[2] + x[3] + x[4] + cin = sum + 2*(carry + cout)
// and differ only in their gates, hence in delay and area. Combinational.
module compressor42
  import dht_pkg::*;
#(
  parameter cmp_style_e STYLE = CMP_XNOR_MUX
) (
  input  logic [4:1] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);
  if (STYLE == CMP_FA) begin : g_fa
    compressor42_fa       u_c (.x, .cin, .sum, .carry, .cout);
  end else if (STYLE == CMP_XOR_MUX) begin : g_xor
    compressor42_xor_mux  u_c (.x, .cin, .sum, .carry, .cout);
  end else begin : g_xnor
    compressor42_xnor_mux u_c (.x, .cin, .sum, .carry, .cout);
  end
endmodule
