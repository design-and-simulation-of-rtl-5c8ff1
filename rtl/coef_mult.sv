// Signed sample times unsigned coefficient fraction, through the Urdhwa multiplier.
//
//   y = sign(v) * floor(|v| * c / 256)
// The coefficient c is an 8-bit fraction (c/256). The sample is split into sign
// and magnitude, the magnitude goes through the unsigned W x 8 Urdhwa
// multiplier, the 8 fraction bits are dropped and the sign is put back, so the
// result is rounded toward zero. The sign-magnitude wrapping and the rounding
// are this design's choices. Combinational.
module coef_mult
  import dht_pkg::*;
#(
  parameter int         W     = DW,
  parameter cmp_style_e STYLE = CMP_XNOR_MUX
) (
  input  logic signed [W-1:0] v,
  input  logic        [7:0]   c,
  output logic signed [W-1:0] y
);
  logic         neg;
  logic [W-1:0] mag;
  logic [W+7:0] prod;
  logic [W-1:0] q;

  assign neg = v[W-1];
  assign mag = neg ? W'(-v) : W'(v);

  urdhwa_mult #(.A_W(W), .STYLE(STYLE)) u_mult (.a(mag), .b(c), .p(prod));

  assign q = prod[W+7:8];
  assign y = neg ? -$signed(q) : $signed(q);

  // The low 8 product bits are the dropped fraction.
  logic unused_frac;
  assign unused_frac = ^prod[7:0];
endmodule
