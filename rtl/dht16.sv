// 16-point discrete Hartley transform of 8-bit real samples, combinational.
//
//   y(k) = sum_n data(n) * cas(2*pi*n*k/16),  cas(t) = cos(t) + sin(t)
// A fast Hartley butterfly in radix-2 decimation in time. The samples enter in
// bit-reversed order: the even samples and the odd samples each go through an
// 8-point DHT (dht8), whose first two stages are additions only and whose
// third stage multiplies by c1. The last stages combine the two halves:
//   y(k) = E(k) + cos(pi*k/8) O(k) + sin(pi*k/8) O(-k)   (indices mod 8)
// With c1 = cos(pi/4), c2 = cos(pi/8), c3 = sin(pi/8):
//   y0/y8   = E0 +- O0              y4/y12  = E4 +- O4
//   y2/y10  = E2 +- c1(O2+O6)       y6/y14  = E6 +- c1(O2-O6)
//   y1/y9   = E1 +- (c2 O1 + c3 O7) y7/y15  = E7 +- (c3 O1 - c2 O7)
//   y3/y11  = E3 +- (c3 O3 + c2 O5) y5/y13  = E5 +- (c2 O3 - c3 O5)
// Outputs come in natural order with no output permutation. Every
// multiplication (4 inside the two dht8, 10 here) is an Urdhwa multiplier with
// an 8-bit coefficient fraction; results are rounded toward zero, so an output
// differs from the exact transform by a few units (at most about 8).
//
// Interface: data[16] signed samples, c1/c2/c3 the coefficients as 8-bit
// fractions (normally dht_pkg::C1_Q8, C2_Q8, C3_Q8), y[16] signed DW-bit
// outputs. No clock: the whole transform is one combinational path.
// STYLE picks the kind of 4:2 compressor used in every multiplier.
//
// The stage order (bit-reversed inputs, two adder stages, c1, then c2/c3 on
// the odd half, a summing level and a final adder level) and the port names
// follow the published design; the coefficient format, the widths, the
// rounding and this exact radix-2 factorisation are choices of this RTL.
module dht16
  import dht_pkg::*;
#(
  parameter int         SAMPLE_W = IN_W,
  parameter cmp_style_e STYLE    = CMP_XNOR_MUX
) (
  input  logic signed [SAMPLE_W-1:0] data [16],
  input  logic        [7:0]          c1,
  input  logic        [7:0]          c2,
  input  logic        [7:0]          c3,
  output logic signed [DW-1:0]       y    [16]
);
  typedef logic signed [DW-1:0] val_t;

  logic signed [SAMPLE_W-1:0] xe [8];
  logic signed [SAMPLE_W-1:0] xo [8];
  val_t e [8];
  val_t o [8];

  always_comb begin
    for (int n = 0; n < 8; n++) begin
      xe[n] = data[2*n];
      xo[n] = data[2*n+1];
    end
  end

  dht8 #(.SAMPLE_W(SAMPLE_W), .STYLE(STYLE)) u_even (.x(xe), .c1(c1), .y(e));
  dht8 #(.SAMPLE_W(SAMPLE_W), .STYLE(STYLE)) u_odd  (.x(xo), .c1(c1), .y(o));

  // coefficient stage
  val_t s26, d26;
  val_t t2, t6;
  val_t c2o1, c3o7, c3o1, c2o7, c3o3, c2o5, c2o3, c3o5;
  val_t t1, t7, t3, t5;

  assign s26 = o[2] + o[6];
  assign d26 = o[2] - o[6];

  coef_mult #(.W(DW), .STYLE(STYLE)) u_m2  (.v(s26),  .c(c1), .y(t2));
  coef_mult #(.W(DW), .STYLE(STYLE)) u_m6  (.v(d26),  .c(c1), .y(t6));
  coef_mult #(.W(DW), .STYLE(STYLE)) u_m1c (.v(o[1]), .c(c2), .y(c2o1));
  coef_mult #(.W(DW), .STYLE(STYLE)) u_m7s (.v(o[7]), .c(c3), .y(c3o7));
  coef_mult #(.W(DW), .STYLE(STYLE)) u_m1s (.v(o[1]), .c(c3), .y(c3o1));
  coef_mult #(.W(DW), .STYLE(STYLE)) u_m7c (.v(o[7]), .c(c2), .y(c2o7));
  coef_mult #(.W(DW), .STYLE(STYLE)) u_m3s (.v(o[3]), .c(c3), .y(c3o3));
  coef_mult #(.W(DW), .STYLE(STYLE)) u_m5c (.v(o[5]), .c(c2), .y(c2o5));
  coef_mult #(.W(DW), .STYLE(STYLE)) u_m3c (.v(o[3]), .c(c2), .y(c2o3));
  coef_mult #(.W(DW), .STYLE(STYLE)) u_m5s (.v(o[5]), .c(c3), .y(c3o5));

  // summing stage after the multiplications
  assign t1 = c2o1 + c3o7;
  assign t7 = c3o1 - c2o7;
  assign t3 = c3o3 + c2o5;
  assign t5 = c2o3 - c3o5;

  // final stage: additions only
  always_comb begin
    y[0]  = e[0] + o[0];
    y[8]  = e[0] - o[0];
    y[4]  = e[4] + o[4];
    y[12] = e[4] - o[4];
    y[2]  = e[2] + t2;
    y[10] = e[2] - t2;
    y[6]  = e[6] + t6;
    y[14] = e[6] - t6;
    y[1]  = e[1] + t1;
    y[9]  = e[1] - t1;
    y[7]  = e[7] + t7;
    y[15] = e[7] - t7;
    y[3]  = e[3] + t3;
    y[11] = e[3] - t3;
    y[5]  = e[5] + t5;
    y[13] = e[5] - t5;
  end
endmodule
