// 8-point discrete Hartley transform, combinational.
//
//   y(k) = sum_n x(n) * cas(2*pi*n*k/8),  cas(t) = cos(t) + sin(t)
// Radix-2 decimation in time: the even and the odd samples each go through a
// 4-point DHT, which needs only additions (pairs x(n), x(n+4) first, so the
// inputs are used in bit-reversed order). The 8-point outputs combine them as
//   y(k) = E(k) + cos(pi*k/4) O(k) + sin(pi*k/4) O(-k)   (indices mod 4)
// which needs two multiplications by c1 = cos(pi/4):
//   m1 = c1*(O1+O3), m2 = c1*(O1-O3)
//   y0 = E0+O0  y4 = E0-O0  y2 = E2+O2  y6 = E2-O2
//   y1 = E1+m1  y5 = E1-m1  y3 = E3+m2  y7 = E3-m2
// Outputs come in natural order. c1 is an input (8-bit fraction, normally
// dht_pkg::C1_Q8) so the multipliers are real Urdhwa multipliers. Every
// internal value and output is DW bits wide, enough for 8-bit samples.
// The 8-point length is one of the two lengths the design names (2^3 and 2^4);
// this factorisation is the standard radix-2 fast Hartley transform.
module dht8
  import dht_pkg::*;
#(
  parameter int         SAMPLE_W = IN_W,
  parameter cmp_style_e STYLE  = CMP_XNOR_MUX
) (
  input  logic signed [SAMPLE_W-1:0] x [8],
  input  logic        [7:0]        c1,
  output logic signed [DW-1:0]     y [8]
);
  typedef logic signed [DW-1:0] val_t;

  val_t e [4];   // 4-point DHT of the even samples
  val_t o [4];   // 4-point DHT of the odd samples
  val_t osum, odif, m1, m2;

  // 4-point DHT: y0=a+b+c+d, y1=a+b-c-d, y2=a-b+c-d, y3=a-b-c+d of (a,b,c,d)
  // computed as butterflies on the bit-reversed pairs (a,c) and (b,d).
  function automatic void dht4(input val_t a, input val_t b, input val_t c,
                               input val_t d, output val_t r [4]);
    val_t p, q, r2, s;
    p  = a + c;
    q  = a - c;
    r2 = b + d;
    s  = b - d;
    r[0] = p + r2;
    r[2] = p - r2;
    r[1] = q + s;
    r[3] = q - s;
  endfunction

  always_comb begin
    dht4(val_t'(x[0]), val_t'(x[2]), val_t'(x[4]), val_t'(x[6]), e);
    dht4(val_t'(x[1]), val_t'(x[3]), val_t'(x[5]), val_t'(x[7]), o);
    osum = o[1] + o[3];
    odif = o[1] - o[3];
  end

  coef_mult #(.W(DW), .STYLE(STYLE)) u_m1 (.v(osum), .c(c1), .y(m1));
  coef_mult #(.W(DW), .STYLE(STYLE)) u_m2 (.v(odif), .c(c1), .y(m2));

  always_comb begin
    y[0] = e[0] + o[0];
    y[4] = e[0] - o[0];
    y[2] = e[2] + o[2];
    y[6] = e[2] - o[2];
    y[1] = e[1] + m1;
    y[5] = e[1] - m1;
    y[3] = e[3] + m2;
    y[7] = e[3] - m2;
  end
endmodule
