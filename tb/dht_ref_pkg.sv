// Reference models for the DHT testbenches.
//
// ref_cmul     : sign(v) * floor(|v| * c / 256), the fixed-point product the
//                hardware is meant to form, written with the '*' operator.
// ref_dht8_fx  : the 8-point fast Hartley transform with that product.
// ref_dht16_fx : the 16-point fast Hartley transform with that product.
// exact_dht    : the transform by its definition, sum x(n) cas(2 pi n k / N),
//                in floating point, with no factorisation at all.
package dht_ref_pkg;

  function automatic int ref_cmul(int v, int c);
    if (v < 0) return -(((-v) * c) / 256);
    return (v * c) / 256;
  endfunction

  function automatic void ref_dht8_fx(input int x [8], input int c1, output int y [8]);
    int e [4];
    int o [4];
    int m1, m2;
    e[0] = x[0] + x[2] + x[4] + x[6];
    e[1] = x[0] + x[2] - x[4] - x[6];
    e[2] = x[0] - x[2] + x[4] - x[6];
    e[3] = x[0] - x[2] - x[4] + x[6];
    o[0] = x[1] + x[3] + x[5] + x[7];
    o[1] = x[1] + x[3] - x[5] - x[7];
    o[2] = x[1] - x[3] + x[5] - x[7];
    o[3] = x[1] - x[3] - x[5] + x[7];
    m1 = ref_cmul(o[1] + o[3], c1);
    m2 = ref_cmul(o[1] - o[3], c1);
    y[0] = e[0] + o[0];  y[4] = e[0] - o[0];
    y[2] = e[2] + o[2];  y[6] = e[2] - o[2];
    y[1] = e[1] + m1;    y[5] = e[1] - m1;
    y[3] = e[3] + m2;    y[7] = e[3] - m2;
  endfunction

  function automatic void ref_dht16_fx(input int x [16], input int c1, input int c2,
                                       input int c3, output int y [16]);
    int xe [8];
    int xo [8];
    int e [8];
    int o [8];
    int t [8];
    for (int n = 0; n < 8; n++) begin
      xe[n] = x[2*n];
      xo[n] = x[2*n+1];
    end
    ref_dht8_fx(xe, c1, e);
    ref_dht8_fx(xo, c1, o);
    t[0] = o[0];
    t[4] = o[4];
    t[2] = ref_cmul(o[2] + o[6], c1);
    t[6] = ref_cmul(o[2] - o[6], c1);
    t[1] = ref_cmul(o[1], c2) + ref_cmul(o[7], c3);
    t[7] = ref_cmul(o[1], c3) - ref_cmul(o[7], c2);
    t[3] = ref_cmul(o[3], c3) + ref_cmul(o[5], c2);
    t[5] = ref_cmul(o[3], c2) - ref_cmul(o[5], c3);
    for (int k = 0; k < 8; k++) begin
      y[k]   = e[k] + t[k];
      y[k+8] = e[k] - t[k];
    end
  endfunction

  function automatic real exact_dht(input int x [], input int k);
    real acc, th;
    int n_pts;
    n_pts = x.size();
    acc = 0.0;
    for (int n = 0; n < n_pts; n++) begin
      th  = 2.0 * 3.14159265358979323846 * real'((n * k) % n_pts) / real'(n_pts);
      acc += real'(x[n]) * ($cos(th) + $sin(th));
    end
    return acc;
  endfunction

endpackage
