// Test of dht8, the 8-point DHT, with c1 = dht_pkg::C1_Q8.
// Inputs: an impulse at each position, all-maximum, all-minimum, an
// alternating pattern and 5000 random 8-bit vectors. Each output is checked
//  - bit for bit against ref_dht8_fx (same fixed-point arithmetic, written
//    with '*'), and
//  - against the exact transform sum x(n) cas(2 pi n k/8) to within 2.
// Combinational: outputs are sampled 1 ns after the inputs change.
module tb_dht8;
  import dht_pkg::*;
  import dht_ref_pkg::*;

  localparam real TOL = 2.0;

  logic signed [IN_W-1:0] x [8];
  logic signed [DW-1:0]   y [8];
  int checks = 0, failures = 0;
  real max_err = 0.0;

  dht8 dut (.x, .c1(C1_Q8), .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_vector(input int v [8]);
    int r [8];
    int xd [];
    real ex, err;
    xd = new[8];
    for (int n = 0; n < 8; n++) begin
      x[n]  = IN_W'(v[n]);
      xd[n] = v[n];
    end
    #1;
    ref_dht8_fx(v, int'(C1_Q8), r);
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (int'(y[k]) != r[k]) begin
        failures++;
        $display("FAIL y[%0d]=%0d reference %0d", k, y[k], r[k]);
      end
      ex  = exact_dht(xd, k);
      err = real'(y[k]) - ex;
      if (err < 0.0) err = -err;
      if (err > max_err) max_err = err;
      checks++;
      if (err > TOL) begin
        failures++;
        $display("FAIL y[%0d]=%0d exact %f", k, y[k], ex);
      end
    end
  endtask

  initial begin
    int v [8];
    for (int i = 0; i < 8; i++) begin
      for (int n = 0; n < 8; n++) v[n] = (n == i) ? 100 : 0;
      run_vector(v);
    end
    for (int n = 0; n < 8; n++) v[n] = 127;
    run_vector(v);
    for (int n = 0; n < 8; n++) v[n] = -128;
    run_vector(v);
    for (int n = 0; n < 8; n++) v[n] = (n % 2 == 0) ? 127 : -128;
    run_vector(v);
    for (int i = 0; i < 5000; i++) begin
      for (int n = 0; n < 8; n++) v[n] = int'($signed(8'($urandom)));
      run_vector(v);
    end
    $display("largest distance from the exact transform: %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
