// End-to-end test of dht16, the 16-point DHT, built three times: once with
// each kind of 4:2 compressor in its multipliers (full adders, XOR and
// multiplexer, XOR-XNOR and multiplexer; the last is the default). All three
// get the same inputs and the coefficients dht_pkg::C1_Q8, C2_Q8, C3_Q8.
// Inputs: an impulse at each of the 16 positions, all-maximum, all-minimum,
// alternating extremes, and 3000 random 8-bit vectors. Each output of each
// build is checked
//  - bit for bit against ref_dht16_fx (same fixed-point algorithm, '*'), and
//  - against the exact transform sum x(n) cas(2 pi n k/16) to within 8.
// Also counted, and a failure if never seen: a multiplier operand (odd-half
// output O1, worked out with the reference model) that is negative
// (sign-magnitude path), one that is positive, and an output at the
// full-scale value -2048. The design is combinational, so outputs are checked
// 1 ns after the inputs change (no clock, zero cycles of latency).
module tb_dht16;
  import dht_pkg::*;
  import dht_ref_pkg::*;

  localparam real TOL = 8.0;

  logic signed [IN_W-1:0] data [16];
  logic signed [DW-1:0]   y_fa [16];
  logic signed [DW-1:0]   y_xm [16];
  logic signed [DW-1:0]   y_xn [16];
  int checks = 0, failures = 0;
  int n_neg = 0, n_pos = 0, n_full = 0, n_vec = 0;
  real max_err = 0.0;

  dht16 #(.STYLE(CMP_FA))       dut_fa (.data, .c1(C1_Q8), .c2(C2_Q8), .c3(C3_Q8), .y(y_fa));
  dht16 #(.STYLE(CMP_XOR_MUX))  dut_xm (.data, .c1(C1_Q8), .c2(C2_Q8), .c3(C3_Q8), .y(y_xm));
  dht16 #(.STYLE(CMP_XNOR_MUX)) dut_xn (.data, .c1(C1_Q8), .c2(C2_Q8), .c3(C3_Q8), .y(y_xn));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(input string name, input int k, input int got,
                           input int r, input real ex);
    real err;
    checks++;
    if (got != r) begin
      failures++;
      if (failures < 20) $display("FAIL %s y[%0d]=%0d reference %0d", name, k, got, r);
    end
    err = real'(got) - ex;
    if (err < 0.0) err = -err;
    if (err > max_err) max_err = err;
    checks++;
    if (err > TOL) begin
      failures++;
      if (failures < 20) $display("FAIL %s y[%0d]=%0d exact %f", name, k, got, ex);
    end
  endtask

  task automatic run_vector(input int v [16]);
    int r [16];
    int xo [8];
    int o [8];
    int xd [];
    real ex;
    xd = new[16];
    for (int n = 0; n < 16; n++) begin
      data[n] = IN_W'(v[n]);
      xd[n]   = v[n];
    end
    #1;
    n_vec++;
    // operand of the c2/c3 multipliers on O1: output 1 of the odd-sample 8-point DHT
    for (int n = 0; n < 8; n++) xo[n] = v[2*n+1];
    ref_dht8_fx(xo, int'(C1_Q8), o);
    if (o[1] < 0) n_neg++;
    if (o[1] > 0) n_pos++;
    ref_dht16_fx(v, int'(C1_Q8), int'(C2_Q8), int'(C3_Q8), r);
    for (int k = 0; k < 16; k++) begin
      ex = exact_dht(xd, k);
      check_out("fa",   k, int'(y_fa[k]), r[k], ex);
      check_out("xor",  k, int'(y_xm[k]), r[k], ex);
      check_out("xnor", k, int'(y_xn[k]), r[k], ex);
      if (int'(y_xn[k]) == -2048) n_full++;
    end
  endtask

  initial begin
    int v [16];
    for (int i = 0; i < 16; i++) begin
      for (int n = 0; n < 16; n++) v[n] = (n == i) ? 100 : 0;
      run_vector(v);
    end
    for (int n = 0; n < 16; n++) v[n] = 127;
    run_vector(v);
    for (int n = 0; n < 16; n++) v[n] = -128;
    run_vector(v);
    for (int n = 0; n < 16; n++) v[n] = (n % 2 == 0) ? 127 : -128;
    run_vector(v);
    for (int i = 0; i < 3000; i++) begin
      for (int n = 0; n < 16; n++) v[n] = int'($signed(8'($urandom)));
      run_vector(v);
    end
    $display("vectors %0d, negative multiplier operand %0d, positive %0d, full-scale output %0d",
             n_vec, n_neg, n_pos, n_full);
    $display("largest distance from the exact transform: %f", max_err);
    checks++;
    if (n_neg == 0) begin failures++; $display("FAIL negative operand never seen"); end
    checks++;
    if (n_pos == 0) begin failures++; $display("FAIL positive operand never seen"); end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL full-scale output never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
