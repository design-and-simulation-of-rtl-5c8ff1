// dht16 at its default parameters (8-bit samples, XOR-XNOR/multiplexer 4:2
// compressors, coefficients dht_pkg::C1_Q8, C2_Q8, C3_Q8), taken through
// complete 16-point transforms:
//  - a cosine and a sine of one cycle per 16 samples (amplitude 100), whose
//    transforms concentrate in bins 1 and 15,
//  - a constant (all energy in bin 0),
//  - 500 random 8-bit vectors.
// Every output is checked bit for bit against ref_dht16_fx and to within 8 of
// the exact transform. For the cosine the exact result is 800 in bins 1 and
// 15 and 0 elsewhere; that is checked too. Combinational: outputs sampled
// 1 ns after the inputs change.
module tb_dht16_full;
  import dht_pkg::*;
  import dht_ref_pkg::*;

  localparam real TOL = 8.0;

  logic signed [IN_W-1:0] data [16];
  logic signed [DW-1:0]   y    [16];
  int checks = 0, failures = 0;

  dht16 dut (.data, .c1(C1_Q8), .c2(C2_Q8), .c3(C3_Q8), .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_vector(input int v [16]);
    int r [16];
    int xd [];
    real ex, err;
    xd = new[16];
    for (int n = 0; n < 16; n++) begin
      data[n] = IN_W'(v[n]);
      xd[n]   = v[n];
    end
    #1;
    ref_dht16_fx(v, int'(C1_Q8), int'(C2_Q8), int'(C3_Q8), r);
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (int'(y[k]) != r[k]) begin
        failures++;
        $display("FAIL y[%0d]=%0d reference %0d", k, y[k], r[k]);
      end
      ex  = exact_dht(xd, k);
      err = real'(y[k]) - ex;
      if (err < 0.0) err = -err;
      checks++;
      if (err > TOL) begin
        failures++;
        $display("FAIL y[%0d]=%0d exact %f", k, y[k], ex);
      end
    end
  endtask

  initial begin
    int v [16];
    real pi = 3.14159265358979323846;
    // cosine: the exact DHT is 800 in bins 1 and 15
    for (int n = 0; n < 16; n++) v[n] = int'($rtoi($floor(100.0 * $cos(2.0 * pi * n / 16.0) + 0.5)));
    run_vector(v);
    for (int k = 0; k < 16; k++) begin
      checks++;
      if ((k == 1 || k == 15) ? (y[k] < 795 || y[k] > 805) : (y[k] < -5 || y[k] > 5)) begin
        failures++;
        $display("FAIL cosine bin %0d = %0d", k, y[k]);
      end
    end
    for (int n = 0; n < 16; n++) v[n] = int'($rtoi($floor(100.0 * $sin(2.0 * pi * n / 16.0) + 0.5)));
    run_vector(v);
    for (int n = 0; n < 16; n++) v[n] = 50;
    run_vector(v);
    for (int i = 0; i < 500; i++) begin
      for (int n = 0; n < 16; n++) v[n] = int'($signed(8'($urandom)));
      run_vector(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
