// Exhaustive test of compressor42_xnor_mux: all 32 combinations of x[1..4] and cin.
// Checks, against values computed here from the inputs:
//   the count  x1+x2+x3+x4+cin = sum + 2*(carry + cout)
//   sum   = x1^x2^x3^x4^cin
//   cout  = majority(x1, x2, x3), which does not depend on cin
//   carry = (x1^x2^x3^x4) ? cin : x4
// Combinational; outputs sampled 1 ns after each input.
module tb_compressor42_xnor_mux;
  logic [4:1] x;
  logic       cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor42_xnor_mux dut (.x, .cin, .sum, .carry, .cout);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s x=%b cin=%b: got %0d expected %0d", what, x, cin, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt, t, maj;
    for (int i = 0; i < 32; i++) begin
      {x, cin} = 5'(i);
      #1;
      cnt = int'(x[1]) + int'(x[2]) + int'(x[3]) + int'(x[4]) + int'(cin);
      t   = int'(x[1]) ^ int'(x[2]) ^ int'(x[3]) ^ int'(x[4]);
      maj = (int'(x[1]) + int'(x[2]) + int'(x[3])) >= 2 ? 1 : 0;
      check("count", int'(sum) + 2 * (int'(carry) + int'(cout)), cnt);
      check("sum",   int'(sum),   t ^ int'(cin));
      check("cout",  int'(cout),  maj);
      check("carry", int'(carry), t != 0 ? int'(cin) : int'(x[4]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
