// Exhaustive test of compressor72 with each kind of 4:2 compressor inside:
// all 512 combinations of x[1..7], cin1 and cin2, checked against
//   x1+...+x7+cin1+cin2 = sum + 2*(carry + cout1) + 4*cout2
// and against cout1 = majority(x1, x2, x3) (independent of both carry-ins).
// Combinational; outputs sampled 1 ns after each input.
module tb_compressor72;
  import dht_pkg::*;

  logic [7:1] x;
  logic       cin1, cin2;
  logic [2:0] sum, carry, cout1, cout2;
  int checks = 0, failures = 0;

  compressor72 #(.STYLE(CMP_FA)) dut_fa (.x, .cin1, .cin2, .sum(sum[0]), .carry(carry[0]),
                                         .cout1(cout1[0]), .cout2(cout2[0]));
  compressor72 #(.STYLE(CMP_XOR_MUX)) dut_xm (.x, .cin1, .cin2, .sum(sum[1]), .carry(carry[1]),
                                              .cout1(cout1[1]), .cout2(cout2[1]));
  compressor72 dut_def (.x, .cin1, .cin2, .sum(sum[2]), .carry(carry[2]),
                        .cout1(cout1[2]), .cout2(cout2[2]));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt, got, maj;
    for (int i = 0; i < 512; i++) begin
      {x, cin1, cin2} = 9'(i);
      #1;
      cnt = $countones({x, cin1, cin2});
      maj = (int'(x[1]) + int'(x[2]) + int'(x[3])) >= 2 ? 1 : 0;
      for (int d = 0; d < 3; d++) begin
        got = int'(sum[d]) + 2 * (int'(carry[d]) + int'(cout1[d])) + 4 * int'(cout2[d]);
        checks++;
        if (got != cnt) begin
          failures++;
          $display("FAIL style %0d x=%b cin1=%b cin2=%b: count %0d expected %0d",
                   d, x, cin1, cin2, got, cnt);
        end
        checks++;
        if (int'(cout1[d]) != maj) begin
          failures++;
          $display("FAIL style %0d x=%b: cout1=%b", d, x, cout1[d]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
