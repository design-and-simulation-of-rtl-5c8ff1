// Exhaustive test of half_adder: all four input combinations against
// a + b = s + 2*co. Combinational; outputs sampled 1 ns after each input.
module tb_half_adder;
  logic a, b, s, co;
  int checks = 0, failures = 0;

  half_adder dut (.a, .b, .s, .co);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (int'(s) + 2 * int'(co) != int'(a) + int'(b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> s=%0b co=%0b", a, b, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
