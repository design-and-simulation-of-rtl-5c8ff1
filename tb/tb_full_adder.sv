// Exhaustive test of full_adder: all eight input combinations against
// a + b + ci = s + 2*co. Combinational; outputs sampled 1 ns after each input.
module tb_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a, .b, .ci, .s, .co);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, ci} = 3'(i);
      #1;
      checks++;
      if (int'(s) + 2 * int'(co) != int'(a) + int'(b) + int'(ci)) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b -> s=%0b co=%0b", a, b, ci, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
