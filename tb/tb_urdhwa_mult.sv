// Test of urdhwa_mult.
//  - 8 x 8 bits, every kind of 4:2 compressor: all 65536 operand pairs,
//    product compared with a * b.
//  - 13 x 8 bits (the width the 16-point DHT uses), default kind: 20000
//    random pairs plus the corner values, compared with a * b.
// Combinational; outputs sampled 1 ns after each input.
module tb_urdhwa_mult;
  import dht_pkg::*;

  logic [7:0]  a8, b;
  logic [12:0] a13;
  logic [15:0] p_fa, p_xm, p_def;
  logic [20:0] p13;
  int checks = 0, failures = 0;

  urdhwa_mult #(.STYLE(CMP_FA))      dut_fa  (.a(a8), .b, .p(p_fa));
  urdhwa_mult #(.STYLE(CMP_XOR_MUX)) dut_xm  (.a(a8), .b, .p(p_xm));
  urdhwa_mult                        dut_def (.a(a8), .b, .p(p_def));
  urdhwa_mult #(.A_W(13))            dut_13  (.a(a13), .b, .p(p13));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a8=%0d a13=%0d b=%0d: got %0d expected %0d", what, a8, a13, b, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    a13 = '0;
    for (int i = 0; i < 65536; i++) begin
      {a8, b} = 16'(i);
      #1;
      exp = int'(a8) * int'(b);
      check("fa",  int'(p_fa),  exp);
      check("xor", int'(p_xm),  exp);
      check("xnor", int'(p_def), exp);
    end
    for (int i = 0; i < 20004; i++) begin
      case (i)
        0: begin a13 = 13'h1fff; b = 8'hff; end
        1: begin a13 = 13'h1000; b = 8'h80; end
        2: begin a13 = 13'h1fff; b = 8'h01; end
        3: begin a13 = 13'h0001; b = 8'hff; end
        default: begin a13 = 13'($urandom); b = 8'($urandom); end
      endcase
      #1;
      check("a13", int'(p13), int'(a13) * int'(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
