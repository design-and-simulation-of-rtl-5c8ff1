// 7:2 compressor built from two 4:2 compressors and a full adder.
//
// Adds the seven bits x[1..7] of one column and two carry-ins:
//   x[1] + ... + x[7] + cin1 + cin2 = sum + 2*(carry + cout1) + 4*cout2
// The first 4:2 compressor takes x[1..4] and cin1; its cout leaves as cout1.
// The second takes the first one's sum, x[5..7] and cin2 and gives sum. The
// three remaining bits of weight 2 (both compressors' carry and the second
// one's cout) go through a full adder, whose sum is carry and whose carry is
// cout2. In a row of these compressors, cout1 of column k feeds cin1 of column
// k+1 and cout2 of column k feeds cin2 of column k+2; the row then leaves one
// sum bit and one carry bit per column.
// cout1 depends on x[1..4] only. Weight 4 for cout2 is this design's choice:
// with only weight 2 for both carry-outs the nine inputs (up to 9) would not
// fit into the outputs (up to 7). STYLE selects the kind of 4:2 compressor.
// Combinational.
module compressor72
  import dht_pkg::*;
#(
  parameter cmp_style_e STYLE = CMP_XNOR_MUX
) (
  input  logic [7:1] x,
  input  logic       cin1,
  input  logic       cin2,
  output logic       sum,
  output logic       carry,
  output logic       cout1,
  output logic       cout2
);
  logic s1, c1, c2, co2;

  compressor42 #(.STYLE(STYLE)) u_c42a (
    .x(x[4:1]), .cin(cin1), .sum(s1), .carry(c1), .cout(cout1)
  );
  compressor42 #(.STYLE(STYLE)) u_c42b (
    .x({x[7:5], s1}), .cin(cin2), .sum(sum), .carry(c2), .cout(co2)
  );
  full_adder u_fa (.a(c1), .b(c2), .ci(co2), .s(carry), .co(cout2));
endmodule
