// Urdhwa Tiryakbhyam ("vertically and crosswise") multiplier, A_W x 8 bits, unsigned.
//
// Column k of the product collects every crosswise AND term a[i] & b[j] with
// i + j = k: these are the bits of the eight partial-product rows
// pp[j] = (a & b[j]) << j, read column by column. The columns are then reduced
// without carry propagation:
//   stage 1  a row of 7:2 compressors adds rows pp[1..7] in every column
//            (carry-outs chained one and two columns up) -> sum s1, carry c1
//   stage 2  a row of 4:2 compressors adds s1, c1 (one column up) and pp[0]
//            (carry-out chained one column up)           -> sum s2, carry c2
//   stage 3  a carry-propagate adder of a half adder and full adders adds
//            s2 and c2 (one column up).
// Everything is taken modulo 2^(A_W+8); the product always fits, so the
// dropped top carries are zero in sum (so the carry-outs of the top
// columns and the top bit of each carry vector are deliberately unused).
// With A_W = 8 this is the 8-bit multiplier of the design; the DHT uses a
// wider a-operand with the same eight rows. STYLE selects the kind of 4:2 compressor (also inside the 7:2
// compressors). The arrangement of compressors is this design's own.
// Combinational.
module urdhwa_mult
  import dht_pkg::*;
#(
  parameter int         A_W   = 8,
  parameter cmp_style_e STYLE = CMP_XNOR_MUX
) (
  input  logic [A_W-1:0]   a,
  input  logic [7:0]       b,
  output logic [A_W+7:0]   p
);
  localparam int B_W = 8;
  localparam int P_W = A_W + B_W;

  // partial-product rows (vertical and crosswise AND terms)
  logic [P_W-1:0] pp [B_W];
  always_comb begin
    for (int j = 0; j < B_W; j++) begin
      pp[j] = P_W'(a & {A_W{b[j]}}) << j;
    end
  end

  logic [P_W-1:0] s1, c1, s2, c2;

  for (genvar k = 0; k < P_W; k++) begin : g_col
    logic cin1, cin2, cout1, cout2;   // 7:2 carry chain
    logic cin4, cout4;                // 4:2 carry chain
    logic x2;                         // stage-2 input: c1 of the column below

    if (k == 0) begin : g_first
      assign cin1 = 1'b0;
      assign cin4 = 1'b0;
      assign x2   = 1'b0;
    end else begin : g_next
      assign cin1 = g_col[k-1].cout1;
      assign cin4 = g_col[k-1].cout4;
      assign x2   = c1[k-1];
    end
    if (k < 2) begin : g_first2
      assign cin2 = 1'b0;
    end else begin : g_next2
      assign cin2 = g_col[k-2].cout2;
    end

    compressor72 #(.STYLE(STYLE)) u_c72 (
      .x({pp[7][k], pp[6][k], pp[5][k], pp[4][k], pp[3][k], pp[2][k], pp[1][k]}),
      .cin1(cin1), .cin2(cin2),
      .sum(s1[k]), .carry(c1[k]), .cout1(cout1), .cout2(cout2)
    );

    compressor42 #(.STYLE(STYLE)) u_c42 (
      .x({1'b0, pp[0][k], x2, s1[k]}), .cin(cin4),
      .sum(s2[k]), .carry(c2[k]), .cout(cout4)
    );
  end

  // stage 3: ripple-carry adder of s2 and c2 << 1 (bit 0 needs no adder)
  assign p[0] = s2[0];
  for (genvar k = 1; k < P_W; k++) begin : g_cpa
    logic co;
    if (k == 1) begin : g_ha
      half_adder u_ha (.a(s2[k]), .b(c2[k-1]), .s(p[k]), .co(co));
    end else begin : g_fa
      full_adder u_fa (.a(s2[k]), .b(c2[k-1]), .ci(g_cpa[k-1].co), .s(p[k]), .co(co));
    end
  end
endmodule
