// Shared types and constants of the 16-point discrete Hartley transform (DHT).
//
// The transform multiplies by three constants: c1 = cos(pi/4), c2 = cos(pi/8)
// and c3 = sin(pi/8). They are carried as unsigned 8-bit fractions (value/256),
// rounded to nearest, so that one operand of every multiplier is 8 bits wide as
// in the 8-bit Urdhwa multiplier of the design. The three ways of building a
// 4:2 compressor are selected through cmp_style_e; the third (XOR-XNOR gates
// and multiplexers) is the fastest one and is the default everywhere.
package dht_pkg;

  // 4:2 compressor variants
  //   CMP_FA       : two full adders in series (simplest, slowest)
  //   CMP_XOR_MUX  : XOR gates with multiplexers on Cout and Carry
  //   CMP_XNOR_MUX : XOR-XNOR pairs feeding multiplexers only (fastest)
  typedef enum logic [1:0] {
    CMP_FA       = 2'd0,
    CMP_XOR_MUX  = 2'd1,
    CMP_XNOR_MUX = 2'd2
  } cmp_style_e;

  localparam int COEF_W = 8;            // coefficient width, fraction bits
  localparam int IN_W   = 8;            // sample width (two's complement)
  localparam int DW     = IN_W + 5;     // width of every internal value and output

  // round(cos(pi/4)*256) = round(181.02), round(cos(pi/8)*256) = round(236.52),
  // round(sin(pi/8)*256) = round(97.97)
  localparam logic [COEF_W-1:0] C1_Q8 = 8'd181;
  localparam logic [COEF_W-1:0] C2_Q8 = 8'd237;
  localparam logic [COEF_W-1:0] C3_Q8 = 8'd98;

endpackage
