// hybrid_adder: W-bit hybrid carry-lookahead / carry-ripple adder.
//
// The operands are cut into 4-bit slices; each slice is a cla4 block
// (carry lookahead inside) and the carry ripples from block to block.
// This is the adder used for the final addition of every multiplier, for
// the 3M hard multiple and in the multi-operand adder. A width that is not
// a multiple of 4 is padded with zeros at the top (own choice).
// Interface: s = a + b + cin modulo 2^W, cout the carry out of bit W-1.
// Purely combinational.
module hybrid_adder #(
  parameter int unsigned W = 22
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned NB = (W + 3) / 4;  // number of 4-bit blocks
  localparam int unsigned WP = 4 * NB;       // padded width

  logic [WP-1:0] ap, bp, sp;
  logic [NB:0]   c;

  assign ap   = WP'(a);
  assign bp   = WP'(b);
  assign c[0] = cin;

  for (genvar i = 0; i < NB; i++) begin : g_blk
    cla4 u_cla4 (
      .a   (ap[4*i +: 4]),
      .b   (bp[4*i +: 4]),
      .cin (c[i]),
      .s   (sp[4*i +: 4]),
      .cout(c[i+1])
    );
  end

  // carry out of bit W-1: the block carry when W is a multiple of 4,
  // otherwise the sum bit just above the operand width in the padding
  if (WP == W) begin : g_exact
    assign cout = c[NB];
  end else begin : g_pad
    assign cout = sp[W];
  end

  assign s = sp[W-1:0];

endmodule
