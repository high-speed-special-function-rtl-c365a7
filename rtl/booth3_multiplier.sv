// booth3_multiplier: WA x WB two's complement multiplier.
//
// Three steps, all combinational: booth3_ppgen forms ceil(WB/3) radix-8
// Booth partial products (plus the sign-template bits and one row of S
// bits), wallace_tree reduces those rows with 4:2 compressors and full
// adders to two rows, and a hybrid carry-lookahead/ripple adder adds
// them. p = a*b exactly (WA+WB bits). hm_active tells whether the 3M
// adder was switched on for this operand pair. In the special function
// unit it serves as the squarer (10 x 10) and as the two coefficient
// multipliers. The structure follows the published design; widths per
// instance are this implementation's choice.
module booth3_multiplier
  import sfu_pkg::*;
#(
  parameter int unsigned WA = 10,  // multiplicand width (signed)
  parameter int unsigned WB = 10   // multiplier width (signed), Booth-recoded
) (
  input  logic [WA-1:0]    a,
  input  logic [WB-1:0]    b,
  output logic [WA+WB-1:0] p,
  output logic             hm_active
);

  localparam int unsigned NG = booth3_groups(WB);
  localparam int unsigned W  = booth3_width(WA, WB);

  logic [W-1:0] rows [NG+1];
  logic [W-1:0] sum_row, carry_row, total;
  logic         unused_cout;

  booth3_ppgen #(.WA(WA), .WB(WB)) u_ppgen (
    .a        (a),
    .b        (b),
    .rows     (rows),
    .hm_active(hm_active)
  );

  wallace_tree #(.W(W), .N(NG + 1)) u_tree (
    .rows     (rows),
    .sum_row  (sum_row),
    .carry_row(carry_row)
  );

  hybrid_adder #(.W(W)) u_cpa (
    .a   (sum_row),
    .b   (carry_row),
    .cin (1'b0),
    .s   (total),
    .cout(unused_cout)
  );

  // the array is W >= WA+WB bits wide; the bits above the product are
  // the wrapped sign-template constants and carry no information
  assign p = total[WA+WB-1:0];

endmodule
