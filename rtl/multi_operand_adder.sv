// multi_operand_adder: adds N two's complement operands of W bits.
//
// The operands go through the same Wallace tree as the multiplier partial
// products (4:2 compressors and full adders) down to two rows, and a
// hybrid carry-lookahead/ripple adder forms the result, sum = sum of ops
// modulo 2^W. In the special function unit it adds the three polynomial
// terms C0, C1*x and C2*x^2. Reduction tree plus hybrid final adder
// follows the published design. Purely combinational.
module multi_operand_adder #(
  parameter int unsigned W = 15,
  parameter int unsigned N = 3
) (
  input  logic [W-1:0] ops [N],
  output logic [W-1:0] sum
);

  logic [W-1:0] sum_row, carry_row;
  logic         unused_cout;

  wallace_tree #(.W(W), .N(N)) u_tree (
    .rows     (ops),
    .sum_row  (sum_row),
    .carry_row(carry_row)
  );

  hybrid_adder #(.W(W)) u_cpa (
    .a   (sum_row),
    .b   (carry_row),
    .cin (1'b0),
    .s   (sum),
    .cout(unused_cout)
  );

endmodule
