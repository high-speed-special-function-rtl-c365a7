// hard_multiple: the 3M ("hard") multiple of a Booth-3 multiplier, with
// the circuit that switches its adder off when no group needs it.
//
// 3M = M + 2M is formed once per multiplier with a hybrid CLA adder on the
// multiplicand extended by two bits (WA+2 bits, enough for 3M). Per group
// of the multiplier, a Disable signal follows the published gate circuit:
// Disable = NAND(b3 XOR b2, b1 XOR b0), which is low exactly when the
// group's digit is +3 or -3. The adder is active when any group's Disable
// is low; otherwise its operands are forced to zero (operand isolation),
// so it does not toggle and m3 reads 0. Taking SEL4..SEL1 of that circuit
// as the group bits b3..b0, and sharing one adder among all groups, are
// this implementation's reading. Purely combinational.
module hard_multiple #(
  parameter int unsigned WA = 10,  // multiplicand width
  parameter int unsigned NG = 4    // Booth groups of the multiplier
) (
  input  logic [WA-1:0]   m,           // multiplicand, two's complement
  input  logic [4*NG-1:0] groups,      // group g = groups[4g+3:4g] = {b3,b2,b1,b0}
  output logic [WA+1:0]   m3,          // 3*m, WA+2 bits, zero while disabled
  output logic [NG-1:0]   grp_disable, // per group: 1 = 3M not selected
  output logic            active       // adder enabled
);

  localparam int unsigned P = WA + 2;

  logic [P-1:0] mx, op_a, op_b;
  logic         unused_cout;

  for (genvar g = 0; g < NG; g++) begin : g_dis
    assign grp_disable[g] = ~((groups[4*g+3] ^ groups[4*g+2]) &
                              (groups[4*g+1] ^ groups[4*g]));
  end

  assign active = ~&grp_disable;
  assign mx     = {{2{m[WA-1]}}, m};
  assign op_a   = mx & {P{active}};
  assign op_b   = {mx[P-2:0], 1'b0} & {P{active}};

  hybrid_adder #(.W(P)) u_add (
    .a   (op_a),
    .b   (op_b),
    .cin (1'b0),
    .s   (m3),
    .cout(unused_cout)
  );

endmodule
