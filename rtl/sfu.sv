// sfu: special function unit for f(x) = 1/(1+x), x in [0,1).
//
// Second-order piecewise polynomial evaluation with non-uniform segments:
//   f(x) ~ C0 + C1*x + C2*x^2.
// The 7 MSBs of x go to the address encoder, which returns the remapped
// address of the segment (7 segments of 1/8 or 1/4); the coefficient ROM
// returns C0, C1, C2 for it. In parallel a 10x10 Booth-3 multiplier squares
// x. C1*x (19x10) and C2*x^2 (15x19) are two more Booth-3 multipliers, each
// with its own 4:2-compressor Wallace tree and hybrid CLA. Each of the
// three terms is truncated to 13 fractional bits and a multi-operand adder
// (Wallace tree plus hybrid CLA) adds them into the 13-bit result.
//
// Interface: x is X/2^9 (X = 0..511); z is f(x)*2^13, i.e. f = Z/2^13
// (Z = 4098..8191 over the whole input range, within 3.1*2^-13 of
// 1/(1+x)). seg_addr shows the selected table entry and hm_active, one
// bit per multiplier (squarer, C1 multiplier, C2 multiplier), whether that
// multiplier's 3M adder was switched on.
// Timing: purely combinational, one result per input with no latency in
// cycles; register the ports outside if a pipeline is needed.
// The data path, the coefficients and the input/output scaling follow the
// published design. Truncating each term to 13 fractional bits before the
// final sum, and resolving every product with its own adder, are this
// implementation's choices; they give exactly the published example
// outputs.
module sfu
  import sfu_pkg::*;
(
  input  logic [N_BITS-1:0] x,
  output logic [Z_BITS-1:0] z,
  output logic [A_BITS-1:0] seg_addr,
  output logic [2:0]        hm_active
);

  localparam int unsigned WT = Z_BITS + 2;  // width of the summed terms

  coeff_t        coeff;
  logic [19:0]   p_sq;   // x*x, 2^-18 units (10x10 signed product)
  logic [28:0]   p_c1;   // C1*x, 2^-27 units, negative
  logic [33:0]   p_c2;   // C2*x^2, 2^-32 units
  logic [WT-1:0] terms [3];
  logic [WT-1:0] total;

  address_encoder #(.M_BITS(M_BITS), .A_BITS(A_BITS)) u_enc (
    .xm  (x[N_BITS-1 -: M_BITS]),
    .addr(seg_addr)
  );

  coeff_rom u_rom (
    .addr (seg_addr),
    .coeff(coeff)
  );

  // squarer: x is unsigned, so both operands get a 0 sign bit
  booth3_multiplier #(.WA(N_BITS + 1), .WB(N_BITS + 1)) u_sq (
    .a        ({1'b0, x}),
    .b        ({1'b0, x}),
    .p        (p_sq),
    .hm_active(hm_active[0])
  );

  // C1 * x: C1 is the multiplicand with its constant sign bit restored
  booth3_multiplier #(.WA(C1_BITS + 1), .WB(N_BITS + 1)) u_c1 (
    .a        ({1'b1, coeff.c1}),
    .b        ({1'b0, x}),
    .p        (p_c1),
    .hm_active(hm_active[1])
  );

  // C2 * x^2: x^2 (18 bits, unsigned) is the Booth-recoded operand
  booth3_multiplier #(.WA(C2_BITS + 1), .WB(2 * N_BITS + 1)) u_c2 (
    .a        ({1'b0, coeff.c2}),
    .b        ({1'b0, p_sq[2*N_BITS-1:0]}),
    .p        (p_c2),
    .hm_active(hm_active[2])
  );

  // three terms, each truncated to 13 fractional bits
  assign terms[0] = WT'(coeff.c0[C0_BITS-1:1]);   // C0: 2^-14 -> 2^-13
  assign terms[1] = p_c1[28:14];                  // C1*x: 2^-27 -> 2^-13 (signed)
  assign terms[2] = p_c2[33:19];                  // C2*x^2: 2^-32 -> 2^-13

  multi_operand_adder #(.W(WT), .N(3)) u_sum (
    .ops(terms),
    .sum(total)
  );

  assign z = total[Z_BITS-1:0];

endmodule
