// sfu_pkg: types and constants shared by the special function unit.
//
// The unit evaluates f(x) = 1/(1+x) for x in [0,1) with a second-order
// piecewise polynomial C0 + C1*x + C2*x^2. The input is a 9-bit unsigned
// fraction (x = X/2^9) and the output a 13-bit unsigned fraction
// (f = Z/2^13). Coefficients are stored as fixed-point integers:
// C0*2^14 (14 bits), C1*2^18 (18 bits, always negative) and C2*2^14
// (14 bits). These widths and scalings follow the published design; the
// Booth select struct is this implementation's own encoding.
package sfu_pkg;

  localparam int unsigned N_BITS  = 9;   // input fraction bits
  localparam int unsigned M_BITS  = 7;   // MSBs of x seen by the address encoder
  localparam int unsigned Z_BITS  = 13;  // output fraction bits
  localparam int unsigned A_BITS  = 3;   // coefficient table address width
  localparam int unsigned ENTRIES = 7;   // non-uniform segments

  localparam int unsigned C0_BITS = 14;  // C0 * 2^14, unsigned
  localparam int unsigned C1_BITS = 18;  // C1 * 2^18, low bits of a negative value
  localparam int unsigned C2_BITS = 14;  // C2 * 2^14, unsigned

  // One coefficient set as read from the table.
  typedef struct packed {
    logic [C0_BITS-1:0] c0;
    logic [C1_BITS-1:0] c1;
    logic [C2_BITS-1:0] c2;
  } coeff_t;

  // One-hot (or all-zero) multiple select of a radix-8 Booth digit.
  typedef struct packed {
    logic x4;  // select 4M
    logic x3;  // select 3M (the hard multiple)
    logic x2;  // select 2M
    logic x1;  // select M
  } booth_sel_t;

  // Number of radix-8 Booth groups of a wb-bit signed multiplier.
  function automatic int booth3_groups(int wb);
    return (wb + 2) / 3;
  endfunction

  // Width of the partial product array of a wa x wb Booth-3 multiplier:
  // (wa+2)-bit partial products, shifted by 3 per group, plus the top
  // sign-template bit.
  function automatic int booth3_width(int wa, int wb);
    return wa + 2 + 3 * (booth3_groups(wb) - 1) + 1;
  endfunction

endpackage
