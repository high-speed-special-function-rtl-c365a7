// coeff_rom: coefficient table of the 1/(1+x) special function unit.
//
// Seven entries, one per non-uniform segment, each holding the truncated
// minimax coefficients of f(x) ~ C0 + C1*x + C2*x^2 with x the global
// input (not the offset inside the segment):
//   c0 = C0 * 2^14 (14 bits, unsigned),
//   c1 = C1 * 2^18 + 2^18 (18 bits; every C1 is negative and above -1, so
//        the table keeps the low 18 bits of its 19-bit two's complement
//        form and the datapath supplies the constant sign bit 1),
//   c2 = C2 * 2^14 (14 bits, unsigned).
// Segment     x range     C0             C1             C2
//   0     [0,     1/8)   0.9999389648  -0.9927825928   0.8372802734
//   1     [1/8,   1/4)   0.9963989258  -0.935333252    0.5992431640
//   2     [1/4,   3/8)   0.9868774414  -0.8586997986   0.4434814453
//   3     [3/8,   1/2)   0.9722290039  -0.7798805237   0.3374023437
//   4     [1/2,   5/8)   0.9537353516  -0.7055931091   0.2626342773
//   5     [5/8,   7/8)   0.9228515625  -0.609462738    0.1877441406
//   6     [7/8,   1  )   0.8764038086  -0.5019607544   0.1256103515
// The coefficients and widths are the published ones; the encoding of C1
// is this implementation's. Address 7 is unused and reads zero.
// Combinational read (a ROM in logic).
module coeff_rom
  import sfu_pkg::*;
(
  input  logic [A_BITS-1:0] addr,
  output coeff_t            coeff
);

  always_comb begin
    unique case (addr)
      3'd0:    coeff = '{c0: 14'd16383, c1: 18'd1892,   c2: 14'd13718};
      3'd1:    coeff = '{c0: 14'd16325, c1: 18'd16952,  c2: 14'd9818};
      3'd2:    coeff = '{c0: 14'd16169, c1: 18'd37041,  c2: 14'd7266};
      3'd3:    coeff = '{c0: 14'd15929, c1: 18'd57703,  c2: 14'd5528};
      3'd4:    coeff = '{c0: 14'd15626, c1: 18'd77177,  c2: 14'd4303};
      3'd5:    coeff = '{c0: 14'd15120, c1: 18'd102377, c2: 14'd3076};
      3'd6:    coeff = '{c0: 14'd14359, c1: 18'd130558, c2: 14'd2058};
      default: coeff = '0;
    endcase
  end

endmodule
