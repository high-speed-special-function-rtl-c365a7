// address_encoder: maps the M_BITS most significant bits of x to the
// remapped address of its non-uniform segment in the coefficient table.
//
// The segments have power-of-two sizes and are sorted by size, so all
// segments of one size form a contiguous run ("class"). A class starts at
// CLASS_START (in units of 2^-M_BITS), holds segments of 2^CLASS_LOG2
// units and its first segment sits at table address CLASS_BASE. The
// address is CLASS_BASE + ((xm - CLASS_START) >> CLASS_LOG2) for the last
// class whose start xm has reached: one comparator per class, a subtract
// and a shift. The defaults are those of 1/(1+x): five segments of 16/128
// starting at 0 (addresses 0..4) and two of 32/128 starting at 80/128
// (addresses 5, 6). The segment list follows the published design; this
// comparator-based encoder is this implementation's own circuit.
// Purely combinational. Classes must be listed with ascending starts.
module address_encoder #(
  parameter int unsigned M_BITS  = 7,
  parameter int unsigned A_BITS  = 3,
  parameter int unsigned N_CLASS = 2,
  parameter int unsigned CLASS_START [N_CLASS] = '{0, 80},
  parameter int unsigned CLASS_LOG2  [N_CLASS] = '{4, 5},
  parameter int unsigned CLASS_BASE  [N_CLASS] = '{0, 5}
) (
  input  logic [M_BITS-1:0] xm,
  output logic [A_BITS-1:0] addr
);

  always_comb begin
    addr = '0;
    for (int c = 0; c < N_CLASS; c++) begin
      if (xm >= M_BITS'(CLASS_START[c])) begin
        addr = A_BITS'(CLASS_BASE[c]) +
               A_BITS'((xm - M_BITS'(CLASS_START[c])) >> CLASS_LOG2[c]);
      end
    end
  end

endmodule
