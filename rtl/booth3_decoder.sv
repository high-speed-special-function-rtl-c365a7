// booth3_decoder: radix-8 (Booth-3) recoder for one multiplier group.
//
// A group is four multiplier bits {b3,b2,b1,b0}, b0 being the MSB of the
// previous group (or 0 for the first group). It stands for the digit
// d = -4*b3 + 2*b2 + b1 + b0 in {-4..4}. The decoder drives one of the
// selects M, 2M, 3M, 4M for |d| (none for d = 0) and the sign S, which is
// the group MSB itself. The selects and S feed the partial product bit
// cells; that wiring follows the published block diagram. How the
// magnitude is decoded is this implementation's own: the three low bits
// are conditionally inverted by b3 (c = b ^ b3) giving |d| = 2*c2 + c1 + c0.
// Purely combinational.
module booth3_decoder
  import sfu_pkg::*;
(
  input  logic [3:0]  grp,  // {b3, b2, b1, b0}
  output booth_sel_t  sel,  // multiple select
  output logic        s     // sign: 1 = negative multiple
);

  logic [2:0] c;

  always_comb begin
    c      = grp[2:0] ^ {3{grp[3]}};
    sel.x1 = ~c[2] & (c[1] ^ c[0]);
    sel.x2 = (c[2] & ~c[1] & ~c[0]) | (~c[2] & c[1] & c[0]);
    sel.x3 = c[2] & (c[1] ^ c[0]);
    sel.x4 = c[2] & c[1] & c[0];
    s      = grp[3];
  end

  // at most one multiple may be selected
  always_comb begin
    assert ($onehot0(sel)) else $error("booth3_decoder: more than one multiple selected");
  end

endmodule
