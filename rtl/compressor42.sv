// compressor42: 4:2 compressor, the main cell of the Wallace trees.
//
// Adds four bits a,b,c,d of one column and a carry cin from the column to
// the right: a+b+c+d+cin = sum + 2*(carry + cout). It is built from two
// full adders: the first adds a,b,c and gives cout, which does not depend
// on cin, so a row of compressors has no rippling carry; the second adds
// the first sum, d and cin. The use of 4:2 compressors follows the
// published design; the two-full-adder structure is the usual one and
// this implementation's choice. Combinational.
module compressor42 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);

  logic s1;

  full_adder u_fa1 (.a(a),  .b(b), .c(c),   .sum(s1),  .carry(cout));
  full_adder u_fa2 (.a(s1), .b(d), .c(cin), .sum(sum), .carry(carry));

endmodule
