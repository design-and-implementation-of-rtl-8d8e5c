// compressor_4_2: one column of a 4:2 compressor.
//
// Adds the four column bits a1..a4 and the carry-in cin from the next lower
// column:  a1 + a2 + a3 + a4 + cin = sum + 2*(carry + cout).
// cout goes to the cin of the next higher column; carry is a bit of the
// carry row (weight of the next higher column). The port set is the one of
// the design's 4:2 compressor symbol. The inside, two chained full adders,
// is this implementation's choice: cout depends only on a1..a3, so carries do
// not ripple along a row of these cells. Purely combinational.
module compressor_4_2 (
  input  logic a1,
  input  logic a2,
  input  logic a3,
  input  logic a4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;

  full_adder u_fa1 (.a(a1), .b(a2), .ci(a3),  .s(s1),  .co(cout));
  full_adder u_fa2 (.a(s1), .b(a4), .ci(cin), .s(sum), .co(carry));
endmodule
