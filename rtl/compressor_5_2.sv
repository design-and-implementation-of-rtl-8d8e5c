// compressor_5_2: one column of a 5:2 compressor.
//
// Adds the five column bits a1..a5 and two carry-ins from the next lower
// column:  a1 + ... + a5 + cin1 + cin2 = sum + 2*(carry + cout1 + cout2).
// cout1 and cout2 go to cin1 and cin2 of the next higher column; carry is a
// bit of the carry row. The port set is the one of the design's 5:2
// compressor symbol. The inside, three chained full adders, is this
// implementation's choice: cout1 and cout2 depend only on a1..a5, so carries
// do not ripple along a row of these cells. Purely combinational.
module compressor_5_2 (
  input  logic a1,
  input  logic a2,
  input  logic a3,
  input  logic a4,
  input  logic a5,
  input  logic cin1,
  input  logic cin2,
  output logic sum,
  output logic carry,
  output logic cout1,
  output logic cout2
);
  logic s1, s2;

  full_adder u_fa1 (.a(a1), .b(a2),   .ci(a3),   .s(s1),  .co(cout1));
  full_adder u_fa2 (.a(s1), .b(a4),   .ci(a5),   .s(s2),  .co(cout2));
  full_adder u_fa3 (.a(s2), .b(cin1), .ci(cin2), .s(sum), .co(carry));
endmodule
