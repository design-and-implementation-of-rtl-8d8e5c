// full_adder: one-bit full adder, s = a ^ b ^ ci, co = majority(a, b, ci).
// Purely combinational. The building cell of the sum recoder and of both
// compressor types.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
