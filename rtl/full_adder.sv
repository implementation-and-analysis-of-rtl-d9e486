// full_adder: a 3:2 counter. Adds three bits of equal weight; s keeps
// the weight of the inputs, c has twice that weight. Purely combinational.
// A standard cell used by the compressors and the Wallace tree.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic t;
  assign t  = a ^ b;
  assign s  = t ^ ci;
  assign co = (a & b) | (t & ci);
endmodule
